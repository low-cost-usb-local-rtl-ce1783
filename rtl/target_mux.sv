// target_mux: address decoder that splits the access stream of the command
// engine between the local bus and the interfaces behind reserved addresses.
//
// Instead of new command codes for every extra interface, single addresses
// at the top of the local-bus address space are reserved: I2C_ADDR for the
// I2C master and JTAG_ADDR for the JTAG shifter. Every other address goes to
// the local bus master. The request is passed only to the selected target,
// and the response of the selected target is returned; the selection is
// combinational and follows the address, which the requester holds stable
// until done.
//
// The idea of reserved addresses follows the published design, whose example puts
// I2C at the top address 0x3fff of a 14-bit space. With the 16-bit bus used
// here the defaults are the top address 0xffff for I2C and the next one
// down, 0xfffe, for JTAG; the JTAG value is this design's choice.
module target_mux
  import usb_lb_pkg::*;
#(
  parameter logic [AW-1:0] I2C_ADDR  = 16'hFFFF,
  parameter logic [AW-1:0] JTAG_ADDR = 16'hFFFE
) (
  input  acc_req_t req,
  output acc_rsp_t rsp,
  output acc_req_t lb_req,
  input  acc_rsp_t lb_rsp,
  output acc_req_t i2c_req,
  input  acc_rsp_t i2c_rsp,
  output acc_req_t jtag_req,
  input  acc_rsp_t jtag_rsp
);

  typedef enum logic [1:0] {T_LB, T_I2C, T_JTAG} target_e;
  target_e sel;

  always_comb begin
    if (req.addr == I2C_ADDR)       sel = T_I2C;
    else if (req.addr == JTAG_ADDR) sel = T_JTAG;
    else                            sel = T_LB;

    lb_req         = req;
    i2c_req        = req;
    jtag_req       = req;
    lb_req.valid   = req.valid && sel == T_LB;
    i2c_req.valid  = req.valid && sel == T_I2C;
    jtag_req.valid = req.valid && sel == T_JTAG;

    case (sel)
      T_I2C:   rsp = i2c_rsp;
      T_JTAG:  rsp = jtag_rsp;
      default: rsp = lb_rsp;
    endcase
  end

endmodule
