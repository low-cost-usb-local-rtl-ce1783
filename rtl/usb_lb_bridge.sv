// usb_lb_bridge: USB to local bus bridge, the interface FPGA.
//
// A PC or embedded PC controls the parallel local bus of an FPGA based
// system through a USB bridge chip (FT2232H). Channel A of the chip runs in
// FT245 asynchronous FIFO mode and is seen by this FPGA as a pair of byte
// FIFOs; channel B (MPSSE-JTAG) configures this FPGA and needs no logic here.
// The bridge executes framed commands from the host - single, block and
// scattered reads and writes - on the 16-bit local bus (16-bit address,
// 16-bit data, RD, WR, BUSY), and on an I2C master and a JTAG master that sit
// at reserved addresses. Every command is answered with a status byte,
// followed by the read data of read commands.
//
// Structure:
//   ft245_async_if  FT2232H channel A pins  <-> byte streams
//   cmd_engine      byte streams <-> accesses (framing, commands, status),
//                   with rdata_buffer for read data
//   target_mux      access -> local bus / I2C / JTAG by address
//   lb_master       local bus cycles with wait states and timeout; it also
//                   drives the address of a write record early, as soon as
//                   cmd_engine has received it (early_addr)
//   i2c_master      I2C write transactions
//   jtag_shifter    one TCK cycle per written byte, TDO verification
//
// The partition follows the published block diagram (command and data FIFO
// on channel A, local bus, I2C, JTAG); the internal access handshake that
// ties the blocks together is this design's own.
//
// All logic runs on one clock, clk (50 MHz assumed by the timing defaults);
// rst_n is an asynchronous active-low reset. Tri-state buses (FT2232H data,
// local bus data) are brought out as separate in, out and output-enable
// signals; I2C lines are brought out as open-drain "drive low" controls.
module usb_lb_bridge
  import usb_lb_pkg::*;
#(
  parameter int unsigned   FT_RD_LOW   = 3,
  parameter int unsigned   FT_RD_HIGH  = 3,
  parameter int unsigned   FT_WR_LOW   = 2,
  parameter int unsigned   FT_WR_HIGH  = 3,
  parameter int unsigned   LB_SETUP    = 1,
  parameter int unsigned   LB_STROBE   = 4,
  parameter int unsigned   LB_HOLD     = 1,
  parameter int unsigned   LB_TIMEOUT  = 1000,
  parameter int unsigned   I2C_QUARTER = 125,
  parameter int unsigned   JTAG_HALF   = 2,
  parameter logic [AW-1:0] I2C_ADDR    = 16'hFFFF,
  parameter logic [AW-1:0] JTAG_ADDR   = 16'hFFFE,
  parameter int unsigned   BUF_DEPTH   = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  // FT2232H channel A, FT245 asynchronous FIFO mode
  input  logic          ft_rxf_n,
  input  logic          ft_txe_n,
  output logic          ft_rd_n,
  output logic          ft_wr_n,
  input  logic [7:0]    ft_d_in,
  output logic [7:0]    ft_d_out,
  output logic          ft_d_oe,
  // local bus
  output logic [AW-1:0] lb_a,
  output logic [DW-1:0] lb_d_out,
  output logic          lb_d_oe,
  input  logic [DW-1:0] lb_d_in,
  output logic          lb_rd,
  output logic          lb_wr,
  input  logic          lb_busy,
  // I2C (open drain)
  output logic          i2c_scl_drive_low,
  output logic          i2c_sda_drive_low,
  input  logic          i2c_sda_in,
  // JTAG of the developed system
  output logic          jtag_tck,
  output logic          jtag_tms,
  output logic          jtag_tdi,
  input  logic          jtag_tdo
);

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ready, tx_valid, tx_ready;
  acc_req_t   acc_req, lb_req, i2c_req, jtag_req;
  acc_rsp_t   acc_rsp, lb_rsp, i2c_rsp, jtag_rsp;
  logic [AW-1:0] early_addr;
  logic          early_valid;

  ft245_async_if #(
    .RD_LOW (FT_RD_LOW), .RD_HIGH (FT_RD_HIGH),
    .WR_LOW (FT_WR_LOW), .WR_HIGH (FT_WR_HIGH)
  ) u_ft (
    .clk, .rst_n,
    .ft_rxf_n, .ft_txe_n, .ft_rd_n, .ft_wr_n, .ft_d_in, .ft_d_out, .ft_d_oe,
    .rx_data, .rx_valid, .rx_ready,
    .tx_data, .tx_valid, .tx_ready
  );

  cmd_engine #(
    .I2C_ADDR (I2C_ADDR), .JTAG_ADDR (JTAG_ADDR), .BUF_DEPTH (BUF_DEPTH)
  ) u_cmd (
    .clk, .rst_n,
    .rx_data, .rx_valid, .rx_ready,
    .tx_data, .tx_valid, .tx_ready,
    .acc_req, .acc_rsp, .early_addr, .early_valid
  );

  target_mux #(.I2C_ADDR (I2C_ADDR), .JTAG_ADDR (JTAG_ADDR)) u_mux (
    .req (acc_req), .rsp (acc_rsp),
    .lb_req, .lb_rsp, .i2c_req, .i2c_rsp, .jtag_req, .jtag_rsp
  );

  lb_master #(
    .SETUP (LB_SETUP), .STROBE (LB_STROBE), .HOLD (LB_HOLD), .TIMEOUT (LB_TIMEOUT)
  ) u_lb (
    .clk, .rst_n, .req (lb_req), .rsp (lb_rsp), .early_addr, .early_valid,
    .lb_a, .lb_d_out, .lb_d_oe, .lb_d_in, .lb_rd, .lb_wr, .lb_busy
  );

  i2c_master #(.QUARTER (I2C_QUARTER)) u_i2c (
    .clk, .rst_n, .req (i2c_req), .rsp (i2c_rsp),
    .scl_drive_low (i2c_scl_drive_low),
    .sda_drive_low (i2c_sda_drive_low),
    .sda_in        (i2c_sda_in)
  );

  jtag_shifter #(.HALF (JTAG_HALF)) u_jtag (
    .clk, .rst_n, .req (jtag_req), .rsp (jtag_rsp),
    .tck (jtag_tck), .tms (jtag_tms), .tdi (jtag_tdi), .tdo (jtag_tdo)
  );

endmodule
