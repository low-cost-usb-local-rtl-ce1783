// jtag_shifter: JTAG master for the boards of the developed system, reached
// through a reserved local-bus address.
//
// One written byte is one TCK cycle. Bits of the written word:
//   bit 0  TMS value
//   bit 1  TDI value
//   bit 2  expected TDO value
//   bit 3  check TDO against bit 2 in this cycle
// The shifter sets TMS and TDI, waits HALF clocks with TCK low, samples TDO
// (the target changed it on the previous falling TCK edge), compares it
// when asked, raises TCK for HALF clocks and lowers it again; the access is
// done when TCK is back low. A mismatch sets a sticky error flag. Reading
// the address returns {14'b0, mismatch, tdo}: the present TDO level and
// whether TDO was wrong in any checked cycle since the previous read; the
// read clears the flag. This is what an SVF player needs to run a file
// with expected TDO values without reading back every bit.
//
// The byte's meaning (set TMS/TDI, verify TDO if requested, pulse TCK) and
// the read-back follow the published design; the bit positions and the TCK timing
// are this design's choice. A block write to the address streams cycles.
module jtag_shifter
  import usb_lb_pkg::*;
#(
  parameter int unsigned HALF = 2   // clocks per TCK half period
) (
  input  logic     clk,
  input  logic     rst_n,
  input  acc_req_t req,
  output acc_rsp_t rsp,
  output logic     tck,
  output logic     tms,
  output logic     tdi,
  input  logic     tdo
);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_e;

  state_e      state;
  logic [15:0] cnt;
  logic        tdo_q;
  logic        check, expect_tdo;
  logic        mismatch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tdo_q <= 1'b0;
    else        tdo_q <= tdo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      tck        <= 1'b0;
      tms        <= 1'b1;
      tdi        <= 1'b1;
      check      <= 1'b0;
      expect_tdo <= 1'b0;
      mismatch   <= 1'b0;
      rsp        <= '0;
    end else begin
      rsp.done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (req.valid && !rsp.done) begin
            if (req.we) begin
              tms        <= req.wdata[0];
              tdi        <= req.wdata[1];
              expect_tdo <= req.wdata[2];
              check      <= req.wdata[3];
              cnt        <= 16'(HALF);
              state      <= S_LOW;
            end else begin
              rsp.rdata <= {14'b0, mismatch, tdo_q};
              rsp.err   <= 1'b0;
              rsp.done  <= 1'b1;
              mismatch  <= 1'b0;
            end
          end
        end
        S_LOW: begin
          if (cnt <= 1) begin
            if (check && tdo_q != expect_tdo) mismatch <= 1'b1;
            tck   <= 1'b1;
            cnt   <= 16'(HALF);
            state <= S_HIGH;
          end else cnt <= cnt - 1'b1;
        end
        S_HIGH: begin
          if (cnt <= 1) begin
            tck      <= 1'b0;
            rsp.err  <= 1'b0;
            rsp.done <= 1'b1;
            state    <= S_IDLE;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
