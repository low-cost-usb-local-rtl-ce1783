// lb_master: master of the parallel local bus of the developed system.
//
// The local bus has a 16-bit address, a 16-bit data bus, RD and WR strobes
// and a BUSY line with which a slow slave stretches the cycle (wait states).
// Every cycle is built from three phases:
//   setup  - address (and write data) driven, strobes inactive, SETUP clocks;
//   strobe - RD or WR active for at least STROBE clocks, and longer while the
//            synchronized BUSY is high;
//   hold   - strobe released, address and data kept for HOLD clocks.
// Between cycles the address lines keep the last address, or take the
// address announced on early_addr while the rest of a write record is still
// on its way over USB, so that address decoders settle before the cycle.
// Read data is sampled on the last strobe clock. If the strobe has been
// active for TIMEOUT clocks and BUSY is still high, the cycle is ended and
// reported as failed (err with done); the command engine turns that into
// the error bit of the status byte.
//
// Interface: one access at a time through usb_lb_pkg::acc_req_t/acc_rsp_t;
// done is a one-cycle pulse in the last hold clock.
//
// The bus signals, the wait states, the timeout and driving the address
// as soon as it is known follow the published design; the
// strobe polarity (active high), the phase lengths, the timeout length and
// the BUSY synchronizer are this design's choice. BUSY passes through two
// flops, so a slave must raise it within STROBE-2 clocks of the strobe.
// The data bus is split into d_out, d_oe and d_in; the tri-state buffer sits
// in the pad ring.
module lb_master
  import usb_lb_pkg::*;
#(
  parameter int unsigned SETUP   = 1,
  parameter int unsigned STROBE  = 4,
  parameter int unsigned HOLD    = 1,
  parameter int unsigned TIMEOUT = 1000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  acc_req_t      req,
  output acc_rsp_t      rsp,
  // address announced before its access (pair records), driven while idle
  input  logic [AW-1:0] early_addr,
  input  logic          early_valid,
  // local bus pins
  output logic [AW-1:0] lb_a,
  output logic [DW-1:0] lb_d_out,
  output logic          lb_d_oe,
  input  logic [DW-1:0] lb_d_in,
  output logic          lb_rd,
  output logic          lb_wr,
  input  logic          lb_busy
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD} state_e;

  state_e      state;
  logic [15:0] cnt;       // clocks left in setup/hold
  logic [15:0] scnt;      // clocks the strobe has been active
  logic [1:0]  busy_sync;
  logic        busy_s;
  logic        err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else        busy_sync <= {busy_sync[0], lb_busy};
  end
  assign busy_s = busy_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      scnt      <= '0;
      lb_a      <= '0;
      lb_d_out  <= '0;
      lb_d_oe   <= 1'b0;
      lb_rd     <= 1'b0;
      lb_wr     <= 1'b0;
      err_q     <= 1'b0;
      rsp       <= '0;
    end else begin
      rsp.done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (req.valid && !rsp.done) begin
            lb_a     <= req.addr;
            lb_d_out <= req.wdata;
            lb_d_oe  <= req.we;
            err_q    <= 1'b0;
            cnt      <= 16'(SETUP);
            state    <= S_SETUP;
          end else if (early_valid) begin
            lb_a <= early_addr;
          end
        end
        S_SETUP: begin
          if (cnt <= 1) begin
            lb_rd <= !req.we;
            lb_wr <= req.we;
            scnt  <= 16'd1;
            state <= S_STROBE;
          end else cnt <= cnt - 1'b1;
        end
        S_STROBE: begin
          if (scnt >= 16'(STROBE) && (!busy_s || scnt >= 16'(TIMEOUT))) begin
            rsp.rdata <= lb_d_in;
            err_q     <= busy_s;
            lb_rd     <= 1'b0;
            lb_wr     <= 1'b0;
            cnt       <= 16'(HOLD);
            state     <= S_HOLD;
          end else scnt <= scnt + 1'b1;
        end
        S_HOLD: begin
          if (cnt <= 1) begin
            lb_d_oe  <= 1'b0;
            rsp.done <= 1'b1;
            rsp.err  <= err_q;
            state    <= S_IDLE;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(lb_rd && lb_wr));
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 state != S_IDLE |-> req.valid && $stable(req.addr));

endmodule
