// lb_slave_model: behavioural local-bus slave for the testbenches: a 64k x
// 16 memory that answers RD and WR strobes and can stretch cycles with
// BUSY. Not synthesizable.
//
// When busy_clocks is non-zero the slave raises BUSY one clock after a
// strobe starts and holds it for busy_clocks clocks (wait states); when
// stuck is set BUSY stays high for ever (a missing slave, for timeouts).
// Writes land in mem when WR falls; read data is driven while RD is high.
// The model counts strobes, cycles that saw BUSY, and address changes
// during a strobe (which are protocol errors).
`timescale 1ns/1ps
module lb_slave_model (
  input  logic        clk,
  input  logic [15:0] a,
  input  logic [15:0] d_from_master,
  input  logic        d_oe,
  output logic [15:0] d_to_master,
  input  logic        rd,
  input  logic        wr,
  output logic        busy
);

  logic [15:0] mem [logic [15:0]];
  int unsigned busy_clocks = 0;
  logic        stuck = 1'b0;
  int          writes = 0, reads = 0, waited = 0, errors = 0;
  int unsigned bcnt = 0;
  logic        rd_q = 1'b0, wr_q = 1'b0;
  logic [15:0] a_q = '0;

  initial busy = 1'b0;

  always_comb d_to_master = (rd && mem.exists(a)) ? mem[a] : 16'h0000;

  always @(posedge clk) begin
    rd_q <= rd;
    wr_q <= wr;
    a_q  <= a;
    if ((rd || wr) && (rd_q || wr_q) && a != a_q) begin errors++; $display("lb slave: address changed during strobe"); end
    if (rd && wr) begin errors++; $display("lb slave: RD and WR together"); end
    if (wr && !d_oe) begin errors++; $display("lb slave: write without data"); end
    if ((rd && !rd_q) || (wr && !wr_q)) begin
      if (stuck) busy <= 1'b1;
      else if (busy_clocks > 0) begin
        busy <= 1'b1;
        bcnt <= busy_clocks;
        waited++;
      end
    end else if (busy && !stuck) begin
      if (bcnt <= 1) busy <= 1'b0;
      bcnt <= bcnt - 1;
    end
    if (!stuck && !(rd || wr) && busy && bcnt == 0) busy <= 1'b0;
    if (!rd && rd_q) reads++;
    if (!wr && wr_q) begin
      mem[a] = d_from_master;
      writes++;
    end
  end

endmodule
