// rdata_buffer: first-in first-out store for the read data of one command.
//
// Every command is answered with a status byte that comes before any read
// data, and the status is known only when the last access of the command
// has finished. The words read by a block or scattered read therefore wait
// here until the status byte has gone out. The depth default is the largest
// block length of the protocol, 256 words of 16 bits, so one command can
// never overflow it. The status-before-data order and the block length
// follow the published design; holding the data in a FIFO is this design's
// way of meeting that order.
//
// Interface: push/wdata write a word, pop removes the word shown on rdata
// (show-ahead: rdata is the oldest word whenever empty is low), clear
// empties the buffer in one clock (used when a command is abandoned).
// Pushing into a full buffer or popping an empty one is ignored and
// flagged by an assertion.
module rdata_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[rptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full)  wptr <= inc(wptr);
      if (pop && !empty)  rptr <= inc(rptr);
      case ({push && !full, pop && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !clear));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !clear));

endmodule
