// tb_rdata_buffer: self-checking testbench of rdata_buffer at its default
// depth (256 x 16). Random pushes and pops are compared with a queue
// reference; the buffer is then filled to its depth, checked full, and
// cleared. A watchdog ends the run if it stalls.
`timescale 1ns/1ps
module tb_rdata_buffer;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 1;
  logic clear = 0, push = 0, pop = 0;
  logic [15:0] wdata = 0, rdata;
  logic empty, full;
  logic [8:0] count;
  int checks = 0, failures = 0;
  logic [15:0] ref_q[$];

  rdata_buffer dut (.*);

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;  // asynchronous reset before the first clock edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      push  = ($urandom % 2) && ref_q.size() < DEPTH;
      pop   = ($urandom % 3 == 0) && ref_q.size() > 0;
      wdata = 16'($urandom);
      if (pop) check(rdata == ref_q[0], $sformatf("pop data %h vs %h", rdata, ref_q[0]));
      @(posedge clk);
      #1;
      if (pop) void'(ref_q.pop_front());
      if (push) ref_q.push_back(wdata);
      check(count == 9'(ref_q.size()), "count");
      check(empty == (ref_q.size() == 0), "empty flag");
    end
    @(negedge clk);
    pop = 0;
    while (ref_q.size() < DEPTH) begin
      push = 1; wdata = 16'($urandom);
      @(posedge clk); #1;
      ref_q.push_back(wdata);
      @(negedge clk);
    end
    push = 0;
    check(full && count == 9'(DEPTH), "full at depth");
    for (int i = 0; i < DEPTH; i++) begin
      check(rdata == ref_q[i], "drain order");
      pop = 1; @(posedge clk); #1; @(negedge clk);
    end
    pop = 0;
    check(empty, "empty after drain");
    push = 1; wdata = 16'h1234; @(posedge clk); #1; @(negedge clk);
    push = 0; clear = 1; @(posedge clk); #1; @(negedge clk); clear = 0;
    check(empty && count == 0, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
