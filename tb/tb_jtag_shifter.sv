// tb_jtag_shifter: self-checking testbench of jtag_shifter. The JTAG target
// is a 1-bit delay line: on every falling TCK edge TDO takes the TDI value
// of the preceding rising edge. The testbench writes random TMS/TDI bytes
// with the expected TDO computed from that model and checking enabled,
// verifies TMS/TDI at each rising TCK and the number of TCK pulses, reads
// back the status (no mismatch), then writes one wrong expectation and
// checks that the sticky mismatch flag is reported once and then cleared.
`timescale 1ns/1ps
module tb_jtag_shifter;
  import usb_lb_pkg::*;
  localparam int HALF = 2;
  logic clk = 0, rst_n = 1;
  acc_req_t req;
  acc_rsp_t rsp;
  logic tck, tms, tdi, tdo = 0;
  logic tdi_cap = 0;
  int checks = 0, failures = 0, pulses = 0;
  logic exp_tms, exp_tdi;

  jtag_shifter #(.HALF(HALF)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge tck) begin
    pulses++; tdi_cap <= tdi;
    checks++;
    if (tms !== exp_tms || tdi !== exp_tdi) begin failures++; $display("FAIL: TMS/TDI at TCK"); end
  end
  always @(negedge tck) tdo <= tdi_cap;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic we, input logic [15:0] d, output logic [15:0] rd);
    @(negedge clk);
    req = '0; req.valid = 1; req.we = we; req.addr = 16'hFFFE; req.wdata = d;
    do @(posedge clk); while (!rsp.done);
    #1 rd = rsp.rdata;
    @(negedge clk); req.valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    logic model_tdo;
    req = '0; exp_tms = 1; exp_tdi = 1;
    #1 rst_n = 0;  // asynchronous reset before the first clock edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    model_tdo = 0;
    for (int i = 0; i < 40; i++) begin
      exp_tms = 1'($urandom); exp_tdi = 1'($urandom);
      // TDO seen before this pulse is the TDI of the previous pulse
      access(1, {12'b0, 1'b1, model_tdo, exp_tdi, exp_tms}, rd);
      model_tdo = exp_tdi;
    end
    check(pulses == 40, $sformatf("TCK pulses %0d", pulses));
    access(0, 0, rd);
    check(rd[1] == 0, "no mismatch after correct expectations");
    check(rd[0] == model_tdo, "TDO level read back");
    exp_tms = 0; exp_tdi = 0;
    access(1, {12'b0, 1'b1, !model_tdo, 1'b0, 1'b0}, rd);
    model_tdo = 0;
    access(1, {12'b0, 1'b0, 1'b1, 1'b0, 1'b0}, rd);  // unchecked, wrong: ignored
    access(0, 0, rd);
    check(rd[1] == 1, "mismatch reported");
    access(0, 0, rd);
    check(rd[1] == 0, "mismatch cleared by read");
    check(pulses == 42, "TCK pulses after all writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
