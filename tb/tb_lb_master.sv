// tb_lb_master: self-checking testbench of lb_master against a behavioural
// memory slave. It writes and reads back random addresses, checks the
// cycle timing without wait states (strobe of STROBE clocks, done after
// SETUP + STROBE + HOLD + 1 clocks), a cycle stretched by BUSY (wait
// states), and a cycle whose slave never releases BUSY (timeout reported
// as err after TIMEOUT strobe clocks), and that an early address is put
// on the bus while idle. TIMEOUT is shortened to keep the run
// short.
`timescale 1ns/1ps
module tb_lb_master;
  import usb_lb_pkg::*;
  localparam int SETUP = 1, STROBE = 4, HOLD = 1, TIMEOUT = 60;
  logic clk = 0, rst_n = 1;
  acc_req_t req;
  acc_rsp_t rsp;
  logic [15:0] lb_a, lb_d_out, lb_d_in;
  logic lb_d_oe, lb_rd, lb_wr, lb_busy;
  logic [15:0] early_addr = 0;
  logic early_valid = 0;
  int checks = 0, failures = 0;
  int strobe_len = 0, last_strobe = 0;

  lb_master #(.SETUP(SETUP), .STROBE(STROBE), .HOLD(HOLD), .TIMEOUT(TIMEOUT)) dut (.*);
  lb_slave_model slave (.clk, .a(lb_a), .d_from_master(lb_d_out), .d_oe(lb_d_oe),
                        .d_to_master(lb_d_in), .rd(lb_rd), .wr(lb_wr), .busy(lb_busy));

  always #10 clk = ~clk;

  always @(posedge clk) begin
    if (lb_rd || lb_wr) strobe_len <= strobe_len + 1;
    else if (strobe_len != 0) begin last_strobe <= strobe_len; strobe_len <= 0; end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic we, input logic [15:0] a, input logic [15:0] d,
                        output logic [15:0] rd, output logic err, output int cycles);
    @(negedge clk);
    req = '0; req.valid = 1; req.we = we; req.addr = a; req.wdata = d; req.first = 1; req.last = 1;
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!rsp.done);
    rd = rsp.rdata; err = rsp.err;
    @(negedge clk); req.valid = 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd, addrs[$], datas[$];
    logic err;
    int cyc;
    req = '0;
    #1 rst_n = 0;  // asynchronous reset before the first clock edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      addrs.push_back(16'($urandom)); datas.push_back(16'($urandom));
      access(1, addrs[i], datas[i], rd, err, cyc);
      check(!err, "write err");
      check(cyc == SETUP + STROBE + HOLD + 1, $sformatf("write latency %0d", cyc));
      @(posedge clk);
      check(last_strobe == STROBE, $sformatf("write strobe %0d", last_strobe));
      check(slave.mem[addrs[i]] == datas[i], "slave got write data");
    end
    for (int i = 0; i < 20; i++) begin
      access(0, addrs[i], 0, rd, err, cyc);
      check(!err && rd == (slave.mem[addrs[i]]), $sformatf("read %h got %h", addrs[i], rd));
      check(cyc == SETUP + STROBE + HOLD + 1, "read latency");
    end
    // wait states: BUSY for 12 clocks stretches the strobe
    slave.busy_clocks = 12;
    access(0, addrs[0], 0, rd, err, cyc);
    @(posedge clk);
    check(!err && rd == slave.mem[addrs[0]], "read with wait states");
    check(last_strobe > STROBE + 8 && cyc > SETUP + STROBE + HOLD + 9, $sformatf("stretched strobe %0d", last_strobe));
    check(slave.waited == 1, "slave saw one stretched cycle");
    slave.busy_clocks = 0;
    // timeout: BUSY never released
    slave.stuck = 1;
    access(1, 16'h4444, 16'h5555, rd, err, cyc);
    @(posedge clk);
    check(err, "timeout reported");
    check(last_strobe == TIMEOUT, $sformatf("timeout strobe %0d", last_strobe));
    slave.stuck = 0;
    slave.busy = 0;
    repeat (3) @(posedge clk);
    access(0, addrs[1], 0, rd, err, cyc);
    check(!err && rd == datas[1], "recovered after timeout");
    // early address: taken while idle, without a strobe
    @(negedge clk); early_addr = 16'h7E57; early_valid = 1;
    @(negedge clk); early_valid = 0;
    repeat (3) @(posedge clk);
    check(lb_a == 16'h7E57 && !lb_rd && !lb_wr, "early address driven while idle");
    access(1, 16'h7E57, 16'h0BAD, rd, err, cyc);
    check(!err && slave.mem[16'h7E57] == 16'h0BAD, "write after early address");
    check(slave.errors == 0, $sformatf("bus protocol errors seen by slave: %0d", slave.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
