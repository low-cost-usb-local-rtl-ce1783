// tb_cmd_engine: self-checking testbench of cmd_engine. Command bytes come
// from the host protocol package through a valid/ready stream with random
// gaps; response bytes are taken with random stalls. Accesses are answered
// by a memory model in the testbench after a random delay; address 0xDEAD
// answers with an error. Every command type is checked against the
// expected response bytes and the memory contents, together with: block
// address increment and its suppression at the reserved I2C address (with
// the first/last flags of the block), the largest block (256 words), a
// bad op code, a frame broken by a new start byte, stray payload bytes
// outside a frame, the early address of write records, and an access error that stops the rest of a command.
`timescale 1ns/1ps
module tb_cmd_engine;
  import usb_lb_pkg::*;
  import host_proto_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [7:0] rx_data, tx_data;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  acc_req_t acc_req;
  acc_rsp_t acc_rsp;
  logic [15:0] early_addr;
  logic early_valid;
  logic [15:0] early_log[$];
  always @(posedge clk) if (early_valid) early_log.push_back(early_addr);
  int checks = 0, failures = 0;
  byte_q_t to_dut, from_dut;
  logic [15:0] mem [logic [15:0]];
  typedef struct {logic we; logic [15:0] a; logic [15:0] d; logic first; logic last;} acc_t;
  acc_t log_q[$];
  int lat = 0;

  cmd_engine dut (.*);

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // byte source
  always @(posedge clk) begin
    if (rx_valid && rx_ready) void'(to_dut.pop_front());
  end
  always @(negedge clk) begin
    rx_valid = to_dut.size() > 0 && ($urandom % 4 != 0 || rx_valid);
    rx_data  = to_dut.size() > 0 ? to_dut[0] : 8'h00;
  end
  // byte sink
  always @(posedge clk) begin
    if (tx_valid && tx_ready) from_dut.push_back(tx_data);
    tx_ready <= ($urandom % 3) != 0;
  end
  // access responder
  always @(posedge clk) begin
    acc_rsp.done <= 1'b0;
    if (acc_req.valid && !acc_rsp.done) begin
      if (lat == 0) begin
        acc_rsp.done  <= 1'b1;
        acc_rsp.err   <= acc_req.addr == 16'hDEAD;
        acc_rsp.rdata <= mem.exists(acc_req.addr) ? mem[acc_req.addr] : 16'h0;
        if (acc_req.we) mem[acc_req.addr] = acc_req.wdata;
        log_q.push_back('{acc_req.we, acc_req.addr, acc_req.wdata, acc_req.first, acc_req.last});
        lat <= $urandom % 4;
      end else lat <= lat - 1;
    end
  end

  task automatic run(input byte_q_t cmd, input byte_q_t exp, input string what);
    int n = 0;
    from_dut.delete();
    log_q.delete();
    foreach (cmd[i]) to_dut.push_back(cmd[i]);
    while (from_dut.size() < exp.size() && n < 20000) begin @(posedge clk); n++; end
    repeat (30) @(posedge clk);
    check(from_dut == exp, $sformatf("%s: response %p expected %p", what, from_dut, exp));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a[$], d[$], e[$];
    byte_q_t c;
    acc_rsp = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single write and read
    run(cmd_write(16'h1234, 16'hBEEF), {status(OP_WRITE, 0, 0, 0)}, "write");
    check(mem[16'h1234] == 16'hBEEF, "write reached memory");
    run(cmd_read(16'h1234), resp(status(OP_READ, 0, 0, 0), {16'hBEEF}), "read");
    // block write / read with increment
    d = {16'h0001, 16'hC0DE, 16'hFFFF, 16'h8000};
    run(cmd_blk_write(16'h0100, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "block write");
    check(mem[16'h0100] == 16'h0001 && mem[16'h0103] == 16'h8000 && log_q.size() == 4, "block write addresses");
    run(cmd_blk_read(16'h0100, 4), resp(status(OP_BLK_READ, 0, 0, 0), d), "block read");
    // scattered
    a = {16'h0007, 16'hA000, 16'h0042}; d = {16'h1111, 16'h2222, 16'h3333};
    early_log.delete();
    run(cmd_scat_write(a, d), {status(OP_SCAT_WRITE, 0, 0, 0)}, "scattered write");
    check(early_log == a, "early addresses of the scattered write records");
    a = {16'hA000, 16'h0100, 16'h0042, 16'h1234};
    e = {16'h2222, 16'h0001, 16'h3333, 16'hBEEF};
    run(cmd_scat_read(a), resp(status(OP_SCAT_READ, 0, 0, 0), e), "scattered read");
    check(log_q.size() == 4 && log_q[0].first && log_q[0].last, "scattered records are single accesses");
    // block write to the reserved I2C address: no increment, first/last marks
    d = {16'h0052, 16'h00A5, 16'h003C};
    run(cmd_blk_write(16'hFFFF, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "I2C block");
    check(log_q.size() == 3 && log_q[0].a == 16'hFFFF && log_q[2].a == 16'hFFFF, "reserved address not incremented");
    check(log_q[0].first && !log_q[0].last && !log_q[1].first && !log_q[1].last && log_q[2].last, "first/last flags");
    // largest block
    d.delete();
    for (int i = 0; i < 256; i++) d.push_back(16'($urandom));
    run(cmd_blk_write(16'h2000, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "256-word block write");
    run(cmd_blk_read(16'h2000, 256), resp(status(OP_BLK_READ, 0, 0, 0), d), "256-word block read");
    // bad op code
    run({8'hE0}, {status(3'd6, 1, 0, 0)}, "bad op");
    // stray payload, then a read broken by a new write header
    c = {8'h11, 8'h22};
    c = {c, 8'h90, 8'h01};  // read header, one address byte
    c = {c, cmd_write(16'h0555, 16'h0666)};
    run(c, {status(OP_READ, 0, 1, 0), status(OP_WRITE, 0, 0, 0)}, "frame error");
    check(mem[16'h0555] == 16'h0666 && log_q.size() == 1, "command after frame error runs");
    // access error: rest of command skipped, missing words are 0
    a = {16'h0007, 16'hDEAD, 16'h0042};
    run(cmd_scat_read(a), resp(status(OP_SCAT_READ, 0, 0, 1), {16'h1111, 16'h0000, 16'h0000}), "bus error");
    check(log_q.size() == 2, "no access after the error");
    run(cmd_read(16'h0042), resp(status(OP_READ, 0, 0, 0), {16'h3333}), "recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
