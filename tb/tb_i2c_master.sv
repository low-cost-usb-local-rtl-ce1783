// tb_i2c_master: self-checking testbench of i2c_master with a behavioural
// I2C slave at address 0x52 on a wired-AND bus. It sends a block (address
// word, then data bytes, last flag on the final one) and checks that the
// slave received the data, one START and one STOP; it checks SCL timing
// (4 quarters per bit, 9 bits per byte); it sends to an absent address and
// checks the no-acknowledge error, the rejection of the rest of the block
// and the sticky status read; and it checks a repeated START between two
// blocks. QUARTER is shortened to keep the run short.
`timescale 1ns/1ps
module tb_i2c_master;
  import usb_lb_pkg::*;
  localparam int Q = 4;
  logic clk = 0, rst_n = 1;
  acc_req_t req;
  acc_rsp_t rsp;
  logic scl_drive_low, sda_drive_low, slave_sda_low;
  logic scl, sda;
  int checks = 0, failures = 0, scl_rises = 0;

  assign scl = !scl_drive_low;
  assign sda = !(sda_drive_low || slave_sda_low);

  i2c_master #(.QUARTER(Q)) dut (.clk, .rst_n, .req, .rsp, .scl_drive_low, .sda_drive_low, .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h52)) slave (.scl, .sda, .sda_drive_low(slave_sda_low));

  always #10 clk = ~clk;
  always @(posedge scl) scl_rises++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic we, input logic [15:0] d, input logic first, input logic last,
                        output logic [15:0] rd, output logic err, output int cycles);
    @(negedge clk);
    req = '0; req.valid = 1; req.we = we; req.addr = 16'hFFFF; req.wdata = d;
    req.first = first; req.last = last;
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!rsp.done);
    rd = rsp.rdata; err = rsp.err;
    @(negedge clk); req.valid = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    logic err;
    int cyc, r0;
    req = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write 0xA5, 0x3C to slave 0x52
    r0 = scl_rises;
    access(1, 16'h0052, 1, 0, rd, err, cyc);
    check(!err, "address acknowledged");
    check(scl_rises - r0 == 9, $sformatf("9 SCL pulses for the address byte, got %0d", scl_rises - r0));
    check(cyc == 4 * Q + 9 * 4 * Q + 1, $sformatf("START + 9 bits + 1 = %0d clocks, got %0d", 40 * Q + 1, cyc));
    access(1, 16'h00A5, 0, 0, rd, err, cyc);
    check(!err && cyc == 9 * 4 * Q + 1, $sformatf("data byte timing %0d", cyc));
    access(1, 16'h003C, 0, 1, rd, err, cyc);
    check(!err && cyc == 9 * 4 * Q + 4 * Q + 1, "last byte with STOP");
    check(slave.data.size() == 2 && slave.data[0] == 8'hA5 && slave.data[1] == 8'h3C, "slave data");
    check(slave.starts == 1 && slave.stops == 1, "one START, one STOP");
    check(scl && sda, "bus released");
    access(0, 0, 0, 0, rd, err, cyc);
    check(rd[1:0] == 2'b00, "status: no nack, idle");
    // absent slave
    access(1, 16'h0011, 1, 0, rd, err, cyc);
    check(err, "no-acknowledge reported");
    check(slave.stops == 2, "STOP after no-acknowledge");
    access(1, 16'h0099, 0, 1, rd, err, cyc);
    check(err && cyc < 4, "rest of block rejected at once");
    check(slave.data.size() == 2, "nothing reached a slave");
    access(0, 0, 0, 0, rd, err, cyc);
    check(rd[1] == 1, "sticky nack read");
    access(0, 0, 0, 0, rd, err, cyc);
    check(rd[1] == 0, "nack cleared by read");
    // repeated START
    access(1, 16'h0052, 1, 0, rd, err, cyc);
    access(1, 16'h0011, 0, 0, rd, err, cyc);
    access(0, 0, 0, 0, rd, err, cyc);
    check(rd[0] == 1, "status: transaction open");
    access(1, 16'h0052, 1, 0, rd, err, cyc);
    check(!err && slave.starts == 4 && slave.stops == 2, "repeated START acknowledged");
    access(1, 16'h0022, 0, 1, rd, err, cyc);
    check(slave.data.size() == 4 && slave.data[2] == 8'h11 && slave.data[3] == 8'h22, "data around repeated START");
    check(slave.stops == 3, "final STOP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
