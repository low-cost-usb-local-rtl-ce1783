// tb_usb_lb_bridge: end-to-end testbench of the whole bridge at its default
// parameters (50 MHz clock). The testbench plays the host: it queues
// command bytes in the behavioural FT2232H channel model and compares the
// bytes the bridge writes back with the expected responses. Behind the
// bridge sit a local-bus memory slave that can add wait states or hang, an
// I2C slave at address 0x52, and a JTAG target that is a 1-bit delay line.
//
// Every mechanism of the design is made to happen and counted: the six
// command types, wait states, bus timeout, the reserved I2C and JTAG
// addresses (a 13-byte I2C block, an I2C no-acknowledge and a JTAG TDO
// mismatch), a 256-word block read, a broken frame, a bad op code, a
// response held back by the bridge chip (TXE# high) and the early address
// drive (write strobes whose address was on the bus well before the
// strobe). A mechanism that never happened counts as a failure. The time
// per operation of long scattered writes and reads is measured and checked
// against the 1.3 us per operation reported for the original prototype,
// which this design must not exceed.
`timescale 1ns/1ps
module tb_usb_lb_bridge;
  import host_proto_pkg::*;
  logic clk = 0, rst_n = 1;
  logic ft_rxf_n, ft_txe_n, ft_rd_n, ft_wr_n, ft_d_oe;
  logic [7:0] ft_d_in, ft_d_out;
  logic [15:0] lb_a, lb_d_out, lb_d_in;
  logic lb_d_oe, lb_rd, lb_wr, lb_busy;
  logic i2c_scl_drive_low, i2c_sda_drive_low, slave_sda_low, scl, sda;
  logic jtag_tck, jtag_tms, jtag_tdi, jtag_tdo = 0, tdi_cap = 0;
  int checks = 0, failures = 0;

  typedef enum int {M_WRITE, M_READ, M_BLK_WRITE, M_BLK_READ, M_SCAT_WRITE, M_SCAT_READ,
                    M_WAIT_STATES, M_TIMEOUT, M_I2C, M_I2C_NACK, M_JTAG, M_JTAG_MISMATCH,
                    M_FULL_BLOCK, M_FRAME_ERR, M_BAD_OP, M_TX_HELD, M_EARLY_ADDR, M_COUNT} mech_e;
  int seen [M_COUNT];

  usb_lb_bridge dut (
    .clk, .rst_n,
    .ft_rxf_n, .ft_txe_n, .ft_rd_n, .ft_wr_n, .ft_d_in, .ft_d_out, .ft_d_oe,
    .lb_a, .lb_d_out, .lb_d_oe, .lb_d_in, .lb_rd, .lb_wr, .lb_busy,
    .i2c_scl_drive_low, .i2c_sda_drive_low, .i2c_sda_in(sda),
    .jtag_tck, .jtag_tms, .jtag_tdi, .jtag_tdo
  );

  ft245_model ft (.rxf_n(ft_rxf_n), .txe_n(ft_txe_n), .rd_n(ft_rd_n), .wr_n(ft_wr_n),
                  .d_to_fpga(ft_d_in), .d_from_fpga(ft_d_out), .d_oe(ft_d_oe));
  lb_slave_model lbs (.clk, .a(lb_a), .d_from_master(lb_d_out), .d_oe(lb_d_oe),
                      .d_to_master(lb_d_in), .rd(lb_rd), .wr(lb_wr), .busy(lb_busy));
  assign scl = !i2c_scl_drive_low;
  assign sda = !(i2c_sda_drive_low || slave_sda_low);
  i2c_slave_model #(.ADDR(7'h52)) i2cs (.scl, .sda, .sda_drive_low(slave_sda_low));
  always @(posedge jtag_tck) tdi_cap <= jtag_tdi;
  always @(negedge jtag_tck) jtag_tdo <= tdi_cap;

  always #10 clk = ~clk;  // 50 MHz

  // Early address: count write strobes whose address was already on the
  // bus at least 10 clocks before the strobe (before the record's data
  // bytes had all arrived).
  int a_stable = 0;
  logic [15:0] a_prev = 0;
  logic wr_prev = 0;
  always @(posedge clk) begin
    a_prev <= lb_a;
    wr_prev <= lb_wr;
    a_stable <= (lb_a == a_prev) ? a_stable + 1 : 0;
    if (lb_wr && !wr_prev && a_stable >= 10) seen[M_EARLY_ADDR]++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send a command, wait for the expected number of response bytes, compare.
  task automatic run(input byte_q_t cmd, input byte_q_t exp, input string what);
    realtime t0 = $realtime;
    ft.rx_from_fpga.delete();
    foreach (cmd[i]) ft.host_send(cmd[i]);
    while (ft.rx_from_fpga.size() < exp.size() && $realtime - t0 < 2ms) @(posedge clk);
    repeat (50) @(posedge clk);
    check(ft.rx_from_fpga == exp, $sformatf("%s: response %p expected %p", what, ft.rx_from_fpga, exp));
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a[$], d[$], e[$];
    byte_q_t c, x;
    realtime t0, per_op;
    int n0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    run(cmd_write(16'h0010, 16'hCAFE), {status(OP_WRITE, 0, 0, 0)}, "write");
    check(lbs.mem[16'h0010] == 16'hCAFE, "local bus write"); seen[M_WRITE]++;
    run(cmd_read(16'h0010), resp(status(OP_READ, 0, 0, 0), {16'hCAFE}), "read"); seen[M_READ]++;

    d = {16'h1000, 16'h2001, 16'h3002, 16'h4003, 16'h5004};
    run(cmd_blk_write(16'h0200, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "block write");
    check(lbs.mem[16'h0204] == 16'h5004, "block write last word"); seen[M_BLK_WRITE]++;
    run(cmd_blk_read(16'h0200, 5), resp(status(OP_BLK_READ, 0, 0, 0), d), "block read"); seen[M_BLK_READ]++;

    // scattered write: 64 records, time per operation from the WR strobes
    a.delete(); d.delete();
    for (int i = 0; i < 64; i++) begin a.push_back(16'(i * 37 + 5)); d.push_back(16'($urandom)); end
    n0 = lbs.writes;
    fork
      run(cmd_scat_write(a, d), {status(OP_SCAT_WRITE, 0, 0, 0)}, "scattered write");
      begin
        wait (lbs.writes == n0 + 1); t0 = $realtime;
        wait (lbs.writes == n0 + 64); per_op = ($realtime - t0) / 63;
      end
    join
    $display("scattered write: %0.1f ns per operation", per_op);
    check(per_op <= 1300ns, $sformatf("scattered write %0.1f ns per operation", per_op));
    check(lbs.mem[a[63]] == d[63], "scattered write data"); seen[M_SCAT_WRITE]++;

    // scattered read: 64 addresses, time from command start to end of response
    t0 = $realtime;
    run(cmd_scat_read(a), resp(status(OP_SCAT_READ, 0, 0, 0), d), "scattered read");
    $display("scattered read: %0.1f ns per operation (incl. 50-clock tail)", ($realtime - t0) / 64);
    check(($realtime - t0) / 64 <= 1300ns, "scattered read time per operation"); seen[M_SCAT_READ]++;

    // wait states
    lbs.busy_clocks = 8;
    n0 = lbs.waited;
    run(cmd_blk_read(16'h0200, 5), resp(status(OP_BLK_READ, 0, 0, 0), {16'h1000, 16'h2001, 16'h3002, 16'h4003, 16'h5004}), "read with wait states");
    check(lbs.waited == n0 + 5, "five stretched cycles"); seen[M_WAIT_STATES] += lbs.waited - n0;
    lbs.busy_clocks = 0;

    // timeout: slave hangs on the second record
    fork
      run(cmd_scat_read({16'h0010, 16'h0011, 16'h0012}),
          resp(status(OP_SCAT_READ, 0, 0, 1), {16'hCAFE, 16'h0000, 16'h0000}), "timeout");
      begin wait (lbs.reads == 1 + 5 + 64 + 5 + 1); lbs.stuck = 1; end
    join
    lbs.stuck = 0; lbs.busy = 0; seen[M_TIMEOUT]++;
    run(cmd_read(16'h0010), resp(status(OP_READ, 0, 0, 0), {16'hCAFE}), "read after timeout");

    // I2C: block write to the reserved address 0xffff, slave 0x52
    n0 = i2cs.starts + i2cs.stops;  // (the bus lines may already have moved during reset)
    // a block of 13 words: the slave address, then 12 data bytes
    d = {16'h0052};
    for (int i = 0; i < 12; i++) d.push_back(16'(8'($urandom)));
    run(cmd_blk_write(16'hFFFF, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "I2C block");
    check(i2cs.data.size() == 12, $sformatf("I2C slave got %0d bytes", i2cs.data.size()));
    for (int i = 0; i < 12; i++) check(i2cs.data[i] == d[i + 1][7:0], "I2C slave data");
    check(i2cs.starts + i2cs.stops == n0 + 2 && i2cs.starts == 1, $sformatf("I2C START/STOP %0d %0d", i2cs.starts, i2cs.stops)); seen[M_I2C]++;
    run(cmd_blk_write(16'hFFFF, {16'h0033, 16'h0001}), {status(OP_BLK_WRITE, 0, 0, 1)}, "I2C no-acknowledge");
    run(cmd_read(16'hFFFF), resp(status(OP_READ, 0, 0, 0), {16'h0002}), "I2C status after nack");
    seen[M_I2C_NACK]++;

    // JTAG: 16 cycles with checked TDO, then one wrong expectation
    c.delete(); d.delete();
    begin
      logic model_tdo = jtag_tdo;
      for (int i = 0; i < 16; i++) begin
        logic tms = 1'($urandom), tdi = 1'($urandom);
        d.push_back({12'b0, 1'b1, model_tdo, tdi, tms});
        model_tdo = tdi;
      end
      run(cmd_blk_write(16'hFFFE, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "JTAG stream");
      run(cmd_read(16'hFFFE), resp(status(OP_READ, 0, 0, 0), {{15'b0, model_tdo}}), "JTAG status clean");
      seen[M_JTAG]++;
      run(cmd_write(16'hFFFE, {12'b0, 1'b1, !model_tdo, 2'b00}), {status(OP_WRITE, 0, 0, 0)}, "JTAG wrong expectation");
      run(cmd_read(16'hFFFE), resp(status(OP_READ, 0, 0, 0), {16'h0002}), "JTAG mismatch reported");
      seen[M_JTAG_MISMATCH]++;
    end

    // 256-word block with the response held back by the bridge chip
    d.delete();
    for (int i = 0; i < 256; i++) d.push_back(16'($urandom));
    run(cmd_blk_write(16'h4000, d), {status(OP_BLK_WRITE, 0, 0, 0)}, "256-word block write");
    ft.tx_block = 1;
    fork
      run(cmd_blk_read(16'h4000, 256), resp(status(OP_BLK_READ, 0, 0, 0), d), "256-word block read");
      begin
        #30us;
        check(ft.rx_from_fpga.size() == 0, "nothing written while TXE# high");
        seen[M_TX_HELD]++;
        ft.tx_block = 0;
      end
    join
    seen[M_FULL_BLOCK]++;

    // broken frame and bad op code
    c = {8'hB0, 8'h01};  // block read header, then a new command
    c = {c, cmd_read(16'h0010)};
    x = resp(status(OP_READ, 0, 0, 0), {16'hCAFE});
    x.push_front(status(OP_BLK_READ, 0, 1, 0));
    run(c, x, "frame error"); seen[M_FRAME_ERR]++;
    run({8'hF0}, {status(3'd7, 1, 0, 0)}, "bad op"); seen[M_BAD_OP]++;

    check(ft.violations == 0, $sformatf("FT245 timing violations %0d", ft.violations));
    check(lbs.errors == 0, "local bus protocol errors");
    for (int m = 0; m < M_COUNT; m++) begin
      check(seen[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
      $display("mechanism %-16s %0d", mech_e'(m), seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
