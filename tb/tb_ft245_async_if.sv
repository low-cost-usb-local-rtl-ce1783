// tb_ft245_async_if: self-checking testbench of ft245_async_if with the
// behavioural FT2232H channel model. The host sends random bytes while the
// FPGA side takes them with random stalls and at the same time writes
// random bytes back; the testbench checks both byte streams, that the model
// saw no cycle shorter than 80 ns (read) or 50 ns (write) and no bus
// conflict, the cycle lengths the default parameters give (7 clocks each, 140 ns),
// and that writes wait while TXE# is held high.
`timescale 1ns/1ps
module tb_ft245_async_if;
  logic clk = 0, rst_n = 1;
  logic ft_rxf_n, ft_txe_n, ft_rd_n, ft_wr_n, ft_d_oe;
  logic [7:0] ft_d_in, ft_d_out;
  logic [7:0] rx_data, tx_data;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  int checks = 0, failures = 0;
  logic [7:0] sent[$], got[$], tx_sent[$];

  ft245_async_if dut (.*);
  ft245_model ft (.rxf_n(ft_rxf_n), .txe_n(ft_txe_n), .rd_n(ft_rd_n), .wr_n(ft_wr_n),
                  .d_to_fpga(ft_d_in), .d_from_fpga(ft_d_out), .d_oe(ft_d_oe));

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FPGA-side consumer with random stalls
  always @(posedge clk) begin
    if (rx_valid && rx_ready) got.push_back(rx_data);
    rx_ready <= ($urandom % 4) != 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    tx_valid = 0; tx_data = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // host to FPGA only, consumer always ready: cycle length
    for (int i = 0; i < 200; i++) begin
      sent.push_back(8'($urandom));
      ft.host_send(sent[i]);
    end
    // FPGA to host, interleaved
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      tx_valid = 1; tx_data = 8'($urandom);
      do @(posedge clk); while (!tx_ready);
      tx_sent.push_back(tx_data);
      @(negedge clk); tx_valid = 0;
      repeat ($urandom % 3) @(posedge clk);
    end
    wait (got.size() == sent.size());
    repeat (20) @(posedge clk);
    check(got.size() == sent.size() && ft.rx_from_fpga.size() == tx_sent.size(), "byte counts");
    foreach (sent[i]) check(i < got.size() && got[i] == sent[i], $sformatf("host to FPGA byte %0d", i));
    foreach (tx_sent[i])
      check(i < ft.rx_from_fpga.size() && ft.rx_from_fpga[i] == tx_sent[i], $sformatf("FPGA to host byte %0d", i));
    check(ft.violations == 0, $sformatf("FT245 timing violations %0d", ft.violations));
    check(ft.min_rd_cycle >= 80ns && ft.min_rd_cycle == 140ns, $sformatf("shortest read cycle %0.1f ns", ft.min_rd_cycle));
    check(ft.min_wr_cycle >= 50ns && ft.min_wr_cycle == 140ns, $sformatf("shortest write cycle %0.1f ns", ft.min_wr_cycle));
    // TXE# held high: write must wait
    ft.tx_block = 1;
    repeat (4) @(posedge clk);  // let TXE# pass the synchronizer
    @(negedge clk);
    tx_valid = 1; tx_data = 8'h5A;
    t0 = $realtime;
    do @(posedge clk); while (!tx_ready && $realtime - t0 < 2000ns);
    check(!tx_ready && ft.wr_cycles == 100, "no write while TXE# high");
    ft.tx_block = 0;
    do @(posedge clk); while (!tx_ready);
    @(negedge clk); tx_valid = 0;
    repeat (20) @(posedge clk);
    check(ft.wr_cycles == 101 && ft.rx_from_fpga[100] == 8'h5A, "write after TXE# low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
