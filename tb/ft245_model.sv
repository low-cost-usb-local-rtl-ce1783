// ft245_model: behavioural model of one FT2232H channel in FT245
// asynchronous FIFO mode, seen from the FPGA pins. Not synthesizable.
//
// The host side is a pair of queues: host_send() queues a byte for the FPGA
// (RXF# goes low), and bytes the FPGA writes with WR# land in rx_from_fpga.
// Read: data appears T_DATA ns after RD# falls and the byte is removed when
// RD# rises; RXF# then goes high for T_PRE ns before it can show the next
// byte. Write: the byte on the bus is taken when WR# rises; TXE# then goes
// high for T_PRE ns. Setting tx_block holds TXE# high (host not reading).
// The model measures every read and write cycle (falling edge to falling
// edge) and counts those shorter than the 80 ns read and 50 ns write
// minimum of the mode, and bus conflicts (FPGA driving during a read).
`timescale 1ns/1ps
module ft245_model #(
  parameter realtime T_DATA = 14ns,
  parameter realtime T_PRE  = 30ns,
  parameter realtime T_START = 5ns
) (
  output logic       rxf_n,
  output logic       txe_n,
  input  logic       rd_n,
  input  logic       wr_n,
  output logic [7:0] d_to_fpga,
  input  logic [7:0] d_from_fpga,
  input  logic       d_oe
);

  logic [7:0] to_fpga[$];
  logic [7:0] rx_from_fpga[$];
  logic       tx_block = 1'b0;
  logic       rd_pre = 1'b0, wr_pre = 1'b0;
  int         rd_cycles = 0, wr_cycles = 0, violations = 0;
  realtime    last_rd_fall = -1000ns, last_wr_fall = -1000ns;
  realtime    min_rd_cycle = 1e9, min_wr_cycle = 1e9;

  task automatic host_send(input logic [7:0] b);
    to_fpga.push_back(b);
  endtask

  assign rxf_n = !(to_fpga.size() > 0 && !rd_pre);
  assign txe_n = tx_block || wr_pre;

  initial d_to_fpga = 8'h00;

  always @(negedge rd_n) if ($realtime > T_START) begin
    if (rxf_n) violations++;
    if (d_oe) violations++;
    if ($realtime - last_rd_fall < 80ns) violations++;
    if ($realtime - last_rd_fall < min_rd_cycle) min_rd_cycle = $realtime - last_rd_fall;
    last_rd_fall = $realtime;
    #(T_DATA);
    if (to_fpga.size() > 0) d_to_fpga = to_fpga[0];
  end

  always @(posedge rd_n) if ($realtime > T_START) begin
    if (to_fpga.size() > 0) void'(to_fpga.pop_front());
    rd_cycles++;
    rd_pre = 1'b1;
    #(T_PRE);
    rd_pre = 1'b0;
  end

  always @(negedge wr_n) if ($realtime > T_START) begin
    if (txe_n) violations++;
    if ($realtime - last_wr_fall < 50ns) violations++;
    if ($realtime - last_wr_fall < min_wr_cycle) min_wr_cycle = $realtime - last_wr_fall;
    last_wr_fall = $realtime;
  end

  always @(posedge wr_n) if ($realtime > T_START) begin
    if (!d_oe) violations++;
    rx_from_fpga.push_back(d_from_fpga);
    wr_cycles++;
    wr_pre = 1'b1;
    #(T_PRE);
    wr_pre = 1'b0;
  end

endmodule
