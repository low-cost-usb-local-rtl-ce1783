// ft245_async_if: FPGA side of an FT2232H channel in FT245 asynchronous FIFO mode.
//
// The USB bridge shows the FPGA two byte FIFOs behind one 8-bit data bus:
// RXF# low means the host has sent a byte that can be read with an RD#
// pulse, TXE# low means a byte can be written with a WR# pulse. This module
// turns that into two valid/ready byte streams for the command engine.
//
// How it works: RXF# and TXE# are asynchronous to the FPGA clock and pass
// through two-flop synchronizers. An FSM runs one bus cycle at a time. A
// pending response byte has priority over reading, so that a response can
// always drain while the host keeps sending. A read holds RD# low for
// RD_LOW clocks and samples the data bus on the last of them; RD# then
// stays high for RD_HIGH clocks, long enough for RXF# to show through the
// synchronizer whether another byte is waiting. A write drives the bus one
// clock before WR# falls, holds WR# low for WR_LOW clocks, keeps the data one
// clock after WR# rises and leaves WR# high for WR_HIGH clocks in all.
// The read byte waits in a one-byte holding register until it is taken.
//
// Timing: the published design gives 80 ns as the shortest read cycle and 50 ns as
// the shortest write cycle of this mode. With the defaults a read cycle
// takes RD_LOW + RD_HIGH + 1 = 7 clocks and a write cycle 1 + WR_LOW +
// WR_HIGH + 1 = 7 clocks, 140 ns at the assumed 50 MHz clock; both meet the
// minimum; the split of each cycle into low and high time and the clock
// frequency are this design's choice. The data bus is split into d_in,
// d_out and d_oe so that the tri-state buffer sits in the pad ring.
module ft245_async_if #(
  parameter int unsigned RD_LOW  = 3,  // clocks RD# is low, data sampled on the last
  parameter int unsigned RD_HIGH = 3,  // clocks RD# is high before RXF# is looked at again
  parameter int unsigned WR_LOW  = 2,  // clocks WR# is low
  parameter int unsigned WR_HIGH = 3   // clocks WR# is high after a write (first one holds data)
) (
  input  logic       clk,
  input  logic       rst_n,
  // FT2232H pins
  input  logic       ft_rxf_n,
  input  logic       ft_txe_n,
  output logic       ft_rd_n,
  output logic       ft_wr_n,
  input  logic [7:0] ft_d_in,
  output logic [7:0] ft_d_out,
  output logic       ft_d_oe,
  // bytes from the host
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic       rx_ready,
  // bytes to the host
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready
);

  typedef enum logic [2:0] {S_IDLE, S_RD_LOW, S_RD_HIGH, S_WR_SETUP, S_WR_LOW, S_WR_HIGH} state_e;

  state_e     state;
  logic [7:0] cnt;
  logic [1:0] rxf_sync, txe_sync;
  logic       rxf_n_s, txe_n_s;
  logic       rx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxf_sync <= 2'b11;
      txe_sync <= 2'b11;
    end else begin
      rxf_sync <= {rxf_sync[0], ft_rxf_n};
      txe_sync <= {txe_sync[0], ft_txe_n};
    end
  end
  assign rxf_n_s = rxf_sync[1];
  assign txe_n_s = txe_sync[1];

  assign tx_ready = (state == S_IDLE) && tx_valid && !txe_n_s;
  assign rx_valid = rx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      ft_rd_n  <= 1'b1;
      ft_wr_n  <= 1'b1;
      ft_d_oe  <= 1'b0;
      ft_d_out <= '0;
      rx_data  <= '0;
      rx_full  <= 1'b0;
    end else begin
      if (rx_full && rx_ready) rx_full <= 1'b0;
      case (state)
        S_IDLE: begin
          if (tx_valid && !txe_n_s) begin
            ft_d_out <= tx_data;
            ft_d_oe  <= 1'b1;
            state    <= S_WR_SETUP;
          end else if (!rxf_n_s && !rx_full) begin
            ft_rd_n <= 1'b0;
            cnt     <= 8'(RD_LOW - 1);
            state   <= S_RD_LOW;
          end
        end
        S_RD_LOW: begin
          if (cnt == 0) begin
            rx_data <= ft_d_in;
            rx_full <= 1'b1;
            ft_rd_n <= 1'b1;
            cnt     <= 8'(RD_HIGH - 1);
            state   <= S_RD_HIGH;
          end else cnt <= cnt - 1'b1;
        end
        S_RD_HIGH: begin
          if (cnt == 0) state <= S_IDLE;
          else cnt <= cnt - 1'b1;
        end
        S_WR_SETUP: begin
          ft_wr_n <= 1'b0;
          cnt     <= 8'(WR_LOW - 1);
          state   <= S_WR_LOW;
        end
        S_WR_LOW: begin
          if (cnt == 0) begin
            ft_wr_n <= 1'b1;
            cnt     <= 8'(WR_HIGH - 1);
            state   <= S_WR_HIGH;
          end else cnt <= cnt - 1'b1;
        end
        S_WR_HIGH: begin
          ft_d_oe <= 1'b0;  // data held for the first high clock only
          if (cnt == 0) state <= S_IDLE;
          else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A byte must not be offered and withdrawn before it is taken.
  a_rx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              rx_valid && !rx_ready |=> rx_valid && $stable(rx_data));

endmodule
