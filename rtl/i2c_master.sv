// i2c_master: I2C write master reached through a reserved local-bus address.
//
// A block write to the I2C address becomes one I2C write transaction: the
// first word of the block carries the 7-bit slave address (bits 6..0), the
// following words carry the data bytes (bits 7..0), and the end of the block
// ends the transaction. So the host sends "these N bytes to slave 0x52" as a
// single command instead of toggling SCL and SDA itself.
//
// How it works: a quarter-period tick (QUARTER clocks) steps an FSM through
// START, eight data bits, the acknowledge bit and STOP; every bit takes four
// quarters (SDA set while SCL low, SCL high for two quarters, SCL low). A
// request with first=1 sends a START (a repeated START if a transaction is
// still open) followed by the address byte with the write bit. Each byte is
// acknowledged by the access done pulse after its ACK bit; the last byte is
// acknowledged after the STOP. If the slave does not acknowledge, a STOP is
// sent at once, the access ends with err, and the rest of the block is
// answered with err without bus activity. A read of the I2C address returns
// {14'b0, nack, busy}, where nack is sticky and cleared by the read.
//
// The reserved address, the first-byte-is-address rule and the purpose
// follow the published design; the bit timing, the repeated START, the abort on a
// missing acknowledge and the status word are this design's choice. The
// master does not support clock stretching or I2C reads. SCL and SDA are
// open-drain: scl_drive_low/sda_drive_low pull the line low, sda_in reads it.
// Default QUARTER = 125 gives 100 kHz SCL from a 50 MHz clock.
module i2c_master
  import usb_lb_pkg::*;
#(
  parameter int unsigned QUARTER = 125
) (
  input  logic     clk,
  input  logic     rst_n,
  input  acc_req_t req,
  output acc_rsp_t rsp,
  output logic     scl_drive_low,
  output logic     sda_drive_low,
  input  logic     sda_in
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP, S_OPEN} state_e;

  state_e      state;
  logic [15:0] qcnt;
  logic        tick;
  logic [1:0]  q;          // quarter inside the current bit
  logic [2:0]  bitn;
  logic [7:0]  shreg;
  logic        last_q;     // current byte ends the transaction
  logic        nack;       // sticky: a byte was not acknowledged
  logic        aborted;    // transaction ended early; rest of block rejected
  logic        sda_meta, sda_s;
  logic        ack_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {sda_s, sda_meta} <= 2'b11;
    else        {sda_s, sda_meta} <= {sda_meta, sda_in};
  end

  assign tick = (qcnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      qcnt          <= '0;
      q             <= '0;
      bitn          <= '0;
      shreg         <= '0;
      last_q        <= 1'b0;
      nack          <= 1'b0;
      aborted       <= 1'b0;
      ack_seen      <= 1'b0;
      scl_drive_low <= 1'b0;
      sda_drive_low <= 1'b0;
      rsp           <= '0;
    end else begin
      rsp.done <= 1'b0;
      if (state != S_IDLE && state != S_OPEN)
        qcnt <= tick ? 16'(QUARTER - 1) : qcnt - 1'b1;
      case (state)
        S_IDLE, S_OPEN: begin
          if (req.valid && !rsp.done) begin
            if (!req.we) begin
              rsp.rdata <= {14'b0, nack, state == S_OPEN};
              rsp.err   <= 1'b0;
              rsp.done  <= 1'b1;
              nack      <= 1'b0;
            end else if (req.first) begin
              shreg   <= {req.wdata[6:0], 1'b0};  // address, write
              last_q  <= req.last;
              aborted <= 1'b0;
              q       <= '0;
              qcnt    <= 16'(QUARTER - 1);
              state   <= S_START;
            end else if (state == S_OPEN && !aborted) begin
              shreg <= req.wdata[7:0];
              last_q <= req.last;
              q     <= '0;
              bitn  <= 3'd7;
              qcnt  <= 16'(QUARTER - 1);
              state <= S_BIT;
            end else begin
              // no open transaction: reject the byte
              rsp.err  <= 1'b1;
              rsp.done <= 1'b1;
            end
          end
        end
        S_START: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: sda_drive_low <= 1'b0;   // release SDA
            2'd1: scl_drive_low <= 1'b0;   // release SCL
            2'd2: sda_drive_low <= 1'b1;   // SDA falls while SCL high: START
            2'd3: begin
              scl_drive_low <= 1'b1;
              bitn          <= 3'd7;
              state         <= S_BIT;
            end
          endcase
        end
        S_BIT: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: sda_drive_low <= !shreg[bitn];
            2'd1: scl_drive_low <= 1'b0;
            2'd2: ;
            2'd3: begin
              scl_drive_low <= 1'b1;
              if (bitn == 0) state <= S_ACK;
              else bitn <= bitn - 1'b1;
            end
          endcase
        end
        S_ACK: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: sda_drive_low <= 1'b0;   // slave drives the ACK
            2'd1: scl_drive_low <= 1'b0;
            2'd2: ack_seen <= !sda_s;
            2'd3: begin
              scl_drive_low <= 1'b1;
              if (!ack_seen || last_q) begin
                if (!ack_seen) begin
                  nack    <= 1'b1;
                  aborted <= !last_q;
                end
                state <= S_STOP;
              end else begin
                rsp.err  <= 1'b0;
                rsp.done <= 1'b1;
                state    <= S_OPEN;
              end
            end
          endcase
        end
        S_STOP: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: sda_drive_low <= 1'b1;
            2'd1: scl_drive_low <= 1'b0;
            2'd2: sda_drive_low <= 1'b0;   // SDA rises while SCL high: STOP
            2'd3: begin
              rsp.err  <= !ack_seen;
              rsp.done <= 1'b1;
              state    <= S_IDLE;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_scl_released_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                        state == S_IDLE |-> !scl_drive_low);

endmodule
