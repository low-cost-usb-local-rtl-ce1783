// cmd_engine: command interpreter of the USB to local bus bridge.
//
// The host sees the bridge only as a byte pipe, so commands are framed:
// bit 7 of every byte is a start-of-frame marker, set only in the first
// byte of a command, and bits 6..0 carry payload. Addresses and data are
// cut into 7-bit groups, most significant group first:
//   address record     3 bytes = 21 bits, the 16-bit address right-aligned
//   data word          3 bytes, the 16-bit data right-aligned
//   (address, data)    5 bytes = 35 bits: {3'b0, address, data}
// Header byte: {1, op[2:0], 3'b000, (L-1)[7]}; block and scattered commands
// follow it with a length byte {0, (L-1)[6:0]}, so L runs from 1 to 256.
//   op 0 write          header, (address, data)
//   op 1 read           header, address
//   op 2 block write    header, length, start address, L data words
//   op 3 block read     header, length, start address
//   op 4 scattered wr.  header, length, L (address, data) records
//   op 5 scattered rd.  header, length, L address records
// Block commands increment the address after each word, except at a
// reserved interface address (I2C, JTAG), which then acts as a port.
//
// Every command is answered. The first response byte is the status byte
// {1, op[2:0], bad_op, frame_err, bus_err, err}; read commands follow it
// with L data words of 3 bytes each. The status can only be known after the
// last access, so read data waits in rdata_buffer until then.
//
// How it works: the FSM collects the payload bytes of one record into a
// shift register and starts the access as soon as the record is complete,
// so accesses overlap with the arrival of the next record in the bridge
// chip. In an (address, data) record the address is complete after the
// third of its five bytes; it is then offered on early_addr (early_valid
// pulses) so that the local bus can drive its address lines while the data
// bytes are still arriving, giving the address decoders of the system more
// time. A byte with bit 7 set in the middle of a command abandons the
// command: the status byte goes out with frame_err and no data, and the byte
// is then taken as the header of the next command. Payload bytes outside a
// frame are dropped. After a failed access (bus timeout, I2C
// no-acknowledge) the rest of the command is still consumed, but no further
// access is made and the missing read words are returned as 0, so the
// response always has the length the host expects.
//
// Framing with bit 7, the mandatory status byte, the address-before-data
// order with the early address drive, and the command set (single, block
// and scattered reads and writes, block length up to 256) follow the published design. The byte layout of header,
// length and status, the op codes 4 and 5, and the error handling details
// are this design's choice.
module cmd_engine
  import usb_lb_pkg::*;
#(
  parameter logic [AW-1:0] I2C_ADDR  = 16'hFFFF,
  parameter logic [AW-1:0] JTAG_ADDR = 16'hFFFE,
  parameter int unsigned   BUF_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  // bytes from the host
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,
  // bytes to the host
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  // accesses
  output acc_req_t   acc_req,
  input  acc_rsp_t   acc_rsp,
  // address of an (address, data) record, known before its data has arrived
  output logic [AW-1:0] early_addr,
  output logic          early_valid
);

  typedef enum logic [2:0] {S_HDR, S_LEN, S_COLLECT, S_DECODE, S_ACC, S_STATUS, S_DATA} state_e;

  state_e        state;
  logic [2:0]    op;
  logic          lm1_msb;
  logic [8:0]    cnt;        // words left, including the current one
  logic          first_w;    // current word is the first of the command
  logic [2:0]    need;       // payload bytes still to collect
  logic          addr_phase; // collecting the start address of a block command
  logic [31:0]   sr;         // last 32 payload bits; a 35-bit pair record keeps its low 32
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata;
  logic          we;
  logic          bad_op, frame_err, bus_err;
  logic [1:0]    k;          // byte of the data word being sent

  // read data buffer
  logic          buf_push, buf_pop, buf_empty, buf_full;
  logic [DW-1:0] buf_wdata, buf_rdata;
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count;

  logic is_block, is_multi, rx_start;
  assign is_block = (op == OP_BLK_WRITE) || (op == OP_BLK_READ);
  assign is_multi = (op >= OP_BLK_WRITE);
  assign rx_start = rx_data[7];

  rdata_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(DW)) u_buf (
    .clk, .rst_n,
    .clear (state == S_HDR),
    .push  (buf_push),
    .wdata (buf_wdata),
    .pop   (buf_pop),
    .rdata (buf_rdata),
    .empty (buf_empty),
    .full  (buf_full),
    .count (buf_count)
  );

  // A payload byte is taken in S_LEN/S_COLLECT; a start byte there is left
  // in place to become the next header.
  always_comb begin
    rx_ready = 1'b0;
    case (state)
      S_HDR:             rx_ready = 1'b1;
      S_LEN, S_COLLECT:  rx_ready = rx_valid && !rx_start;
      default:           rx_ready = 1'b0;
    endcase
  end

  always_comb begin
    acc_req       = '0;
    acc_req.valid = (state == S_ACC) && !bus_err;
    acc_req.we    = we;
    acc_req.addr  = addr;
    acc_req.wdata = wdata;
    acc_req.first = is_block ? first_w : 1'b1;
    acc_req.last  = is_block ? (cnt == 9'd1) : 1'b1;
  end

  // Read data: a failed or skipped read returns 0.
  assign buf_push  = (state == S_ACC) && !we && (bus_err || acc_rsp.done);
  assign buf_wdata = (bus_err || acc_rsp.err) ? '0 : acc_rsp.rdata;

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = '0;
    buf_pop  = 1'b0;
    if (state == S_STATUS) begin
      tx_valid = 1'b1;
      tx_data  = {1'b1, op, 4'b0000};
      tx_data[ST_BAD_OP]    = bad_op;
      tx_data[ST_FRAME_ERR] = frame_err;
      tx_data[ST_BUS_ERR]   = bus_err;
      tx_data[ST_ERR]       = bad_op | frame_err | bus_err;
    end else if (state == S_DATA && !buf_empty) begin
      tx_valid = 1'b1;
      case (k)
        2'd0:    tx_data = {1'b0, 5'b0, buf_rdata[15:14]};
        2'd1:    tx_data = {1'b0, buf_rdata[13:7]};
        default: tx_data = {1'b0, buf_rdata[6:0]};
      endcase
      buf_pop = tx_ready && (k == 2'd2);
    end
  end

  function automatic logic [2:0] rec_bytes(logic [2:0] o);
    return (o == OP_WRITE || o == OP_SCAT_WRITE) ? 3'(PAIR_BYTES) : 3'(ADDR_BYTES);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_HDR;
      op         <= '0;
      lm1_msb    <= 1'b0;
      cnt        <= '0;
      first_w    <= 1'b0;
      need       <= '0;
      addr_phase <= 1'b0;
      sr         <= '0;
      addr       <= '0;
      wdata      <= '0;
      we         <= 1'b0;
      bad_op     <= 1'b0;
      frame_err  <= 1'b0;
      bus_err    <= 1'b0;
      k          <= '0;
      early_addr  <= '0;
      early_valid <= 1'b0;
    end else begin
      early_valid <= 1'b0;
      case (state)
        S_HDR: begin
          if (rx_valid && rx_start) begin
            op        <= rx_data[6:4];
            lm1_msb   <= rx_data[0];
            bad_op    <= 1'b0;
            frame_err <= 1'b0;
            bus_err   <= 1'b0;
            first_w   <= 1'b1;
            cnt       <= 9'd1;
            addr_phase <= 1'b0;
            case (rx_data[6:4])
              OP_WRITE, OP_READ: begin
                need  <= rec_bytes(rx_data[6:4]);
                state <= S_COLLECT;
              end
              OP_BLK_WRITE, OP_BLK_READ, OP_SCAT_WRITE, OP_SCAT_READ:
                state <= S_LEN;
              default: begin
                bad_op <= 1'b1;
                state  <= S_STATUS;
              end
            endcase
          end
        end
        S_LEN: begin
          if (rx_valid) begin
            if (rx_start) begin
              frame_err <= 1'b1;
              state     <= S_STATUS;
            end else begin
              cnt        <= {1'b0, lm1_msb, rx_data[6:0]} + 9'd1;
              addr_phase <= is_block;
              need       <= is_block ? 3'(ADDR_BYTES) : rec_bytes(op);
              state      <= S_COLLECT;
            end
          end
        end
        S_COLLECT: begin
          if (rx_valid) begin
            if (rx_start) begin
              frame_err <= 1'b1;
              state     <= S_STATUS;
            end else begin
              sr   <= {sr[24:0], rx_data[6:0]};
              need <= need - 1'b1;
              // third byte of a pair record: {3'b0, A[15:0], D[15:14]} is in
              if (need == 3'd3 && !addr_phase && (op == OP_WRITE || op == OP_SCAT_WRITE)) begin
                early_addr  <= {sr[10:0], rx_data[6:2]};
                early_valid <= 1'b1;
              end
              if (need == 3'd1) state <= S_DECODE;
            end
          end
        end
        S_DECODE: begin
          if (addr_phase) begin
            addr       <= sr[15:0];
            addr_phase <= 1'b0;
            if (op == OP_BLK_READ) begin
              we    <= 1'b0;
              state <= S_ACC;
            end else begin
              need  <= 3'(WORD_BYTES);
              state <= S_COLLECT;
            end
          end else begin
            case (op)
              OP_WRITE, OP_SCAT_WRITE: begin
                addr  <= sr[31:16];
                wdata <= sr[15:0];
                we    <= 1'b1;
              end
              OP_BLK_WRITE: begin
                wdata <= sr[15:0];
                we    <= 1'b1;
              end
              default: begin  // single or scattered read
                addr <= sr[15:0];
                we   <= 1'b0;
              end
            endcase
            state <= S_ACC;
          end
        end
        S_ACC: begin
          if (bus_err || acc_rsp.done) begin
            if (!bus_err && acc_rsp.err) bus_err <= 1'b1;
            first_w <= 1'b0;
            cnt     <= cnt - 1'b1;
            if (is_block && addr != I2C_ADDR && addr != JTAG_ADDR) addr <= addr + 1'b1;
            if (cnt == 9'd1)            state <= S_STATUS;
            else if (op == OP_BLK_READ) state <= S_ACC;
            else begin
              need  <= is_block ? 3'(WORD_BYTES) : rec_bytes(op);
              state <= S_COLLECT;
            end
          end
        end
        S_STATUS: begin
          if (tx_ready) begin
            k <= '0;
            state <= (is_read_op(op) && !frame_err && !bad_op) ? S_DATA : S_HDR;
          end
        end
        S_DATA: begin
          if (buf_empty) state <= S_HDR;
          else if (tx_ready) k <= (k == 2'd2) ? 2'd0 : k + 1'b1;
        end
        default: state <= S_HDR;
      endcase
    end
  end

  a_multi_needs_len: assert property (@(posedge clk) disable iff (!rst_n)
                                      state == S_LEN |-> is_multi);
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 acc_req.valid && !acc_rsp.done |=> acc_req.valid && $stable(acc_req));
  a_buf_room: assert property (@(posedge clk) disable iff (!rst_n) !(buf_push && buf_full));

endmodule
