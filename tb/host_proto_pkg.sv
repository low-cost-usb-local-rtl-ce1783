// host_proto_pkg: host side of the bridge's command protocol, for the
// testbenches. Builds command byte streams and the expected responses,
// independently of the RTL: every byte has the start-of-frame marker in
// bit 7, values are cut into 7-bit groups, most significant group first.
package host_proto_pkg;

  typedef logic [7:0] byte_q_t[$];

  localparam logic [2:0] OP_WRITE = 0, OP_READ = 1, OP_BLK_WRITE = 2,
                         OP_BLK_READ = 3, OP_SCAT_WRITE = 4, OP_SCAT_READ = 5;

  // Append value v as n bytes of 7 bits, most significant first.
  function automatic void put7(ref byte_q_t q, input logic [34:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back({1'b0, 7'((v >> (7 * i)) & 35'h7f)});
  endfunction

  function automatic void header(ref byte_q_t q, input logic [2:0] op, input int len);
    if (op >= OP_BLK_WRITE) begin
      q.push_back({1'b1, op, 3'b000, 1'((len - 1) >> 7)});
      q.push_back({1'b0, 7'((len - 1) & 8'h7f)});
    end else q.push_back({1'b1, op, 4'b0000});
  endfunction

  function automatic byte_q_t cmd_write(input logic [15:0] a, input logic [15:0] d);
    byte_q_t q;
    header(q, OP_WRITE, 1);
    put7(q, {3'b0, a, d}, 5);
    return q;
  endfunction

  function automatic byte_q_t cmd_read(input logic [15:0] a);
    byte_q_t q;
    header(q, OP_READ, 1);
    put7(q, 35'(a), 3);
    return q;
  endfunction

  function automatic byte_q_t cmd_blk_write(input logic [15:0] a, input logic [15:0] d[$]);
    byte_q_t q;
    header(q, OP_BLK_WRITE, d.size());
    put7(q, 35'(a), 3);
    foreach (d[i]) put7(q, 35'(d[i]), 3);
    return q;
  endfunction

  function automatic byte_q_t cmd_blk_read(input logic [15:0] a, input int len);
    byte_q_t q;
    header(q, OP_BLK_READ, len);
    put7(q, 35'(a), 3);
    return q;
  endfunction

  function automatic byte_q_t cmd_scat_write(input logic [15:0] a[$], input logic [15:0] d[$]);
    byte_q_t q;
    header(q, OP_SCAT_WRITE, a.size());
    foreach (a[i]) put7(q, {3'b0, a[i], d[i]}, 5);
    return q;
  endfunction

  function automatic byte_q_t cmd_scat_read(input logic [15:0] a[$]);
    byte_q_t q;
    header(q, OP_SCAT_READ, a.size());
    foreach (a[i]) put7(q, 35'(a[i]), 3);
    return q;
  endfunction

  // Status byte: {1, op, bad_op, frame_err, bus_err, any error}.
  function automatic logic [7:0] status(input logic [2:0] op, input logic bad,
                                        input logic frame, input logic bus);
    return {1'b1, op, bad, frame, bus, bad | frame | bus};
  endfunction

  // Expected response: status byte, then each word as 3 bytes.
  function automatic byte_q_t resp(input logic [7:0] st, input logic [15:0] d[$]);
    byte_q_t q;
    q.push_back(st);
    foreach (d[i]) put7(q, 35'(d[i]), 3);
    return q;
  endfunction

endpackage
