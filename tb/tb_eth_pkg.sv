// tb_eth_pkg - Ethernet frame helpers shared by the testbenches.
//
// Builds frames as byte queues and computes the FCS byte by byte (reflected
// CRC-32, polynomial 0xEDB88320, initial value all ones, final inversion), a
// formulation independent of the nibble-wide CRC in the design. Also holds a
// reference time counter step and time difference written with 128-bit counts.
package tb_eth_pkg;
  import synutc_pkg::*;

  typedef logic [7:0] byte_q_t[$];

  localparam logic [127:0] SEC_UNITS = 128'(1_000_000_000) << 32;

  function automatic logic [31:0] crc32_bytes(byte_q_t b);
    logic [31:0] c;
    c = '1;
    foreach (b[i]) begin
      c = c ^ 32'(b[i]);
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // frame body (no preamble) with FCS appended, low byte of the FCS first
  function automatic byte_q_t make_frame(logic [15:0] ethertype, int payload_len, int seed);
    byte_q_t f;
    logic [31:0] fcs;
    for (int i = 0; i < 6; i++) f.push_back(8'h01 + 8'(i));          // destination
    for (int i = 0; i < 6; i++) f.push_back(8'hA0 + 8'(i) + 8'(seed)); // source
    f.push_back(ethertype[15:8]);
    f.push_back(ethertype[7:0]);
    for (int i = 0; i < payload_len; i++) f.push_back(8'((i * 37 + seed * 11) ^ 8'h5A));
    fcs = crc32_bytes(f);
    for (int i = 0; i < 4; i++) f.push_back(fcs[8*i +: 8]);
    return f;
  endfunction

  // write a value into a frame (without FCS) most significant byte first
  function automatic void put_field(ref byte_q_t f, input int off, input logic [95:0] v, input int nbytes);
    for (int i = 0; i < nbytes; i++) f[off + i] = v[(nbytes - 1 - i) * 8 +: 8];
  endfunction

  // replace the FCS of a frame (last 4 bytes) by the correct one, xor a syndrome
  function automatic void fix_fcs(ref byte_q_t f, input logic [31:0] syndrome);
    byte_q_t body;
    logic [31:0] fcs;
    body = f[0 : f.size() - 5];
    fcs = crc32_bytes(body) ^ syndrome;
    for (int i = 0; i < 4; i++) f[f.size() - 4 + i] = fcs[8*i +: 8];
  endfunction

  function automatic logic [127:0] ts_units(ts_t t);
    return 128'(t[95:64]) * SEC_UNITS + 128'(t[63:0]);
  endfunction

  function automatic ts_t units_ts(logic [127:0] u);
    logic [127:0] s, r;
    s = u / SEC_UNITS;
    r = u % SEC_UNITS;
    return {s[31:0], r[63:0]};
  endfunction

  // split a received nibble stream into frame bytes after the SFD
  function automatic byte_q_t nibbles_to_frame(logic [3:0] n[$], output int preamble_nibbles);
    byte_q_t f;
    int s;
    s = -1;
    for (int i = 1; i < n.size(); i++)
      if (n[i-1] == 4'h5 && n[i] == 4'hD) begin s = i + 1; break; end
    preamble_nibbles = s;
    if (s < 0) return f;
    for (int i = s; i + 1 < n.size(); i += 2) f.push_back({n[i+1], n[i]});
    return f;
  endfunction
endpackage
