// synutc_pkg - types and constants shared by the SynUTC timing blocks.
//
// Time is held in a 96-bit word: seconds in [95:64] and nanoseconds in [63:32]
// (the 64-bit IEEE 1588 seconds/nanoseconds format), followed by a 32-bit binary
// fraction of a nanosecond in [31:0] that gives the adder-based clock its fine
// rate resolution. Increments, accuracy bounds and residence times use the lower
// 64 bits only ("ns.frac": 32-bit nanoseconds, 32-bit fraction).
// The package also holds the Ethernet CRC-32 step for one MII nibble and the
// control/configuration structs that the CPU drives.
package synutc_pkg;

  localparam int unsigned TS_W       = 96;
  localparam int unsigned NSF_W      = 64;
  localparam logic [31:0] NS_PER_SEC = 32'd1_000_000_000;

  typedef logic [TS_W-1:0]  ts_t;    // {sec, ns, frac}
  typedef logic [NSF_W-1:0] nsf_t;   // {ns, frac}

  // Commands from the CPU to an adder-based clock. Each *_stb is a one-cycle strobe.
  typedef struct packed {
    logic        inc_stb;     // take inc as new per-tick increment (rate adjustment)
    nsf_t        inc;
    logic        load_stb;    // set the clock state (resynchronisation)
    ts_t         load_val;
    logic        amort_stb;   // start a linear amortization
    logic [63:0] amort_delta; // signed ns.frac added to every tick's increment
    logic [31:0] amort_ticks; // number of ticks the correction is applied for
  } clk_ctrl_t;

  // Commands to the two accuracy-bound clocks (alpha- and alpha+).
  typedef struct packed {
    logic load_stb;           // set both bounds (resynchronisation)
    nsf_t neg_val;
    nsf_t pos_val;
    logic rate_stb;           // set both deterioration rates
    nsf_t neg_rate;
    nsf_t pos_rate;
  } acc_ctrl_t;

  // Frame format of a clock synchronisation packet (CSP), set by software.
  typedef struct packed {
    logic [15:0] ethertype;   // EtherType that marks a CSP
    logic [10:0] ts_offset;   // byte offset of the field written by this stamper
    logic [10:0] src_offset;  // residence mode: byte offset of the ingress timestamp
  } csp_cfg_t;

  // Ethernet CRC-32 (reflected, polynomial 0xEDB88320), one nibble, LSB first.
  function automatic logic [31:0] crc32_nibble(logic [31:0] crc, logic [3:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 4; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Residence time between two stamps, as ns.frac, assuming it is below one second.
  function automatic nsf_t ts_diff(ts_t later, ts_t earlier);
    logic [64:0] a, b;
    a = {1'b0, later[63:0]};
    b = {1'b0, earlier[63:0]};
    if (later[95:64] != earlier[95:64]) a = a + {1'b0, NS_PER_SEC, 32'd0};
    return nsf_t'(a - b);
  endfunction

endpackage
