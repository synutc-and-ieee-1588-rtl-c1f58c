// tb_mii_stamper - self-checking testbench for mii_stamper in both modes.
//
// Two stampers are chained: a stamp-mode one writes the SFD time T1 into a
// 12-byte field at byte 18, and a residence-mode one reads that field and
// writes T2 - T1 into an 8-byte field at byte 30, T2 being the time the SFD
// reached it. The testbench sends frames nibble by nibble, records T1 and T2 by
// watching the streams itself, builds the expected frames with a byte-wise
// CRC-32 and compares every output frame byte for byte. Frames: CSPs, frames
// with another EtherType (must leave unchanged), a CSP with a corrupt FCS (must
// leave with the same CRC syndrome), frames with a nibble strobe every cycle and
// every 4th cycle, and a residence interval that spans a second boundary. Also
// checks the constant latency of 9 nibbles from input SFD to output SFD.
module tb_mii_stamper;
  import synutc_pkg::*;
  import tb_eth_pkg::*;

  localparam logic [15:0] CSP_TYPE = 16'h88F7;

  logic       clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [3:0] in_d = '0, m_d, o_d;
  logic       in_dv = 1'b0, m_dv, o_dv, m_er, o_er;
  ts_t        time_i = '0;
  ts_t        cap1, cap2;
  logic       v1, v2, st1, st2;
  csp_cfg_t   cfg1, cfg2;
  int         checks = 0, failures = 0;
  int         gap = 0;

  assign cfg1 = '{ethertype: CSP_TYPE, ts_offset: 11'd18, src_offset: 11'd0};
  assign cfg2 = '{ethertype: CSP_TYPE, ts_offset: 11'd30, src_offset: 11'd18};

  mii_stamper #(.FIELD_BYTES(12), .RESIDENCE(1'b0)) dut1 (
    .clk, .rst_n, .ce, .in_d, .in_dv, .in_er(1'b0), .out_d(m_d), .out_dv(m_dv), .out_er(m_er),
    .time_i, .cfg(cfg1), .ts_capt(cap1), .ts_valid(v1), .stamped(st1));
  mii_stamper #(.FIELD_BYTES(8), .RESIDENCE(1'b1)) dut2 (
    .clk, .rst_n, .ce, .in_d(m_d), .in_dv(m_dv), .in_er(m_er), .out_d(o_d), .out_dv(o_dv), .out_er(o_er),
    .time_i, .cfg(cfg2), .ts_capt(cap2), .ts_valid(v2), .stamped(st2));

  always #5 clk = ~clk;

  // reference clock: 10 ns per cycle, IEEE 1588 wrap
  always @(posedge clk) time_i <= units_ts(ts_units(time_i) + (128'd10 << 32));

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- monitors ----------------
  logic [3:0] cur1[$], cur2[$];
  logic [3:0] got1[$][$], got2[$][$];
  ts_t        t2_q[$];
  logic       prev5 = 1'b0, inf = 1'b0;
  int         ce_since_sfd = -1, lat_q[$];
  int         n_stamped1 = 0, n_stamped2 = 0, n_sec_cross = 0;

  always @(posedge clk) if (rst_n) begin
    if (st1) n_stamped1++;
    if (st2) n_stamped2++;
    if (ce) begin
      // counts the sampling edge of the input SFD too, hence one above the latency
      if (ce_since_sfd >= 0) ce_since_sfd++;
      if (m_dv) cur1.push_back(m_d); else if (cur1.size() != 0) begin got1.push_back(cur1); cur1 = {}; end
      if (o_dv) cur2.push_back(o_d); else if (cur2.size() != 0) begin got2.push_back(cur2); cur2 = {}; end
      // own SFD detection on the second stamper's input
      if (m_dv && !inf && prev5 && m_d == 4'hD) begin
        t2_q.push_back(time_i);
        inf = 1'b1;
        lat_q.push_back(ce_since_sfd);
      end
      if (!m_dv) inf = 1'b0;
      prev5 = m_dv && (m_d == 4'h5);
    end
  end

  // ---------------- driver ----------------
  task automatic put_nib(logic dv, logic [3:0] d, logic is_sfd, ref ts_t t1);
    repeat (gap) begin ce = 1'b0; @(negedge clk); end
    ce = 1'b1; in_dv = dv; in_d = d;
    if (is_sfd) begin t1 = time_i; ce_since_sfd = 0; end
    @(negedge clk);
    ce = 1'b0;
  endtask

  task automatic send(byte_q_t f, output ts_t t1);
    for (int i = 0; i < 15; i++) put_nib(1'b1, 4'h5, 1'b0, t1);
    put_nib(1'b1, 4'hD, 1'b1, t1);
    foreach (f[i]) begin
      put_nib(1'b1, f[i][3:0], 1'b0, t1);
      put_nib(1'b1, f[i][7:4], 1'b0, t1);
    end
    for (int i = 0; i < 24; i++) put_nib(1'b0, 4'h0, 1'b0, t1);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame through both stampers, checked against the reference
  task automatic run_frame(logic [15:0] et, int plen, int seed, logic [31:0] corrupt);
    byte_q_t f, e1, e2, r1, r2;
    ts_t t1, t2;
    int pre1, pre2;
    logic [127:0] res;
    f = make_frame(et, plen, seed);
    f[f.size() - 1] ^= corrupt[31:24];
    f[f.size() - 2] ^= corrupt[23:16];
    f[f.size() - 3] ^= corrupt[15:8];
    f[f.size() - 4] ^= corrupt[7:0];
    send(f, t1);
    repeat (40 * (gap + 1)) @(negedge clk);
    chk(got1.size() == 1 && got2.size() == 1 && t2_q.size() == 1, "one frame out of each stamper");
    if (got1.size() != 1 || got2.size() != 1 || t2_q.size() != 1) return;
    t2 = t2_q.pop_front();
    r1 = nibbles_to_frame(got1.pop_front(), pre1);
    r2 = nibbles_to_frame(got2.pop_front(), pre2);
    chk(pre1 == 16 && pre2 == 16, "preamble passed unchanged");
    begin int l; l = lat_q.pop_front() - 1; chk(l == 9, $sformatf("latency %0d nibbles", l)); end
    chk(dut1.ts_capt == t1, "capture register holds the SFD time");
    // expected frames
    e1 = f;
    e2 = f;
    if (et == CSP_TYPE) begin
      put_field(e1, 18, t1, 12);
      fix_fcs(e1, corrupt);
      res = ts_units(t2) - ts_units(t1);
      if (t2[95:64] != t1[95:64]) n_sec_cross++;
      e2 = e1;
      put_field(e2, 30, {32'd0, res[63:0]}, 8);
      fix_fcs(e2, corrupt);
    end
    chk(r1 == e1, $sformatf("stamp-mode frame (type %h, len %0d)", et, plen));
    chk(r2 == e2, $sformatf("residence-mode frame (type %h, len %0d)", et, plen));
    if (r2 != e2) for (int i = 0; i < e2.size() && i < r2.size(); i++)
      if (r2[i] != e2[i]) $display("  byte %0d: got %h exp %h", i, r2[i], e2[i]);
  endtask

  initial begin
    int csp_frames, other_frames, bad_frames;
    csp_frames = 0; other_frames = 0; bad_frames = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      gap = (k % 3 == 2) ? 3 : 0;                // every 4th cycle, as 25 MHz MII on 100 MHz
      if (k == 6) begin                          // cross a second boundary mid-flight
        time_i = {32'd7, 32'd999_999_780, 32'd0};
      end
      if (k % 4 == 3)      begin run_frame(16'h0800, 46 + k, k, 32'd0); other_frames++; end
      else if (k == 5)     begin run_frame(CSP_TYPE, 60, k, 32'h0000_0100); bad_frames++; end
      else                 begin run_frame(CSP_TYPE, 46 + 3 * k, k, 32'd0); csp_frames++; end
    end
    chk(n_sec_cross == 1, "a residence interval spanned a second boundary");
    chk(n_stamped1 == csp_frames + bad_frames, "stamped pulses of the first stamper");
    chk(n_stamped2 == csp_frames + bad_frames, "stamped pulses of the second stamper");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
