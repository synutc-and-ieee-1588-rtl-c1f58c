// mii_stamper - on-the-fly timestamping of clock synchronisation packets (CSPs)
// on an IEEE 802.3 MII nibble stream.
//
// The stamper sits in the MII path between MAC and PHY (or, in the switch
// add-on, between a node and the switch). It watches the nibbles for the start
// frame delimiter (preamble nibble 5 followed by D); in the clock cycle that the
// SFD nibble is sampled, the local 96-bit time is stored in ts_capt. The stream
// is passed on through a delay line of DELAY (8) nibbles. As frames leave the
// delay line the stamper
//   * recognises a CSP by its EtherType (bytes 12-13 after the SFD),
//   * overwrites FIELD_BYTES bytes at byte offset cfg.ts_offset with the field
//     value, most significant byte first, low nibble first as MII sends it,
//   * replaces the 8 FCS nibbles with a recomputed FCS. The new FCS is
//     ~CRC(modified) ^ FCS(received) ^ ~CRC(received), so an unmodified frame
//     leaves bit-identical and a frame that arrived corrupt leaves corrupt.
//     The delay line is what makes the FCS visible before it has to be sent.
// Field value: in stamp mode (RESIDENCE=0) the SFD timestamp itself (node
// "Send TS"/"Receive TS", add-on ingress time). In residence mode (RESIDENCE=1)
// the 96-bit ingress time is read from byte offset cfg.src_offset of the frame
// and the 64-bit ns.frac difference SFD time - ingress time (under one second)
// is written; the source field must end before the written one starts.
//
// Timing: every register moves only on cycles with ce=1 (one MII nibble), except
// the SFD capture, which takes time_i in that same cycle. out_* lags in_* by
// DELAY+1 nibbles, a constant that does not disturb the timestamps.
// The SFD detection, the 96-bit capture and the insertion follow the source
// description; the EtherType test, offsets, delay line and FCS rule are this
// design's choices.
module mii_stamper
  import synutc_pkg::*;
#(
  parameter int unsigned FIELD_BYTES = 12,
  parameter bit          RESIDENCE   = 1'b0,
  parameter int unsigned DELAY       = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic [3:0] in_d,
  input  logic       in_dv,
  input  logic       in_er,
  output logic [3:0] out_d,
  output logic       out_dv,
  output logic       out_er,
  input  ts_t        time_i,
  input  csp_cfg_t   cfg,
  output ts_t        ts_capt,     // time at the last SFD
  output logic       ts_valid,    // one-cycle pulse when ts_capt is updated
  output logic       stamped      // one-cycle pulse: a CSP left with its field written
);

  localparam int unsigned FW = FIELD_BYTES * 8;

  typedef struct packed {
    logic       dv;
    logic       er;
    logic [3:0] d;
    logic       sfd;   // this nibble completed the SFD
  } nib_t;

  // ---------------- input side: SFD detection and capture ----------------
  logic       in_frame_q, prev5_q;
  logic       sfd_in;
  nib_t       dl_q [DELAY];

  assign sfd_in = ce && in_dv && !in_frame_q && prev5_q && (in_d == 4'hD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame_q <= 1'b0;
      prev5_q    <= 1'b0;
      ts_capt    <= '0;
      ts_valid   <= 1'b0;
      for (int i = 0; i < DELAY; i++) dl_q[i] <= '0;
    end else begin
      ts_valid <= sfd_in;
      if (sfd_in) ts_capt <= time_i;
      if (ce) begin
        prev5_q <= in_dv && (in_d == 4'h5);
        if (!in_dv)      in_frame_q <= 1'b0;
        else if (sfd_in) in_frame_q <= 1'b1;
        dl_q[0] <= '{dv: in_dv, er: in_er, d: in_d, sfd: sfd_in};
        for (int i = 1; i < DELAY; i++) dl_q[i] <= dl_q[i-1];
      end
    end
  end

  // ---------------- output side: parse, insert, regenerate FCS ----------------
  nib_t        lv;              // nibble leaving the delay line
  logic        later_all_dv;    // the DELAY nibbles behind lv are all valid
  logic        out_frame_q;     // between SFD and end of frame
  logic [11:0] ncnt_q;          // nibble index after the SFD
  logic        et_ok_q;         // EtherType matched so far
  logic [31:0] crc_rx_q, crc_md_q;
  logic [2:0]  fcs_idx_q;
  logic        in_fcs_q;
  logic [31:0] fcs_new_q;
  logic [95:0] src_q;           // residence mode: ingress time read from the frame
  logic        wrote_q;

  assign lv = dl_q[DELAY-1];

  always_comb begin
    later_all_dv = in_dv;
    for (int i = 0; i < DELAY-1; i++) later_all_dv &= dl_q[i].dv;
  end

  logic        body;         // a frame nibble after the SFD
  logic        fcs_nib;      // one of the FCS nibbles
  logic        fcs_first;
  logic [11:0] f_start, s_start;
  logic        in_field, in_src;
  logic [11:0] f_n, s_n;
  logic [FW-1:0] fval;
  logic [3:0]  md;           // nibble after modification
  logic [31:0] rx_fcs, fcs_now;
  int unsigned fbit;

  always_comb begin
    body      = out_frame_q && lv.dv;
    fcs_nib   = body && !later_all_dv;
    fcs_first = fcs_nib && !in_fcs_q;
    f_start   = {cfg.ts_offset, 1'b0};
    s_start   = {cfg.src_offset, 1'b0};
    f_n       = ncnt_q - f_start;
    s_n       = ncnt_q - s_start;
    in_field  = body && !fcs_nib && et_ok_q && (ncnt_q >= 12'd28) &&
                (ncnt_q >= f_start) && (f_n < 12'(2*FIELD_BYTES));
    in_src    = body && (ncnt_q >= s_start) && (s_n < 12'd24);

    if (RESIDENCE) fval = FW'(ts_diff(ts_capt, src_q));
    else           fval = FW'(ts_capt >> (TS_W - FW));

    fbit = (FIELD_BYTES - 1 - 32'(f_n[11:1])) * 8 + (f_n[0] ? 4 : 0);
    md   = in_field ? fval[fbit +: 4] : lv.d;

    // the FCS as received: nibble j sits DELAY-1-j stages back
    for (int j = 0; j < 8; j++)
      rx_fcs[4*j +: 4] = (j == 0) ? lv.d : dl_q[DELAY-1-j].d;
    fcs_now = ~crc_md_q ^ rx_fcs ^ ~crc_rx_q;
    if (fcs_nib) md = fcs_first ? fcs_now[3:0] : fcs_new_q[4*fcs_idx_q +: 4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_frame_q <= 1'b0;
      ncnt_q      <= '0;
      et_ok_q     <= 1'b0;
      crc_rx_q    <= '1;
      crc_md_q    <= '1;
      fcs_idx_q   <= '0;
      in_fcs_q    <= 1'b0;
      fcs_new_q   <= '0;
      src_q       <= '0;
      wrote_q     <= 1'b0;
      out_d       <= '0;
      out_dv      <= 1'b0;
      out_er      <= 1'b0;
      stamped     <= 1'b0;
    end else begin
      stamped <= 1'b0;
      if (ce) begin
        out_d  <= md;
        out_dv <= lv.dv;
        out_er <= lv.er;

        if (lv.sfd) begin
          out_frame_q <= 1'b1;
          ncnt_q      <= '0;
          et_ok_q     <= 1'b1;
          crc_rx_q    <= '1;
          crc_md_q    <= '1;
          in_fcs_q    <= 1'b0;
          fcs_idx_q   <= '0;
          wrote_q     <= 1'b0;
        end else if (!lv.dv) begin
          if (out_frame_q && wrote_q) stamped <= 1'b1;
          out_frame_q <= 1'b0;
          in_fcs_q    <= 1'b0;
        end else if (body) begin
          ncnt_q <= ncnt_q + 1'b1;
          case (ncnt_q)
            12'd24: if (lv.d != cfg.ethertype[11:8])  et_ok_q <= 1'b0;
            12'd25: if (lv.d != cfg.ethertype[15:12]) et_ok_q <= 1'b0;
            12'd26: if (lv.d != cfg.ethertype[3:0])   et_ok_q <= 1'b0;
            12'd27: if (lv.d != cfg.ethertype[7:4])   et_ok_q <= 1'b0;
            default: ;
          endcase
          if (in_src) src_q[(11 - 32'(s_n[11:1])) * 8 + (s_n[0] ? 4 : 0) +: 4] <= lv.d;
          if (in_field) wrote_q <= 1'b1;
          if (fcs_nib) begin
            in_fcs_q  <= 1'b1;
            fcs_idx_q <= fcs_idx_q + 1'b1;
            if (fcs_first) fcs_new_q <= fcs_now;
          end else begin
            crc_rx_q <= crc32_nibble(crc_rx_q, lv.d);
            crc_md_q <= crc32_nibble(crc_md_q, md);
          end
        end
      end
    end
  end

  // In residence mode the ingress field must be complete before the written field starts.
  if (RESIDENCE) begin : g_res_check
    a_src_before_field: assert property (@(posedge clk) disable iff (!rst_n)
        out_frame_q |-> (32'(cfg.src_offset) + 12 <= 32'(cfg.ts_offset)));
  end

endmodule
