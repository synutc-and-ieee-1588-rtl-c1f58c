// tb_synutc_system - end-to-end testbench of synutc_system at its default size.
//
// The testbench plays the nodes' CPUs and MACs, the Ethernet switch (it
// broadcasts every frame from one port to all other ports after a random delay
// of 1..20 us) and the GPS receiver. It runs the steps of a synchronisation
// round in the way node software would use the hardware:
//   1. the four node clocks are loaded with different times (one close to a
//      seconds rollover); every node broadcasts a CSP at the same moment;
//   2. every received CSP is checked field by field: Send TS, add-on ingress
//      time, residence time and Receive TS against times observed here on the
//      MII streams, and its FCS;
//   3. from node 0's CSPs each node's offset is estimated as
//      Receive TS - Send TS - residence - fixed path latency (18 nibbles) and
//      must equal the true offset exactly; the nodes then load node 0's time
//      (state resynchronisation) and must agree with node 0 to the bit;
//   4. node 1 is slewed by +500 ns with an amortization, a second round must
//      measure exactly +500 ns, and an opposite amortization must bring it back;
//   5. with clocks agreeing, simultaneous input events on two nodes must get
//      identical timestamps and event outputs programmed for one time on two
//      nodes must rise in the same cycle; a rate change on node 3 must make it
//      drift by exactly the programmed amount; the accuracy bounds must load
//      and deteriorate and every node's accuracy interval must contain the
//      common time; a non-CSP frame must cross unchanged; the 1-pps and a
//      GPS serial byte must reach node 0.
// Each mechanism is counted, and one that never happened counts as a failure.
module tb_synutc_system;
  import synutc_pkg::*;
  import tb_eth_pkg::*;

  localparam int NN = 4, NI = 2, NO = 2, DIV = 868;
  localparam logic [15:0] CSP_TYPE = 16'h88F7;
  localparam int OFF_SEND = 14, OFF_ING = 26, OFF_RES = 38, OFF_RX = 46;
  localparam logic [127:0] NS = 128'd1 << 32;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] mac_txd [NN], mac_rxd [NN], sw_txd [NN], sw_rxd [NN];
  logic       mac_tx_en [NN], mac_rx_dv [NN], sw_tx_en [NN], sw_rx_dv [NN];
  clk_ctrl_t  node_clk_ctrl [NN];
  acc_ctrl_t  node_acc_ctrl [NN];
  csp_cfg_t   csp_tx_cfg, csp_rx_cfg, addon_ing_cfg, addon_egr_cfg;
  ts_t        node_time [NN], node_tx_ts [NN], node_rx_ts [NN], addon_time;
  nsf_t       node_acc_neg [NN], node_acc_pos [NN];
  ts_t        node_interval_lo [NN], node_interval_hi [NN];
  logic [NN-1:0] node_interval_wide;
  logic [NN-1:0] node_amort_busy, node_tx_stamped, node_rx_stamped, addon_ing_stamped, addon_egr_stamped;
  logic [NI-1:0] evt_in [NN];
  logic [NI:0]   evt_clr [NN], evt_valid [NN], evt_overrun [NN];
  ts_t           evt_ts [NN][NI+1];
  logic [NO-1:0] gen_arm [NN], gen_clr [NN], evt_out [NN];
  ts_t           gen_time [NN][NO];
  logic       gps_pps = 0, gps_rxd = 1, gps_txd, gps_tx_start = 0, gps_tx_busy, gps_rx_valid, gps_rx_err;
  logic [7:0] gps_tx_data = '0, gps_rx_data;
  clk_ctrl_t  addon_clk_ctrl = '0;
  int         checks = 0, failures = 0;

  assign csp_tx_cfg    = '{ethertype: CSP_TYPE, ts_offset: 11'(OFF_SEND), src_offset: 11'd0};
  assign csp_rx_cfg    = '{ethertype: CSP_TYPE, ts_offset: 11'(OFF_RX),   src_offset: 11'd0};
  assign addon_ing_cfg = '{ethertype: CSP_TYPE, ts_offset: 11'(OFF_ING),  src_offset: 11'd0};
  assign addon_egr_cfg = '{ethertype: CSP_TYPE, ts_offset: 11'(OFF_RES),  src_offset: 11'(OFF_ING)};

  synutc_system dut (
    .clk, .rst_n, .mii_ce(1'b1), .mac_txd, .mac_tx_en, .mac_rxd, .mac_rx_dv,
    .node_clk_ctrl, .node_acc_ctrl, .csp_tx_cfg, .csp_rx_cfg, .node_time, .node_acc_neg, .node_acc_pos,
    .node_amort_busy, .node_interval_lo, .node_interval_hi, .node_interval_wide, .node_tx_ts, .node_rx_ts, .node_tx_stamped, .node_rx_stamped,
    .evt_in, .evt_clr, .evt_ts, .evt_valid, .evt_overrun, .gen_arm, .gen_time, .gen_clr, .evt_out,
    .gps_pps, .gps_rxd, .gps_txd, .gps_tx_data, .gps_tx_start, .gps_tx_busy, .gps_rx_data,
    .gps_rx_valid, .gps_rx_err, .addon_clk_ctrl, .addon_ing_cfg, .addon_egr_cfg, .addon_time,
    .sw_txd, .sw_tx_en, .sw_rxd, .sw_rx_dv, .addon_ing_stamped, .addon_egr_stamped);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // mechanism counters
  typedef enum int {M_SEND_TS, M_RX_TS, M_INGRESS, M_RESIDENCE, M_PASSTHRU, M_LOAD, M_SEC_WRAP,
                    M_AMORT, M_RATE, M_ACC, M_INTERVAL, M_EVT_TS, M_EVT_GEN, M_PPS, M_UART, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"send_ts", "receive_ts", "ingress_ts", "residence", "non_csp_passthrough",
      "clock_load", "seconds_rollover", "amortization", "rate_adjust", "accuracy_deterioration", "accuracy_interval",
      "event_timestamp", "event_generation", "pps_capture", "gps_uart"};

  // ---------------- stream monitors ----------------
  logic [3:0] cur_sw [NN][$], cur_rx [NN][$];
  logic [3:0] fr_sw  [NN][$][$], fr_rx [NN][$][$];
  ts_t        t_send [NN][$], t_ing [NN][$], t_egr [NN][$], t_recv [NN][$];
  logic       p5 [4][NN], inf [4][NN];
  int         sw_busy_until [NN];

  initial for (int n = 0; n < NN; n++) begin
    mac_txd[n] = '0; mac_tx_en[n] = 0; sw_rxd[n] = '0; sw_rx_dv[n] = 0;
    node_clk_ctrl[n] = '0; node_acc_ctrl[n] = '0; evt_in[n] = '0; evt_clr[n] = '0;
    gen_arm[n] = '0; gen_clr[n] = '0; gen_time[n][0] = '0; gen_time[n][1] = '0;
    for (int k = 0; k < 4; k++) begin p5[k][n] = 0; inf[k][n] = 0; end
  end
  initial for (int m = 0; m < M_NUM; m++) mech[m] = 0;

  // SFD watcher: returns 1 in the cycle an SFD nibble is on a stream
  function automatic logic sfd_seen(int k, int n, logic dv, logic [3:0] d);
    logic hit;
    hit = dv && !inf[k][n] && p5[k][n] && d == 4'hD;
    if (hit) inf[k][n] = 1;
    if (!dv) inf[k][n] = 0;
    p5[k][n] = dv && d == 4'h5;
    return hit;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (sw_tx_en[n]) cur_sw[n].push_back(sw_txd[n]);
      else if (cur_sw[n].size() != 0) begin fr_sw[n].push_back(cur_sw[n]); cur_sw[n] = {}; end
      if (mac_rx_dv[n]) cur_rx[n].push_back(mac_rxd[n]);
      else if (cur_rx[n].size() != 0) begin fr_rx[n].push_back(cur_rx[n]); cur_rx[n] = {}; end
      if (sfd_seen(0, n, mac_tx_en[n], mac_txd[n]))                 t_send[n].push_back(node_time[n]);
      if (sfd_seen(1, n, dut.link_up_dv[n], dut.link_up_d[n]))       t_ing[n].push_back(addon_time);
      if (sfd_seen(2, n, sw_rx_dv[n], sw_rxd[n]))                    t_egr[n].push_back(addon_time);
      if (sfd_seen(3, n, dut.link_dn_dv[n], dut.link_dn_d[n]))       t_recv[n].push_back(node_time[n]);
      if (node_tx_stamped[n]) mech[M_SEND_TS]++;
      if (node_rx_stamped[n]) mech[M_RX_TS]++;
      if (addon_ing_stamped[n]) mech[M_INGRESS]++;
      if (addon_egr_stamped[n]) mech[M_RESIDENCE]++;
    end
  end

  // ---------------- the Ethernet switch: broadcast with a random delay ----------------
  typedef struct { int src; logic [3:0] nib[$]; } pend_t;
  pend_t sw_q [NN][$];

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NN; s++)
      while (fr_sw[s].size() != 0) begin
        logic [3:0] n[$];
        n = fr_sw[s].pop_front();
        for (int d = 0; d < NN; d++) if (d != s) begin
          pend_t p;
          p.src = s; p.nib = n;
          sw_q[d].push_back(p);
        end
      end
  end

  for (genvar d = 0; d < NN; d++) begin : g_sw_port
    initial begin
      forever begin
        pend_t p;
        @(negedge clk);
        if (sw_q[d].size() != 0) begin
          p = sw_q[d].pop_front();
          repeat (100 + $urandom_range(0, 1900)) @(negedge clk);   // 1..20 us in the switch
          foreach (p.nib[i]) begin sw_rx_dv[d] = 1; sw_rxd[d] = p.nib[i]; @(negedge clk); end
          sw_rx_dv[d] = 0; sw_rxd[d] = '0;
          repeat (24) @(negedge clk);                              // inter-frame gap
        end
      end
    end
  end

  // ---------------- MAC side ----------------
  task automatic mac_send(int n, byte_q_t f);
    for (int i = 0; i < 16; i++) begin mac_tx_en[n] = 1; mac_txd[n] = (i == 15) ? 4'hD : 4'h5; @(negedge clk); end
    foreach (f[i]) begin
      mac_txd[n] = f[i][3:0]; @(negedge clk);
      mac_txd[n] = f[i][7:4]; @(negedge clk);
    end
    mac_tx_en[n] = 0; mac_txd[n] = '0;
  endtask

  function automatic logic [95:0] get_field(byte_q_t f, int off, int nb);
    logic [95:0] v;
    v = '0;
    for (int i = 0; i < nb; i++) v = (v << 8) | 96'(f[off + i]);
    return v;
  endfunction

  // one round: every node broadcasts a CSP; returns measured offsets of nodes vs node 0
  task automatic round(int seed, output logic signed [127:0] est [NN]);
    int got;
    fork
      mac_send(0, make_frame(CSP_TYPE, 50, 0));
      mac_send(1, make_frame(CSP_TYPE, 50, 1));
      mac_send(2, make_frame(CSP_TYPE, 50, 2));
      mac_send(3, make_frame(CSP_TYPE, 50, 3));
    join
    // wait for all 12 frames
    got = 0;
    repeat (40000) begin
      got = fr_rx[0].size() + fr_rx[1].size() + fr_rx[2].size() + fr_rx[3].size();
      if (got == NN * (NN - 1)) break;
      @(negedge clk);
    end
    chk(got == NN * (NN - 1), $sformatf("round %0d: all CSPs delivered (%0d)", seed, got));
    for (int j = 0; j < NN; j++) begin
      ts_t ts_send [NN];
      ts_t ts_ing [NN];
      est[j] = 0;
      for (int i = 0; i < NN; i++) begin ts_send[i] = t_send[i][0]; ts_ing[i] = t_ing[i][0]; end
      while (fr_rx[j].size() != 0) begin
        byte_q_t r, body;
        int pre, i;
        logic [127:0] res;
        ts_t te, tr;
        r = nibbles_to_frame(fr_rx[j].pop_front(), pre);
        te = t_egr[j].pop_front();
        tr = t_recv[j].pop_front();
        i = int'(r[6]) - 32'hA0;
        body = r; fix_fcs(body, 0);
        chk(body == r, "FCS valid at the receiving MAC");
        chk(get_field(r, OFF_SEND, 12) == ts_send[i], $sformatf("Send TS %0d->%0d", i, j));
        chk(get_field(r, OFF_ING, 12) == ts_ing[i], $sformatf("ingress time %0d->%0d", i, j));
        res = ts_units(te) - ts_units(ts_ing[i]);
        chk(get_field(r, OFF_RES, 8) == 96'(res[63:0]), $sformatf("residence %0d->%0d", i, j));
        chk(get_field(r, OFF_RX, 12) == tr, $sformatf("Receive TS %0d->%0d", i, j));
        if (i == 0)
          est[j] = $signed(ts_units(get_field(r, OFF_RX, 12))) - $signed(ts_units(get_field(r, OFF_SEND, 12)))
                 - $signed(128'(get_field(r, OFF_RES, 8))) - $signed(128'd180 * NS);
      end
    end
    for (int i = 0; i < NN; i++) begin void'(t_send[i].pop_front()); void'(t_ing[i].pop_front()); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ts_t loads [NN];
    logic signed [127:0] est [NN], truth [NN];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // ---- 1. different clock states, one about to roll over its second ----
    loads[0] = {32'd1000, 32'd0,           32'd0};
    loads[1] = {32'd1000, 32'd1_250_375,   32'd0};
    loads[2] = {32'd1000, 32'd999_999_000, 32'd0};
    loads[3] = {32'd999,  32'd999_000_000, 32'd0};
    for (int n = 0; n < NN; n++) begin
      node_clk_ctrl[n].load_stb = 1; node_clk_ctrl[n].load_val = loads[n];
      truth[n] = $signed(ts_units(loads[n])) - $signed(ts_units(loads[0]));
    end
    @(negedge clk);
    for (int n = 0; n < NN; n++) node_clk_ctrl[n] = '0;
    for (int n = 0; n < NN; n++) if (node_time[n] == loads[n]) mech[M_LOAD]++;
    repeat (200) @(negedge clk);
    if (node_time[2][95:64] == 32'd1001) mech[M_SEC_WRAP]++;

    // ---- 2./3. first round, offsets, state resynchronisation ----
    round(1, est);
    for (int j = 1; j < NN; j++)
      chk(est[j] == truth[j], $sformatf("offset of node %0d measured exactly (%0d vs %0d ns)", j,
          est[j] >>> 32, truth[j] >>> 32));
    for (int j = 1; j < NN; j++) begin
      node_clk_ctrl[j].load_stb = 1;
      node_clk_ctrl[j].load_val = units_ts(128'($signed(ts_units(node_time[j])) + $signed(128'd10 * NS) - est[j]));
    end
    @(negedge clk);
    for (int j = 1; j < NN; j++) node_clk_ctrl[j] = '0;
    repeat (3) begin
      for (int j = 1; j < NN; j++) chk(node_time[j] == node_time[0], $sformatf("node %0d agrees after resync", j));
      @(negedge clk);
    end
    // accuracy intervals after resynchronisation: 100 ns, widening 1/1024 ns per tick
    for (int n = 0; n < NN; n++) begin
      node_acc_ctrl[n].load_stb = 1; node_acc_ctrl[n].neg_val = 64'd100 << 32; node_acc_ctrl[n].pos_val = 64'd100 << 32;
      node_acc_ctrl[n].rate_stb = 1; node_acc_ctrl[n].neg_rate = 64'h40_0000; node_acc_ctrl[n].pos_rate = 64'h40_0000;
    end
    @(negedge clk);
    for (int n = 0; n < NN; n++) node_acc_ctrl[n] = '0;
    repeat (1024) @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      chk(node_acc_neg[n] == (64'd101 << 32) && node_acc_pos[n] == (64'd101 << 32), "accuracy bounds widened by 1 ns");
      if (node_acc_neg[n] == (64'd101 << 32)) mech[M_ACC]++;
      // every node's interval must contain the common time, and be as wide as its two bounds
      chk(!node_interval_wide[n] && ts_units(node_interval_lo[n]) < ts_units(node_time[0]) &&
          ts_units(node_time[0]) < ts_units(node_interval_hi[n]), "interval contains the common time");
      chk(ts_units(node_interval_hi[n]) - ts_units(node_interval_lo[n]) == 128'd202 * NS - 128'h80_0000,
          "interval width alpha- + alpha+");
      if (!node_interval_wide[n]) mech[M_INTERVAL]++;
    end

    // ---- 4. slew node 1 by +500 ns, measure, slew back ----
    node_clk_ctrl[1].amort_stb = 1; node_clk_ctrl[1].amort_delta = 64'h8000_0000; node_clk_ctrl[1].amort_ticks = 1000;
    @(negedge clk); node_clk_ctrl[1] = '0;
    chk(node_amort_busy[1], "amortization running");
    repeat (1001) @(negedge clk);
    chk(ts_units(node_time[1]) - ts_units(node_time[0]) == 128'd500 * NS, "node 1 slewed by 500 ns");
    round(2, est);
    chk(est[1] == $signed(128'd500 * NS), "second round measures the 500 ns slew");
    chk(est[2] == 0 && est[3] == 0, "second round: other nodes agree");
    node_clk_ctrl[1].amort_stb = 1; node_clk_ctrl[1].amort_delta = -64'sh8000_0000; node_clk_ctrl[1].amort_ticks = 1000;
    @(negedge clk); node_clk_ctrl[1] = '0;
    repeat (1001) @(negedge clk);
    chk(node_time[1] == node_time[0], "node 1 amortized back");
    if (node_time[1] == node_time[0]) mech[M_AMORT]++;

    // ---- 5. events, rate, pass-through, GPS ----
    evt_in[1][0] = 1; evt_in[2][1] = 1;
    repeat (5) @(negedge clk);
    chk(evt_valid[1][0] && evt_valid[2][1] && evt_ts[1][0] == evt_ts[2][1], "simultaneous events get equal stamps");
    if (evt_ts[1][0] == evt_ts[2][1]) mech[M_EVT_TS]++;
    begin
      ts_t tgo;
      int c0, c3;
      tgo = units_ts(ts_units(node_time[0]) + 128'd5003 * NS);
      gen_time[0][1] = tgo; gen_time[3][0] = tgo; gen_arm[0] = 2'b10; gen_arm[3] = 2'b01;
      @(negedge clk); gen_arm[0] = '0; gen_arm[3] = '0;
      c0 = -1; c3 = -1;
      for (int c = 0; c < 1000 && (c0 < 0 || c3 < 0); c++) begin
        if (c0 < 0 && evt_out[0][1]) c0 = c;
        if (c3 < 0 && evt_out[3][0]) c3 = c;
        @(negedge clk);
      end
      chk(c0 >= 0 && c0 == c3, "event outputs on two nodes rise in the same cycle");
      if (c0 >= 0 && c0 == c3) mech[M_EVT_GEN]++;
    end
    begin
      logic [127:0] d0;
      node_clk_ctrl[3].inc_stb = 1; node_clk_ctrl[3].inc = 64'h0000_000A_0000_1000;  // +1/2^20 ns per tick
      @(negedge clk); node_clk_ctrl[3] = '0;
      d0 = ts_units(node_time[3]) - ts_units(node_time[0]);
      repeat (4096) @(negedge clk);
      node_clk_ctrl[3].inc_stb = 1; node_clk_ctrl[3].inc = 64'h0000_000A_0000_0000;
      @(negedge clk); node_clk_ctrl[3] = '0;
      chk(ts_units(node_time[3]) - ts_units(node_time[0]) - d0 == 128'(4096 * 32'h1000), "rate change drifts as programmed");
      if (ts_units(node_time[3]) != ts_units(node_time[0])) mech[M_RATE]++;
    end
    begin
      byte_q_t f, r;
      int pre, j;
      f = make_frame(16'h0800, 60, 0);
      mac_send(0, f);
      j = 0;
      repeat (30000) begin if (fr_rx[1].size() + fr_rx[2].size() + fr_rx[3].size() == 3) break; @(negedge clk); end
      for (int n = 1; n < NN; n++) if (fr_rx[n].size() != 0) begin
        r = nibbles_to_frame(fr_rx[n].pop_front(), pre);
        void'(t_egr[n].pop_front()); void'(t_recv[n].pop_front());
        chk(r == f, "non-CSP frame unchanged");
        if (r == f) j++;
      end
      chk(j == 3, "non-CSP frame reached all nodes");
      void'(t_send[0].pop_front()); void'(t_ing[0].pop_front());
      if (j == 3) mech[M_PASSTHRU]++;
    end
    begin
      ts_t tp;
      gps_pps = 1; tp = node_time[0];
      repeat (4) @(negedge clk);
      chk(evt_valid[0][NI] && evt_ts[0][NI] == units_ts(ts_units(tp) + 128'd20 * NS), "1-pps timestamped");
      if (evt_valid[0][NI]) mech[M_PPS]++;
    end
    begin
      logic [9:0] fr;
      int ok;
      fr = {1'b1, 8'h47, 1'b0};   // 'G'
      ok = 0;
      fork
        for (int b = 0; b < 10; b++) begin gps_rxd = fr[b]; repeat (DIV) @(negedge clk); end
        repeat (11 * DIV) begin if (gps_rx_valid && gps_rx_data == 8'h47) ok++; @(negedge clk); end
      join
      chk(ok == 1, "GPS serial byte received");
      if (ok == 1) mech[M_UART]++;
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-22s %0d", mech_name[m], mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism %s happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
