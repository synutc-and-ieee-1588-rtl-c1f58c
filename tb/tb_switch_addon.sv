// tb_switch_addon - self-checking testbench for switch_addon.
//
// The testbench plays the nodes and the Ethernet switch. A frame enters the
// node side of port p; the testbench takes what the add-on passes to the switch
// on port p and, after a random residence of 50..3000 cycles, replays it into
// the switch side of port q. The frame leaving the node side of port q must
// carry the add-on time of its ingress SFD at byte 18 and the residence time
// (egress SFD time - ingress SFD time, both observed here on the MII streams)
// at byte 30, with a correct FCS. Non-CSP frames must cross unchanged. All port
// pairs are used; the stamped pulses are counted per port.
module tb_switch_addon;
  import synutc_pkg::*;
  import tb_eth_pkg::*;

  localparam int NP = 4;
  localparam logic [15:0] CSP_TYPE = 16'h88F7;

  logic       clk = 1'b0, rst_n = 1'b0;
  clk_ctrl_t  clk_ctrl = '0;
  csp_cfg_t   ing_cfg, egr_cfg;
  ts_t        time_now;
  logic [3:0] node_rxd [NP], node_txd [NP], sw_txd [NP], sw_rxd [NP];
  logic       node_rx_dv [NP], node_tx_en [NP], sw_tx_en [NP], sw_rx_dv [NP];
  logic [NP-1:0] ing_stamped, egr_stamped;
  int         checks = 0, failures = 0;

  assign ing_cfg = '{ethertype: CSP_TYPE, ts_offset: 11'd18, src_offset: 11'd0};
  assign egr_cfg = '{ethertype: CSP_TYPE, ts_offset: 11'd30, src_offset: 11'd18};

  switch_addon #(.N_PORTS(NP)) dut (
    .clk, .rst_n, .mii_ce(1'b1), .clk_ctrl, .ing_cfg, .egr_cfg, .time_now,
    .node_rxd, .node_rx_dv, .node_txd, .node_tx_en,
    .sw_txd, .sw_tx_en, .sw_rxd, .sw_rx_dv, .ing_stamped, .egr_stamped);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- monitors: frames and SFD times on every stream ----------------
  logic [3:0] cur_sw [NP][$], cur_nd [NP][$];
  logic [3:0] fr_sw  [NP][$][$], fr_nd [NP][$][$];
  ts_t        t_ing [NP][$], t_egr [NP][$];
  logic       p5_i [NP], in_i [NP], p5_e [NP], in_e [NP];
  int         n_ing [NP], n_egr [NP];

  initial for (int p = 0; p < NP; p++) begin
    p5_i[p] = 0; in_i[p] = 0; p5_e[p] = 0; in_e[p] = 0; n_ing[p] = 0; n_egr[p] = 0;
    node_rxd[p] = '0; node_rx_dv[p] = 0; sw_rxd[p] = '0; sw_rx_dv[p] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (ing_stamped[p]) n_ing[p]++;
      if (egr_stamped[p]) n_egr[p]++;
      if (sw_tx_en[p]) cur_sw[p].push_back(sw_txd[p]);
      else if (cur_sw[p].size() != 0) begin fr_sw[p].push_back(cur_sw[p]); cur_sw[p] = {}; end
      if (node_tx_en[p]) cur_nd[p].push_back(node_txd[p]);
      else if (cur_nd[p].size() != 0) begin fr_nd[p].push_back(cur_nd[p]); cur_nd[p] = {}; end
      if (node_rx_dv[p] && !in_i[p] && p5_i[p] && node_rxd[p] == 4'hD) begin t_ing[p].push_back(time_now); in_i[p] = 1; end
      if (!node_rx_dv[p]) in_i[p] = 0;
      p5_i[p] = node_rx_dv[p] && node_rxd[p] == 4'h5;
      if (sw_rx_dv[p] && !in_e[p] && p5_e[p] && sw_rxd[p] == 4'hD) begin t_egr[p].push_back(time_now); in_e[p] = 1; end
      if (!sw_rx_dv[p]) in_e[p] = 0;
      p5_e[p] = sw_rx_dv[p] && sw_rxd[p] == 4'h5;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_node(int p, byte_q_t f);
    for (int i = 0; i < 16; i++) begin
      node_rx_dv[p] = 1; node_rxd[p] = (i == 15) ? 4'hD : 4'h5; @(negedge clk);
    end
    foreach (f[i]) begin
      node_rxd[p] = f[i][3:0]; @(negedge clk);
      node_rxd[p] = f[i][7:4]; @(negedge clk);
    end
    node_rx_dv[p] = 0; node_rxd[p] = '0;
    repeat (30) @(negedge clk);
  endtask

  task automatic replay_switch(int q, logic [3:0] n[$]);
    foreach (n[i]) begin sw_rx_dv[q] = 1; sw_rxd[q] = n[i]; @(negedge clk); end
    sw_rx_dv[q] = 0; sw_rxd[q] = '0;
    repeat (30) @(negedge clk);
  endtask

  int n_csp = 0, n_other = 0;

  task automatic one(int p, int q, logic [15:0] et, int seed, int residence);
    byte_q_t f, e, r;
    logic [3:0] n[$];
    ts_t ti, te;
    int pre;
    logic [127:0] res;
    f = make_frame(et, 50 + seed % 20, seed);
    send_node(p, f);
    chk(fr_sw[p].size() == 1 && t_ing[p].size() == 1, "frame reached the switch side");
    if (fr_sw[p].size() != 1) return;
    n = fr_sw[p].pop_front();
    ti = t_ing[p].pop_front();
    repeat (residence) @(negedge clk);
    replay_switch(q, n);
    chk(fr_nd[q].size() == 1 && t_egr[q].size() == 1, "frame reached the node side");
    if (fr_nd[q].size() != 1) return;
    te = t_egr[q].pop_front();
    r = nibbles_to_frame(fr_nd[q].pop_front(), pre);
    e = f;
    if (et == CSP_TYPE) begin
      put_field(e, 18, ti, 12);
      res = ts_units(te) - ts_units(ti);
      put_field(e, 30, {32'd0, res[63:0]}, 8);
      fix_fcs(e, 32'd0);
      n_csp++;
      // residence seen at the MII ports: the switch delay plus the add-on's own 9-nibble ingress delay
      chk(res[63:32] >= 32'(10 * residence), "residence covers the switch delay");
    end else n_other++;
    chk(r == e, $sformatf("frame port %0d -> %0d type %h", p, q, et));
    if (r != e) for (int i = 0; i < e.size() && i < r.size(); i++)
      if (r[i] != e[i]) $display("  byte %0d: got %h exp %h", i, r[i], e[i]);
  endtask

  initial begin
    ts_t t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    t0 = time_now;
    repeat (100) @(negedge clk);
    chk(ts_units(time_now) - ts_units(t0) == (128'd1000 << 32), "add-on clock runs at 10 ns per cycle");
    for (int p = 0; p < NP; p++)
      for (int q = 0; q < NP; q++)
        if (p != q) one(p, q, ((p + q) % 5 == 4) ? 16'h0800 : CSP_TYPE, p * 4 + q, 50 + int'($urandom_range(0, 2950)));
    chk(n_other > 0 && n_csp > 0, "both frame kinds sent");
    for (int p = 0; p < NP; p++) chk(n_ing[p] > 0 && n_egr[p] > 0, $sformatf("port %0d stamped both ways", p));
    $display("csp=%0d other=%0d", n_csp, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
