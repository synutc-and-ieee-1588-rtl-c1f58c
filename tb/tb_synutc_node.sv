// tb_synutc_node - self-checking testbench for synutc_node.
//
// Exercises each function of the node through its ports:
//   * a CSP from the MAC must leave towards the PHY with the node time of its
//     SFD in the Send TS field (bytes 14..25) and a valid FCS; tx_ts must hold
//     the same time,
//   * a CSP from the PHY must reach the MAC with the Receive TS (bytes 46..57),
//   * an amortization of +1 ns per tick over 500 ticks must move the clock by
//     500 ns more than free running,
//   * the accuracy bounds must load and grow by their rates, and the interval
//     ends must follow the clock and the bounds,
//   * event input and 1-pps edges must be timestamped, an event output must rise
//     at its programmed time, and a byte sent on the GPS UART looped back must
//     be received.
module tb_synutc_node;
  import synutc_pkg::*;
  import tb_eth_pkg::*;

  localparam logic [15:0] CSP_TYPE = 16'h88F7;
  localparam int NI = 2, NO = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] mac_txd = '0, phy_txd, phy_rxd = '0, mac_rxd;
  logic       mac_tx_en = 0, phy_tx_en, phy_rx_dv = 0, mac_rx_dv;
  clk_ctrl_t  clk_ctrl = '0;
  acc_ctrl_t  acc_ctrl = '0;
  ts_t        time_now, tx_ts, rx_ts;
  nsf_t       acc_neg, acc_pos;
  ts_t        interval_lo, interval_hi;
  logic       interval_wide;
  logic       amort_busy, tx_ts_valid, tx_stamped, rx_ts_valid, rx_stamped;
  csp_cfg_t   tx_cfg, rx_cfg;
  logic [NI-1:0] evt_in = '0;
  logic       pps = 0;
  logic [NI:0] evt_clr = '0, evt_valid, evt_overrun;
  ts_t        evt_ts [NI+1];
  logic [NO-1:0] gen_arm = '0, gen_clr = '0, evt_out, gen_armed;
  ts_t        gen_time [NO];
  logic       uart_txd, uart_tx_busy, uart_rx_valid, uart_rx_err, uart_tx_start = 0;
  logic [7:0] uart_tx_data = '0, uart_rx_data;
  int         checks = 0, failures = 0;

  assign tx_cfg = '{ethertype: CSP_TYPE, ts_offset: 11'd14, src_offset: 11'd0};
  assign rx_cfg = '{ethertype: CSP_TYPE, ts_offset: 11'd46, src_offset: 11'd0};

  synutc_node #(.N_EVT_IN(NI), .N_EVT_OUT(NO), .UART_DIV(8)) dut (
    .clk, .rst_n, .mii_ce(1'b1), .mac_txd, .mac_tx_en, .phy_txd, .phy_tx_en, .phy_rxd, .phy_rx_dv,
    .mac_rxd, .mac_rx_dv, .clk_ctrl, .acc_ctrl, .time_now, .acc_neg, .acc_pos, .amort_busy,
    .interval_lo, .interval_hi, .interval_wide,
    .tx_cfg, .rx_cfg, .tx_ts, .tx_ts_valid, .tx_stamped, .rx_ts, .rx_ts_valid, .rx_stamped,
    .evt_in, .pps, .evt_clr, .evt_ts, .evt_valid, .evt_overrun, .gen_arm, .gen_time, .gen_clr,
    .evt_out, .gen_armed, .uart_rxd(uart_txd), .uart_txd, .uart_tx_data, .uart_tx_start,
    .uart_tx_busy, .uart_rx_data, .uart_rx_valid, .uart_rx_err);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // collect the MII outputs
  logic [3:0] cur_t[$], cur_r[$], fr_t[$][$], fr_r[$][$];
  always @(posedge clk) if (rst_n) begin
    if (phy_tx_en) cur_t.push_back(phy_txd); else if (cur_t.size() != 0) begin fr_t.push_back(cur_t); cur_t = {}; end
    if (mac_rx_dv) cur_r.push_back(mac_rxd); else if (cur_r.size() != 0) begin fr_r.push_back(cur_r); cur_r = {}; end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one frame on a MII input; returns the node time sampled with the SFD nibble
  task automatic drive(bit to_phy_side, byte_q_t f, output ts_t t_sfd);
    logic [3:0] n[$];
    for (int i = 0; i < 15; i++) n.push_back(4'h5);
    n.push_back(4'hD);
    foreach (f[i]) begin n.push_back(f[i][3:0]); n.push_back(f[i][7:4]); end
    foreach (n[i]) begin
      if (to_phy_side) begin phy_rx_dv = 1; phy_rxd = n[i]; end
      else             begin mac_tx_en = 1; mac_txd = n[i]; end
      if (i == 15) t_sfd = time_now;
      @(negedge clk);
    end
    phy_rx_dv = 0; mac_tx_en = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    byte_q_t f, e, r;
    ts_t t, t0, t1;
    int pre;
    gen_time[0] = '0; gen_time[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // set the clock to 1000 s
    clk_ctrl.load_stb = 1; clk_ctrl.load_val = {32'd1000, 64'd0};
    @(negedge clk); clk_ctrl = '0;

    // transmit path: Send TS
    f = make_frame(CSP_TYPE, 60, 1);
    drive(0, f, t);
    chk(fr_t.size() == 1, "frame on the PHY side");
    r = nibbles_to_frame(fr_t.pop_front(), pre);
    e = f; put_field(e, 14, t, 12); fix_fcs(e, 0);
    chk(r == e, "Send TS inserted with a valid FCS");
    chk(tx_ts == t && t[95:64] == 32'd1000, "tx_ts holds the SFD time");

    // receive path: Receive TS
    f = make_frame(CSP_TYPE, 60, 2);
    drive(1, f, t);
    chk(fr_r.size() == 1, "frame on the MAC side");
    r = nibbles_to_frame(fr_r.pop_front(), pre);
    e = f; put_field(e, 46, t, 12); fix_fcs(e, 0);
    chk(r == e, "Receive TS inserted with a valid FCS");
    chk(rx_ts == t, "rx_ts holds the SFD time");

    // amortization: +1 ns per tick for 500 ticks on top of 10 ns
    t0 = time_now;
    clk_ctrl.amort_stb = 1; clk_ctrl.amort_delta = 64'h1_0000_0000; clk_ctrl.amort_ticks = 500;
    @(negedge clk); clk_ctrl = '0;
    repeat (599) @(negedge clk);
    t1 = time_now;
    chk(ts_units(t1) - ts_units(t0) == 128'(600 * 10 + 500) << 32, "amortized slew of 500 ns");
    chk(!amort_busy, "amortization finished");

    // accuracy bounds: 50 ns / 80 ns, growing 0.5 / 0.25 ns per tick
    acc_ctrl.load_stb = 1; acc_ctrl.neg_val = 64'd50 << 32; acc_ctrl.pos_val = 64'd80 << 32;
    acc_ctrl.rate_stb = 1; acc_ctrl.neg_rate = 64'h8000_0000; acc_ctrl.pos_rate = 64'h4000_0000;
    @(negedge clk); acc_ctrl = '0;
    repeat (100) @(negedge clk);
    chk(acc_neg == (64'd100 << 32), "alpha- after 100 ticks");
    chk(acc_pos == (64'd105 << 32), "alpha+ after 100 ticks");
    // the interval display shows the clock and bounds of the previous cycle
    chk(!interval_wide, "interval bounded");
    chk(ts_units(interval_hi) == ts_units(time_now) - (128'd10 << 32) + (128'd105 << 32) - (128'h4000_0000), "upper end C + alpha+");
    chk(ts_units(interval_lo) == ts_units(time_now) - (128'd10 << 32) - (128'd100 << 32) + (128'h8000_0000), "lower end C - alpha-");

    // event input 1 and 1-pps (channel NI)
    evt_in[1] = 1; t = time_now;
    repeat (5) @(negedge clk);
    chk(evt_valid[1] && evt_ts[1] == units_ts(ts_units(t) + (128'd20 << 32)), "event input timestamp");
    pps = 1; t = time_now;
    repeat (5) @(negedge clk);
    chk(evt_valid[NI] && evt_ts[NI] == units_ts(ts_units(t) + (128'd20 << 32)), "1-pps timestamp");

    // event output 0 at now + 1 us
    t = units_ts(ts_units(time_now) + (128'd1000 << 32));
    gen_time[0] = t; gen_arm = 2'b01;
    @(negedge clk); gen_arm = '0;
    while (!evt_out[0]) @(negedge clk);
    chk(ts_units(time_now) - ts_units(t) <= (128'd20 << 32) && ts_units(time_now) >= ts_units(t),
        "event output within two ticks of its time");

    // GPS UART loopback
    uart_tx_data = 8'hA7; uart_tx_start = 1;
    @(negedge clk); uart_tx_start = 0;
    begin
      int got;
      got = 0;
      repeat (120) begin if (uart_rx_valid) begin got++; chk(uart_rx_data == 8'hA7, "GPS UART byte"); end @(negedge clk); end
      chk(got == 1, "GPS UART received one byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
