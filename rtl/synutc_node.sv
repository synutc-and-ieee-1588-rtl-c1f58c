// synutc_node - timing core of a SynUTC network node (the node's SoC without
// its CPU and Ethernet MAC).
//
// It combines everything a node needs in hardware for interval-based clock
// synchronisation:
//   * the 96-bit adder-based local clock (rate adjustment, load, amortization),
//   * two accuracy clocks for alpha- and alpha+, so the node's accuracy
//     interval [time - acc_neg, time + acc_pos] widens by itself, and the
//     interval display that forms both ends of it,
//   * an MII stamper on the transmit path writing the "Send TS" field of
//     outgoing CSPs and one on the receive path writing the "Receive TS" field,
//   * event timestamping for N_EVT_IN input pins plus the GPS 1-pps pin
//     (channel N_EVT_IN), and event generation on N_EVT_OUT output pins,
//   * the RS232 port to the GPS timing receiver.
// The CPU side (commands, configuration and status) is brought out as ports.
// MII runs in the core clock domain: mii_ce marks the cycles that carry a
// nibble. Both MII paths pass through with a constant delay of 9 nibbles.
// The list of functions follows the source description; the port-level CPU
// interface and the MII clock-enable are this design's choices.
module synutc_node
  import synutc_pkg::*;
#(
  parameter int unsigned N_EVT_IN  = 2,
  parameter int unsigned N_EVT_OUT = 2,
  parameter int unsigned UART_DIV  = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mii_ce,
  // MII between MAC and PHY
  input  logic [3:0] mac_txd,
  input  logic       mac_tx_en,
  output logic [3:0] phy_txd,
  output logic       phy_tx_en,
  input  logic [3:0] phy_rxd,
  input  logic       phy_rx_dv,
  output logic [3:0] mac_rxd,
  output logic       mac_rx_dv,
  // CPU: clocks
  input  clk_ctrl_t  clk_ctrl,
  input  acc_ctrl_t  acc_ctrl,
  output ts_t        time_now,
  output nsf_t       acc_neg,
  output nsf_t       acc_pos,
  output logic       amort_busy,
  output ts_t        interval_lo,   // time - alpha-, one cycle behind time_now
  output ts_t        interval_hi,   // time + alpha+
  output logic       interval_wide, // a bound is one second or more
  // CPU: packet timestamps
  input  csp_cfg_t   tx_cfg,
  input  csp_cfg_t   rx_cfg,
  output ts_t        tx_ts,
  output logic       tx_ts_valid,
  output logic       tx_stamped,
  output ts_t        rx_ts,
  output logic       rx_ts_valid,
  output logic       rx_stamped,
  // events and GPS
  input  logic [N_EVT_IN-1:0]  evt_in,
  input  logic                 pps,
  input  logic [N_EVT_IN:0]    evt_clr,
  output ts_t                  evt_ts [N_EVT_IN+1],
  output logic [N_EVT_IN:0]    evt_valid,
  output logic [N_EVT_IN:0]    evt_overrun,
  input  logic [N_EVT_OUT-1:0] gen_arm,
  input  ts_t                  gen_time [N_EVT_OUT],
  input  logic [N_EVT_OUT-1:0] gen_clr,
  output logic [N_EVT_OUT-1:0] evt_out,
  output logic [N_EVT_OUT-1:0] gen_armed,
  input  logic                 uart_rxd,
  output logic                 uart_txd,
  input  logic [7:0]           uart_tx_data,
  input  logic                 uart_tx_start,
  output logic                 uart_tx_busy,
  output logic [7:0]           uart_rx_data,
  output logic                 uart_rx_valid,
  output logic                 uart_rx_err
);

  nsf_t inc_unused, rn_unused, rp_unused;
  logic tx_er_unused, rx_er_unused;

  adder_clock u_clock (
    .clk, .rst_n, .ctrl(clk_ctrl), .time_o(time_now), .inc_o(inc_unused), .amort_busy
  );

  accuracy_clock #(.W(NSF_W)) u_acc_neg (
    .clk, .rst_n, .load(acc_ctrl.load_stb), .load_val(acc_ctrl.neg_val),
    .rate_stb(acc_ctrl.rate_stb), .rate(acc_ctrl.neg_rate), .alpha(acc_neg), .rate_o(rn_unused)
  );

  accuracy_clock #(.W(NSF_W)) u_acc_pos (
    .clk, .rst_n, .load(acc_ctrl.load_stb), .load_val(acc_ctrl.pos_val),
    .rate_stb(acc_ctrl.rate_stb), .rate(acc_ctrl.pos_rate), .alpha(acc_pos), .rate_o(rp_unused)
  );

  interval_clock u_interval (
    .clk, .rst_n, .time_i(time_now), .acc_neg, .acc_pos,
    .lo(interval_lo), .hi(interval_hi), .wide(interval_wide)
  );

  mii_stamper #(.FIELD_BYTES(12), .RESIDENCE(1'b0)) u_tx_stamp (
    .clk, .rst_n, .ce(mii_ce),
    .in_d(mac_txd), .in_dv(mac_tx_en), .in_er(1'b0),
    .out_d(phy_txd), .out_dv(phy_tx_en), .out_er(tx_er_unused),
    .time_i(time_now), .cfg(tx_cfg),
    .ts_capt(tx_ts), .ts_valid(tx_ts_valid), .stamped(tx_stamped)
  );

  mii_stamper #(.FIELD_BYTES(12), .RESIDENCE(1'b0)) u_rx_stamp (
    .clk, .rst_n, .ce(mii_ce),
    .in_d(phy_rxd), .in_dv(phy_rx_dv), .in_er(1'b0),
    .out_d(mac_rxd), .out_dv(mac_rx_dv), .out_er(rx_er_unused),
    .time_i(time_now), .cfg(rx_cfg),
    .ts_capt(rx_ts), .ts_valid(rx_ts_valid), .stamped(rx_stamped)
  );

  event_timestamp #(.N(N_EVT_IN + 1)) u_evt_ts (
    .clk, .rst_n, .ev({pps, evt_in}), .time_i(time_now), .clr(evt_clr),
    .ts(evt_ts), .valid(evt_valid), .overrun(evt_overrun)
  );

  event_generator #(.N(N_EVT_OUT)) u_evt_gen (
    .clk, .rst_n, .time_i(time_now), .arm(gen_arm), .cmp_time(gen_time), .clr(gen_clr),
    .out(evt_out), .armed(gen_armed)
  );

  uart #(.DIV(UART_DIV)) u_gps_uart (
    .clk, .rst_n, .tx_data(uart_tx_data), .tx_start(uart_tx_start), .tx_busy(uart_tx_busy),
    .txd(uart_txd), .rxd(uart_rxd), .rx_data(uart_rx_data), .rx_valid(uart_rx_valid),
    .rx_err(uart_rx_err)
  );

endmodule
