// switch_addon - delay-measurement add-on for a standard Ethernet switch.
//
// A switch holds a packet for a variable time (typically tens of microseconds),
// which would spoil clock synchronisation across it. The add-on sits in the MII
// links between N_PORTS nodes and the switch. On each port's way in, an
// ingress stamper writes the add-on's time of the SFD into the CSP's ingress
// field (12 bytes at ing_cfg.ts_offset). On each port's way out, an egress
// stamper in residence mode reads that field back and writes the time the CSP
// spent in the switch (egress SFD time - ingress time, 64-bit ns.frac) into the
// residence field at egr_cfg.ts_offset. Both directions regenerate the FCS.
// All ports use the add-on's one adder-based clock, so the residence time needs
// no clock synchronisation. Each path delays its stream by a constant 9
// nibbles. The ingress delay is part of the measured residence (it is taken
// from SFD to SFD at the two add-on inputs); the egress delay is not, and
// software adds it to the fixed path latency.
// Ingress stamping and residence insertion follow the source description; the
// field layout and the single local clock are this design's choices.
module switch_addon
  import synutc_pkg::*;
#(
  parameter int unsigned N_PORTS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mii_ce,
  input  clk_ctrl_t  clk_ctrl,
  input  csp_cfg_t   ing_cfg,
  input  csp_cfg_t   egr_cfg,
  output ts_t        time_now,
  // node side
  input  logic [3:0] node_rxd   [N_PORTS],
  input  logic       node_rx_dv [N_PORTS],
  output logic [3:0] node_txd   [N_PORTS],
  output logic       node_tx_en [N_PORTS],
  // switch side
  output logic [3:0] sw_txd     [N_PORTS],
  output logic       sw_tx_en   [N_PORTS],
  input  logic [3:0] sw_rxd     [N_PORTS],
  input  logic       sw_rx_dv   [N_PORTS],
  // status
  output logic [N_PORTS-1:0] ing_stamped,
  output logic [N_PORTS-1:0] egr_stamped
);

  nsf_t inc_unused;
  logic amort_unused;

  adder_clock u_clock (
    .clk, .rst_n, .ctrl(clk_ctrl), .time_o(time_now), .inc_o(inc_unused), .amort_busy(amort_unused)
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    ts_t  ing_ts, egr_ts;
    logic ing_v, egr_v, ing_er, egr_er;

    mii_stamper #(.FIELD_BYTES(12), .RESIDENCE(1'b0)) u_ingress (
      .clk, .rst_n, .ce(mii_ce),
      .in_d(node_rxd[p]), .in_dv(node_rx_dv[p]), .in_er(1'b0),
      .out_d(sw_txd[p]), .out_dv(sw_tx_en[p]), .out_er(ing_er),
      .time_i(time_now), .cfg(ing_cfg),
      .ts_capt(ing_ts), .ts_valid(ing_v), .stamped(ing_stamped[p])
    );

    mii_stamper #(.FIELD_BYTES(8), .RESIDENCE(1'b1)) u_egress (
      .clk, .rst_n, .ce(mii_ce),
      .in_d(sw_rxd[p]), .in_dv(sw_rx_dv[p]), .in_er(1'b0),
      .out_d(node_txd[p]), .out_dv(node_tx_en[p]), .out_er(egr_er),
      .time_i(time_now), .cfg(egr_cfg),
      .ts_capt(egr_ts), .ts_valid(egr_v), .stamped(egr_stamped[p])
    );
  end

endmodule
