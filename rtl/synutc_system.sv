// synutc_system - prototype clock synchronisation system: N_NODES SynUTC
// network nodes around a switch add-on.
//
// Each node's MII towards its PHY is joined directly to one port of the switch
// add-on (the PHY pair and cable are taken as a zero-delay link); the add-on's
// switch-side MII ports are brought out for the Ethernet switch. So a CSP sent
// by node i gets its Send TS in node i, its ingress time in the add-on, is
// forwarded by the external switch, gets its residence time on the add-on's way
// out and its Receive TS in the destination node. The GPS receiver attaches to
// node 0 (1-pps and RS232); the other nodes' GPS inputs are held idle. What
// the nodes' CPUs and MACs would drive is brought out as per-node ports.
// One core clock runs every adder-based clock; mii_ce marks MII nibble cycles.
// The four nodes, the add-on between nodes and switch and the GPS receiver on
// one node follow the source system overview; the shared CSP format ports and
// the direct MII links are this design's choices.
module synutc_system
  import synutc_pkg::*;
#(
  parameter int unsigned N_NODES   = 4,
  parameter int unsigned N_EVT_IN  = 2,
  parameter int unsigned N_EVT_OUT = 2,
  parameter int unsigned UART_DIV  = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mii_ce,
  // MACs of the nodes
  input  logic [3:0] mac_txd    [N_NODES],
  input  logic       mac_tx_en  [N_NODES],
  output logic [3:0] mac_rxd    [N_NODES],
  output logic       mac_rx_dv  [N_NODES],
  // CPUs of the nodes
  input  clk_ctrl_t  node_clk_ctrl [N_NODES],
  input  acc_ctrl_t  node_acc_ctrl [N_NODES],
  input  csp_cfg_t   csp_tx_cfg,          // "Send TS" field
  input  csp_cfg_t   csp_rx_cfg,          // "Receive TS" field
  output ts_t        node_time  [N_NODES],
  output nsf_t       node_acc_neg [N_NODES],
  output nsf_t       node_acc_pos [N_NODES],
  output logic [N_NODES-1:0] node_amort_busy,
  output ts_t        node_interval_lo [N_NODES],
  output ts_t        node_interval_hi [N_NODES],
  output logic [N_NODES-1:0] node_interval_wide,
  output ts_t        node_tx_ts [N_NODES],
  output ts_t        node_rx_ts [N_NODES],
  output logic [N_NODES-1:0] node_tx_stamped,
  output logic [N_NODES-1:0] node_rx_stamped,
  // application events
  input  logic [N_EVT_IN-1:0]  evt_in    [N_NODES],
  input  logic [N_EVT_IN:0]    evt_clr   [N_NODES],
  output ts_t                  evt_ts    [N_NODES][N_EVT_IN+1],
  output logic [N_EVT_IN:0]    evt_valid [N_NODES],
  output logic [N_EVT_IN:0]    evt_overrun [N_NODES],
  input  logic [N_EVT_OUT-1:0] gen_arm   [N_NODES],
  input  ts_t                  gen_time  [N_NODES][N_EVT_OUT],
  input  logic [N_EVT_OUT-1:0] gen_clr   [N_NODES],
  output logic [N_EVT_OUT-1:0] evt_out   [N_NODES],
  // GPS receiver on node 0
  input  logic       gps_pps,
  input  logic       gps_rxd,
  output logic       gps_txd,
  input  logic [7:0] gps_tx_data,
  input  logic       gps_tx_start,
  output logic       gps_tx_busy,
  output logic [7:0] gps_rx_data,
  output logic       gps_rx_valid,
  output logic       gps_rx_err,
  // switch add-on and the external Ethernet switch
  input  clk_ctrl_t  addon_clk_ctrl,
  input  csp_cfg_t   addon_ing_cfg,
  input  csp_cfg_t   addon_egr_cfg,
  output ts_t        addon_time,
  output logic [3:0] sw_txd     [N_NODES],
  output logic       sw_tx_en   [N_NODES],
  input  logic [3:0] sw_rxd     [N_NODES],
  input  logic       sw_rx_dv   [N_NODES],
  output logic [N_NODES-1:0] addon_ing_stamped,
  output logic [N_NODES-1:0] addon_egr_stamped
);

  logic [3:0] link_up_d  [N_NODES];   // node -> add-on
  logic       link_up_dv [N_NODES];
  logic [3:0] link_dn_d  [N_NODES];   // add-on -> node
  logic       link_dn_dv [N_NODES];

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    localparam bit HAS_GPS = (n == 0);
    logic [N_EVT_OUT-1:0] armed_unused;
    logic       tx_v_unused, rx_v_unused;
    logic       txd_o, busy_o, rxv_o, rxe_o;
    logic [7:0] rxdat_o;

    synutc_node #(.N_EVT_IN(N_EVT_IN), .N_EVT_OUT(N_EVT_OUT), .UART_DIV(UART_DIV)) u_node (
      .clk, .rst_n, .mii_ce,
      .mac_txd(mac_txd[n]), .mac_tx_en(mac_tx_en[n]),
      .phy_txd(link_up_d[n]), .phy_tx_en(link_up_dv[n]),
      .phy_rxd(link_dn_d[n]), .phy_rx_dv(link_dn_dv[n]),
      .mac_rxd(mac_rxd[n]), .mac_rx_dv(mac_rx_dv[n]),
      .clk_ctrl(node_clk_ctrl[n]), .acc_ctrl(node_acc_ctrl[n]),
      .time_now(node_time[n]), .acc_neg(node_acc_neg[n]), .acc_pos(node_acc_pos[n]),
      .amort_busy(node_amort_busy[n]),
      .interval_lo(node_interval_lo[n]), .interval_hi(node_interval_hi[n]),
      .interval_wide(node_interval_wide[n]),
      .tx_cfg(csp_tx_cfg), .rx_cfg(csp_rx_cfg),
      .tx_ts(node_tx_ts[n]), .tx_ts_valid(tx_v_unused), .tx_stamped(node_tx_stamped[n]),
      .rx_ts(node_rx_ts[n]), .rx_ts_valid(rx_v_unused), .rx_stamped(node_rx_stamped[n]),
      .evt_in(evt_in[n]), .pps(HAS_GPS ? gps_pps : 1'b0), .evt_clr(evt_clr[n]),
      .evt_ts(evt_ts[n]), .evt_valid(evt_valid[n]), .evt_overrun(evt_overrun[n]),
      .gen_arm(gen_arm[n]), .gen_time(gen_time[n]), .gen_clr(gen_clr[n]),
      .evt_out(evt_out[n]), .gen_armed(armed_unused),
      .uart_rxd(HAS_GPS ? gps_rxd : 1'b1), .uart_txd(txd_o),
      .uart_tx_data(gps_tx_data), .uart_tx_start(HAS_GPS ? gps_tx_start : 1'b0),
      .uart_tx_busy(busy_o), .uart_rx_data(rxdat_o), .uart_rx_valid(rxv_o), .uart_rx_err(rxe_o)
    );

    if (HAS_GPS) begin : g_gps
      assign gps_txd      = txd_o;
      assign gps_tx_busy  = busy_o;
      assign gps_rx_data  = rxdat_o;
      assign gps_rx_valid = rxv_o;
      assign gps_rx_err   = rxe_o;
    end
  end

  switch_addon #(.N_PORTS(N_NODES)) u_addon (
    .clk, .rst_n, .mii_ce,
    .clk_ctrl(addon_clk_ctrl), .ing_cfg(addon_ing_cfg), .egr_cfg(addon_egr_cfg),
    .time_now(addon_time),
    .node_rxd(link_up_d), .node_rx_dv(link_up_dv),
    .node_txd(link_dn_d), .node_tx_en(link_dn_dv),
    .sw_txd, .sw_tx_en, .sw_rxd, .sw_rx_dv,
    .ing_stamped(addon_ing_stamped), .egr_stamped(addon_egr_stamped)
  );

endmodule
