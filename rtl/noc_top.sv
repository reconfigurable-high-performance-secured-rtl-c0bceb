// noc_top: hierarchical agent-monitored NoC with two neighbouring clusters.
//
// Packets arriving from the application level (in_*) pass the cluster
// separation module, which sends each one to cluster 1 or cluster 2 by the
// cluster select bit of its header; inside the cluster the packet enters at
// the cluster agent's node and is routed by fault-aware XY routing to the
// cell agent of its destination, whose firewall passes it to the PE or stops
// it. Every PE can also send packets inside its own cluster. The two cluster
// agents exchange their critical-fault maps, report them to the top level
// (ca_up_*) and take segregation commands from it (ca_cmd_*).
// All per-node signals are arrays indexed [cluster][node], node = y*MESH_N+x.
// The fault status inputs stand for the fault detection circuitry; the PE
// ports and the cluster agent's up/command ports stand for the cores and
// the platform level, which are outside this design.
// Two clusters of 4x4 with a CSM follow the document; the clusters are joined
// only through the CSM and the agents (no data links between them), which is
// this design's choice.
// Timing: the CSM adds one register stage; a packet handed over by a PE is
// on a mesh link two cycles later, takes one cycle per hop, and reaches the
// destination PE three cycles after its last hop (router output, firewall
// and NI registers).
// rst_n is an asynchronous reset for the registers; lint also sees it in the
// `disable iff` of the assertions and reports it as used both ways, which is
// intended.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned           MESH_N    = 4,
  parameter int unsigned           HB_PERIOD = 16,
  parameter int unsigned           TIMEOUT   = 64,
  parameter logic [2**SPORT_W-1:0] HW_BLOCK  = 32'h8000_0000,
  parameter int unsigned           MAX_SESS  = 31,
  localparam int unsigned          NC        = 2,
  localparam int unsigned          NN        = MESH_N * MESH_N,
  localparam int unsigned          SCW       = $clog2(MAX_SESS + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // application-level packet input
  input  logic                              in_valid,
  input  pkt_t                              in_pkt,
  output logic                              in_ready,
  // fault status (from the fault detection circuitry) and dead-agent model
  input  node_fault_t [NC-1:0][NN-1:0]      fault,
  input  logic [NC-1:0][NN-1:0]             agent_fail,
  // agent configuration
  input  logic                              cfg_we,
  input  logic [$clog2(NC)-1:0]             cfg_cluster,
  input  logic [$clog2(NN)-1:0]             cfg_node,
  input  logic                              cfg_sel,
  input  logic [SPORT_W-1:0]                cfg_addr,
  input  logic [3:0]                        cfg_wdata,
  // processing elements
  input  logic [NC-1:0][NN-1:0]             pe_tx_valid,
  input  pkt_t [NC-1:0][NN-1:0]             pe_tx_pkt,
  output logic [NC-1:0][NN-1:0]             pe_tx_ready,
  output logic [NC-1:0][NN-1:0]             pe_tx_err,
  output logic [NC-1:0][NN-1:0]             pe_rx_valid,
  output pkt_t [NC-1:0][NN-1:0]             pe_rx_pkt,
  // platform level
  output logic [NC-1:0]                     ca_up_valid,
  output logic [NC-1:0][NN-1:0]             ca_up_map,
  output logic [NC-1:0][NN-1:0]             ca_remote_map,
  output logic [NC-1:0][NN-1:0]             ca_silent,
  input  logic [NC-1:0]                     ca_cmd_valid,
  input  logic [NC-1:0][NN-1:0]             ca_cmd_segregate,
  // monitoring
  output logic [NC-1:0][NN-1:0]             rt_drop,
  output logic [NC-1:0][NN-1:0]             rt_detour,
  output logic [NC-1:0][NN-1:0]             fw_drop,
  output drop_e [NC-1:0][NN-1:0]            fw_reason,
  output logic [NC-1:0][NN-1:0]             fw_bypass,
  output logic [NC-1:0][NN-1:0][SCW-1:0]    sess_count,
  output logic [NC-1:0][NN-1:0][NDIRS-1:0]  link_valid,
  output logic [NC-1:0][NN-1:0]             cong,
  output logic [NC-1:0][NN-1:0][7:0]        lfr,
  output logic [NC-1:0][NN-1:0][7:0]        rfr
);
  logic [NC-1:0]         csm_valid, csm_ready;
  pkt_t                  csm_pkt;
  logic [NC-1:0]         nbr_valid;
  logic [NC-1:0][NN-1:0] nbr_map;

  cluster_separation_module #(.N_CLUSTERS(NC)) u_csm (
    .clk, .rst_n,
    .in_valid, .in_pkt, .in_ready,
    .out_valid(csm_valid),
    .out_pkt  (csm_pkt),
    .out_ready(csm_ready)
  );

  for (genvar c = 0; c < NC; c++) begin : g_cl
    noc_cluster #(
      .MESH_N(MESH_N), .CLUSTER_ID(c), .HB_PERIOD(HB_PERIOD), .TIMEOUT(TIMEOUT),
      .HW_BLOCK(HW_BLOCK), .MAX_SESS(MAX_SESS)
    ) u_cluster (
      .clk, .rst_n,
      .fault           (fault[c]),
      .agent_fail      (agent_fail[c]),
      .cfg_we          (cfg_we && cfg_cluster == c),
      .cfg_node, .cfg_sel, .cfg_addr, .cfg_wdata,
      .ext_valid       (csm_valid[c]),
      .ext_pkt         (csm_pkt),
      .ext_ready       (csm_ready[c]),
      .pe_tx_valid     (pe_tx_valid[c]),
      .pe_tx_pkt       (pe_tx_pkt[c]),
      .pe_tx_ready     (pe_tx_ready[c]),
      .pe_tx_err       (pe_tx_err[c]),
      .pe_rx_valid     (pe_rx_valid[c]),
      .pe_rx_pkt       (pe_rx_pkt[c]),
      .ca_nbr_in_valid (nbr_valid[NC-1-c]),
      .ca_nbr_in_map   (nbr_map[NC-1-c]),
      .ca_nbr_out_valid(nbr_valid[c]),
      .ca_nbr_out_map  (nbr_map[c]),
      .ca_up_valid     (ca_up_valid[c]),
      .ca_up_map       (ca_up_map[c]),
      .ca_cmd_valid    (ca_cmd_valid[c]),
      .ca_cmd_segregate(ca_cmd_segregate[c]),
      .ca_remote_map   (ca_remote_map[c]),
      .ca_silent       (ca_silent[c]),
      .rt_drop         (rt_drop[c]),
      .rt_detour       (rt_detour[c]),
      .fw_drop         (fw_drop[c]),
      .fw_reason       (fw_reason[c]),
      .fw_bypass       (fw_bypass[c]),
      .sess_count      (sess_count[c]),
      .link_valid      (link_valid[c]),
      .cong            (cong[c]),
      .lfr             (lfr[c]),
      .rfr             (rfr[c])
    );
  end
endmodule
