// noc_tile: one node of the mesh - router, cell agent and network interface.
//
// The router's four mesh ports go to the neighbouring tiles; a mesh link
// carries a packet with a valid bit and no back-pressure (the router always
// takes what arrives). Its Local port
// takes packets from the network interface (the PE) or, with priority, from
// the external injection port ext_* (used at the node that hosts the cluster
// agent, where packets from the cluster separation module enter). Packets
// the router ejects go through the cell agent's firewall and then through
// the NI to the PE. The agent gives the router its view of the neighbours:
// a direction is never used when Eq. (2) marks it faulty, and avoided when
// the RFR marks the neighbour unhealthy; the neighbours' congestion bits
// steer the XY choice. The agent also sees the ejected packets (firewall).
// Peer-to-peer agent signals per direction: link status, input-pin status,
// health bit and congestion bit, each one bit, in both directions.
// Composition follows the document's node (Fig. 3); the external injection
// priority is this design's choice.
// rst_n is the asynchronous reset of the registers and also appears in the
// `disable iff` of assertions; lint reports that double use, which is intended.
module noc_tile
  import noc_pkg::*;
#(
  parameter int unsigned           X          = 0,
  parameter int unsigned           Y          = 0,
  parameter int unsigned           MESH_N     = 4,
  parameter int unsigned           CLUSTER_ID = 0,
  parameter logic [15:0]           SEED       = 16'hACE1,
  parameter int unsigned           HB_PERIOD  = 16,
  parameter logic [2**SPORT_W-1:0] HW_BLOCK   = 32'h8000_0000,
  parameter int unsigned           MAX_SESS   = 31
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // mesh links, index N,E,S,W
  input  logic [NDIRS-1:0]          ln_in_valid,
  input  pkt_t [NDIRS-1:0]          ln_in_pkt,
  output logic [NDIRS-1:0]          ln_out_valid,
  output pkt_t [NDIRS-1:0]          ln_out_pkt,
  // peer-to-peer agent links
  input  logic [NDIRS-1:0]          nbr_link,
  input  logic [NDIRS-1:0]          nbr_inport,
  input  logic [NDIRS-1:0]          nbr_health,
  input  logic [NDIRS-1:0]          nbr_cong,     // neighbour n congested
  output logic [NDIRS-1:0]          link_out,
  output logic [NDIRS-1:0]          inport_out,
  output logic                      health_out,
  output logic                      cong_out,
  // fault status and cluster agent
  input  node_fault_t               fault,
  input  logic                      agent_fail,
  input  logic                      segregate,
  input  logic [MESH_N*MESH_N-1:0]  dest_fail,
  output logic                      rpt_valid,
  output logic [7:0]                rpt_lfr,
  // configuration of the agent
  input  logic                      cfg_we,
  input  logic                      cfg_sel,
  input  logic [SPORT_W-1:0]        cfg_addr,
  input  logic [3:0]                cfg_wdata,
  // external injection into the Local port
  input  logic                      ext_valid,
  input  pkt_t                      ext_pkt,
  output logic                      ext_ready,
  // processing element
  input  logic                      pe_tx_valid,
  input  pkt_t                      pe_tx_pkt,
  output logic                      pe_tx_ready,
  output logic                      pe_tx_err,
  output logic                      pe_rx_valid,
  output pkt_t                      pe_rx_pkt,
  // status
  output logic                      rt_drop,
  output logic                      rt_detour,
  output logic                      fw_drop,
  output drop_e                     fw_reason,
  output logic                      fw_bypass,
  output logic [$clog2(MAX_SESS+1)-1:0] sess_count,
  output logic [7:0]                lfr,
  output logic [7:0]                rfr
);
  logic [NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid;
  pkt_t [NPORTS-1:0] r_in_pkt, r_out_pkt;
  logic [NPORTS-1:0] r_drop, r_detour;
  logic              r_busy;
  logic [NDIRS-1:0]  dir_fault;
  logic              node_fail, pe_fail;
  logic              ni_valid, ni_ready, dv_valid;
  pkt_t              ni_pkt, dv_pkt;

  assign r_in_valid[3:0]  = ln_in_valid;
  assign r_in_pkt[3:0]    = ln_in_pkt;
  assign ln_out_valid     = r_out_valid[3:0];
  assign ln_out_pkt       = r_out_pkt[3:0];

  // Local input: external packets first, then the NI
  assign r_in_valid[DIR_L] = ext_valid || ni_valid;
  assign r_in_pkt[DIR_L]   = ext_valid ? ext_pkt : ni_pkt;
  assign ext_ready         = ext_valid && r_in_ready[DIR_L];
  assign ni_ready          = !ext_valid && r_in_ready[DIR_L];

  assign link_out  = fault.link;
  assign rt_drop   = |r_drop;
  assign rt_detour = |r_detour;

  noc_router #(.X(X), .Y(Y), .SEED(SEED), .MESH_N(MESH_N)) u_router (
    .clk, .rst_n,
    .in_valid  (r_in_valid),
    .in_pkt    (r_in_pkt),
    .in_ready  (r_in_ready),
    .out_valid (r_out_valid),
    .out_pkt   (r_out_pkt),
    .hard      (dir_fault),
    .avoid     (rfr[3:0]),
    .cong      (nbr_cong),
    .node_fault(node_fail),
    .pe_fault  (pe_fail),
    .far_bad   (dest_fail),
    .drop      (r_drop),
    .deflect   (r_detour),
    .busy      (r_busy)
  );

  cell_agent #(.HB_PERIOD(HB_PERIOD), .HW_BLOCK(HW_BLOCK), .MAX_SESS(MAX_SESS)) u_agent (
    .clk, .rst_n,
    .fault, .nbr_link, .nbr_inport, .nbr_health,
    .router_busy(r_busy),
    .inport_out, .health_out, .cong_out, .lfr, .rfr, .dir_fault, .node_fail, .pe_fail,
    .segregate, .agent_fail, .rpt_valid, .rpt_lfr,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .ej_valid (r_out_valid[DIR_L]),
    .ej_pkt   (r_out_pkt[DIR_L]),
    .dv_valid, .dv_pkt, .fw_drop, .fw_reason, .fw_bypass, .sess_count
  );

  network_interface #(.MESH_N(MESH_N), .CLUSTER_ID(CLUSTER_ID)) u_ni (
    .clk, .rst_n,
    .pe_tx_valid, .pe_tx_pkt, .pe_tx_ready, .pe_tx_err,
    .own_fail (pe_fail),
    .dest_fail,
    .inj_valid(ni_valid),
    .inj_pkt  (ni_pkt),
    .inj_ready(ni_ready),
    .dv_valid, .dv_pkt, .pe_rx_valid, .pe_rx_pkt
  );
endmodule
