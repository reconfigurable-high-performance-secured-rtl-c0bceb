// noc_cluster: one MESH_N x MESH_N agent-based NoC cluster.
//
// MESH_N*MESH_N tiles (router + cell agent + NI) in a 2-D mesh; tile k sits
// at x = k mod MESH_N, y = k div MESH_N (y grows towards South). Neighbouring
// tiles are joined by a data link in each direction and by the one-bit
// peer-to-peer agent signals (link status, input-pin status, health,
// congestion). At the mesh edge a missing neighbour looks like a faulty
// link, so routing never leaves the mesh. One cluster agent collects the
// reports of all cell agents; the tile at (CA_X, CA_Y) hosts it, and the
// packets the cluster separation module sends to this cluster enter the
// network through that tile's Local port (ext_*).
// Configuration writes are addressed to one tile (cfg_node = y*MESH_N+x).
// Per-tile status (drops, detours, firewall decisions, link occupancy,
// congestion) is brought out for monitoring.
// The 4x4 mesh with the cluster agent at a central node follows the
// document; the edge handling and the entry point are this design's choices.
// rst_n is the asynchronous reset of the registers and also appears in the
// `disable iff` of assertions; lint reports that double use, which is intended.
module noc_cluster
  import noc_pkg::*;
#(
  parameter int unsigned           MESH_N     = 4,
  parameter int unsigned           CLUSTER_ID = 0,
  parameter int unsigned           CA_X       = 1,
  parameter int unsigned           CA_Y       = 1,
  parameter int unsigned           HB_PERIOD  = 16,
  parameter int unsigned           TIMEOUT    = 64,
  parameter logic [2**SPORT_W-1:0] HW_BLOCK   = 32'h8000_0000,
  parameter int unsigned           MAX_SESS   = 31,
  localparam int unsigned          NN         = MESH_N * MESH_N,
  localparam int unsigned          SCW        = $clog2(MAX_SESS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  node_fault_t [NN-1:0]          fault,
  input  logic [NN-1:0]                 agent_fail,
  input  logic                          cfg_we,
  input  logic [$clog2(NN)-1:0]         cfg_node,
  input  logic                          cfg_sel,
  input  logic [SPORT_W-1:0]            cfg_addr,
  input  logic [3:0]                    cfg_wdata,
  input  logic                          ext_valid,
  input  pkt_t                          ext_pkt,
  output logic                          ext_ready,
  input  logic [NN-1:0]                 pe_tx_valid,
  input  pkt_t [NN-1:0]                 pe_tx_pkt,
  output logic [NN-1:0]                 pe_tx_ready,
  output logic [NN-1:0]                 pe_tx_err,
  output logic [NN-1:0]                 pe_rx_valid,
  output pkt_t [NN-1:0]                 pe_rx_pkt,
  input  logic                          ca_nbr_in_valid,
  input  logic [NN-1:0]                 ca_nbr_in_map,
  output logic                          ca_nbr_out_valid,
  output logic [NN-1:0]                 ca_nbr_out_map,
  output logic                          ca_up_valid,
  output logic [NN-1:0]                 ca_up_map,
  input  logic                          ca_cmd_valid,
  input  logic [NN-1:0]                 ca_cmd_segregate,
  output logic [NN-1:0]                 ca_remote_map,
  output logic [NN-1:0]                 ca_silent,
  output logic [NN-1:0]                 rt_drop,
  output logic [NN-1:0]                 rt_detour,
  output logic [NN-1:0]                 fw_drop,
  output drop_e [NN-1:0]                fw_reason,
  output logic [NN-1:0]                 fw_bypass,
  output logic [NN-1:0][SCW-1:0]        sess_count,
  output logic [NN-1:0][NDIRS-1:0]      link_valid,
  output logic [NN-1:0]                 cong,
  output logic [NN-1:0][7:0]            lfr,
  output logic [NN-1:0][7:0]            rfr
);
  logic [NN-1:0][NDIRS-1:0] ovalid, link_o, inport_o;
  logic [NN-1:0]            cong_o;
  pkt_t [NN-1:0][NDIRS-1:0] opkt;
  logic [NN-1:0]            health_o, rpt_valid;
  logic [NN-1:0][7:0]       rpt_lfr;
  logic [NN-1:0]            segregate, dest_fail, ext_rdy;

  for (genvar k = 0; k < NN; k++) begin : g_tile
    localparam int unsigned TX = k % MESH_N;
    localparam int unsigned TY = k / MESH_N;
    logic [NDIRS-1:0] in_valid, n_link, n_inport, n_health, n_cong;
    pkt_t [NDIRS-1:0] in_pkt;
    logic             is_ca;
    assign is_ca = (TX == CA_X) && (TY == CA_Y);

    for (genvar d = 0; d < NDIRS; d++) begin : g_dir
      localparam bit HAS = (d == DIR_N) ? (TY > 0) :
                           (d == DIR_E) ? (TX < MESH_N - 1) :
                           (d == DIR_S) ? (TY < MESH_N - 1) : (TX > 0);
      localparam int unsigned NB = (d == DIR_N) ? k - MESH_N :
                                   (d == DIR_E) ? k + 1 :
                                   (d == DIR_S) ? k + MESH_N : k - 1;
      localparam int unsigned OD = (d + 2) % 4;
      if (HAS) begin : g_nb
        assign in_valid[d]  = ovalid[NB][OD];
        assign in_pkt[d]    = opkt[NB][OD];
        assign n_link[d]    = link_o[NB][OD];
        assign n_inport[d]  = inport_o[NB][OD];
        assign n_health[d]  = health_o[NB];
        assign n_cong[d]    = cong_o[NB];
      end else begin : g_edge
        assign in_valid[d]  = 1'b0;
        assign in_pkt[d]    = '0;
        assign n_link[d]    = 1'b1;
        assign n_inport[d]  = 1'b0;
        assign n_health[d]  = 1'b0;
        assign n_cong[d]    = 1'b0;
      end
    end

    noc_tile #(
      .X(TX), .Y(TY), .MESH_N(MESH_N), .CLUSTER_ID(CLUSTER_ID),
      .SEED(16'(32'h1D3B + k * 32'h0953 + CLUSTER_ID * 32'h7001)),
      .HB_PERIOD(HB_PERIOD), .HW_BLOCK(HW_BLOCK), .MAX_SESS(MAX_SESS)
    ) u_tile (
      .clk, .rst_n,
      .ln_in_valid (in_valid),
      .ln_in_pkt   (in_pkt),
      .ln_out_valid(ovalid[k]),
      .ln_out_pkt  (opkt[k]),
      .nbr_link    (n_link),
      .nbr_inport  (n_inport),
      .nbr_health  (n_health),
      .nbr_cong    (n_cong),
      .link_out    (link_o[k]),
      .inport_out  (inport_o[k]),
      .health_out  (health_o[k]),
      .cong_out    (cong_o[k]),
      .fault       (fault[k]),
      .agent_fail  (agent_fail[k]),
      .segregate   (segregate[k]),
      .dest_fail   (dest_fail),
      .rpt_valid   (rpt_valid[k]),
      .rpt_lfr     (rpt_lfr[k]),
      .cfg_we      (cfg_we && cfg_node == k),
      .cfg_sel, .cfg_addr, .cfg_wdata,
      .ext_valid   (is_ca && ext_valid),
      .ext_pkt     (ext_pkt),
      .ext_ready   (ext_rdy[k]),
      .pe_tx_valid (pe_tx_valid[k]),
      .pe_tx_pkt   (pe_tx_pkt[k]),
      .pe_tx_ready (pe_tx_ready[k]),
      .pe_tx_err   (pe_tx_err[k]),
      .pe_rx_valid (pe_rx_valid[k]),
      .pe_rx_pkt   (pe_rx_pkt[k]),
      .rt_drop     (rt_drop[k]),
      .rt_detour   (rt_detour[k]),
      .fw_drop     (fw_drop[k]),
      .fw_reason   (fw_reason[k]),
      .fw_bypass   (fw_bypass[k]),
      .sess_count  (sess_count[k]),
      .lfr         (lfr[k]),
      .rfr         (rfr[k])
    );
  end

  assign ext_ready  = ext_rdy[CA_Y * MESH_N + CA_X];
  assign link_valid = ovalid;
  assign cong       = cong_o;

  cluster_agent #(.N_CELLS(NN), .TIMEOUT(TIMEOUT)) u_ca (
    .clk, .rst_n,
    .rpt_valid,
    .rpt_lfr,
    .nbr_in_valid (ca_nbr_in_valid),
    .nbr_in_map   (ca_nbr_in_map),
    .nbr_out_valid(ca_nbr_out_valid),
    .nbr_out_map  (ca_nbr_out_map),
    .up_valid     (ca_up_valid),
    .up_map       (ca_up_map),
    .cmd_valid    (ca_cmd_valid),
    .cmd_segregate(ca_cmd_segregate),
    .segregate    (segregate),
    .dest_fail    (dest_fail),
    .remote_map   (ca_remote_map),
    .silent       (ca_silent)
  );
endmodule
