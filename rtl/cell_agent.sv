// cell_agent: the per-node agent of the hierarchical monitoring system.
//
// It sits beside the router of its node and does three jobs.
//  Fault/congestion information: fault_registers hold the LFR/RFR and give
//    the router the Eq. (2) direction status; the agent also registers
//    whether its router had to deflect or hold a packet (congestion) and
//    passes that bit to the neighbouring agents, together with its health
//    bit and input-pin bits (peer-to-peer network between agents).
//  Security: packets the router ejects for this node pass through the
//    control packet stage, which uses the config register (source-port
//    lookup table), the bypass register and the session monitor to pass the
//    packet to the network interface or to stop it.
//  Reporting: it sends a status report (rpt_valid with its LFR) to the
//    cluster agent every HB_PERIOD cycles and whenever the LFR changes; a
//    silent agent (agent_fail, a model of a dead agent) sends nothing, which
//    the cluster agent detects by timeout.
// Configuration writes: cfg_sel = 0 writes source-port entry cfg_addr with
// cfg_wdata[0]; cfg_sel = 1 writes the bypass register with cfg_wdata.
// Timing: a packet ejected in cycle t is delivered or dropped in cycle t+1.
// The division of work follows the document; the report period, the
// report format and the configuration port are this design's choices.
// rst_n is the asynchronous reset of the registers and also appears in the
// `disable iff` of assertions; lint reports that double use, which is intended.
// The read-back outputs of the port table, the bypass register and the
// session monitor's full flag are left open: the agent does not need them.
module cell_agent
  import noc_pkg::*;
#(
  parameter int unsigned            HB_PERIOD   = 16,
  parameter logic [2**SPORT_W-1:0]  HW_BLOCK    = 32'h8000_0000,
  parameter logic [3:0]             BYPASS_INIT = 4'b0110,
  parameter int unsigned            MAX_SESS    = 31
) (
  input  logic               clk,
  input  logic               rst_n,
  // fault status and peer-to-peer agent links
  input  node_fault_t        fault,
  input  logic [NDIRS-1:0]   nbr_link,
  input  logic [NDIRS-1:0]   nbr_inport,
  input  logic [NDIRS-1:0]   nbr_health,
  input  logic               router_busy,
  output logic [NDIRS-1:0]   inport_out,
  output logic               health_out,
  output logic               cong_out,
  output logic [7:0]         lfr,
  output logic [7:0]         rfr,
  output logic [NDIRS-1:0]   dir_fault,
  output logic               node_fail,
  output logic               pe_fail,
  // cluster agent
  input  logic               segregate,
  input  logic               agent_fail,
  output logic               rpt_valid,
  output logic [7:0]         rpt_lfr,
  // configuration
  input  logic               cfg_we,
  input  logic               cfg_sel,
  input  logic [SPORT_W-1:0] cfg_addr,
  input  logic [3:0]         cfg_wdata,
  // packets for this node
  input  logic               ej_valid,
  input  pkt_t               ej_pkt,
  output logic               dv_valid,
  output pkt_t               dv_pkt,
  output logic               fw_drop,
  output drop_e              fw_reason,
  output logic               fw_bypass,
  output logic [$clog2(MAX_SESS+1)-1:0] sess_count
);
  logic port_blocked, sess_req, sess_accept;

  fault_registers u_fr (
    .clk, .rst_n, .fault, .nbr_link, .nbr_inport, .nbr_health, .segregate,
    .lfr, .rfr, .dir_fault, .inport_out, .health_out, .node_fail, .pe_fail
  );

  config_register #(.HW_BLOCK(HW_BLOCK)) u_cfg (
    .clk, .rst_n,
    .we       (cfg_we && !cfg_sel),
    .waddr    (cfg_addr),
    .wblock   (cfg_wdata[0]),
    .raddr    (ej_pkt.hdr.src_port),
    .blocked  (port_blocked),
    .table_out()
  );

  session_monitor #(.MAX_SESS(MAX_SESS)) u_sess (
    .clk, .rst_n,
    .req   (sess_req),
    .op    (ej_pkt.hdr.sess),
    .accept(sess_accept),
    .count (sess_count),
    .full  ()
  );

  control_packet_stage #(.BYPASS_INIT(BYPASS_INIT)) u_cps (
    .clk, .rst_n,
    .in_valid    (ej_valid),
    .in_pkt      (ej_pkt),
    .port_blocked(port_blocked),
    .segregated  (segregate),
    .sess_req    (sess_req),
    .sess_accept (sess_accept),
    .bp_we       (cfg_we && cfg_sel),
    .bp_wdata    (cfg_wdata),
    .bypass_reg  (),
    .out_valid   (dv_valid),
    .out_pkt     (dv_pkt),
    .drop_valid  (fw_drop),
    .drop_reason (fw_reason),
    .bypassed    (fw_bypass)
  );

  // congestion bits and status reports
  localparam int HBW = $clog2(HB_PERIOD + 1);
  logic [HBW-1:0] hb_cnt;
  logic [7:0]     lfr_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cong_out  <= '0;
      hb_cnt    <= '0;
      lfr_last  <= '0;
      rpt_valid <= 1'b0;
      rpt_lfr   <= '0;
    end else begin
      cong_out  <= router_busy;
      rpt_valid <= 1'b0;
      if (!agent_fail) begin
        if (hb_cnt == HBW'(HB_PERIOD - 1) || lfr != lfr_last) begin
          hb_cnt    <= '0;
          lfr_last  <= lfr;
          rpt_valid <= 1'b1;
          rpt_lfr   <= lfr;
        end else begin
          hb_cnt <= hb_cnt + 1'b1;
        end
      end
    end
  end
endmodule
