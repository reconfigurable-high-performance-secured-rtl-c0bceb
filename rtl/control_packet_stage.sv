// control_packet_stage: the agent's pass/stop decision for packets that have
// reached their destination node, with the bypass register.
//
// For each packet ejected by the router (in_valid/in_pkt) it decides, in the
// order below, and registers the result for one cycle:
//   segregated node                      -> stop (DROP_SEGR)
//   bypass register bit of packet type   -> pass without further checks
//   source port blocked (config register)-> stop (DROP_PORT)
//   session operation refused            -> stop (DROP_SESSION)
//   otherwise                            -> pass
// A passed packet appears on out_valid/out_pkt one cycle after in_valid; a
// stopped one raises drop_valid with drop_reason instead. The 4-bit bypass
// register (one bit per packet type) is written through bp_we/bp_wdata and
// resets to BYPASS_INIT (video and audio). The session monitor is asked
// (sess_req) only for packets that reach that step. The stage always accepts.
// Pass/stop on the config register and bypassing video/audio follow the
// document; reading "bypass" as skipping the checks, and the check order,
// are this design's choices.
module control_packet_stage
  import noc_pkg::*;
#(
  parameter logic [3:0] BYPASS_INIT = 4'b0110
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pkt_t       in_pkt,
  input  logic       port_blocked,
  input  logic       segregated,
  output logic       sess_req,
  input  logic       sess_accept,
  input  logic       bp_we,
  input  logic [3:0] bp_wdata,
  output logic [3:0] bypass_reg,
  output logic       out_valid,
  output pkt_t       out_pkt,
  output logic       drop_valid,
  output drop_e      drop_reason,
  output logic       bypassed
);
  logic [3:0] bp_q;
  logic       pass;
  drop_e      why;
  logic       is_bp;

  always_comb begin
    is_bp    = bp_q[in_pkt.hdr.ptype];
    sess_req = 1'b0;
    pass     = 1'b0;
    why      = DROP_NONE;
    if (segregated)                      why = DROP_SEGR;
    else if (is_bp)                      pass = 1'b1;
    else if (port_blocked)               why = DROP_PORT;
    else if (in_pkt.hdr.sess != SES_NONE) begin
      sess_req = in_valid;
      if (sess_accept) pass = 1'b1;
      else             why  = DROP_SESSION;
    end else                             pass = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bp_q        <= BYPASS_INIT;
      out_valid   <= 1'b0;
      out_pkt     <= '0;
      drop_valid  <= 1'b0;
      drop_reason <= DROP_NONE;
      bypassed    <= 1'b0;
    end else begin
      if (bp_we) bp_q <= bp_wdata;
      out_valid   <= in_valid && pass;
      drop_valid  <= in_valid && !pass;
      drop_reason <= in_valid ? why : DROP_NONE;
      bypassed    <= in_valid && !segregated && is_bp;
      if (in_valid) out_pkt <= in_pkt;
    end
  end

  assign bypass_reg = bp_q;
endmodule
