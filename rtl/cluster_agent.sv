// cluster_agent: the upper level of the agent hierarchy for one cluster.
//
// Every cell agent of the cluster sends it status reports (rpt_valid with
// the cell's LFR). The cluster agent keeps, per cell, the critical-fault bit
//   crit[i] = Node failed (LFR[4]) | PE/NI failed (LFR[5]) | no report for
//             TIMEOUT cycles
// and does what the management algorithm asks of it:
//  * when the critical map changes it informs the top level (up_valid pulse,
//    up_map) and the neighbouring cluster agent (nbr_out_valid, nbr_out_map);
//  * it stores the map received from the neighbouring cluster agent
//    (remote_map) for the top level and the cells;
//  * it takes remapping commands from the top level (cmd_valid,
//    cmd_segregate) and segregates the named cells (segregate[i] held until
//    the next command);
//  * it tells the cells' network interfaces which destinations not to send
//    to, and the routers which nodes to steer around
//    (dest_fail = crit | segregate).
// Timing: a report changes crit one cycle later; up_valid/nbr_out_valid
// follow one cycle after that. Reset clears all maps and timers.
// The duties follow the document's management algorithm; the timeout value,
// the map format and the one-pulse messages are this design's choices.
module cluster_agent #(
  parameter int unsigned N_CELLS = 16,
  parameter int unsigned TIMEOUT = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_CELLS-1:0]       rpt_valid,
  input  logic [N_CELLS-1:0][7:0]  rpt_lfr,
  input  logic                     nbr_in_valid,
  input  logic [N_CELLS-1:0]       nbr_in_map,
  output logic                     nbr_out_valid,
  output logic [N_CELLS-1:0]       nbr_out_map,
  output logic                     up_valid,
  output logic [N_CELLS-1:0]       up_map,
  input  logic                     cmd_valid,
  input  logic [N_CELLS-1:0]       cmd_segregate,
  output logic [N_CELLS-1:0]       segregate,
  output logic [N_CELLS-1:0]       dest_fail,
  output logic [N_CELLS-1:0]       remote_map,
  output logic [N_CELLS-1:0]       silent
);
  localparam int TW = $clog2(TIMEOUT + 1);
  logic [N_CELLS-1:0][TW-1:0] timer_q;
  logic [N_CELLS-1:0]         fail_q, silent_q, crit_q, seg_q, remote_q;
  logic [N_CELLS-1:0]         crit_d;

  always_comb crit_d = fail_q | silent_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_q       <= '0;
      fail_q        <= '0;
      silent_q      <= '0;
      crit_q        <= '0;
      seg_q         <= '0;
      remote_q      <= '0;
      up_valid      <= 1'b0;
      nbr_out_valid <= 1'b0;
    end else begin
      for (int i = 0; i < N_CELLS; i++) begin
        if (rpt_valid[i]) begin
          timer_q[i]  <= '0;
          silent_q[i] <= 1'b0;
          fail_q[i]   <= rpt_lfr[i][4] | rpt_lfr[i][5];
        end else if (timer_q[i] == TW'(TIMEOUT)) begin
          silent_q[i] <= 1'b1;
        end else begin
          timer_q[i] <= timer_q[i] + 1'b1;
        end
      end
      crit_q        <= crit_d;
      up_valid      <= (crit_d != crit_q);
      nbr_out_valid <= (crit_d != crit_q);
      if (nbr_in_valid) remote_q <= nbr_in_map;
      if (cmd_valid)    seg_q    <= cmd_segregate;
    end
  end

  assign up_map      = crit_q;
  assign nbr_out_map = crit_q;
  assign segregate   = seg_q;
  assign dest_fail   = crit_q | seg_q;
  assign remote_map  = remote_q;
  assign silent      = silent_q;
endmodule
