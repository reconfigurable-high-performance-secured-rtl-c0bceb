// tb_noc_cluster: a 4x4 cluster with the fault pattern of the document's
// faulty-network study: one faulty node (6.25 % of 16) and five faulty links
// (20.8 % of 24). Every healthy PE sends random packets to random healthy
// nodes. Checks: every packet reaches the right PE unchanged; no packet ever
// crosses a faulty link or enters the faulty router; packets addressed to
// the faulty node are refused at the source once the cluster agent has
// reported it; the cluster agent reports exactly the faulty node. Counts
// deflections and congestion. The faulty links are chosen so that every
// healthy node stays reachable around the faulty node.
module tb_noc_cluster;
  import noc_pkg::*;
  localparam int N = 4, NN = 16, NPKT = 1200;
  localparam int BAD = 10;   // node (2,2)
  logic clk = 0, rst_n = 0;
  node_fault_t [NN-1:0] fault = '0;
  logic [NN-1:0] agent_fail = 0;
  logic cfg_we = 0, cfg_sel = 0; logic [3:0] cfg_node = 0; logic [4:0] cfg_addr = 0; logic [3:0] cfg_wdata = 0;
  logic ext_valid = 0, ext_ready;
  pkt_t ext_pkt = '0;
  logic [NN-1:0] pe_tx_valid = 0, pe_tx_ready, pe_tx_err, pe_rx_valid;
  pkt_t [NN-1:0] pe_tx_pkt = '0, pe_rx_pkt;
  logic ca_nbr_in_valid = 0, ca_nbr_out_valid, ca_up_valid, ca_cmd_valid = 0;
  logic [NN-1:0] ca_nbr_in_map = 0, ca_nbr_out_map, ca_up_map, ca_cmd_segregate = 0, ca_remote_map, ca_silent;
  logic [NN-1:0] rt_drop, rt_detour, fw_drop, fw_bypass;
  drop_e [NN-1:0] fw_reason;
  logic [NN-1:0][4:0] sess_count;
  logic [NN-1:0][3:0] link_valid;
  logic [NN-1:0] cong;
  logic [NN-1:0][7:0] lfr, rfr;
  logic [NN-1:0][3:0] bad_link = '0;

  int checks = 0, failures = 0, sent = 0, delivered = 0, refused = 0, n_detour = 0, n_cong = 0;
  int n_drop = 0, lat_sum = 0, cyc = 0;
  int exp_dst [int unsigned];
  int t_sent  [int unsigned];
  pkt_t q [NN][$];

  noc_cluster #(.MESH_N(N), .HB_PERIOD(16), .TIMEOUT(64)) dut (.*);
  always #5 clk = ~clk;

  // faulty link between node a and its neighbour in direction d (reported by a)
  task automatic kill_link(int a, int d);
    int b;
    fault[a].link[d] = 1'b1;
    b = (d == DIR_N) ? a - N : (d == DIR_E) ? a + 1 : (d == DIR_S) ? a + N : a - 1;
    bad_link[a][d] = 1'b1;
    bad_link[b][(d + 2) % 4] = 1'b1;
  endtask

  int unsigned uid = 1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < NN; k++) begin
      if (pe_tx_valid[k] && pe_tx_ready[k]) pe_tx_valid[k] <= 1'b0;
      if (pe_tx_err[k]) refused++;
      if (rt_detour[k]) n_detour++;
      if (rt_drop[k]) n_drop++;
      if (cong[k]) n_cong++;
      for (int d = 0; d < 4; d++) begin
        if (rst_n && link_valid[k][d] && (bad_link[k][d] || k == BAD)) begin
          failures++; $display("FAIL traffic on faulty link/node %0d dir %0d", k, d);
        end
      end
      if (pe_rx_valid[k]) begin
        int unsigned id;
        id = pe_rx_pkt[k].data;
        checks++;
        if (!exp_dst.exists(id) || exp_dst[id] != k) begin
          failures++; $display("FAIL packet %0d at node %0d", id, k);
        end else begin
          lat_sum += cyc - t_sent[id];
          exp_dst.delete(id);
          delivered++;
        end
      end
    end
  end
  always @(negedge clk) begin
    for (int k = 0; k < NN; k++)
      if (!pe_tx_valid[k] && pe_tx_ready[k] && q[k].size() > 0) begin
        pe_tx_pkt[k]   <= q[k].pop_front();
        pe_tx_valid[k] <= 1'b1;
        t_sent[pe_tx_pkt[k].data] = cyc;
      end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog: %0d of %0d delivered", delivered, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src, dst, lost_wait;
    fault[BAD].xbar = 1'b1;
    kill_link(0, DIR_E);
    kill_link(3, DIR_S);
    kill_link(12, DIR_E);
    kill_link(14, DIR_E);
    kill_link(1, DIR_S);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    checks++;
    if (ca_up_map != 16'(1 << BAD)) begin failures++; $display("FAIL cluster agent map %h", ca_up_map); end
    // packets to the faulty node are refused at the source
    for (int k = 0; k < 4; k++) begin
      pkt_t p; p = '0; p.hdr.dst_x = 2'(BAD % N); p.hdr.dst_y = 2'(BAD / N); p.data = 32'hF000_0000 + k;
      q[k].push_back(p);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (refused != 4) begin failures++; $display("FAIL refused=%0d", refused); end
    // random traffic
    for (int n = 0; n < NPKT; n++) begin
      pkt_t p;
      do src = $urandom_range(0, NN - 1); while (src == BAD);
      do dst = $urandom_range(0, NN - 1); while (dst == BAD || dst == src);
      p = '0; p.hdr.dst_x = 2'(dst % N); p.hdr.dst_y = 2'(dst / N);
      p.hdr.src_port = 5'($urandom_range(0, 30)); p.data = uid; uid++;
      exp_dst[p.data] = dst;
      q[src].push_back(p);
      sent++;
    end
    lost_wait = 0;
    while (exp_dst.size() > 0 && lost_wait < 20000) begin @(posedge clk); lost_wait++; end
    checks++;
    if (delivered != sent) begin failures++; $display("FAIL delivered %0d of %0d (drops %0d)", delivered, sent, n_drop); end
    checks++;
    if (n_detour == 0) begin failures++; $display("FAIL no detour happened"); end
    checks++;
    if (n_drop != 0) begin failures++; $display("FAIL %0d packets dropped in the network", n_drop); end
    checks++;
    if (n_cong == 0) begin failures++; $display("FAIL no congestion seen"); end
    $display("delivered %0d/%0d, mean latency %0d cycles, detours %0d, congestion-cycles %0d, drops %0d",
             delivered, sent, delivered ? lat_sum / delivered : 0, n_detour, n_cong, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
