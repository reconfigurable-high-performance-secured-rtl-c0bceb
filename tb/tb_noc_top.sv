// tb_noc_top: end-to-end run of the whole two-cluster system at its default
// size (two 4x4 clusters), exercising each mechanism of the design:
//  * cluster 1 has a faulty router and five faulty links (6.25 % of nodes,
//    20.8 % of links); cluster 2 has a node whose PE has failed;
//  * the cluster agents report exactly those nodes and exchange their maps;
//  * the example transfer from node 2 to node 16 of cluster 1 with payload
//    CDD78FD9, then random PE-to-PE traffic in both clusters and packets
//    from the application level through the cluster separation module:
//    all must arrive unchanged at the right PE, none over a faulty link;
//  * a packet for the failed node is refused by the NI; a packet that
//    reaches the PE-failed node's neighbour is dropped by the router;
//  * firewall: a port blocked by configuration, the hardware-blocked port,
//    a bypassed video packet, session opens up to the limit and a close;
//  * a silent cell agent is detected by timeout and reported; the top level
//    segregates it and packets for it are then refused.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_noc_top;
  import noc_pkg::*;
  localparam int NC = 2, NN = 16, N = 4;
  localparam int BAD0 = 10;   // faulty router, cluster 1 (index 0)
  localparam int PEF1 = 6;    // failed PE, cluster 2 (index 1)
  localparam int FW   = 3;    // firewall test node, cluster 2
  localparam int SIL  = 12;   // agent that goes silent, cluster 2
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  pkt_t in_pkt = '0;
  node_fault_t [NC-1:0][NN-1:0] fault = '0;
  logic [NC-1:0][NN-1:0] agent_fail = '0;
  logic cfg_we = 0, cfg_cluster = 0, cfg_sel = 0;
  logic [3:0] cfg_node = 0, cfg_wdata = 0;
  logic [4:0] cfg_addr = 0;
  logic [NC-1:0][NN-1:0] pe_tx_valid = '0, pe_tx_ready, pe_tx_err, pe_rx_valid;
  pkt_t [NC-1:0][NN-1:0] pe_tx_pkt = '0, pe_rx_pkt;
  logic [NC-1:0] ca_up_valid, ca_cmd_valid = 0;
  logic [NC-1:0][NN-1:0] ca_up_map, ca_remote_map, ca_silent, ca_cmd_segregate = '0;
  logic [NC-1:0][NN-1:0] rt_drop, rt_detour, fw_drop, fw_bypass, cong;
  drop_e [NC-1:0][NN-1:0] fw_reason;
  logic [NC-1:0][NN-1:0][4:0] sess_count;
  logic [NC-1:0][NN-1:0][3:0] link_valid;
  logic [NC-1:0][NN-1:0][7:0] lfr, rfr;

  noc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_csm [NC], n_defl = 0, n_cong = 0, n_refused = 0, n_rtdrop = 0, n_ups = 0;
  int n_fwport = 0, n_fwsess = 0, n_bypass = 0, n_deliv = 0;
  int exp_dst [int unsigned];            // id -> c*NN + k
  pkt_t q [NC*NN][$];
  pkt_t csm_q [$];
  logic [NC-1:0][NN-1:0][3:0] bad_link = '0;
  int unsigned uid = 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic kill_link(int c, int a, int d);
    int b;
    fault[c][a].link[d] = 1'b1;
    b = (d == DIR_N) ? a - N : (d == DIR_E) ? a + 1 : (d == DIR_S) ? a + N : a - 1;
    bad_link[c][a][d] = 1'b1;
    bad_link[c][b][(d + 2) % 4] = 1'b1;
  endtask

  function automatic pkt_t mk(int c, int dst, ptype_e pt, int port, sess_e so, logic want);
    pkt_t p;
    p = '0; p.hdr.dst_x = 2'(dst % N); p.hdr.dst_y = 2'(dst / N); p.hdr.cluster = 1'(c);
    p.hdr.ptype = pt; p.hdr.src_port = 5'(port); p.hdr.sess = so; p.data = uid; uid++;
    if (want) exp_dst[p.data] = c * NN + dst;
    return p;
  endfunction

  // monitors
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      n_csm[in_pkt.hdr.cluster]++;
      void'(csm_q.pop_front());
      in_valid <= 1'b0;
    end
    for (int c = 0; c < NC; c++) begin
      if (ca_up_valid[c]) n_ups++;
      for (int k = 0; k < NN; k++) begin
        if (pe_tx_valid[c][k] && pe_tx_ready[c][k]) pe_tx_valid[c][k] <= 1'b0;
        if (pe_tx_err[c][k]) n_refused++;
        if (rt_detour[c][k]) n_defl++;
        if (rt_drop[c][k]) n_rtdrop++;
        if (cong[c][k]) n_cong++;
        if (fw_bypass[c][k]) n_bypass++;
        if (fw_drop[c][k] && fw_reason[c][k] == DROP_PORT) n_fwport++;
        if (fw_drop[c][k] && fw_reason[c][k] == DROP_SESSION) n_fwsess++;
        for (int d = 0; d < 4; d++)
          if (link_valid[c][k][d] && (bad_link[c][k][d] || (c == 0 && k == BAD0))) begin
            failures++; $display("FAIL traffic on faulty link: cluster %0d node %0d dir %0d", c, k, d);
          end
        if (pe_rx_valid[c][k]) begin
          int unsigned id;
          id = pe_rx_pkt[c][k].data;
          checks++;
          if (!exp_dst.exists(id) || exp_dst[id] != c * NN + k) begin
            failures++; $display("FAIL packet %0h arrived at cluster %0d node %0d", id, c, k);
          end else begin
            exp_dst.delete(id);
            n_deliv++;
          end
        end
      end
    end
  end
  // sources
  always @(negedge clk) begin
    if (!in_valid && csm_q.size() > 0) begin
      in_pkt   <= csm_q[0];
      in_valid <= 1'b1;
    end
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < NN; k++)
        if (!pe_tx_valid[c][k] && pe_tx_ready[c][k] && q[c*NN+k].size() > 0) begin
          pe_tx_pkt[c][k]   <= q[c*NN+k].pop_front();
          pe_tx_valid[c][k] <= 1'b1;
        end
  end

  task automatic wait_all(string what);
    int t;
    t = 0;
    while ((exp_dst.size() > 0 || csm_q.size() > 0 || in_valid) && t < 30000) begin @(posedge clk); t++; end
    repeat (10) @(posedge clk);
    check($sformatf("%s: %0d packets not delivered", what, exp_dst.size()), exp_dst.size() == 0);
  endtask

  task automatic cfg_write(int c, int node, logic sel, int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_cluster = 1'(c); cfg_node = 4'(node); cfg_sel = sel;
    cfg_addr = 5'(addr); cfg_wdata = 4'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog: %0d packets outstanding", exp_dst.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src, dst, fw0, fs0, rd0, rf0;
    // faults
    fault[0][BAD0].xbar = 1'b1;
    kill_link(0, 0, DIR_E);
    kill_link(0, 3, DIR_S);
    kill_link(0, 12, DIR_E);
    kill_link(0, 14, DIR_E);
    kill_link(0, 1, DIR_S);
    fault[1][PEF1].pe = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    check("cluster 1 map", ca_up_map[0] == 16'(1 << BAD0));
    check("cluster 2 map", ca_up_map[1] == 16'(1 << PEF1));
    check("maps exchanged", ca_remote_map[1] == ca_up_map[0] && ca_remote_map[0] == ca_up_map[1]);

    // node 2 -> node 16 of cluster 1, payload CDD78FD9
    begin
      pkt_t p;
      p = mk(0, 15, PT_DATA, 0, SES_NONE, 1);
      exp_dst.delete(p.data);
      p.data = 32'hCDD7_8FD9;
      exp_dst[p.data] = 15;
      q[1].push_back(p);
      wait_all("node 2 to node 16");
    end

    // random PE traffic in both clusters and application-level packets
    for (int n = 0; n < 1600; n++) begin
      int c;
      c = n % 2;
      do src = $urandom_range(0, NN - 1); while ((c == 0 && src == BAD0) || (c == 1 && src == PEF1));
      do dst = $urandom_range(0, NN - 1); while (dst == src || (c == 0 && dst == BAD0) || (c == 1 && dst == PEF1));
      q[c*NN+src].push_back(mk(c, dst, PT_DATA, $urandom_range(0, 30), SES_NONE, 1));
    end
    for (int n = 0; n < 200; n++) begin
      int c;
      c = $urandom_range(0, 1);
      do dst = $urandom_range(0, NN - 1); while ((c == 0 && dst == BAD0) || (c == 1 && dst == PEF1));
      csm_q.push_back(mk(c, dst, PT_DATA, $urandom_range(0, 30), SES_NONE, 1));
    end
    wait_all("random traffic");

    // the NI refuses a packet for the failed node
    rf0 = n_refused;
    q[0*NN+2].push_back(mk(0, BAD0, PT_DATA, 1, SES_NONE, 0));
    repeat (10) @(posedge clk);
    check("refused at NI", n_refused == rf0 + 1);
    // a packet for the PE-failed node is dropped next to it
    rd0 = n_rtdrop;
    csm_q.push_back(mk(1, PEF1, PT_DATA, 1, SES_NONE, 0));
    repeat (20) @(posedge clk);
    check("dropped by router", n_rtdrop == rd0 + 1);

    // firewall at node FW of cluster 2
    cfg_write(1, FW, 0, 7, 1);
    fw0 = n_fwport;
    csm_q.push_back(mk(1, FW, PT_DATA, 7, SES_NONE, 0));    // blocked by configuration
    csm_q.push_back(mk(1, FW, PT_DATA, 31, SES_NONE, 0));   // blocked in hardware
    csm_q.push_back(mk(1, FW, PT_VIDEO, 7, SES_NONE, 1));   // bypassed
    csm_q.push_back(mk(1, FW, PT_DATA, 8, SES_NONE, 1));    // allowed
    wait_all("firewall");
    repeat (20) @(posedge clk);
    check("port drops", n_fwport == fw0 + 2);
    check("bypass", n_bypass == 1);
    // sessions: 31 opens pass, the 32nd is refused, then one close
    fs0 = n_fwsess;
    for (int i = 0; i < 32; i++) csm_q.push_back(mk(1, FW, PT_CTRL, 9, SES_OPEN, i < 31));
    wait_all("session opens");
    repeat (20) @(posedge clk);
    check("session limit", n_fwsess == fs0 + 1 && sess_count[1][FW] == 31);
    csm_q.push_back(mk(1, FW, PT_CTRL, 9, SES_CLOSE, 1));
    wait_all("session close");
    check("session closed", sess_count[1][FW] == 30);

    // a silent agent, then segregation by the top level
    agent_fail[1][SIL] = 1'b1;
    repeat (120) @(posedge clk);
    check("silent agent reported", ca_silent[1][SIL] && ca_up_map[1][SIL] && ca_remote_map[0][SIL]);
    @(negedge clk);
    ca_cmd_valid[1] = 1'b1; ca_cmd_segregate[1] = 16'(1 << SIL);
    @(negedge clk);
    ca_cmd_valid[1] = 1'b0;
    repeat (5) @(posedge clk);
    rf0 = n_refused;
    q[1*NN+0].push_back(mk(1, SIL, PT_DATA, 1, SES_NONE, 0));
    repeat (10) @(posedge clk);
    check("segregated node refused", n_refused == rf0 + 1);
    check("segregated node unhealthy", rfr[1][8][2] == 1'b1);

    // every mechanism must have happened
    check("CSM to cluster 1", n_csm[0] > 0);
    check("CSM to cluster 2", n_csm[1] > 0);
    check("deflection", n_defl > 0);
    check("congestion", n_cong > 0);
    check("cluster agent reports", n_ups >= 3);
    $display("delivered %0d; CSM %0d/%0d; deflections %0d; congestion %0d; refused %0d; router drops %0d; port drops %0d; session drops %0d; bypass %0d; reports %0d",
             n_deliv, n_csm[0], n_csm[1], n_defl, n_cong, n_refused, n_rtdrop, n_fwport, n_fwsess, n_bypass, n_ups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
