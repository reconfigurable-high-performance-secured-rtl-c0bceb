// tb_noc_load: throughput and latency of one 4x4 cluster at its default
// parameters under uniform random traffic, at a normal and a heavy offered
// load, with one faulty router and five faulty links (6.25 % of nodes,
// 20.8 % of links). Each healthy PE draws a new packet with the offered
// probability every cycle, for a random healthy destination. For each load
// the accepted throughput is measured over a fixed window and the mean
// latency from generation (source queue included) to arrival at the PE.
// Checks: every packet arrives at the right PE, none crosses a faulty link,
// nothing is dropped, the normal load is carried in full, the heavy load
// carries more but saturates, and latency grows with load. The two load
// levels are this testbench's choice; the source design only calls them
// normal and heavy.
module tb_noc_load;
  import noc_pkg::*;
  localparam int N = 4, NN = 16, WINDOW = 1500;
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

  noc_cluster dut (.*);
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
      end
  end

  // offered load in packets per node per 1000 cycles; sources generate
  // packets by a Bernoulli draw each cycle, timestamped at generation, so the
  // latency includes the wait in the source queue
  int rate_pm = 0;
  logic gen = 1'b0;
  always @(negedge clk) if (rst_n && gen) begin
    for (int k = 0; k < NN; k++)
      if (k != BAD && $urandom_range(0, 999) < rate_pm) begin
        pkt_t p;
        int dst;
        do dst = $urandom_range(0, NN - 1); while (dst == BAD || dst == k);
        p = '0; p.hdr.dst_x = 2'(dst % N); p.hdr.dst_y = 2'(dst / N);
        p.hdr.src_port = 5'($urandom_range(0, 30)); p.data = uid; uid++;
        exp_dst[p.data] = dst;
        t_sent[p.data]  = cyc;
        q[k].push_back(p);
        sent++;
      end
  end

  initial begin
    #4000000;
    failures++;
    $display("watchdog: %0d of %0d delivered", delivered, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one load point: generate for WINDOW cycles, then drain; returns the
  // accepted throughput (packets per node per 1000 cycles, measured over the
  // window) and the mean latency
  task automatic run_load(int rpm, output int thr_pm, output int lat);
    int d0, l0, s0, t;
    d0 = delivered; l0 = lat_sum; s0 = sent;
    rate_pm = rpm;
    gen = 1'b1;
    repeat (WINDOW) @(posedge clk);
    gen = 1'b0;
    thr_pm = (delivered - d0) * 1000 / (WINDOW * (NN - 1));
    t = 0;
    while (exp_dst.size() > 0 && t < 40000) begin @(posedge clk); t++; end
    lat = (delivered > d0) ? (lat_sum - l0) / (delivered - d0) : 0;
    check($sformatf("load %0d: all %0d packets delivered", rpm, sent - s0), exp_dst.size() == 0);
    $display("offered %0d, accepted %0d packets/node/1000 cycles, mean latency %0d cycles", rpm, thr_pm, lat);
  endtask

  initial begin
    int thr_n, lat_n, thr_h, lat_h;
    fault[BAD].xbar = 1'b1;
    kill_link(0, DIR_E);
    kill_link(3, DIR_S);
    kill_link(12, DIR_E);
    kill_link(14, DIR_E);
    kill_link(1, DIR_S);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    run_load(40, thr_n, lat_n);    // normal load: 0.04 packets/node/cycle
    run_load(300, thr_h, lat_h);   // heavy load: 0.3 packets/node/cycle
    check("normal load carried in full", thr_n * 100 >= 85 * 40);
    check("heavy load carries more than normal", thr_h > thr_n);
    check("heavy load saturates below the offered rate", thr_h < 300);
    check("latency grows with load", lat_h > lat_n);
    check("no packet dropped", n_drop == 0);
    check("deflections seen", n_detour > 0);
    check("congestion seen", n_cong > 0);
    $display("deflections %0d, congestion-cycles %0d", n_detour, n_cong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
