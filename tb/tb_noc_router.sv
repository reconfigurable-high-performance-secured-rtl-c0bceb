// tb_noc_router: the deflection router at (1,1) of a 4x4 mesh, driven cycle
// by cycle on all five inputs.
//  * every packet arriving on a link leaves in the next cycle, exactly once
//    and unchanged (no buffering, no loss), never through a faulty port;
//  * a packet takes its productive port when it wins it, and is flagged as
//    deflected otherwise; packets for this node leave on Local;
//  * three packets competing for East: one wins, two are deflected, and the
//    winner is not always the same input (random arbitration);
//  * injection waits while through traffic holds its port;
//  * a faulty router moves nothing; a packet for a node with its PE down is
//    dropped.
module tb_noc_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid = 0, in_ready, out_valid, drop, deflect;
  pkt_t [4:0] in_pkt = '0, out_pkt;
  logic [3:0] hard = 0, avoid = 0, cong = 0;
  logic node_fault = 0, pe_fault = 0, busy;
  logic [15:0] far_bad = '0;   // no distant failures: local decisions only
  int checks = 0, failures = 0;
  int n_defl = 0, n_drop = 0, n_hold = 0;
  int unsigned uid = 1;

  noc_router #(.X(1), .Y(1), .SEED(16'h5A5A)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic pkt_t mk(int x, int y);
    pkt_t p;
    p = '0; p.hdr.dst_x = 2'(x); p.hdr.dst_y = 2'(y); p.data = uid; uid++;
    return p;
  endfunction

  function automatic logic productive(pkt_t p, int o);
    case (o)
      DIR_E: return p.hdr.dst_x > 1;
      DIR_W: return p.hdr.dst_x < 1;
      DIR_S: return p.hdr.dst_y > 1;
      DIR_N: return p.hdr.dst_y < 1;
      default: return p.hdr.dst_x == 1 && p.hdr.dst_y == 1;
    endcase
  endfunction

  // apply one cycle of inputs, then check the outputs of that cycle
  task automatic cycle(logic [4:0] v, pkt_t p [5], output int port [5]);
    logic [4:0] acc, dr, df;
    @(negedge clk);
    in_valid = v;
    for (int i = 0; i < 5; i++) in_pkt[i] = p[i];
    #1;
    acc = in_valid & in_ready; dr = drop; df = deflect;
    if (in_valid[4] && !in_ready[4]) n_hold++;
    @(posedge clk); #1;
    in_valid = 0;
    for (int i = 0; i < 5; i++) begin
      port[i] = -1;
      if (!acc[i]) continue;
      if (dr[i]) begin n_drop++; port[i] = -2; continue; end
      for (int o = 0; o < 5; o++)
        if (out_valid[o] && out_pkt[o] == p[i]) begin
          check($sformatf("packet %0d out twice", p[i].data), port[i] == -1);
          port[i] = o;
        end
      check($sformatf("packet %0d from %0d lost", p[i].data, i), port[i] >= 0);
      if (port[i] >= 0) begin
        check("sent through faulty port", port[i] == DIR_L || !hard[port[i]]);
        // a non-productive step is always flagged; a U-turn back the way
        // the packet came is flagged too even where it is productive
        check($sformatf("deflect flag in %0d port %0d", i, port[i]),
              df[i] ? (port[i] != DIR_L) : productive(p[i], port[i]));
        if (df[i]) n_defl++;
      end
    end
    for (int i = 0; i < 4; i++) check($sformatf("link input %0d not accepted", i), !v[i] || acc[i] || node_fault);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p [5];
    int port [5];
    int wins [5];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single packet W -> E, one-cycle latency
    p[DIR_W] = mk(3, 1);
    cycle(5'b01000, p, port);
    check("W to E", port[DIR_W] == DIR_E);
    // ejection
    p[DIR_N] = mk(1, 1);
    cycle(5'b00001, p, port);
    check("eject", port[DIR_N] == DIR_L);
    // three inputs want East
    for (int r = 0; r < 20; r++) begin
      p[DIR_N] = mk(3, 1); p[DIR_S] = mk(3, 1); p[DIR_W] = mk(3, 1);
      cycle(5'b01101, p, port);
      check("one winner", (port[DIR_N] == DIR_E) + (port[DIR_S] == DIR_E) + (port[DIR_W] == DIR_E) == 1);
      for (int i = 0; i < 4; i++) if (port[i] == DIR_E) wins[i]++;
    end
    check("random winner", (wins[DIR_N] > 0) + (wins[DIR_S] > 0) + (wins[DIR_W] > 0) >= 2);
    // injection waits for its port
    p[DIR_W] = mk(3, 1); p[DIR_L] = mk(2, 1);
    cycle(5'b11000, p, port);
    check("injection held", port[DIR_W] == DIR_E && port[DIR_L] == -1 && n_hold == 1);
    p[DIR_L] = mk(2, 1);
    cycle(5'b10000, p, port);
    check("injection sent", port[DIR_L] == DIR_E);
    // two packets for this node: one ejected, one deflected
    p[DIR_E] = mk(1, 1); p[DIR_W] = mk(1, 1);
    cycle(5'b01010, p, port);
    check("one ejected", (port[DIR_E] == DIR_L) != (port[DIR_W] == DIR_L));
    // random traffic with faulty ports
    for (int r = 0; r < 600; r++) begin
      logic [4:0] v;
      hard = (r < 300) ? 4'b0000 : 4'b0010;
      v = 5'($urandom) & ~{1'b0, hard};
      for (int i = 0; i < 5; i++) p[i] = mk($urandom_range(0, 3), $urandom_range(0, 3));
      cycle(v, p, port);
    end
    hard = 0;
    check("deflections seen", n_defl > 0);
    // faulty router
    node_fault = 1;
    p[DIR_L] = mk(3, 1);
    cycle(5'b10000, p, port);
    check("faulty router idle", port[DIR_L] == -1 && out_valid == 0);
    node_fault = 0;
    // PE down: dropped
    pe_fault = 1;
    p[DIR_S] = mk(1, 1);
    cycle(5'b00100, p, port);
    check("dropped", port[DIR_S] == -2 && n_drop == 1);
    pe_fault = 0;
    $display("deflections %0d, drops %0d, held injections %0d", n_defl, n_drop, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
