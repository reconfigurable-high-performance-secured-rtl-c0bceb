// tb_xy_route: directed cases of the route computation at node (1,1) of a
// 4x4 mesh: arrival (with and without PE), XY order, a faulty X step,
// congestion tie-break, an unhealthy neighbour on the way and as the
// destination, no preference back towards the arrival port, and the case
// with no usable productive direction (left to deflection).
module tb_xy_route;
  import noc_pkg::*;
  logic [1:0] cur_x = 1, cur_y = 1;
  hdr_t hdr;
  logic [2:0] in_dir;
  logic [3:0] hard, avoid, cong;
  logic pe_fault, local_out, drop;
  logic [1:0] pref_v;
  logic [1:0][1:0] pref;
  int checks = 0, failures = 0;

  logic [15:0] far_bad = '0;

  xy_route dut (.cur_x, .cur_y, .hdr, .in_dir, .hard, .avoid, .cong, .pe_fault, .far_bad,
                .local_out, .drop, .pref_v, .pref);

  task automatic tcase(string name, int dx, int dy, int indir, logic [3:0] h, logic [3:0] a,
                       logic [3:0] cg, logic pef, logic e_loc, logic e_drop, logic [1:0] e_pv,
                       int e_p0, int e_p1);
    hdr = '0; hdr.dst_x = 2'(dx); hdr.dst_y = 2'(dy);
    in_dir = 3'(indir); hard = h; avoid = a; cong = cg; pe_fault = pef;
    #1;
    checks++;
    if (local_out != e_loc || drop != e_drop || pref_v != e_pv ||
        (e_pv[0] && pref[0] != 2'(e_p0)) || (e_pv[1] && pref[1] != 2'(e_p1))) begin
      failures++;
      $display("FAIL %s: local=%0d drop=%0d pv=%b p0=%0d p1=%0d", name, local_out, drop, pref_v,
               pref[0], pref[1]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //      name               dx dy in  hard     avoid    cong     pe loc drop pv     p0     p1
    tcase("local",             1, 1, 0, 4'b0000, 4'b0000, 4'b0000, 0, 1, 0, 2'b00, 0,     0);
    tcase("local pe down",     1, 1, 0, 4'b0000, 4'b0000, 4'b0000, 1, 0, 1, 2'b00, 0,     0);
    tcase("east",              3, 1, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b01, DIR_E, 0);
    tcase("west",              0, 1, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b01, DIR_W, 0);
    tcase("north",             1, 0, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b01, DIR_N, 0);
    tcase("south",             1, 3, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b01, DIR_S, 0);
    tcase("x first SE",        3, 3, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b11, DIR_E, DIR_S);
    tcase("x first NW",        0, 0, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b11, DIR_W, DIR_N);
    tcase("x faulty",          3, 3, 4, 4'b0010, 4'b0000, 4'b0000, 0, 0, 0, 2'b01, DIR_S, 0);
    tcase("x unhealthy",       3, 3, 4, 4'b0000, 4'b0010, 4'b0000, 0, 0, 0, 2'b01, DIR_S, 0);
    tcase("x congested",       3, 3, 4, 4'b0000, 4'b0000, 4'b0010, 0, 0, 0, 2'b11, DIR_S, DIR_E);
    tcase("both congested",    3, 3, 4, 4'b0000, 4'b0000, 4'b0110, 0, 0, 0, 2'b11, DIR_E, DIR_S);
    tcase("no u-turn",         3, 3, 1, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b01, DIR_S, 0);
    tcase("dest unhealthy",    2, 1, 4, 4'b0000, 4'b0010, 4'b0000, 0, 0, 1, 2'b00, 0,     0);
    tcase("dest link faulty",  2, 1, 4, 4'b0010, 4'b0000, 4'b0000, 0, 0, 0, 2'b00, 0,     0);
    tcase("both blocked",      3, 3, 4, 4'b0110, 4'b0000, 4'b0000, 0, 0, 0, 2'b00, 0,     0);
    // failed nodes further away (cluster agent map), node = y*4 + x
    far_bad = 16'(1 << 6);   // (2,1) lies on the X-first path
    tcase("far: xy path bad",  3, 3, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b11, DIR_S, DIR_E);
    tcase("far: over cong",    3, 3, 4, 4'b0000, 4'b0000, 4'b0100, 0, 0, 0, 2'b11, DIR_S, DIR_E);
    far_bad = 16'(1 << 9);   // (1,2) lies on the Y-first path
    tcase("far: yx path bad",  3, 3, 4, 4'b0000, 4'b0000, 4'b0010, 0, 0, 0, 2'b11, DIR_E, DIR_S);
    far_bad = 16'(1 << 10);  // (2,2) lies on neither
    tcase("far: off path",     3, 3, 4, 4'b0000, 4'b0000, 4'b0000, 0, 0, 0, 2'b11, DIR_E, DIR_S);
    far_bad = 16'(1 << 15);  // the destination itself does not count
    tcase("far: destination",  3, 3, 4, 4'b0000, 4'b0000, 4'b0010, 0, 0, 0, 2'b11, DIR_S, DIR_E);
    far_bad = 16'((1 << 6) | (1 << 9));  // both paths bad: congestion decides
    tcase("far: both bad",     3, 3, 4, 4'b0000, 4'b0000, 4'b0010, 0, 0, 0, 2'b11, DIR_S, DIR_E);
    far_bad = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
