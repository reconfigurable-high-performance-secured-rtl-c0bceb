// tb_cluster_agent: reports from 16 cells; checks the critical map for node
// and PE failures, detection of a silent cell after TIMEOUT cycles, the
// one-pulse messages to the top level and the neighbour, storage of the
// neighbour's map and segregation commands.
module tb_cluster_agent;
  logic clk = 0, rst_n = 0;
  logic [15:0] rpt_valid = 0, nbr_in_map = 0, nbr_out_map, up_map, cmd_segregate = 0;
  logic [15:0][7:0] rpt_lfr = '0;
  logic nbr_in_valid = 0, nbr_out_valid, up_valid, cmd_valid = 0;
  logic [15:0] segregate, dest_fail, remote_map, silent;
  logic [15:0] alive = 16'hFFFF;
  int checks = 0, failures = 0, ups = 0;
  localparam int TO = 20;

  cluster_agent #(.N_CELLS(16), .TIMEOUT(TO)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s up_map=%h silent=%h", what, up_map, silent); end
  endtask

  // cells report every 8 cycles while alive
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    rpt_valid <= (cyc % 8 == 0) ? alive : 16'h0;
  end
  always @(posedge clk) if (up_valid) ups++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    check("all healthy", up_map == 0 && dest_fail == 0 && ups == 0);
    // node failure at cell 5, PE failure at cell 9, input pin only at cell 3
    rpt_lfr[5] = 8'h10; rpt_lfr[9] = 8'h20; rpt_lfr[3] = 8'h01;
    repeat (10) @(negedge clk);
    check("node/pe failures", up_map == 16'h0220 && nbr_out_map == 16'h0220 && dest_fail == 16'h0220);
    check("one report up", ups == 1);
    // cell 12 goes silent
    alive[12] = 0;
    repeat (TO - 5) @(negedge clk);
    check("not yet timed out", !silent[12]);
    repeat (15) @(negedge clk);
    check("timed out", silent[12] && up_map == 16'h1220 && ups == 2);
    // it recovers
    alive[12] = 1;
    repeat (10) @(negedge clk);
    check("recovered", !silent[12] && up_map == 16'h0220 && ups == 3);
    // neighbour cluster map
    nbr_in_valid = 1; nbr_in_map = 16'hA005;
    @(negedge clk); nbr_in_valid = 0; nbr_in_map = 0;
    @(negedge clk);
    check("remote map", remote_map == 16'hA005);
    // segregation command
    cmd_valid = 1; cmd_segregate = 16'h0400;
    @(negedge clk); cmd_valid = 0; cmd_segregate = 0;
    @(negedge clk);
    check("segregate", segregate == 16'h0400 && dest_fail == 16'h0620);
    // repair
    rpt_lfr[5] = 0; rpt_lfr[9] = 0;
    repeat (10) @(negedge clk);
    check("repaired", up_map == 0 && dest_fail == 16'h0400 && ups == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
