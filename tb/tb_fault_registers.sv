// tb_fault_registers: drives single faults and checks the LFR, RFR and the
// Eq. (2)/(3)/(4) results, including their one-cycle register latency.
module tb_fault_registers;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  node_fault_t fault;
  logic [3:0] nbr_link, nbr_inport, nbr_health, dir_fault, inport_out;
  logic segregate, health_out, node_fail, pe_fail;
  logic [7:0] lfr, rfr;
  int checks = 0, failures = 0;

  fault_registers dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (lfr=%b rfr=%b df=%b)", what, lfr, rfr, dir_fault); end
  endtask

  task automatic clear();
    fault = '0; nbr_link = 0; nbr_inport = 0; nbr_health = 0; segregate = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("healthy", lfr == 0 && rfr == 0 && dir_fault == 0 && !health_out);
    // Eq. (3): each router component makes the node faulty
    for (int c = 0; c < 3; c++) begin
      clear();
      @(negedge clk);
      if (c == 0) fault.pri_enc = 1; else if (c == 1) fault.arbiter = 1; else fault.xbar = 1;
      #1;
      check("node not yet registered", lfr[4] == 0);
      @(negedge clk);
      check($sformatf("node comp %0d", c), lfr == 8'b0001_0000 && inport_out == 4'hF && node_fail && !pe_fail && health_out);
    end
    // Eq. (4): PE, NI or local link make the PE unavailable
    for (int c = 0; c < 3; c++) begin
      clear();
      if (c == 0) fault.pe = 1; else if (c == 1) fault.ni = 1; else fault.link_local = 1;
      @(negedge clk);
      check($sformatf("pe comp %0d", c), lfr == 8'b0010_0000 && pe_fail && !node_fail && health_out);
    end
    // Eq. (2): own input pin, own link, neighbour's link report, neighbour's pin
    for (int d = 0; d < 4; d++) begin
      clear(); fault.inport[d] = 1;
      @(negedge clk);
      check($sformatf("inport %0d", d), lfr == 8'(1 << d) && dir_fault == 4'(1 << d) && inport_out == 4'(1 << d));
      clear(); fault.link[d] = 1;
      @(negedge clk);
      check($sformatf("link %0d", d), lfr == 0 && dir_fault == 4'(1 << d) && !health_out);
      clear(); nbr_link[d] = 1;
      #1 check($sformatf("nbr link %0d", d), dir_fault == 4'(1 << d));
      clear(); nbr_inport[d] = 1;
      #1 check($sformatf("nbr inport %0d", d), dir_fault == 4'(1 << d));
      clear(); nbr_health[d] = 1;
      @(negedge clk);
      check($sformatf("rfr %0d", d), rfr == 8'(1 << d) && dir_fault == 0);
    end
    clear(); segregate = 1;
    @(negedge clk);
    check("segregate health", health_out && lfr == 0);
    clear();
    @(negedge clk);
    check("all clear", lfr == 0 && rfr == 0 && !health_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
