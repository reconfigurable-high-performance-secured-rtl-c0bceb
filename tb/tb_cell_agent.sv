// tb_cell_agent: status reports (period and on change, none from a dead
// agent), congestion bits, Eq. (2) direction status, and the firewall path:
// normal delivery, a port blocked by a configuration write, the hardware
// blocked port, a bypassed video packet, session counting and segregation.
module tb_cell_agent;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  node_fault_t fault = '0;
  logic [3:0] nbr_link = 0, nbr_inport = 0, nbr_health = 0;
  logic router_busy = 0, cong_out;
  logic [3:0] inport_out, dir_fault;
  logic health_out, node_fail, pe_fail, segregate = 0, agent_fail = 0, rpt_valid;
  logic [7:0] lfr, rfr, rpt_lfr;
  logic cfg_we = 0, cfg_sel = 0; logic [4:0] cfg_addr = 0; logic [3:0] cfg_wdata = 0;
  logic ej_valid = 0, dv_valid, fw_drop, fw_bypass;
  pkt_t ej_pkt = '0, dv_pkt;
  drop_e fw_reason;
  logic [4:0] sess_count;
  int checks = 0, failures = 0, rpts = 0;

  cell_agent #(.HB_PERIOD(8), .HW_BLOCK(32'h8000_0000)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rpt_valid) rpts++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // eject one packet and check the firewall answer
  task automatic eject(int port, ptype_e pt, sess_e so, logic exp_pass, drop_e why);
    @(negedge clk);
    ej_valid = 1; ej_pkt = '0; ej_pkt.hdr.src_port = 5'(port); ej_pkt.hdr.ptype = pt;
    ej_pkt.hdr.sess = so; ej_pkt.data = $urandom;
    @(negedge clk);
    ej_valid = 0;
    check($sformatf("firewall port %0d type %0d sess %0d", port, pt, so),
          dv_valid == exp_pass && fw_drop == !exp_pass && (exp_pass ? dv_pkt == ej_pkt : fw_reason == why));
  endtask

  task automatic cfg(logic sel, int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 5'(addr); cfg_wdata = 4'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (80) @(negedge clk);
    check($sformatf("periodic reports %0d", rpts), rpts >= 9 && rpts <= 11);
    // report on change
    rpts = 0;
    fault.xbar = 1;
    repeat (3) @(negedge clk);
    check($sformatf("report on change %0d %h", rpts, rpt_lfr), rpts >= 1 && rpt_lfr == 8'h10 && node_fail && health_out);
    fault.xbar = 0;
    // dead agent is silent
    agent_fail = 1; rpts = 0;
    repeat (40) @(negedge clk);
    check("dead agent silent", rpts == 0);
    agent_fail = 0;
    // congestion bits and direction status
    router_busy = 1;
    @(negedge clk);
    check("cong", cong_out == 1);
    router_busy = 0;
    @(negedge clk);
    check("cong clear", cong_out == 0);
    fault.inport[2] = 1; nbr_inport[1] = 1;
    @(negedge clk);
    check("dir fault", dir_fault == 4'b0110 && inport_out == 4'b0100);
    fault = '0; nbr_inport = 0;
    // firewall
    eject(3, PT_DATA, SES_NONE, 1, DROP_NONE);
    eject(31, PT_DATA, SES_NONE, 0, DROP_PORT);
    cfg(0, 3, 1);
    eject(3, PT_DATA, SES_NONE, 0, DROP_PORT);
    eject(3, PT_VIDEO, SES_NONE, 1, DROP_NONE);
    eject(31, PT_AUDIO, SES_NONE, 1, DROP_NONE);
    cfg(0, 3, 0);
    eject(3, PT_DATA, SES_NONE, 1, DROP_NONE);
    // bypass register rewritten: video now checked
    cfg(1, 0, 4'b0000);
    eject(31, PT_VIDEO, SES_NONE, 0, DROP_PORT);
    // sessions
    for (int i = 0; i < 3; i++) eject(4, PT_CTRL, SES_OPEN, 1, DROP_NONE);
    check("sessions open", sess_count == 3);
    eject(4, PT_CTRL, SES_CLOSE, 1, DROP_NONE);
    check("session closed", sess_count == 2);
    // segregation stops everything
    segregate = 1;
    eject(4, PT_DATA, SES_NONE, 0, DROP_SEGR);
    segregate = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
