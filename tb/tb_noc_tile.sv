// tb_noc_tile: one tile at (1,1) with the testbench playing the four
// neighbours. Checks the PE -> link path (cluster bit stamped, two cycles),
// link -> PE path through the firewall (three cycles), priority of the
// external injection port, avoidance of an unhealthy neighbour, a firewall
// drop after a configuration write, and a status report.
module tb_noc_tile;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ln_in_valid = 0, ln_out_valid;
  pkt_t [3:0] ln_in_pkt = '0, ln_out_pkt;
  logic [3:0] nbr_link = 0, nbr_inport = 0, nbr_health = 0, nbr_cong = 0;
  logic [3:0] link_out, inport_out;
  logic cong_out;
  logic health_out;
  node_fault_t fault = '0;
  logic agent_fail = 0, segregate = 0, rpt_valid;
  logic [15:0] dest_fail = 0;
  logic [7:0] rpt_lfr, lfr, rfr;
  logic cfg_we = 0, cfg_sel = 0; logic [4:0] cfg_addr = 0; logic [3:0] cfg_wdata = 0;
  logic ext_valid = 0, ext_ready, pe_tx_valid = 0, pe_tx_ready, pe_tx_err, pe_rx_valid;
  pkt_t ext_pkt = '0, pe_tx_pkt = '0, pe_rx_pkt;
  logic rt_drop, rt_detour, fw_drop, fw_bypass;
  drop_e fw_reason;
  logic [4:0] sess_count;
  int checks = 0, failures = 0, rpts = 0;

  noc_tile #(.X(1), .Y(1), .MESH_N(4), .CLUSTER_ID(1), .HB_PERIOD(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rpt_valid) rpts++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic pkt_t mk(int x, int y, int port);
    pkt_t p;
    p = '0; p.hdr.dst_x = 2'(x); p.hdr.dst_y = 2'(y); p.hdr.src_port = 5'(port); p.data = $urandom;
    return p;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // PE -> east link
    p = mk(3, 1, 2);
    pe_tx_valid = 1; pe_tx_pkt = p;
    @(negedge clk); pe_tx_valid = 0;
    check("not yet on link", !ln_out_valid[DIR_E]);
    @(negedge clk);
    e = p; e.hdr.cluster = 1;
    check("PE to east in 2 cycles", ln_out_valid[DIR_E] && ln_out_pkt[DIR_E] == e);
    // west link -> PE
    p = mk(1, 1, 2);
    ln_in_valid[DIR_W] = 1; ln_in_pkt[DIR_W] = p;
    @(negedge clk); ln_in_valid[DIR_W] = 0;
    repeat (2) @(negedge clk);
    check("link to PE in 3 cycles", pe_rx_valid && pe_rx_pkt == p);
    // external injection wins over the NI
    repeat (2) @(negedge clk);
    pe_tx_valid = 1; pe_tx_pkt = mk(1, 0, 2);
    @(negedge clk); pe_tx_valid = 0;
    ext_valid = 1; ext_pkt = mk(1, 3, 2);
    #1 check("ext first", ext_ready);
    @(negedge clk); ext_valid = 0;
    check("ext on south", ln_out_valid[DIR_S] && ln_out_pkt[DIR_S].data == ext_pkt.data && !ln_out_valid[DIR_N]);
    @(negedge clk);
    check("NI after", ln_out_valid[DIR_N]);
    // unhealthy east neighbour: (3,3) goes south
    nbr_health[DIR_E] = 1;
    repeat (3) @(negedge clk);
    check("rfr", rfr[3:0] == 4'b0010);
    p = mk(3, 3, 2);
    ln_in_valid[DIR_N] = 1; ln_in_pkt[DIR_N] = p;
    @(negedge clk); ln_in_valid[DIR_N] = 0;
    check("avoid east", ln_out_valid[DIR_S] && ln_out_pkt[DIR_S] == p && !ln_out_valid[DIR_E]);
    nbr_health = 0;
    // firewall drop after configuration
    cfg_we = 1; cfg_sel = 0; cfg_addr = 9; cfg_wdata = 1;
    @(negedge clk); cfg_we = 0;
    ln_in_valid[DIR_E] = 1; ln_in_pkt[DIR_E] = mk(1, 1, 9);
    @(negedge clk); ln_in_valid[DIR_E] = 0;
    @(negedge clk);
    check("firewall drop", fw_drop && fw_reason == DROP_PORT);
    @(negedge clk);
    check("nothing to PE", !pe_rx_valid);
    repeat (50) @(negedge clk);
    check("reports", rpts > 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
