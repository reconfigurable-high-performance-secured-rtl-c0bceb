// tb_network_interface: injection with header stamping and router
// back-pressure, refusal of packets for failed destinations and when the own
// PE path is faulty, and one-cycle ejection to the PE.
module tb_network_interface;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pe_tx_valid = 0, pe_tx_ready, pe_tx_err, own_fail = 0;
  pkt_t pe_tx_pkt = '0, inj_pkt, dv_pkt = '0, pe_rx_pkt;
  logic [15:0] dest_fail = 0;
  logic inj_valid, inj_ready = 0, dv_valid = 0, pe_rx_valid;
  int checks = 0, failures = 0;

  network_interface #(.MESH_N(4), .CLUSTER_ID(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic pkt_t mk(int x, int y);
    pkt_t p;
    p = '0; p.hdr.dst_x = 2'(x); p.hdr.dst_y = 2'(y); p.hdr.src_port = 5'(x + 7);
    p.hdr.rsvd = 2'b11; p.data = $urandom;
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // normal injection, router busy for 3 cycles
    @(negedge clk);
    p = mk(3, 2);
    check("ready when empty", pe_tx_ready);
    pe_tx_valid = 1; pe_tx_pkt = p;
    @(negedge clk);
    pe_tx_valid = 0;
    e = p; e.hdr.cluster = 1; e.hdr.rsvd = 0;
    for (int i = 0; i < 3; i++) begin
      check("held", inj_valid && inj_pkt == e && !pe_tx_ready);
      @(negedge clk);
    end
    inj_ready = 1;
    @(negedge clk);
    inj_ready = 0;
    check("released", !inj_valid && pe_tx_ready);
    // failed destination
    dest_fail[2 * 4 + 1] = 1;
    pe_tx_valid = 1; pe_tx_pkt = mk(1, 2);
    @(negedge clk);
    pe_tx_valid = 0;
    check("refused failed dest", pe_tx_err && !inj_valid);
    @(negedge clk);
    check("err is a pulse", !pe_tx_err);
    // own PE path faulty
    own_fail = 1;
    pe_tx_valid = 1; pe_tx_pkt = mk(0, 0);
    @(negedge clk);
    pe_tx_valid = 0; own_fail = 0;
    check("refused own fault", pe_tx_err && !inj_valid);
    // healthy destination still accepted
    pe_tx_valid = 1; pe_tx_pkt = mk(0, 0);
    @(negedge clk);
    pe_tx_valid = 0;
    check("accepted", !pe_tx_err && inj_valid);
    inj_ready = 1;
    @(negedge clk);
    inj_ready = 0;
    // ejection
    p = mk(2, 2);
    dv_valid = 1; dv_pkt = p;
    @(negedge clk);
    dv_valid = 0;
    check("eject", pe_rx_valid && pe_rx_pkt == p);
    @(negedge clk);
    check("eject pulse", !pe_rx_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
