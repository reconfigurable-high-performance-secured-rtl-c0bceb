// tb_control_packet_stage: every combination of segregation, packet type,
// blocked port, session operation and session answer, against the decision
// order segregated > bypass > blocked port > session > pass; also checks the
// one-cycle latency, the bypass register reset value and a bypass write.
module tb_control_packet_stage;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, port_blocked = 0, segregated = 0, sess_req, sess_accept = 0;
  logic bp_we = 0; logic [3:0] bp_wdata = 0, bypass_reg;
  pkt_t in_pkt = '0, out_pkt;
  logic out_valid, drop_valid, bypassed;
  drop_e drop_reason;
  int checks = 0, failures = 0;

  control_packet_stage #(.BYPASS_INIT(4'b0110)) dut (.*);
  always #5 clk = ~clk;

  task automatic one(logic seg, ptype_e pt, logic blk, sess_e so, logic sacc, logic [3:0] bp);
    logic exp_pass, exp_sreq; drop_e exp_why;
    @(negedge clk);
    in_valid = 1; segregated = seg; port_blocked = blk; sess_accept = sacc;
    in_pkt.hdr.ptype = pt; in_pkt.hdr.sess = so; in_pkt.data = $urandom;
    exp_sreq = 0; exp_pass = 0; exp_why = DROP_NONE;
    if (seg) exp_why = DROP_SEGR;
    else if (bp[pt]) exp_pass = 1;
    else if (blk) exp_why = DROP_PORT;
    else if (so != SES_NONE) begin exp_sreq = 1; exp_pass = sacc; if (!sacc) exp_why = DROP_SESSION; end
    else exp_pass = 1;
    #1;
    checks++;
    if (sess_req != exp_sreq) begin failures++; $display("FAIL sess_req"); end
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (out_valid != exp_pass || drop_valid != !exp_pass ||
        (!exp_pass && drop_reason != exp_why) || (exp_pass && out_pkt != in_pkt) ||
        bypassed != (!seg && bp[pt])) begin
      failures++;
      $display("FAIL seg=%0d pt=%0d blk=%0d so=%0d sacc=%0d: out=%0d drop=%0d why=%0d", seg, pt, blk, so,
               sacc, out_valid, drop_valid, drop_reason);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid || drop_valid) begin failures++; $display("FAIL output not a single pulse"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (bypass_reg != 4'b0110) begin failures++; $display("FAIL bypass reset"); end
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < 4; p++)
        for (int b = 0; b < 2; b++)
          for (int so = 0; so < 3; so++)
            for (int a = 0; a < 2; a++)
              one(1'(s), ptype_e'(p), 1'(b), sess_e'(so), 1'(a), 4'b0110);
    @(negedge clk); bp_we = 1; bp_wdata = 4'b1001;
    @(negedge clk); bp_we = 0;
    checks++;
    if (bypass_reg != 4'b1001) begin failures++; $display("FAIL bypass write"); end
    for (int p = 0; p < 4; p++)
      for (int b = 0; b < 2; b++) one(0, ptype_e'(p), 1'(b), SES_NONE, 0, 4'b1001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
