// tb_session_monitor: opens sessions up to the limit of 31, checks that the
// 32nd open is refused, closes them all, checks that a close with nothing
// open is refused, then runs a random open/close mix against a counter model.
module tb_session_monitor;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, accept, full;
  sess_e op = SES_NONE;
  logic [4:0] count;
  int checks = 0, failures = 0, model = 0;

  session_monitor #(.MAX_SESS(31)) dut (.*);
  always #5 clk = ~clk;

  task automatic do_op(sess_e o, logic exp_acc);
    logic acc;
    @(negedge clk);
    req = 1; op = o;
    #1;
    acc = accept;
    checks++;
    if (accept != exp_acc) begin failures++; $display("FAIL op %s count %0d accept %0d", o.name(), count, accept); end
    @(negedge clk);
    req = 0;
    if (acc) model += (o == SES_OPEN) ? 1 : (o == SES_CLOSE) ? -1 : 0;
    checks++;
    if (count != 5'(model) || full != (model == 31)) begin
      failures++; $display("FAIL count %0d model %0d", count, model);
    end
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
    for (int i = 0; i < 31; i++) do_op(SES_OPEN, 1);
    do_op(SES_OPEN, 0);
    do_op(SES_NONE, 1);
    for (int i = 0; i < 31; i++) do_op(SES_CLOSE, 1);
    do_op(SES_CLOSE, 0);
    for (int i = 0; i < 200; i++) begin
      sess_e o;
      o = ($urandom_range(0, 2) == 0) ? SES_CLOSE : SES_OPEN;
      do_op(o, (o == SES_OPEN) ? (model < 31) : (model > 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
