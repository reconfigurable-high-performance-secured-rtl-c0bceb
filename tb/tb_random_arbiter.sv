// tb_random_arbiter: checks the arbiter's start index against an independent
// model of the 16-bit LFSR (x^16+x^14+x^13+x^11+1, right-shifting Galois
// form), checks that it holds while advance is low, and that every index
// 0..NREQ-1 is produced within 200 cycles.
module tb_random_arbiter;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [2:0] start;
  int checks = 0, failures = 0;
  logic [15:0] model;
  int seen [5];

  random_arbiter #(.NREQ(5), .SEED(16'hBEEF)) dut (.clk, .rst_n, .advance, .start);

  always #5 clk = ~clk;

  function automatic logic [15:0] step(logic [15:0] v);
    logic fb;
    fb = v[0];
    v = v >> 1;
    if (fb) begin v[15] ^= 1'b1; v[13] ^= 1'b1; v[12] ^= 1'b1; v[10] ^= 1'b1; end
    return v;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 16'hBEEF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset value", start == 3'(model[7:0] % 5));
    advance = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      model = step(model);
      check($sformatf("cycle %0d start %0d exp %0d", c, start, model[7:0] % 5),
            start == 3'(model[7:0] % 5));
      seen[start]++;
    end
    advance = 0;
    repeat (3) begin
      @(negedge clk);
      check("hold while advance low", start == 3'(model[7:0] % 5));
    end
    for (int i = 0; i < 5; i++) check($sformatf("index %0d seen", i), seen[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
