// tb_priority_encoder: exhaustive check of the circular priority encoder for
// N=5: every request pattern with every start index, against a reference
// search written in the testbench.
module tb_priority_encoder;
  logic [4:0] req, gnt;
  logic [2:0] start, gnt_idx;
  logic any;
  int checks = 0, failures = 0;

  priority_encoder #(.N(5)) dut (.req, .start, .gnt, .gnt_idx, .any);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin
      for (int s = 0; s < 5; s++) begin
        int exp_idx;
        req = 5'(r); start = 3'(s);
        #1;
        exp_idx = -1;
        for (int k = 4; k >= 0; k--) if (r[(s + k) % 5]) exp_idx = (s + k) % 5;
        checks++;
        if (exp_idx < 0) begin
          if (any || gnt != 0) begin failures++; $display("FAIL r=%0d s=%0d grant without request", r, s); end
        end else if (!any || gnt != (5'b1 << exp_idx) || gnt_idx != 3'(exp_idx)) begin
          failures++;
          $display("FAIL r=%b s=%0d gnt=%b exp idx %0d", req, s, gnt, exp_idx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
