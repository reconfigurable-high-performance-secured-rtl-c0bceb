// tb_config_register: writes a random set of blocked ports, reads every entry
// back and checks that the hardware-blocked port stays blocked.
module tb_config_register;
  logic clk = 0, rst_n = 0, we = 0, wblock = 0, blocked;
  logic [4:0] waddr = 0, raddr = 0;
  logic [31:0] table_out, model;
  localparam logic [31:0] HWB = 32'h8000_0001;
  int checks = 0, failures = 0;

  config_register #(.HW_BLOCK(HWB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_all(string what);
    for (int p = 0; p < 32; p++) begin
      raddr = 5'(p);
      #1;
      checks++;
      if (blocked != (model[p] | HWB[p])) begin
        failures++; $display("FAIL %s port %0d blocked=%0d", what, p, blocked);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all("after reset");
    for (int n = 0; n < 3; n++) begin
      for (int k = 0; k < 20; k++) begin
        @(negedge clk);
        we = 1; waddr = 5'($urandom); wblock = 1'($urandom);
        model[waddr] = wblock;
      end
      // try to open the hardware-blocked ports
      @(negedge clk); we = 1; waddr = 31; wblock = 0; model[31] = 0;
      @(negedge clk); we = 1; waddr = 0;  wblock = 0; model[0] = 0;
      @(negedge clk); we = 0;
      check_all($sformatf("round %0d", n));
      checks++;
      if (table_out != (model | HWB)) begin failures++; $display("FAIL table"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
