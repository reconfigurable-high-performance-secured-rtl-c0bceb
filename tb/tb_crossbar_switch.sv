// tb_crossbar_switch: random packets and random one-hot (or empty) select
// rows; every output must carry the selected input or zero.
module tb_crossbar_switch;
  logic [4:0][47:0] in_data, out_data;
  logic [4:0][4:0]  sel;
  int checks = 0, failures = 0;
  int pick [5];

  crossbar_switch #(.N(5), .W(48)) dut (.in_data, .sel, .out_data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 5; i++) in_data[i] = {16'($urandom), $urandom};
      for (int o = 0; o < 5; o++) begin
        pick[o] = $urandom_range(0, 5);   // 5 = nothing selected
        sel[o]  = (pick[o] == 5) ? 5'b0 : 5'b1 << pick[o];
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_data[o] != ((pick[o] == 5) ? 48'h0 : in_data[pick[o]])) begin
          failures++;
          $display("FAIL t=%0d out %0d pick %0d", t, o, pick[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
