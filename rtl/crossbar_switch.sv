// crossbar_switch: the router's N x N switch.
//
// Each output takes the packet of the input selected by its one-hot select
// row (an AND-OR multiplexer); an output whose row is all zero carries zero.
// Purely combinational. The document names the crossbar; the AND-OR form is
// this design's choice.
module crossbar_switch #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 48
) (
  input  logic [N-1:0][W-1:0] in_data,
  input  logic [N-1:0][N-1:0] sel,       // sel[o][i]: output o takes input i
  output logic [N-1:0][W-1:0] out_data
);
  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      out_data[o] = '0;
      for (int unsigned i = 0; i < N; i++)
        out_data[o] |= in_data[i] & {W{sel[o][i]}};
    end
  end
endmodule
