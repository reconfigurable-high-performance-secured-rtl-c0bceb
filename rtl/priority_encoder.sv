// priority_encoder: picks one requesting input for an output port.
//
// The search is circular and starts at the index given by the random arbiter:
// the first requester at or after `start` (wrapping round) gets the one-hot
// grant. With a fresh random start every cycle no input is permanently ahead
// of another. Combinational; `any` is high when some request is present.
// The document gives the encoder-driven-by-arbiter structure; the circular
// search is this design's reading of it.
module priority_encoder #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]          req,
  input  logic [$clog2(N)-1:0]  start,
  output logic [N-1:0]          gnt,
  output logic [$clog2(N)-1:0]  gnt_idx,
  output logic                  any
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] idx;

  always_comb begin
    idx     = '0;
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = IW'((32'(start) + k) % N);
      if (!any && req[idx]) begin
        any          = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = idx;
      end
    end
  end
endmodule
