// random_arbiter: random select signal for one output port of the router.
//
// The router serves competing inputs in random order so that no direction is
// favoured and packets do not pile up behind a fixed priority. This block is a
// 16-bit Galois LFSR (polynomial x^16+x^14+x^13+x^11+1, maximal length) that
// steps once per cycle while `advance` is high; its low byte reduced modulo
// NREQ is the index the priority encoder starts its search from. The document
// names the random arbiter and says the encoder selects by its signal; the
// LFSR, its polynomial and the modulo mapping are this design's choices.
//
// Timing: `start` is a registered value, valid one cycle after reset.
// Reset loads SEED (which must be non-zero).
// Only the low bits of the modulo result are used: the result is always
// below NREQ, so the upper bits are zero by construction.
module random_arbiter #(
  parameter int unsigned NREQ = 5,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     advance,
  output logic [$clog2(NREQ)-1:0]  start
);
  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lfsr <= SEED;
    else if (advance) lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  logic [7:0] mod;
  always_comb begin
    mod   = lfsr[7:0] % 8'(NREQ);
    start = mod[$clog2(NREQ)-1:0];
  end

  initial assert (SEED != 16'h0) else $error("random_arbiter: SEED must be non-zero");
endmodule
