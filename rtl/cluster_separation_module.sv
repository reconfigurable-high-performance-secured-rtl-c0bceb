// cluster_separation_module (CSM): sends each incoming packet to its cluster.
//
// The cluster number is taken from the cluster selection bits of the packet,
// CSEL_W bits starting at bit SEL_BIT (one bit, header bit 11, for the two
// clusters of the default system: '0' -> cluster 1 (index 0), '1' -> cluster 2
// (index 1)). More clusters need more selection bits. The CSM is a one-entry
// register stage: a packet accepted in cycle t is offered to its cluster from
// cycle t+1 until that cluster's ready; a new packet is accepted only when
// the register is empty or is being emptied in the same cycle.
// Selecting the cluster by a packet bit follows the document; the register
// stage and the handshake are this design's choices.
module cluster_separation_module
  import noc_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 2,
  parameter int unsigned SEL_BIT    = CSEL_BIT
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  pkt_t                              in_pkt,
  output logic                              in_ready,
  output logic [N_CLUSTERS-1:0]             out_valid,
  output pkt_t                              out_pkt,
  input  logic [N_CLUSTERS-1:0]             out_ready
);
  localparam int CSEL_W = (N_CLUSTERS > 1) ? $clog2(N_CLUSTERS) : 1;
  logic              full_q;
  pkt_t              pkt_q;
  logic [CSEL_W-1:0] sel_q;
  logic              leave;

  assign leave    = full_q && out_ready[sel_q];
  assign in_ready = !full_q || leave;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      pkt_q  <= '0;
      sel_q  <= '0;
    end else begin
      if (leave) full_q <= 1'b0;
      if (in_valid && in_ready) begin
        full_q <= 1'b1;
        pkt_q  <= in_pkt;
        sel_q  <= in_pkt[SEL_BIT +: CSEL_W];
      end
    end
  end

  always_comb begin
    out_valid = '0;
    out_valid[sel_q] = full_q;
  end
  assign out_pkt = pkt_q;

  initial assert (2**CSEL_W >= N_CLUSTERS) else $error("CSM: too few selection bits");
endmodule
