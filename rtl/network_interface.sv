// network_interface: wrapper between a processing element (PE) and its router.
//
// Injection: the PE offers a packet (pe_tx_valid/pe_tx_pkt) whose header
// names the destination inside the cluster, packet type, source port and
// session operation. The NI stamps its own cluster number in the cluster
// select bit, clears the reserved bits and holds the packet in a one-entry
// register until the router's local input takes it (inj_valid/inj_ready).
// A packet is refused (pe_tx_err pulse, packet consumed) when this node's PE
// path is faulty (Eq. (4)) or the cluster agent has marked the destination
// node failed or segregated (dest_fail map, indexed y*MESH_N+x), so that
// the platform can remap it to a healthy node.
// Ejection: packets passed by the agent's firewall are presented to the PE
// for one cycle on pe_rx_valid/pe_rx_pkt, one cycle after the agent.
// pe_tx_ready is high while the holding register is empty.
// The document names the NI only; this behaviour is this design's choice.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned MESH_N     = 4,
  parameter int unsigned CLUSTER_ID = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      pe_tx_valid,
  input  pkt_t                      pe_tx_pkt,
  output logic                      pe_tx_ready,
  output logic                      pe_tx_err,
  input  logic                      own_fail,
  input  logic [MESH_N*MESH_N-1:0]  dest_fail,
  output logic                      inj_valid,
  output pkt_t                      inj_pkt,
  input  logic                      inj_ready,
  input  logic                      dv_valid,
  input  pkt_t                      dv_pkt,
  output logic                      pe_rx_valid,
  output pkt_t                      pe_rx_pkt
);
  logic hold_q;
  pkt_t hold_pkt_q;
  logic refuse;
  int unsigned dst_idx;

  always_comb begin
    dst_idx = 32'(pe_tx_pkt.hdr.dst_y) * MESH_N + 32'(pe_tx_pkt.hdr.dst_x);
    refuse  = own_fail || (dst_idx < MESH_N * MESH_N && dest_fail[dst_idx]);
  end

  assign pe_tx_ready = !hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q      <= 1'b0;
      hold_pkt_q  <= '0;
      pe_tx_err   <= 1'b0;
      pe_rx_valid <= 1'b0;
      pe_rx_pkt   <= '0;
    end else begin
      pe_tx_err <= 1'b0;
      if (hold_q && inj_ready) hold_q <= 1'b0;
      if (pe_tx_valid && !hold_q) begin
        if (refuse) begin
          pe_tx_err <= 1'b1;
        end else begin
          hold_q                  <= 1'b1;
          hold_pkt_q              <= pe_tx_pkt;
          hold_pkt_q.hdr.cluster  <= 1'(CLUSTER_ID);
          hold_pkt_q.hdr.rsvd     <= '0;
        end
      end
      pe_rx_valid <= dv_valid;
      if (dv_valid) pe_rx_pkt <= dv_pkt;
    end
  end

  assign inj_valid = hold_q;
  assign inj_pkt   = hold_pkt_q;
endmodule
