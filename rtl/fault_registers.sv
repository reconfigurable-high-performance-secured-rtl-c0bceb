// fault_registers: the agent's Local Fault Register (LFR) and Regional Fault
// Register (RFR), with the fault equations of the node.
//
// From the one-bit fault status signals of the node (fault detection
// circuitry, '1' = faulty) it evaluates
//   Eq. (3)  Node = priority_encoder | random_arbiter | crossbar_switch
//   Eq. (4)  PE   = PE_local | NI | Link_local
// and stores them with the four input-pin bits in the 8-bit LFR:
//   LFR[3:0] input pins N,E,S,W   LFR[4] Node   LFR[5] PE   LFR[7:6] reserved (0)
// The RFR holds one bit per neighbour, set while any LFR bit of that
// neighbour is set (the one bit the agents exchange):
//   RFR[0] NN  RFR[1] NE  RFR[2] NS  RFR[3] NW  RFR[7:4] reserved (0)
// The direction status of Eq. (2),
//   dir_fault[n] = Link_n | In_Port_n(own) | In_Port_opp(n)(neighbour n),
// is formed from the registered LFR, the link status seen by both ends and the neighbour's
// input-pin bit. A node whose router is faulty presents all four input pins
// as faulty to its neighbours, so that they treat every link into it as
// faulty ("if any one of the component inside the router is faulty, then
// entire router is considered as faulty"). `segregate` (cluster agent command) makes the node report
// itself unhealthy so that neighbours route round it.
// Timing: LFR and RFR are registers; an LFR change reaches the neighbour's
// RFR one cycle after it reaches the LFR. Reset clears both.
// Register sizes, bit use and equations follow the document; the bit order
// inside the registers is this design's choice.
module fault_registers
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  node_fault_t       fault,
  input  logic [NDIRS-1:0]  nbr_link,     // neighbour's status of the shared link (1 at a mesh edge)
  input  logic [NDIRS-1:0]  nbr_inport,   // neighbour n's input pin facing this node
  input  logic [NDIRS-1:0]  nbr_health,   // neighbour n unhealthy
  input  logic              segregate,
  output logic [7:0]        lfr,
  output logic [7:0]        rfr,
  output logic [NDIRS-1:0]  dir_fault,
  output logic [NDIRS-1:0]  inport_out,
  output logic              health_out,
  output logic              node_fail,
  output logic              pe_fail
);
  logic [7:0] lfr_q, rfr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfr_q <= '0;
      rfr_q <= '0;
    end else begin
      lfr_q <= {2'b00,
                fault.pe | fault.ni | fault.link_local,
                fault.pri_enc | fault.arbiter | fault.xbar,
                fault.inport};
      rfr_q <= {4'b0000, nbr_health};
    end
  end

  assign lfr        = lfr_q;
  assign rfr        = rfr_q;
  // a faulty router (Node) is faulty as a whole: its input pins count as faulty
  assign inport_out = lfr_q[3:0] | {NDIRS{lfr_q[4]}};
  assign node_fail  = lfr_q[4];
  assign pe_fail    = lfr_q[5];
  assign health_out = (|lfr_q[5:0]) | segregate;
  // a bidirectional link is faulty if either end reports it faulty
  assign dir_fault  = fault.link | nbr_link | lfr_q[3:0] | nbr_inport;
endmodule
