// noc_router: bufferless five-port mesh router (N, E, S, W, Local) with
// random arbitration and deflection.
//
// The router keeps no packet queues: every packet that arrives on a mesh
// link leaves on some output in the next cycle, so a packet is never lost,
// never piles up and the network cannot deadlock. Each cycle:
//  1. an xy_route unit per input gives the preferred (productive, healthy)
//     outputs, or says the packet is for this node, or must be dropped;
//  2. the random_arbiter picks a random order in which the four link inputs
//     claim outputs; the Local input (injection) claims last, so injected
//     packets only use what the through traffic leaves free;
//  3. an input takes the Local output if the packet is for this node, else
//     its first free preferred output; failing that, it is deflected to a
//     free output chosen by a priority_encoder with a random start, trying
//     first healthy neighbours other than the one it came from, then any
//     healthy neighbour, then any neighbour whose link works;
//  4. the crossbar_switch moves the packets into the output registers.
// The Local input is held (in_ready low) when no preferred output is free;
// it is deflected only if it has no preferred output at all. Mesh-link
// inputs are always accepted (in_ready high): a neighbour never sends over a
// faulty link, so there are never more arriving packets than usable outputs.
// Per-hop latency is one cycle. With node_fault (Eq. (3)) the router does
// nothing. `drop` flags undeliverable packets (the error output),
// `deflect` flags non-minimal steps, `busy` flags a cycle in which a packet
// was deflected or the injection was held (congestion status).
// `far_bad` is the cluster agent's map of failed nodes; it only decides which
// of two minimal paths is tried first (see xy_route).
// The random arbiter + priority encoder + crossbar structure without buffers
// follows the document; deflection as the way to serve every packet without
// buffers is this design's choice. Routing sees only the faults of the
// node's own links and of its direct neighbours, so a fault pattern that
// walls off a region with a concave outline can keep a packet circling;
// patterns where each blocked hop has a local detour are delivered.
// The index output of the deflection encoders is left open: the one-hot
// grant is all this module needs.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned X    = 0,
  parameter int unsigned Y    = 0,
  parameter logic [15:0] SEED = 16'hACE1,
  parameter int unsigned MESH_N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NPORTS-1:0]      in_valid,
  input  pkt_t [NPORTS-1:0]      in_pkt,
  output logic [NPORTS-1:0]      in_ready,
  output logic [NPORTS-1:0]      out_valid,
  output pkt_t [NPORTS-1:0]      out_pkt,
  input  logic [NDIRS-1:0]       hard,
  input  logic [NDIRS-1:0]       avoid,
  input  logic [NDIRS-1:0]       cong,
  input  logic                   node_fault,
  input  logic                   pe_fault,
  input  logic [MESH_N*MESH_N-1:0] far_bad,  // failed nodes of the cluster
  output logic [NPORTS-1:0]      drop,
  output logic [NPORTS-1:0]      deflect,
  output logic                   busy
);
  // route computation per input
  logic [NPORTS-1:0]           r_local, r_drop;
  logic [NPORTS-1:0][1:0]      r_pv;
  logic [NPORTS-1:0][1:0][1:0] r_pref;

  for (genvar i = 0; i < NPORTS; i++) begin : g_route
    xy_route #(.MESH_N(MESH_N)) u_route (
      .cur_x    (COORD_W'(X)),
      .cur_y    (COORD_W'(Y)),
      .hdr      (in_pkt[i].hdr),
      .in_dir   (3'(i)),
      .hard     (hard),
      .avoid     (avoid),
      .cong     (cong),
      .pe_fault (pe_fault),
      .far_bad  (far_bad),
      .local_out(r_local[i]),
      .drop     (r_drop[i]),
      .pref_v   (r_pv[i]),
      .pref     (r_pref[i])
    );
  end

  // random order of the link inputs and random start of deflection search
  logic [1:0] order_start;
  logic [NPORTS-1:0][1:0] defl_start;
  random_arbiter #(.NREQ(NDIRS), .SEED(SEED)) u_arb_order (
    .clk, .rst_n, .advance(1'b1), .start(order_start)
  );

  // allocation chain: stage k serves input idx[k]
  logic [NPORTS-1:0][2:0]        idx;
  logic [NPORTS-1:0][NPORTS-1:0] take;      // take[k]: one-hot output for stage k
  logic [NPORTS-1:0]             s_defl, s_drop, s_hold;
  logic [NPORTS-1:0]             dany;

  for (genvar k = 0; k < NPORTS; k++) begin : g_stage
    logic [NPORTS-1:0] free;                // outputs still free before this stage
    logic [NPORTS-1:0] tk;                  // one-hot output taken by this stage
    logic              sdefl, sdrop, shold;
    logic [NDIRS-1:0]  cand, dg;
    if (k == 0) begin : g_first
      assign free = node_fault ? '0 : '1;
    end else begin : g_next
      assign free = g_stage[k-1].free & ~g_stage[k-1].tk;
    end
    if (k < NDIRS) begin : g_link
      assign idx[k] = 3'((32'(order_start) + k) % NDIRS);
    end else begin : g_loc
      assign idx[k] = 3'(DIR_L);
    end

    random_arbiter #(.NREQ(NDIRS), .SEED(SEED ^ 16'(16'h3C5A + k * 16'h0101))) u_arb_defl (
      .clk, .rst_n, .advance(1'b1), .start(defl_start[k])
    );

    // deflection candidates for this stage's packet
    always_comb begin
      logic [NDIRS-1:0] f4, c1, c2, c3;
      f4 = free[NDIRS-1:0];
      c1 = f4 & ~hard & ~avoid;
      if (idx[k] < 3'(NDIRS)) c1[idx[k][1:0]] = 1'b0;   // not back where it came from
      c2 = f4 & ~hard & ~avoid;
      c3 = f4 & ~hard;
      cand = (c1 != 0) ? c1 : (c2 != 0) ? c2 : c3;
    end

    priority_encoder #(.N(NDIRS)) u_penc (
      .req    (cand),
      .start  (defl_start[k]),
      .gnt    (dg),
      .gnt_idx(),
      .any    (dany[k])
    );

    always_comb begin
      logic       v, is_loc;
      logic [2:0] i;
      i      = idx[k];
      v      = in_valid[i] && !node_fault;
      is_loc = (i == 3'(DIR_L));
      tk   = '0;
      sdefl = 1'b0;
      sdrop = 1'b0;
      shold = 1'b0;
      if (v) begin
        if (r_drop[i]) begin
          sdrop = 1'b1;
        end else if (r_local[i] && free[DIR_L]) begin
          tk[DIR_L] = 1'b1;
        end else if (r_pv[i][0] && free[3'(r_pref[i][0])]) begin
          tk[3'(r_pref[i][0])] = 1'b1;
        end else if (r_pv[i][1] && free[3'(r_pref[i][1])]) begin
          tk[3'(r_pref[i][1])] = 1'b1;
        end else if (is_loc && (r_pv[i] != 0 || r_local[i])) begin
          shold = 1'b1;                        // injection waits
        end else if (dany[k]) begin
          tk[NDIRS-1:0] = dg;
          sdefl = 1'b1;
        end else if (is_loc) begin
          shold = 1'b1;
        end else begin
          sdrop = 1'b1;                        // no usable output at all
        end
      end
    end
    assign take[k]   = tk;
    assign s_defl[k] = sdefl;
    assign s_drop[k] = sdrop;
    assign s_hold[k] = shold;
  end

  // crossbar select: sel[o][i]
  logic [NPORTS-1:0][NPORTS-1:0] sel;
  pkt_t [NPORTS-1:0]             xbar_out;
  logic [NPORTS-1:0]             any_out;

  always_comb begin
    sel      = '0;
    drop     = '0;
    deflect  = '0;
    in_ready = '0;
    for (int k = 0; k < NPORTS; k++) begin
      for (int o = 0; o < NPORTS; o++)
        if (take[k][o]) sel[o][idx[k]] = 1'b1;
      drop[idx[k]]    = s_drop[k];
      deflect[idx[k]] = s_defl[k];
    end
    in_ready[NDIRS-1:0] = '1;
    in_ready[DIR_L]     = in_valid[DIR_L] && !node_fault && !s_hold[NPORTS-1];
    for (int o = 0; o < NPORTS; o++) any_out[o] = |sel[o];
    busy = (|s_defl) || (|s_hold);
  end

  crossbar_switch #(.N(NPORTS), .W(PKT_W)) u_xbar (
    .in_data (in_pkt),
    .sel     (sel),
    .out_data(xbar_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_pkt   <= '0;
    end else begin
      out_valid <= any_out;
      for (int o = 0; o < NPORTS; o++)
        if (any_out[o]) out_pkt[o] <= xbar_out[o];
    end
  end

  // Every packet arriving on a healthy router's mesh link is forwarded,
  // ejected or dropped in the same cycle.
  always_comb begin
    for (int i = 0; i < NDIRS; i++) begin
      int unsigned n;
      n = 0;
      for (int o = 0; o < NPORTS; o++) n += 32'(sel[o][i]);
      assert (!(in_valid[i] && !node_fault) || n == 1 || drop[i])
        else $error("noc_router (%0d,%0d): input %0d neither forwarded nor dropped", X, Y, i);
      assert (n <= 1) else $error("noc_router: input %0d switched twice", i);
    end
  end
endmodule
