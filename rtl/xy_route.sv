// xy_route: fault- and congestion-aware XY route computation for one packet.
//
// Given the packet header and the current node it returns
//  * `local` - the packet is for this node and its PE is available;
//  * `drop`  - the packet cannot be delivered: it is for this node and the
//              PE is unavailable, or its next hop is the destination and the
//              regional fault register marks that neighbour unhealthy;
//  * up to two preferred output directions (pref_v/pref) among the
//    productive ones (the X step E/W and the Y step S/N), leaving out a
//    direction whose link is faulty (`hard`, Eq. (2)) or whose neighbour is
//    unhealthy (`avoid`, RFR), and leaving out the direction the packet came
//    from (a deflected packet is not pulled straight back). With both usable, X comes first as in XY
//    routing, unless the X neighbour reports congestion and the Y one does
//    not.
// When both are usable and one of the two minimal paths (X then Y, or Y then
// X) crosses a node that the cluster agent reports as failed (`far_bad`,
// one bit per node of the cluster), the other path's first step comes
// first; this check takes precedence over congestion.
// With no preferred direction the router deflects the packet (non-minimal
// step). Combinational. XY with fault information follows the document; the
// congestion tie-break and the drop rule are this design's choices.
// Only the destination fields of the header are read; lint reports the
// other header bits as unused, which is intended.
// For nodes in the last row or column some of the path range comparisons
// are constant; lint notes them, and synthesis simply folds them away.
module xy_route
  import noc_pkg::*;
#(
  parameter int unsigned MESH_N = 4
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  hdr_t               hdr,
  input  logic [2:0]         in_dir,     // port the packet arrived on (4 = Local)
  input  logic [NDIRS-1:0]   hard,
  input  logic [NDIRS-1:0]   avoid,
  input  logic [NDIRS-1:0]   cong,
  input  logic               pe_fault,
  input  logic [MESH_N*MESH_N-1:0] far_bad,
  output logic               local_out,
  output logic               drop,
  output logic [1:0]         pref_v,
  output logic [1:0][1:0]    pref
);
  // does the X-first / Y-first minimal path pass a failed node (endpoints
  // excluded)?
  logic xy_blk, yx_blk;
  logic [COORD_W-1:0] lx, hx, ly, hy;
  logic [MESH_N*MESH_N-1:0] on_xy, on_yx;
  assign lx = (cur_x < hdr.dst_x) ? cur_x : hdr.dst_x;
  assign hx = (cur_x < hdr.dst_x) ? hdr.dst_x : cur_x;
  assign ly = (cur_y < hdr.dst_y) ? cur_y : hdr.dst_y;
  assign hy = (cur_y < hdr.dst_y) ? hdr.dst_y : cur_y;
  for (genvar k = 0; k < MESH_N * MESH_N; k++) begin : g_node
    localparam logic [COORD_W-1:0] KX = COORD_W'(k % MESH_N);
    localparam logic [COORD_W-1:0] KY = COORD_W'(k / MESH_N);
    logic ends;
    assign ends     = (KX == cur_x && KY == cur_y) || (KX == hdr.dst_x && KY == hdr.dst_y);
    assign on_xy[k] = !ends && ((KY == cur_y && KX >= lx && KX <= hx) ||
                                (KX == hdr.dst_x && KY >= ly && KY <= hy));
    assign on_yx[k] = !ends && ((KX == cur_x && KY >= ly && KY <= hy) ||
                                (KY == hdr.dst_y && KX >= lx && KX <= hx));
  end
  assign xy_blk = |(far_bad & on_xy);
  assign yx_blk = |(far_bad & on_yx);

  always_comb begin
    logic       have_x, have_y, use_x, use_y, last_x, last_y;
    logic [1:0] dx, dy;
    local_out = 1'b0;
    drop      = 1'b0;
    pref_v    = 2'b00;
    pref      = '0;
    have_x    = (hdr.dst_x != cur_x);
    have_y    = (hdr.dst_y != cur_y);
    dx        = (hdr.dst_x > cur_x) ? 2'(DIR_E) : 2'(DIR_W);
    dy        = (hdr.dst_y > cur_y) ? 2'(DIR_S) : 2'(DIR_N);
    last_x    = have_x && !have_y &&
                ((hdr.dst_x > cur_x) ? (hdr.dst_x - cur_x == 1) : (cur_x - hdr.dst_x == 1));
    last_y    = have_y && !have_x &&
                ((hdr.dst_y > cur_y) ? (hdr.dst_y - cur_y == 1) : (cur_y - hdr.dst_y == 1));
    // never turn straight back towards the node the packet came from
    use_x     = have_x && !hard[dx] && !avoid[dx] && (3'(dx) != in_dir);
    use_y     = have_y && !hard[dy] && !avoid[dy] && (3'(dy) != in_dir);
    if (!have_x && !have_y) begin
      local_out = !pe_fault;
      drop      = pe_fault;
    end else if ((last_x && avoid[dx]) || (last_y && avoid[dy])) begin
      drop = 1'b1;
    end else if (use_x && use_y) begin
      pref_v = 2'b11;
      if (xy_blk != yx_blk)           pref = xy_blk ? {dx, dy} : {dy, dx};
      else if (cong[dx] && !cong[dy]) pref = {dx, dy};
      else                            pref = {dy, dx};
    end else if (use_x) begin
      pref_v  = 2'b01;
      pref[0] = dx;
    end else if (use_y) begin
      pref_v  = 2'b01;
      pref[0] = dy;
    end
  end
endmodule
