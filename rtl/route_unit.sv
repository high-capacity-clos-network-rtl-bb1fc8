// route_unit: next-hop choice for the packet at the head of one mini-router
// input buffer (combinational).
//
// Inside a central module (CM) a packet is routed minimally towards the egress
// row on the side (West or East) that faces the IOM of its destination port.
// The header's turn_col tells in which column the packet moves vertically:
//   eastbound (VC0): East while col < turn_col, then North/South to the egress
//   row, then East until it leaves the mesh; westbound (VC1) is the mirror image.
// A turn column set by the ingress IOM gives the Modulo route (one intermediate
// turn column); a turn column equal to the exit column gives plain XY.
//
// Congestion-aware diversion: a router on the top row (North link) or bottom
// row (South link) may send the packet over the link to the neighbouring CM,
// where it lands at column j = (mesh/2 + col) mod mesh on the opposite edge row
// and continues with XY. The metric of a path is HOP_W * remaining hops plus the
// regional congestion estimate received from the neighbour in that direction.
// The packet is diverted when it has not been diverted before, the diversion
// does not add hops, and the diverted metric is strictly smaller. A diverted
// packet gets diverted = 1 and turn_col = exit column.
module route_unit
  import clos_pkg::*;
#(
  parameter int ROW   = 0,
  parameter int COL   = 0,
  parameter int MESH  = 4,
  parameter int N_IO  = 4,
  parameter int K_IOM = 8,
  parameter int HOP_W = 1,
  parameter bit DIVERT_EN = 1'b1
) (
  input  pkt_t              pkt_in,
  input  logic [CONG_W-1:0] cong [NDIR],   // congestion estimate per direction
  output logic [1:0]        dir,           // output port (DIR_N..DIR_W)
  output pkt_t              pkt_out,       // header as forwarded
  output logic              divert         // packet leaves through an inter-CM link
);
  localparam int VW = 16;   // width of the hop and metric arithmetic
  logic [VW-1:0] drow, ecol, tcol, hops_l, hops_v, jcol, vrow, m_l, m_v;
  logic dwest;
  logic [1:0] ldir, vdir;
  logic can_v;

  function automatic int absdiff(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_comb begin
    dwest = dst_is_west(int'(pkt_in.dst), N_IO, K_IOM);
    drow  = VW'(dst_row(int'(pkt_in.dst), N_IO, K_IOM));
    ecol  = dwest ? '0 : VW'(MESH - 1);
    tcol  = VW'(pkt_in.turn_col);

    // local minimal route
    if (!dwest && VW'(COL) < tcol)      ldir = 2'(DIR_E);
    else if (dwest && VW'(COL) > tcol)  ldir = 2'(DIR_W);
    else if (VW'(ROW) < drow)           ldir = 2'(DIR_S);
    else if (VW'(ROW) > drow)           ldir = 2'(DIR_N);
    else                                ldir = dwest ? 2'(DIR_W) : 2'(DIR_E);
    hops_l = VW'(absdiff(COL, int'(ecol)) + absdiff(ROW, int'(drow)));

    // diversion candidate over the inter-CM link of this edge row
    jcol  = VW'((MESH / 2 + COL) % MESH);
    can_v = 1'b0;
    vdir  = 2'(DIR_S);
    vrow  = '0;
    if (ROW == MESH - 1) begin
      can_v = 1'b1; vdir = 2'(DIR_S); vrow = '0;
    end else if (ROW == 0) begin
      can_v = 1'b1; vdir = 2'(DIR_N); vrow = VW'(MESH - 1);
    end
    hops_v = VW'(1 + absdiff(int'(jcol), int'(ecol)) + absdiff(int'(vrow), int'(drow)));
    m_l = VW'(HOP_W) * hops_l + VW'(cong[ldir]);
    m_v = VW'(HOP_W) * hops_v + VW'(cong[vdir]);

    divert  = DIVERT_EN && can_v && !pkt_in.diverted && (ldir != vdir) &&
              (hops_v <= hops_l) && (m_v < m_l);
    pkt_out = pkt_in;
    dir     = ldir;
    if (divert) begin
      dir              = vdir;
      pkt_out.diverted = 1'b1;
      pkt_out.turn_col = COORD_W'(ecol);
    end
  end
endmodule
