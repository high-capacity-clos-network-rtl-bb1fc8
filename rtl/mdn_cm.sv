// mdn_cm: central module of the Clos-MDN switch, a Multi-Directional NoC.
//
// A MESH x MESH grid of mdn_router instances. Every side exposes MESH
// bidirectional links, indexed by row on the West/East sides and by column on
// the North/South sides. West and East links go to the input/output modules;
// North and South links go to the previous and next central module. Each link is
// valid/vc/packet forward and one credit per VC backward; each side also carries
// the congestion estimates (fint out, fex in) of its edge routers. West/East
// congestion inputs are meant to be tied to zero by the instantiating module.
// Routers are linked to their four neighbours with the same link bundle, so a
// packet crosses one router per cycle when it meets no contention.
module mdn_cm
  import clos_pkg::*;
#(
  parameter int MESH      = 4,
  parameter int N_IO      = 4,
  parameter int K_IOM     = 8,
  parameter int BUFF      = 4,
  parameter int EDGE_CRED = 2,
  parameter int HOP_W     = 1,
  parameter bit DIVERT_EN = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MESH-1:0]   in_valid   [NDIR],
  input  logic [MESH-1:0]   in_vc      [NDIR],
  input  pkt_t              in_pkt     [NDIR][MESH],
  output logic [NVC-1:0]    in_credit  [NDIR][MESH],
  output logic [MESH-1:0]   out_valid  [NDIR],
  output logic [MESH-1:0]   out_vc     [NDIR],
  output pkt_t              out_pkt    [NDIR][MESH],
  input  logic [NVC-1:0]    out_credit [NDIR][MESH],
  input  logic [CONG_W-1:0] fex        [NDIR][MESH],
  output logic [CONG_W-1:0] fint       [NDIR][MESH],
  output logic [MESH*MESH-1:0] divert_fire   // per router, row-major
);
  // per-router link signals, [row][col][dir]
  logic [NDIR-1:0]   r_in_valid   [MESH][MESH];
  logic [NDIR-1:0]   r_in_vc      [MESH][MESH];
  pkt_t              r_in_pkt     [MESH][MESH][NDIR];
  logic [NVC-1:0]    r_in_credit  [MESH][MESH][NDIR];
  logic [NDIR-1:0]   r_out_valid  [MESH][MESH];
  logic [NDIR-1:0]   r_out_vc     [MESH][MESH];
  pkt_t              r_out_pkt    [MESH][MESH][NDIR];
  logic [NVC-1:0]    r_out_credit [MESH][MESH][NDIR];
  logic [CONG_W-1:0] r_fex        [MESH][MESH][NDIR];
  logic [CONG_W-1:0] r_fint       [MESH][MESH][NDIR];

  for (genvar r = 0; r < MESH; r++) begin : g_row
    for (genvar c = 0; c < MESH; c++) begin : g_col
      mdn_router #(.ROW(r), .COL(c), .MESH(MESH), .N_IO(N_IO), .K_IOM(K_IOM), .BUFF(BUFF),
                   .EDGE_CRED(EDGE_CRED), .HOP_W(HOP_W), .DIVERT_EN(DIVERT_EN)) u_r (
        .clk, .rst_n,
        .in_valid (r_in_valid[r][c]), .in_vc (r_in_vc[r][c]), .in_pkt (r_in_pkt[r][c]),
        .in_credit (r_in_credit[r][c]),
        .out_valid (r_out_valid[r][c]), .out_vc (r_out_vc[r][c]), .out_pkt (r_out_pkt[r][c]),
        .out_credit (r_out_credit[r][c]),
        .fex (r_fex[r][c]), .fint (r_fint[r][c]),
        .divert_fire (divert_fire[r * MESH + c]));

      for (genvar d = 0; d < NDIR; d++) begin : g_dir
        // neighbour in direction d, or the module edge
        localparam int NR = (d == DIR_N) ? r - 1 : (d == DIR_S) ? r + 1 : r;
        localparam int NC = (d == DIR_W) ? c - 1 : (d == DIR_E) ? c + 1 : c;
        localparam int OD = (d + 2) % 4;
        localparam int EI = (d == DIR_N || d == DIR_S) ? c : r;   // index along the side
        if (NR >= 0 && NR < MESH && NC >= 0 && NC < MESH) begin : g_inner
          assign r_in_valid[r][c][d]   = r_out_valid[NR][NC][OD];
          assign r_in_vc[r][c][d]      = r_out_vc[NR][NC][OD];
          assign r_in_pkt[r][c][d]     = r_out_pkt[NR][NC][OD];
          assign r_out_credit[r][c][d] = r_in_credit[NR][NC][OD];
          assign r_fex[r][c][d]        = r_fint[NR][NC][OD];
        end else begin : g_edge
          assign r_in_valid[r][c][d]   = in_valid[d][EI];
          assign r_in_vc[r][c][d]      = in_vc[d][EI];
          assign r_in_pkt[r][c][d]     = in_pkt[d][EI];
          assign r_out_credit[r][c][d] = out_credit[d][EI];
          assign r_fex[r][c][d]        = fex[d][EI];
          assign in_credit[d][EI]      = r_in_credit[r][c][d];
          assign out_valid[d][EI]      = r_out_valid[r][c][d];
          assign out_vc[d][EI]         = r_out_vc[r][c][d];
          assign out_pkt[d][EI]        = r_out_pkt[r][c][d];
          assign fint[d][EI]           = r_fint[r][c][d];
        end
      end
    end
  end
endmodule
