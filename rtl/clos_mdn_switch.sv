// clos_mdn_switch: three-stage Clos-network packet switch whose central stage is
// made of Multi-Directional NoC modules (Clos-MDN), with interleaved links that
// wrap the central stage into a ring.
//
// Structure (defaults give the 32x32 example: n = 4, k = 8, m = 4):
//   * k IOMs (iom), each with n input FIFOs and n output queues. Input port p is
//     served by IOM p/n, output port p by IOM k-1-p/n.
//   * m = n central modules (mdn_cm), each a (k/2)x(k/2) mesh of mini-routers.
//     IOM i (i < k/2) connects to row i of the West side of every CM; IOM i
//     (i >= k/2) to row k-1-i of the East side. Input FIFO j of every IOM feeds
//     CM j; every CM can deliver to every IOM's output queues.
//   * Inter-CM links: bottom-row router in column c of CM r is linked both ways
//     to the top-row router in column (k/4 + c) mod (k/2) of CM (r+1) mod m.
//     Each link carries both VCs and the routers' congestion estimates.
// Timing: one clock is one cycle of the on-chip fabric. The external lines run
// SP times slower: slot is high one cycle in SP, and each input port accepts and
// each output port emits at most one packet per slot. A packet on in_* is taken
// in a slot cycle when in_ready is high; delivered packets appear on out_valid /
// out_pkt for one cycle. The ev_* outputs flag, per cycle, fabric events that are
// useful for observation (diversions to a neighbouring CM, input FIFO heads
// waiting for credit, output queues taking several packets in one cycle).
module clos_mdn_switch
  import clos_pkg::*;
#(
  parameter int N_IO      = 4,    // n: ports per IOM (= number of CMs m)
  parameter int K_IOM     = 8,    // k: number of IOMs
  parameter int BUFF      = 4,    // packets per mini-router input port
  parameter int SP        = 2,    // fabric speedup over the line rate
  parameter int IN_DEPTH  = 4,    // IOM input FIFO depth
  parameter int OQ_DEPTH  = 8,    // IOM output queue depth
  parameter int EDGE_CRED = 2,    // credits per VC on a CM-to-IOM link
  parameter int HOP_W     = 1,    // hop weight of the diversion metric
  parameter bit DIVERT_EN = 1'b1, // allow diversion to neighbouring CMs
  localparam int NP   = N_IO * K_IOM,
  localparam int M    = N_IO,
  localparam int MESH = K_IOM / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 slot,
  input  logic [NP-1:0]        in_valid,
  input  logic [PORT_W-1:0]    in_dst     [NP],
  input  logic [PAYLOAD_W-1:0] in_payload [NP],
  output logic [NP-1:0]        in_ready,
  output logic [NP-1:0]        out_valid,
  output pkt_t                 out_pkt    [NP],
  output logic                 ev_divert,
  output logic                 ev_credit_stall,
  output logic                 ev_oq_multi
);
  // ---------------- time slots ----------------
  logic [$clog2(SP+1)-1:0] slot_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) slot_cnt <= '0;
    else        slot_cnt <= (int'(slot_cnt) == SP - 1) ? '0 : slot_cnt + 1'b1;
  end
  assign slot = (slot_cnt == '0);

  // ---------------- central modules' link arrays ----------------
  logic [MESH-1:0]   cm_in_valid   [M][NDIR];
  logic [MESH-1:0]   cm_in_vc      [M][NDIR];
  pkt_t              cm_in_pkt     [M][NDIR][MESH];
  logic [NVC-1:0]    cm_in_credit  [M][NDIR][MESH];
  logic [MESH-1:0]   cm_out_valid  [M][NDIR];
  logic [MESH-1:0]   cm_out_vc     [M][NDIR];
  pkt_t              cm_out_pkt    [M][NDIR][MESH];
  logic [NVC-1:0]    cm_out_credit [M][NDIR][MESH];
  logic [CONG_W-1:0] cm_fex        [M][NDIR][MESH];
  logic [CONG_W-1:0] cm_fint       [M][NDIR][MESH];
  logic [MESH*MESH-1:0] cm_divert  [M];

  // ---------------- IOM link arrays, [iom][cm] ----------------
  logic [M-1:0]   io_to_valid    [K_IOM];
  logic [M-1:0]   io_to_vc       [K_IOM];
  pkt_t           io_to_pkt      [K_IOM][M];
  logic [NVC-1:0] io_to_credit   [K_IOM][M];
  logic [M-1:0]   io_from_valid  [K_IOM];
  logic [M-1:0]   io_from_vc     [K_IOM];
  pkt_t           io_from_pkt    [K_IOM][M];
  logic [NVC-1:0] io_from_credit [K_IOM][M];
  logic [M-1:0]   io_stall       [K_IOM];
  logic [N_IO-1:0] io_multi      [K_IOM];

  for (genvar i = 0; i < K_IOM; i++) begin : g_iom
    logic [PORT_W-1:0]    dst [N_IO];
    logic [PAYLOAD_W-1:0] pay [N_IO];
    pkt_t                 opk [N_IO];
    for (genvar j = 0; j < N_IO; j++) begin : g_p
      assign dst[j] = in_dst[i * N_IO + j];
      assign pay[j] = in_payload[i * N_IO + j];
      assign out_pkt[(K_IOM - 1 - i) * N_IO + j] = opk[j];
    end
    iom #(.N_IO(N_IO), .K_IOM(K_IOM), .IOM_IDX(i), .BUFF(BUFF), .IN_DEPTH(IN_DEPTH),
          .OQ_DEPTH(OQ_DEPTH), .EDGE_CRED(EDGE_CRED)) u_iom (
      .clk, .rst_n, .slot,
      .in_valid   (in_valid[i * N_IO +: N_IO]),
      .in_dst     (dst),
      .in_payload (pay),
      .in_ready   (in_ready[i * N_IO +: N_IO]),
      .out_valid  (out_valid[(K_IOM - 1 - i) * N_IO +: N_IO]),
      .out_pkt    (opk),
      .to_cm_valid (io_to_valid[i]), .to_cm_vc (io_to_vc[i]), .to_cm_pkt (io_to_pkt[i]),
      .to_cm_credit (io_to_credit[i]),
      .from_cm_valid (io_from_valid[i]), .from_cm_vc (io_from_vc[i]),
      .from_cm_pkt (io_from_pkt[i]), .from_cm_credit (io_from_credit[i]),
      .credit_stall (io_stall[i]), .oq_multi (io_multi[i]));

    // IOM i <-> CM j, on the West or East side of the CM
    localparam int SIDE = (i < K_IOM / 2) ? DIR_W : DIR_E;
    localparam int ROW  = (i < K_IOM / 2) ? i : K_IOM - 1 - i;
    for (genvar j = 0; j < M; j++) begin : g_link
      assign cm_in_valid[j][SIDE][ROW]   = io_to_valid[i][j];
      assign cm_in_vc[j][SIDE][ROW]      = io_to_vc[i][j];
      assign cm_in_pkt[j][SIDE][ROW]     = io_to_pkt[i][j];
      assign io_to_credit[i][j]          = cm_in_credit[j][SIDE][ROW];
      assign io_from_valid[i][j]         = cm_out_valid[j][SIDE][ROW];
      assign io_from_vc[i][j]            = cm_out_vc[j][SIDE][ROW];
      assign io_from_pkt[i][j]           = cm_out_pkt[j][SIDE][ROW];
      assign cm_out_credit[j][SIDE][ROW] = io_from_credit[i][j];
      assign cm_fex[j][SIDE][ROW]        = '0;
    end
  end

  for (genvar r = 0; r < M; r++) begin : g_cm
    mdn_cm #(.MESH(MESH), .N_IO(N_IO), .K_IOM(K_IOM), .BUFF(BUFF), .EDGE_CRED(EDGE_CRED),
             .HOP_W(HOP_W), .DIVERT_EN(DIVERT_EN)) u_cm (
      .clk, .rst_n,
      .in_valid (cm_in_valid[r]), .in_vc (cm_in_vc[r]), .in_pkt (cm_in_pkt[r]),
      .in_credit (cm_in_credit[r]),
      .out_valid (cm_out_valid[r]), .out_vc (cm_out_vc[r]), .out_pkt (cm_out_pkt[r]),
      .out_credit (cm_out_credit[r]),
      .fex (cm_fex[r]), .fint (cm_fint[r]), .divert_fire (cm_divert[r]));

    // interleaved links: South column c of CM r <-> North column (MESH/2+c)%MESH of CM r+1
    localparam int RN = (r + 1) % M;
    for (genvar c = 0; c < MESH; c++) begin : g_ring
      localparam int J = (MESH / 2 + c) % MESH;
      assign cm_in_valid[RN][DIR_N][J]   = cm_out_valid[r][DIR_S][c];
      assign cm_in_vc[RN][DIR_N][J]      = cm_out_vc[r][DIR_S][c];
      assign cm_in_pkt[RN][DIR_N][J]     = cm_out_pkt[r][DIR_S][c];
      assign cm_out_credit[r][DIR_S][c]  = cm_in_credit[RN][DIR_N][J];
      assign cm_fex[RN][DIR_N][J]        = cm_fint[r][DIR_S][c];
      assign cm_in_valid[r][DIR_S][c]    = cm_out_valid[RN][DIR_N][J];
      assign cm_in_vc[r][DIR_S][c]       = cm_out_vc[RN][DIR_N][J];
      assign cm_in_pkt[r][DIR_S][c]      = cm_out_pkt[RN][DIR_N][J];
      assign cm_out_credit[RN][DIR_N][J] = cm_in_credit[r][DIR_S][c];
      assign cm_fex[r][DIR_S][c]         = cm_fint[RN][DIR_N][J];
    end
  end

  // ---------------- observation ----------------
  always_comb begin
    ev_divert       = 1'b0;
    ev_credit_stall = 1'b0;
    ev_oq_multi     = 1'b0;
    for (int r = 0; r < M; r++) ev_divert |= (cm_divert[r] != '0);
    for (int i = 0; i < K_IOM; i++) begin
      ev_credit_stall |= (io_stall[i] != '0);
      ev_oq_multi     |= (io_multi[i] != '0);
    end
  end
endmodule
