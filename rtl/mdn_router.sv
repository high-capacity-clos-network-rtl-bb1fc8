// mdn_router: input-queued mini-router of a Multi-Directional NoC (MDN) module.
//
// Four bidirectional ports (North, East, South, West), no local port: the routers
// on the West and East columns reach the input/output modules through their edge
// port, those on the top and bottom rows reach the neighbouring central modules.
// Each input port has one buffer per virtual channel (VC0 eastbound, VC1
// westbound) with the depths of clos_pkg::vc_depth: the West edge input splits its
// space 2/3 VC0 and 1/3 VC1, the East edge input 1/3 VC0 and 2/3 VC1, inner
// horizontal inputs hold a single VC, North/South inputs split evenly. A buffer of
// depth zero is absent.
//
// Each cycle the head of every VC buffer is routed (route_unit) and requests one
// output. Each output has its own round-robin arbiter over the eight VC buffers
// and forwards at most one packet per cycle, provided the downstream buffer of the
// packet's VC has a credit. Both VCs of one input may leave in the same cycle
// towards different outputs. Outputs are registered: a packet granted in cycle t
// is on out_* in cycle t+1 and is written into the next buffer at the end of that
// cycle. A freed buffer slot returns one credit to the upstream router one cycle
// after the pop (in_credit). Credit counters start at the downstream depth
// (EDGE_CRED per VC towards an IOM).
//
// Congestion (regional congestion awareness): occ is the number of packets held
// in the router. On each side X the router sends fint[X] = (occ + fex[opposite X])
// / 2, its estimate of the congestion seen by a packet that leaves the neighbour
// towards this router and keeps going, and it receives fex[X] from the neighbour
// on side X. Registered; edge inputs without a neighbour are tied to zero.
module mdn_router
  import clos_pkg::*;
#(
  parameter int ROW       = 0,
  parameter int COL       = 0,
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
  // incoming links
  input  logic [NDIR-1:0]   in_valid,
  input  logic [NDIR-1:0]   in_vc,
  input  pkt_t              in_pkt    [NDIR],
  output logic [NVC-1:0]    in_credit [NDIR],
  // outgoing links
  output logic [NDIR-1:0]   out_valid,
  output logic [NDIR-1:0]   out_vc,
  output pkt_t              out_pkt    [NDIR],
  input  logic [NVC-1:0]    out_credit [NDIR],
  // congestion information
  input  logic [CONG_W-1:0] fex  [NDIR],
  output logic [CONG_W-1:0] fint [NDIR],
  // activity counters for observation
  output logic              divert_fire    // a packet left through an inter-CM link
);
  localparam int NB = NDIR * NVC;   // buffer index b = port*2 + vc
  localparam int CRW = 4;           // credit counter width

  // downstream depth seen by output o for VC v
  function automatic int init_credit(input int o, input int v);
    if (o == DIR_W) return (COL == 0) ? EDGE_CRED : vc_depth(COL - 1, MESH, BUFF, DIR_E, v);
    if (o == DIR_E) return (COL == MESH - 1) ? EDGE_CRED : vc_depth(COL + 1, MESH, BUFF, DIR_W, v);
    return BUFF / 2;  // North/South neighbour, inside the CM or across CMs
  endfunction

  pkt_t            head     [NB];
  logic [NB-1:0]   hvalid;
  logic [NB-1:0]   pop;
  logic [1:0]      rdir     [NB];
  pkt_t            rpkt     [NB];
  logic [NB-1:0]   rdiv;
  logic [3:0]      cnt      [NB];
  logic [CRW-1:0]  credit   [NDIR][NVC];
  logic [NB-1:0]   req      [NDIR];
  logic [NB-1:0]   gnt      [NDIR];
  logic [NDIR-1:0] fire;
  logic [CONG_W:0] occ;

  // ---------------- input buffers ----------------
  for (genvar p = 0; p < NDIR; p++) begin : g_port
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      localparam int D = vc_depth(COL, MESH, BUFF, p, v);
      localparam int B = p * NVC + v;
      if (D > 0) begin : g_buf
        logic [PKT_W-1:0] dout;
        logic             empty, full;
        logic [$clog2(D+1)-1:0] count;
        pkt_fifo #(.WIDTH(PKT_W), .DEPTH(D)) u_buf (
          .clk, .rst_n,
          .push (in_valid[p] && (in_vc[p] == v[0])),
          .din  (in_pkt[p]),
          .pop  (pop[B]),
          .dout, .empty, .full, .count);
        assign head[B]   = pkt_t'(dout);
        assign hvalid[B] = !empty;
        assign cnt[B]    = 4'(count);
        a_credit_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                      (in_valid[p] && in_vc[p] == v[0]) |-> (!full || pop[B]));
      end else begin : g_none
        assign head[B]   = '0;
        assign hvalid[B] = 1'b0;
        assign cnt[B]    = '0;
        a_unused: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(in_valid[p] && in_vc[p] == v[0]));
      end
      route_unit #(.ROW(ROW), .COL(COL), .MESH(MESH), .N_IO(N_IO), .K_IOM(K_IOM),
                   .HOP_W(HOP_W), .DIVERT_EN(DIVERT_EN)) u_route (
        .pkt_in (head[B]), .cong (fex), .dir (rdir[B]), .pkt_out (rpkt[B]), .divert (rdiv[B]));
    end
  end

  // ---------------- switch allocation ----------------
  always_comb begin
    for (int o = 0; o < NDIR; o++) begin
      req[o] = '0;
      for (int b = 0; b < NB; b++)
        if (hvalid[b] && int'(rdir[b]) == o && credit[o][b % NVC] != '0) req[o][b] = 1'b1;
    end
  end

  for (genvar o = 0; o < NDIR; o++) begin : g_out
    rr_arbiter #(.N(NB)) u_arb (.clk, .rst_n, .req (req[o]), .advance (1'b1), .grant (gnt[o]));
    assign fire[o] = (gnt[o] != '0);
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NDIR; o++) pop |= gnt[o];
  end

  // ---------------- output registers, credits ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= '0;
      out_vc      <= '0;
      divert_fire <= 1'b0;
      for (int o = 0; o < NDIR; o++) begin
        out_pkt[o] <= '0;
        for (int v = 0; v < NVC; v++) credit[o][v] <= CRW'(init_credit(o, v));
      end
      for (int p = 0; p < NDIR; p++) in_credit[p] <= '0;
    end else begin
      divert_fire <= 1'b0;
      for (int o = 0; o < NDIR; o++) begin
        out_valid[o] <= fire[o];
        for (int b = 0; b < NB; b++) begin
          if (gnt[o][b]) begin
            out_pkt[o] <= rpkt[b];
            out_vc[o]  <= 1'(b % NVC);
            if (rdiv[b]) divert_fire <= 1'b1;
          end
        end
        for (int v = 0; v < NVC; v++) begin
          logic used;
          used = fire[o] && (out_vc_of(gnt[o]) == v);
          credit[o][v] <= credit[o][v] - CRW'(used) + CRW'(out_credit[o][v]);
        end
      end
      for (int p = 0; p < NDIR; p++)
        for (int v = 0; v < NVC; v++) in_credit[p][v] <= pop[p * NVC + v];
    end
  end

  function automatic int out_vc_of(input logic [NB-1:0] g);
    for (int b = 0; b < NB; b++) if (g[b]) return b % NVC;
    return 0;
  endfunction

  // ---------------- congestion estimates ----------------
  always_comb begin
    occ = '0;
    for (int b = 0; b < NB; b++) occ = occ + (CONG_W+1)'(cnt[b]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < NDIR; d++) fint[d] <= '0;
    end else begin
      for (int d = 0; d < NDIR; d++)
        fint[d] <= CONG_W'(((CONG_W+2)'(occ) + (CONG_W+2)'(fex[opposite(d)])) >> 1);
    end
  end
endmodule
