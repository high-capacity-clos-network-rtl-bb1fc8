// iom: input/output module (first and third stage of the Clos-MDN switch).
//
// One IOM serves n = N_IO input ports and n output ports. Inputs and outputs of
// one IOM carry different port numbers: IOM i receives input ports i*n..i*n+n-1
// and drives output ports (k-1-i)*n..(k-1-i)*n+n-1 (inputs and outputs are
// spread over the edge modules in opposite directions).
//
// Ingress: input port j has a plain FIFO that always dispatches to central
// module j (static dispatch, n = m). A packet is taken from the line only in a
// time-slot cycle (slot high) and only if the FIFO has room (in_ready). When it
// enters, the header is completed: source port, diverted = 0 and the turn column
// of its route through the CM. The FIFO head leaves towards its CM as soon as the
// first mini-router's buffer of its VC has a credit (VC0 if the destination is on
// the CM's East side, VC1 if on the West side). A head without credit blocks its
// FIFO; packets behind it wait.
//
// Egress: the link from each CM ends in a small landing buffer of 2*EDGE_CRED
// packets; the CM holds EDGE_CRED credits per VC for it and gets one back for
// every packet that leaves the landing buffer. Landing heads move into the output
// queue of their destination port; one output queue takes in up to m packets in a
// cycle. Each output queue sends one packet per time slot to the line (out_valid
// is a one-cycle pulse in the cycle after slot).
module iom
  import clos_pkg::*;
#(
  parameter int N_IO      = 4,
  parameter int K_IOM     = 8,
  parameter int IOM_IDX   = 0,
  parameter int BUFF      = 4,
  parameter int IN_DEPTH  = 4,
  parameter int OQ_DEPTH  = 8,
  parameter int EDGE_CRED = 2,
  localparam int M    = N_IO,
  localparam int MESH = K_IOM / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 slot,          // one cycle per external time slot
  // line side
  input  logic [N_IO-1:0]      in_valid,
  input  logic [PORT_W-1:0]    in_dst     [N_IO],
  input  logic [PAYLOAD_W-1:0] in_payload [N_IO],
  output logic [N_IO-1:0]      in_ready,
  output logic [N_IO-1:0]      out_valid,
  output pkt_t                 out_pkt    [N_IO],
  // central-module side, link j goes to CM j
  output logic [M-1:0]         to_cm_valid,
  output logic [M-1:0]         to_cm_vc,
  output pkt_t                 to_cm_pkt     [M],
  input  logic [NVC-1:0]       to_cm_credit  [M],
  input  logic [M-1:0]         from_cm_valid,
  input  logic [M-1:0]         from_cm_vc,
  input  pkt_t                 from_cm_pkt   [M],
  output logic [NVC-1:0]       from_cm_credit [M],
  // observation
  output logic [M-1:0]         credit_stall,  // FIFO head held back for lack of credit
  output logic [N_IO-1:0]      oq_multi       // output queue took >1 packet this cycle
);
  localparam logic WEST = (IOM_IDX < K_IOM / 2);
  localparam int   ROW  = WEST ? IOM_IDX : K_IOM - 1 - IOM_IDX;
  localparam int   ECOL = WEST ? 0 : MESH - 1;
  localparam int   EDIR = WEST ? DIR_W : DIR_E;
  localparam int   LAND = 2 * EDGE_CRED;
  localparam int   CRW  = 4;

  // ---------------- ingress ----------------
  logic [CRW-1:0] credit [M][NVC];
  logic [M-1:0]   send;

  for (genvar j = 0; j < M; j++) begin : g_in
    pkt_t             new_pkt, head;
    logic [PKT_W-1:0] dout;
    logic             empty, full;
    logic [$clog2(IN_DEPTH+1)-1:0] count;
    logic             hvc;

    always_comb begin
      logic dw;
      dw = dst_is_west(int'(in_dst[j]), N_IO, K_IOM);
      new_pkt          = '0;
      new_pkt.dst      = in_dst[j];
      new_pkt.src      = PORT_W'(IOM_IDX * N_IO + j);
      new_pkt.diverted = 1'b0;
      new_pkt.turn_col = COORD_W'(turn_column(WEST, ROW, dw,
                                               dst_row(int'(in_dst[j]), N_IO, K_IOM), MESH));
      new_pkt.payload  = in_payload[j];
    end

    assign in_ready[j] = slot && !full;

    pkt_fifo #(.WIDTH(PKT_W), .DEPTH(IN_DEPTH)) u_fifo (
      .clk, .rst_n, .push (in_valid[j] && in_ready[j]), .din (new_pkt),
      .pop (send[j]), .dout, .empty, .full, .count);

    assign head    = pkt_t'(dout);
    assign hvc     = dst_is_west(int'(head.dst), N_IO, K_IOM);
    assign send[j] = !empty && (credit[j][hvc] != '0);
    assign credit_stall[j] = !empty && !send[j];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        to_cm_valid[j] <= 1'b0;
        to_cm_vc[j]    <= 1'b0;
        to_cm_pkt[j]   <= '0;
        for (int v = 0; v < NVC; v++)
          credit[j][v] <= CRW'(vc_depth(ECOL, MESH, BUFF, EDIR, v));
      end else begin
        to_cm_valid[j] <= send[j];
        if (send[j]) begin
          to_cm_vc[j]  <= hvc;
          to_cm_pkt[j] <= head;
        end
        for (int v = 0; v < NVC; v++)
          credit[j][v] <= credit[j][v] - CRW'(send[j] && hvc == v[0]) + CRW'(to_cm_credit[j][v]);
      end
    end
  end

  // ---------------- egress ----------------
  pkt_t          land_head [M];
  logic [M-1:0]  land_valid;
  logic [M-1:0]  land_vc_head;
  logic [M-1:0]  land_pop;
  logic [M-1:0]  oq_acc [N_IO];

  for (genvar j = 0; j < M; j++) begin : g_land
    logic [PKT_W:0] dout;
    logic           empty, full;
    logic [$clog2(LAND+1)-1:0] count;
    pkt_fifo #(.WIDTH(PKT_W + 1), .DEPTH(LAND)) u_land (
      .clk, .rst_n, .push (from_cm_valid[j]), .din ({from_cm_vc[j], from_cm_pkt[j]}),
      .pop (land_pop[j]), .dout, .empty, .full, .count);
    assign land_head[j]    = pkt_t'(dout[PKT_W-1:0]);
    assign land_vc_head[j] = dout[PKT_W];
    assign land_valid[j]   = !empty;

    always_ff @(posedge clk) begin
      if (!rst_n) from_cm_credit[j] <= '0;
      else for (int v = 0; v < NVC; v++)
        from_cm_credit[j][v] <= land_pop[j] && (land_vc_head[j] == v[0]);
    end

    a_own_port: assert property (@(posedge clk) disable iff (!rst_n)
      land_valid[j] |-> (int'(land_head[j].dst) / N_IO == K_IOM - 1 - IOM_IDX));
  end

  always_comb begin
    land_pop = '0;
    for (int q = 0; q < N_IO; q++) land_pop |= oq_acc[q];
  end

  for (genvar q = 0; q < N_IO; q++) begin : g_oq
    logic [M-1:0]     wv;
    logic [PKT_W-1:0] wd [M];
    logic [PKT_W-1:0] dout;
    logic             empty;
    logic [$clog2(OQ_DEPTH+1)-1:0] count;
    logic             rd;

    always_comb begin
      for (int j = 0; j < M; j++) begin
        wv[j] = land_valid[j] && (int'(land_head[j].dst) % N_IO == q);
        wd[j] = land_head[j];
      end
    end

    assign rd = slot && !empty;

    output_queue #(.WIDTH(PKT_W), .DEPTH(OQ_DEPTH), .M_WR(M)) u_oq (
      .clk, .rst_n, .wr_valid (wv), .wr_data (wd), .wr_accept (oq_acc[q]),
      .rd, .dout, .empty, .count);

    assign oq_multi[q] = ($countones(oq_acc[q]) > 1);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid[q] <= 1'b0;
        out_pkt[q]   <= '0;
      end else begin
        out_valid[q] <= rd;
        if (rd) out_pkt[q] <= pkt_t'(dout);
      end
    end
  end
endmodule
