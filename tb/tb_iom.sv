// tb_iom: IOM 1 of the 32-port geometry (West side, row 1; inputs 4..7, outputs
// 24..27) with a time slot every second cycle. The testbench plays the line cards
// and the four central modules.
// Ingress checks: packets are accepted only in slot cycles, input j always goes
// to CM j in arrival order, the header gets the source port, VC and the turn
// column of the Modulo rule, and the entry buffer credits (3 for VC0, 1 for VC1)
// are never exceeded; a blocked FIFO head is seen (credit stall).
// Egress checks: packets from the CMs reach the output port named by their
// destination exactly once, each output emits at most one packet per slot and
// only right after a slot cycle, several CMs write one output queue in the same
// cycle at least once, and the CM-side credits (2 per VC) are never exceeded.
module tb_iom;
  import clos_pkg::*;
  localparam int NIO = 4, KIOM = 8, IDX = 1, MESH = 4, EC = 2;
  localparam int M = NIO;
  logic clk = 0, rst_n = 0, slot;
  logic [NIO-1:0] in_valid, in_ready, out_valid;
  logic [PORT_W-1:0] in_dst [NIO];
  logic [PAYLOAD_W-1:0] in_payload [NIO];
  pkt_t out_pkt [NIO];
  logic [M-1:0] to_cm_valid, to_cm_vc, from_cm_valid, from_cm_vc;
  pkt_t to_cm_pkt [M], from_cm_pkt [M];
  logic [NVC-1:0] to_cm_credit [M], from_cm_credit [M];
  logic [M-1:0] credit_stall;
  logic [NIO-1:0] oq_multi;
  int checks = 0, failures = 0;
  int n_stall = 0, n_multi = 0, n_full = 0, n_in = 0, n_out_in = 0, n_eg = 0, n_eg_out = 0;

  iom #(.N_IO(NIO), .K_IOM(KIOM), .IOM_IDX(IDX), .EDGE_CRED(EC)) dut (.*);
  always #5 clk = ~clk;

  int entry_depth [NVC] = '{3, 1};
  int cm_held [M][NVC];          // packets the CM entry buffer holds
  int eg_cred [M][NVC];          // our credits towards the IOM landing buffer
  int exp_q [M][$];              // expected ingress order per link (payloads)
  int eg_pending [int];          // egress payload -> destination port
  int cyc = 0;
  int last_slot = -10;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq = 0;
  initial begin
    int out_last [NIO];
    in_valid = '0; from_cm_valid = '0; from_cm_vc = '0;
    for (int j = 0; j < NIO; j++) begin
      in_dst[j] = '0; in_payload[j] = '0; to_cm_credit[j] = '0; from_cm_pkt[j] = '0;
      out_last[j] = -10;
      for (int v = 0; v < NVC; v++) begin cm_held[j][v] = 0; eg_cred[j][v] = EC; end
    end
    slot = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 12000; cyc++) begin
      @(negedge clk);
      // ---- ingress links towards the CMs
      for (int j = 0; j < M; j++) begin
        if (to_cm_valid[j]) begin
          pkt_t p;
          int dst, iomd, drow, t, ett;
          bit dw;
          p = to_cm_pkt[j];
          n_out_in++;
          check(exp_q[j].size() > 0 && int'(p.payload) == exp_q[j][0], "static dispatch, FIFO order");
          if (exp_q[j].size() > 0) void'(exp_q[j].pop_front());
          dst = int'(p.dst);
          iomd = KIOM - 1 - dst / NIO;
          dw = iomd < KIOM / 2;
          drow = dw ? iomd : KIOM - 1 - iomd;
          t = (IDX + drow) % (MESH - 1);
          ett = dw ? 0 : t;
          check(to_cm_vc[j] == dw, "ingress vc");
          check(int'(p.src) == IDX * NIO + j && !p.diverted, "ingress header");
          check(int'(p.turn_col) == ett, "turn column");
          cm_held[j][to_cm_vc[j]]++;
          check(cm_held[j][to_cm_vc[j]] <= entry_depth[to_cm_vc[j]], "entry credits");
        end
        for (int v = 0; v < NVC; v++) begin
          to_cm_credit[j][v] = (cm_held[j][v] > 0) && ($urandom % 4 == 0);
          if (to_cm_credit[j][v]) cm_held[j][v]--;
        end
        if (credit_stall[j]) n_stall++;
      end
      // ---- egress to the lines
      for (int q = 0; q < NIO; q++) begin
        if (out_valid[q]) begin
          check(last_slot == cyc - 1, "output right after a slot");
          check(cyc - out_last[q] >= 2, "one packet per slot");
          out_last[q] = cyc;
          n_eg_out++;
          check(eg_pending.exists(int'(out_pkt[q].payload)), "egress once");
          if (eg_pending.exists(int'(out_pkt[q].payload))) begin
            check(eg_pending[int'(out_pkt[q].payload)] == (KIOM - 1 - IDX) * NIO + q, "egress port");
            eg_pending.delete(int'(out_pkt[q].payload));
          end
        end
        if (oq_multi[q]) n_multi++;
      end
      // ---- credits back from the IOM landing buffers
      for (int j = 0; j < M; j++)
        for (int v = 0; v < NVC; v++) if (from_cm_credit[j][v]) eg_cred[j][v]++;
      // ---- new egress packets from the CMs (bursts towards port 24+0 at times)
      for (int j = 0; j < M; j++) begin
        from_cm_valid[j] = 1'b0;
        if (cyc < 11000 && $urandom % 3 == 0) begin
          bit v;
          int dst;
          v = $urandom % 2;
          dst = (KIOM - 1 - IDX) * NIO + ((cyc / 500) % 2 == 0 ? 0 : $urandom % NIO);
          if (eg_cred[j][v] > 0) begin
            eg_cred[j][v]--;
            from_cm_valid[j] = 1'b1; from_cm_vc[j] = v;
            from_cm_pkt[j] = '0;
            from_cm_pkt[j].dst = PORT_W'(dst);
            from_cm_pkt[j].payload = 32'(seq);
            eg_pending[seq] = dst;
            seq++; n_eg++;
          end
        end
      end
      // ---- line inputs, offered every cycle; accepted only when in_ready
      slot = (cyc % 2 == 0);
      if (slot) last_slot = cyc;
      for (int j = 0; j < NIO; j++) begin
        if (!in_valid[j] || in_ready[j]) begin
          in_valid[j] = (cyc < 11000) && ($urandom % 2 == 0);
          in_dst[j] = PORT_W'($urandom % (NIO * KIOM));
          in_payload[j] = 32'(seq + 1000000 * (j + 1));
        end
      end
      #1;
      for (int j = 0; j < NIO; j++) begin
        check(!in_ready[j] || slot, "ready only in slot");
        if (in_valid[j] && slot && !in_ready[j]) n_full++;
        if (in_valid[j] && in_ready[j]) begin
          exp_q[j].push_back(int'(in_payload[j]));
          n_in++;
        end
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < NIO; j++) if (in_valid[j] && in_ready[j]) begin
        seq++;
      end
    end
    repeat (300) @(negedge clk) begin
      for (int j = 0; j < M; j++) begin
        if (to_cm_valid[j]) begin
          n_out_in++;
          if (exp_q[j].size() > 0) void'(exp_q[j].pop_front());
          cm_held[j][to_cm_vc[j]]++;
        end
        for (int v = 0; v < NVC; v++) begin
          to_cm_credit[j][v] = (cm_held[j][v] > 0);
          if (to_cm_credit[j][v]) cm_held[j][v]--;
        end
      end
      for (int q = 0; q < NIO; q++) if (out_valid[q]) begin
        n_eg_out++;
        if (eg_pending.exists(int'(out_pkt[q].payload))) eg_pending.delete(int'(out_pkt[q].payload));
      end
      for (int j = 0; j < M; j++) from_cm_valid[j] = 1'b0;
      in_valid = '0;
      slot = ((cyc++) % 2 == 0);
    end
    check(n_in == n_out_in, "all ingress packets sent to CMs");
    check(n_eg == n_eg_out, "all egress packets delivered");
    check(n_stall > 0, "credit stall happened");
    check(n_multi > 0, "multi-write into an output queue happened");
    check(n_full > 0, "input FIFO backpressure happened");
    $display("in=%0d/%0d eg=%0d/%0d stall=%0d multi=%0d full=%0d", n_in, n_out_in, n_eg, n_eg_out,
             n_stall, n_multi, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
