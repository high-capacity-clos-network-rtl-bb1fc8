// tb_clos_mdn_switch: end-to-end test of the Clos-MDN switch with all parameters
// at their defaults (32 ports: 8 IOMs of 4 ports, 4 central modules of 4x4
// mini-routers, fabric speedup 2).
//
// Each input port has a line card model: an unbounded queue filled by a traffic
// generator once per time slot and offered to the switch until accepted. Four
// workloads run one after the other, each followed by a drain phase:
//   uniform Bernoulli arrivals, bursty uniform arrivals (on/off with mean burst
//   10 to one destination), hot-spot (unbalanced, w = 0.5: output i gets w of
//   input i's load on top of the uniform share) and diagonal (input i sends 2/3
//   of its packets to output i and 1/3 to output i+1).
// Checks: every packet is delivered exactly once, on the output port it was
// addressed to, with its source port intact; inputs are accepted only in slot
// cycles; no output sends more than one packet per slot; the fabric drains
// completely after each workload (no deadlock). Mechanisms that must each happen at least once:
// diversion to a neighbouring central module, an IOM input FIFO head waiting for
// credit, an output queue taking several packets in one cycle, an input FIFO
// refusing a packet, delivery to an output on the entry side (westbound VC1) and
// to the opposite side (eastbound VC0). Throughput and mean delay (in slots) of
// each workload are printed for information.
module tb_clos_mdn_switch;
  import clos_pkg::*;
  localparam int NIO = 4, KIOM = 8, NP = NIO * KIOM, SP = 2;
  localparam int LOAD_PM = 700;   // offered load per input, per mille
  localparam int RUN = 6000, DRAIN_MAX = 40000;

  logic clk = 0, rst_n = 0, slot;
  logic [NP-1:0] in_valid, in_ready, out_valid;
  logic [PORT_W-1:0] in_dst [NP];
  logic [PAYLOAD_W-1:0] in_payload [NP];
  pkt_t out_pkt [NP];
  logic ev_divert, ev_credit_stall, ev_oq_multi;

  clos_mdn_switch dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_divert = 0, n_cstall = 0, n_multi = 0, n_refused = 0, n_west = 0, n_east = 0;
  int inj_cycle [int];      // payload -> cycle it was generated
  int inj_dst   [int];
  int inj_src   [int];
  int lc_q [NP][$];         // line card queues of payloads
  int out_last [NP];
  int cyc = 0, seq = 0;
  int n_gen = 0, n_del = 0;
  longint delay_sum = 0;
  int burst_left [NP], burst_dst [NP];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s cyc=%0d", what, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (4 * RUN + 2 * DRAIN_MAX) @(posedge clk);
    failures++;
    $display("watchdog: generated=%0d delivered=%0d", n_gen, n_del);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // destination of a new packet from input i under workload w
  function automatic int pick_dst(input int w, input int i);
    int r;
    case (w)
      0: return $urandom % NP;
      1: begin
        if (burst_left[i] == 0) begin
          burst_left[i] = 1 + ($urandom % 19);      // mean 10
          burst_dst[i]  = $urandom % NP;
        end
        burst_left[i]--;
        return burst_dst[i];
      end
      2: begin
        r = $urandom % 1000;
        return (r < 500) ? i : $urandom % NP;
      end
      default: begin
        r = $urandom % 3;
        return (r < 2) ? i : (i + 1) % NP;
      end
    endcase
  endfunction

  // one clock: monitor outputs, generate traffic, drive inputs
  task automatic step(input int w, input bit gen);
    @(negedge clk);
    cyc++;
    for (int p = 0; p < NP; p++) begin
      if (out_valid[p]) begin
        int pl;
        pl = int'(out_pkt[p].payload);
        check(cyc - out_last[p] >= SP, "one packet per slot per output");
        out_last[p] = cyc;
        check(inj_dst.exists(pl), "delivered exactly once");
        if (inj_dst.exists(pl)) begin
          check(inj_dst[pl] == p, "delivered on its destination port");
          check(int'(out_pkt[p].src) == inj_src[pl], "source port intact");
          if (((KIOM - 1 - p / NIO) < KIOM / 2) == (inj_src[pl] / NIO < KIOM / 2)) n_west++;
          else n_east++;
          delay_sum += (cyc - inj_cycle[pl]);
          n_del++;
          inj_dst.delete(pl);
          inj_src.delete(pl);
          inj_cycle.delete(pl);
        end
      end
    end
    if (ev_divert) n_divert++;
    if (ev_credit_stall) n_cstall++;
    if (ev_oq_multi) n_multi++;
    // arrivals happen once per slot
    if (gen && slot) begin
      for (int i = 0; i < NP; i++) begin
        bit arrive;
        // bursty: an off slot starts a burst with probability load/(b*(1-load)),
        // which gives the same mean load with mean burst b = 10
        arrive = (w == 1) ? (burst_left[i] > 0 ||
                             ($urandom % 1000 < (LOAD_PM * 1000) / (10 * (1000 - LOAD_PM))))
                          : ($urandom % 1000 < LOAD_PM);
        if (arrive) begin
          int d;
          d = pick_dst(w, i);
          inj_dst[seq] = d; inj_src[seq] = i; inj_cycle[seq] = cyc;
          lc_q[i].push_back(seq);
          seq++; n_gen++;
        end
      end
    end
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = (lc_q[i].size() > 0);
      if (in_valid[i]) begin
        in_dst[i] = PORT_W'(inj_dst[lc_q[i][0]]);
        in_payload[i] = 32'(lc_q[i][0]);
      end
    end
    #1;
    for (int i = 0; i < NP; i++) begin
      if (in_ready[i]) check(slot, "accept only in a slot");
      if (in_valid[i] && in_ready[i]) void'(lc_q[i].pop_front());
      else if (in_valid[i] && slot) n_refused++;
    end
  endtask

  initial begin
    string names [4] = '{"uniform", "bursty uniform", "hot-spot w=0.5", "diagonal"};
    in_valid = '0;
    for (int p = 0; p < NP; p++) begin
      in_dst[p] = '0; in_payload[p] = '0; out_last[p] = -10; burst_left[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      int g0, d0, c0;
      longint s0;
      g0 = n_gen; d0 = n_del; s0 = delay_sum; c0 = cyc;
      for (int t = 0; t < RUN; t++) step(w, 1'b1);
      for (int t = 0; t < DRAIN_MAX && inj_dst.size() > 0; t++) step(w, 1'b0);
      for (int t = 0; t < 50; t++) step(w, 1'b0);
      check(inj_dst.size() == 0, "all packets delivered after drain");
      $display("%-16s generated=%0d delivered=%0d cycles=%0d mean delay=%0d slots",
               names[w], n_gen - g0, n_del - d0, cyc - c0,
               (n_del > d0) ? int'((delay_sum - s0) / (n_del - d0)) / SP : 0);
    end
    check(n_divert > 0, "diversion to a neighbouring CM");
    check(n_cstall > 0, "input FIFO head waiting for credit");
    check(n_multi > 0, "output queue multi-write");
    check(n_refused > 0, "input FIFO full");
    check(n_west > 0, "delivery on the entry side");
    check(n_east > 0, "delivery across the fabric");
    $display("events: divert=%0d credit_stall=%0d oq_multi=%0d refused=%0d same_side=%0d cross=%0d",
             n_divert, n_cstall, n_multi, n_refused, n_west, n_east);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
