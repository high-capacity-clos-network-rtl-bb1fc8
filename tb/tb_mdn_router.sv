// tb_mdn_router: one bottom-row mini-router (row 3, column 1 of a 4x4 mesh,
// 32-port geometry) under random traffic on all four inputs with random
// downstream credit return and random congestion inputs.
// The testbench acts as the four upstream and four downstream neighbours and
// keeps its own credit books from the buffer depths (inner West input: 4 for
// VC0 only; inner East input: 4 for VC1 only; North/South: 2 per VC). Checks:
//  * every packet leaves exactly once, with the VC of its direction of travel;
//  * a packet leaves on the port the XY/Modulo rule gives, or through the South
//    inter-module link with diverted set when it is diverted;
//  * no output sends more than the downstream credits allow;
//  * credits come back for every packet that leaves;
//  * fint[d] equals (occupancy + fex[opposite d]) / 2 one cycle later;
//  * a lone packet is on the output link 2 cycles after it was on the input link.
module tb_mdn_router;
  import clos_pkg::*;
  localparam int ROW = 3, COL = 1, MESH = 4, NIO = 4, KIOM = 8, BUFF = 4;
  logic clk = 0, rst_n = 0;
  logic [NDIR-1:0] in_valid, in_vc, out_valid, out_vc;
  pkt_t in_pkt [NDIR], out_pkt [NDIR];
  logic [NVC-1:0] in_credit [NDIR], out_credit [NDIR];
  logic [CONG_W-1:0] fex [NDIR], fint [NDIR];
  logic divert_fire;
  int checks = 0, failures = 0, n_div = 0, n_sent = 0, n_recv = 0, n_cstall = 0;

  mdn_router #(.ROW(ROW), .COL(COL), .MESH(MESH), .N_IO(NIO), .K_IOM(KIOM), .BUFF(BUFF)) dut (.*);
  always #5 clk = ~clk;

  // buffer depth [port][vc] and downstream depth [out][vc] of this router
  int in_depth  [NDIR][NVC] = '{'{2, 2}, '{0, 4}, '{2, 2}, '{4, 0}};
  int dn_depth  [NDIR][NVC] = '{'{2, 2}, '{4, 0}, '{2, 2}, '{0, 4}};
  int up_cred   [NDIR][NVC];
  int dn_out    [NDIR][NVC];
  int held;                    // packets held by the router
  bit pending [logic [31:0]];    // payloads in flight

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic int iabs(input int x);
    return x < 0 ? -x : x;
  endfunction

  // expected local direction of packet p in this router
  function automatic int local_dir(input pkt_t p);
    int iomd, erow;
    bit west;
    iomd = KIOM - 1 - int'(p.dst) / NIO;
    west = iomd < KIOM / 2;
    erow = west ? iomd : KIOM - 1 - iomd;
    if (west ? (COL > int'(p.turn_col)) : (COL < int'(p.turn_col))) return west ? DIR_W : DIR_E;
    if (ROW != erow) return (ROW < erow) ? DIR_S : DIR_N;
    return west ? DIR_W : DIR_E;
  endfunction

  function automatic bit vc_of(input int dst);
    return (KIOM - 1 - dst / NIO) < KIOM / 2;   // 1 = westbound
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [CONG_W-1:0] exp_fint [NDIR];
  int seq = 0;

  initial begin
    in_valid = '0; in_vc = '0;
    for (int d = 0; d < NDIR; d++) begin
      in_pkt[d] = '0; out_credit[d] = '0; fex[d] = '0;
      for (int v = 0; v < NVC; v++) begin up_cred[d][v] = in_depth[d][v]; dn_out[d][v] = 0; end
    end
    held = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // latency of a lone packet: enters from the South link, dst 0 (East row 0);
    // in column 1 with turn column 1 its vertical leg goes North.
    in_valid[DIR_S] = 1; in_vc[DIR_S] = 0;
    in_pkt[DIR_S] = '0; in_pkt[DIR_S].dst = 0; in_pkt[DIR_S].turn_col = 1;
    in_pkt[DIR_S].diverted = 1; in_pkt[DIR_S].payload = 32'hABCD;
    @(posedge clk); #1 in_valid = '0;
    check(!out_valid[DIR_N], "latency: not after 1 cycle");
    @(posedge clk); #1 check(out_valid[DIR_N] && out_pkt[DIR_N].payload == 32'hABCD, "latency: out after 2 cycles");
    @(posedge clk); #1;
    out_credit[DIR_N] = 2'b01;
    @(posedge clk); #1 out_credit[DIR_N] = '0;
    repeat (2) @(posedge clk);

    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // ---- observe outputs (registered: they left the buffers at the last edge)
      for (int o = 0; o < NDIR; o++) begin
        if (out_valid[o]) begin
          pkt_t p;
          int ld;
          p = out_pkt[o];
          n_recv++;
          held--;
          check(pending.exists(p.payload), "packet delivered once");
          pending.delete(p.payload);
          check(out_vc[o] == vc_of(int'(p.dst)), "vc of packet");
          ld = local_dir(p);
          if (p.diverted && o == DIR_S && ld != DIR_S) n_div++;
          else check(o == ld, "direction");
          dn_out[o][out_vc[o]]++;
          check(dn_out[o][out_vc[o]] <= dn_depth[o][out_vc[o]], "downstream credit respected");
        end
      end
      // ---- fint check: computed from occupancy after the last edge
      for (int d = 0; d < NDIR; d++)
        if (cyc > 0) check(fint[d] == exp_fint[d], "fint");
      // ---- credit returns from the router to the upstream side
      for (int p = 0; p < NDIR; p++)
        for (int v = 0; v < NVC; v++)
          if (in_credit[p][v]) up_cred[p][v]++;
      // ---- downstream returns credits at random
      for (int o = 0; o < NDIR; o++)
        for (int v = 0; v < NVC; v++) begin
          out_credit[o][v] = (dn_out[o][v] > 0) && ($urandom % 3 == 0);
          if (out_credit[o][v]) dn_out[o][v]--;
        end
      // ---- congestion inputs
      for (int d = 0; d < NDIR; d++) fex[d] = CONG_W'($urandom % 8);
      // ---- new packets
      for (int p = 0; p < NDIR; p++) begin
        in_valid[p] = 0;
        if (cyc < 5500 && $urandom % 2 == 0) begin
          int dst;
          bit v;
          dst = $urandom % (NIO * KIOM);
          v = vc_of(dst);
          if (in_depth[p][v] == 0) continue;
          if (up_cred[p][v] == 0) begin n_cstall++; continue; end
          in_valid[p] = 1; in_vc[p] = v;
          in_pkt[p] = '0;
          in_pkt[p].dst = PORT_W'(dst);
          in_pkt[p].turn_col = COORD_W'($urandom % MESH);
          in_pkt[p].diverted = ($urandom % 2 == 0);
          in_pkt[p].payload = 32'(seq);
          pending[32'(seq)] = 1'b1;
          seq++; n_sent++;
          up_cred[p][v]--;
          held++;
        end
      end
      for (int d = 0; d < NDIR; d++)
        exp_fint[d] = CONG_W'((held - (in_valid[0] + in_valid[1] + in_valid[2] + in_valid[3])
                               + int'(fex[opposite(d)])) / 2);
    end
    repeat (20) @(negedge clk);
    check(n_recv == n_sent, "all packets delivered");
    check(n_div > 0, "diversion happened");
    check(n_cstall > 0, "upstream credit stall happened");
    for (int p = 0; p < NDIR; p++)
      for (int v = 0; v < NVC; v++) check(up_cred[p][v] == in_depth[p][v], "credits restored");
    $display("sent=%0d recv=%0d diverted=%0d stalls=%0d", n_sent, n_recv, n_div, n_cstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
