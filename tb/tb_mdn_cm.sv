// tb_mdn_cm: one 4x4 MDN central module (32-port geometry). Its South links are
// looped back to its own North links with the interleaving of the inter-module
// ring (South column c -> North column (c+2) mod 4), which is the ring of a
// single central module. The testbench plays the eight IOMs on the West and
// East sides: it injects random packets while respecting the entry buffers'
// credits (West edge 3/1, East edge 1/3 packets for VC0/VC1), drains the CM's
// edge outputs while returning credits at random, and checks that every packet
// leaves exactly once, on the side and row facing its destination IOM, with the
// VC of its direction. It also counts diversions through the ring, packets
// that leave on the side they entered, and Modulo (intermediate) turns.
module tb_mdn_cm;
  import clos_pkg::*;
  localparam int MESH = 4, NIO = 4, KIOM = 8, BUFF = 4, EC = 2;
  logic clk = 0, rst_n = 0;
  logic [MESH-1:0]   in_valid   [NDIR];
  logic [MESH-1:0]   in_vc      [NDIR];
  pkt_t              in_pkt     [NDIR][MESH];
  logic [NVC-1:0]    in_credit  [NDIR][MESH];
  logic [MESH-1:0]   out_valid  [NDIR];
  logic [MESH-1:0]   out_vc     [NDIR];
  pkt_t              out_pkt    [NDIR][MESH];
  logic [NVC-1:0]    out_credit [NDIR][MESH];
  logic [CONG_W-1:0] fex        [NDIR][MESH];
  logic [CONG_W-1:0] fint       [NDIR][MESH];
  logic [MESH*MESH-1:0] divert_fire;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_div = 0, n_same = 0, n_mod = 0;

  mdn_cm #(.MESH(MESH), .N_IO(NIO), .K_IOM(KIOM), .BUFF(BUFF), .EDGE_CRED(EC)) dut (.*);
  always #5 clk = ~clk;

  // IOM-side drive, [0] = West edge, [1] = East edge
  logic [MESH-1:0]   d_valid  [2];
  logic [MESH-1:0]   d_vc     [2];
  pkt_t              d_pkt    [2][MESH];
  logic [NVC-1:0]    d_credit [2][MESH];

  // ring of one CM plus the IOM-side drive
  always_comb begin
    for (int c = 0; c < MESH; c++) begin
      int j;
      j = (MESH / 2 + c) % MESH;
      in_valid[DIR_N][j]   = out_valid[DIR_S][c];
      in_vc[DIR_N][j]      = out_vc[DIR_S][c];
      in_pkt[DIR_N][j]     = out_pkt[DIR_S][c];
      out_credit[DIR_S][c] = in_credit[DIR_N][j];
      fex[DIR_N][j]        = fint[DIR_S][c];
      in_valid[DIR_S][c]   = out_valid[DIR_N][j];
      in_vc[DIR_S][c]      = out_vc[DIR_N][j];
      in_pkt[DIR_S][c]     = out_pkt[DIR_N][j];
      out_credit[DIR_N][j] = in_credit[DIR_S][c];
      fex[DIR_S][c]        = fint[DIR_N][j];
    end
    for (int s = 0; s < 2; s++) begin
      in_valid[s == 0 ? DIR_W : DIR_E] = d_valid[s];
      in_vc[s == 0 ? DIR_W : DIR_E]    = d_vc[s];
      for (int r = 0; r < MESH; r++) begin
        in_pkt[s == 0 ? DIR_W : DIR_E][r]     = d_pkt[s][r];
        out_credit[s == 0 ? DIR_W : DIR_E][r] = d_credit[s][r];
        fex[s == 0 ? DIR_W : DIR_E][r]        = '0;
      end
    end
  end

  int ent_depth [2][NVC] = '{'{3, 1}, '{1, 3}};   // [0] = West edge, [1] = East edge
  int up_cred [2][MESH][NVC];
  int dn_out  [2][MESH][NVC];
  bit pending [int];

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
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < MESH; r++)
        for (int v = 0; v < NVC; v++) begin up_cred[s][r][v] = ent_depth[s][v]; dn_out[s][r][v] = 0; end
    for (int s = 0; s < 2; s++) begin
      d_valid[s] = '0; d_vc[s] = '0;
      for (int r = 0; r < MESH; r++) begin d_pkt[s][r] = '0; d_credit[s][r] = '0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        int d;
        d = (s == 0) ? DIR_W : DIR_E;
        for (int r = 0; r < MESH; r++) begin
          // outputs towards the IOMs
          if (out_valid[d][r]) begin
            pkt_t p;
            int iomd;
            bit west;
            p = out_pkt[d][r];
            iomd = KIOM - 1 - int'(p.dst) / NIO;
            west = iomd < KIOM / 2;
            n_recv++;
            check(pending.exists(int'(p.payload)), "delivered once");
            pending.delete(int'(p.payload));
            check(west == (s == 0), "egress side");
            check(r == (west ? iomd : KIOM - 1 - iomd), "egress row");
            check(out_vc[d][r] == west, "vc");
            if (p.diverted) n_div++;
            if ((int'(p.src) / NIO < KIOM / 2) == west) n_same++;
            dn_out[s][r][out_vc[d][r]]++;
            check(dn_out[s][r][out_vc[d][r]] <= EC, "edge credits respected");
          end
          for (int v = 0; v < NVC; v++) begin
            if (in_credit[d][r][v]) up_cred[s][r][v]++;
            d_credit[s][r][v] = (dn_out[s][r][v] > 0) && ($urandom % 2 == 0);
            if (d_credit[s][r][v]) dn_out[s][r][v]--;
          end
          // new packets from IOM on this side/row
          d_valid[s][r] = 1'b0;
          if (cyc < 7000 && $urandom % 3 == 0) begin
            int dst, iomd, drow, src_iom;
            bit dw, v;
            dst = $urandom % (NIO * KIOM);
            iomd = KIOM - 1 - dst / NIO;
            dw = iomd < KIOM / 2;
            drow = dw ? iomd : KIOM - 1 - iomd;
            v = dw;
            if (up_cred[s][r][v] > 0) begin
              int t;
              src_iom = (s == 0) ? r : KIOM - 1 - r;
              up_cred[s][r][v]--;
              d_valid[s][r] = 1'b1;
              d_vc[s][r] = v;
              d_pkt[s][r] = '0;
              d_pkt[s][r].dst = PORT_W'(dst);
              d_pkt[s][r].src = PORT_W'(src_iom * NIO);
              d_pkt[s][r].payload = 32'(seq);
              // Modulo turn column (r + drow) mod 3, mirrored for westbound
              t = (r + drow) % (MESH - 1);
              if ((s == 0) && !dw) d_pkt[s][r].turn_col = COORD_W'(t);
              else if ((s == 1) && dw) d_pkt[s][r].turn_col = COORD_W'(MESH - 1 - t);
              else d_pkt[s][r].turn_col = (s == 0) ? 0 : COORD_W'(MESH - 1);
              if (t > 0 && t < MESH - 1 && ((s == 0) != dw)) n_mod++;
              pending[seq] = 1'b1;
              seq++; n_sent++;
            end
          end
        end
      end
    end
    repeat (200) @(negedge clk);
    check(n_recv == n_sent, "all delivered");
    check(n_div > 0, "diversions through the ring");
    check(n_same > 0, "same-side deliveries");
    check(n_mod > 0, "intermediate turn columns");
    $display("sent=%0d recv=%0d diverted=%0d same_side=%0d modulo=%0d", n_sent, n_recv, n_div, n_same, n_mod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
