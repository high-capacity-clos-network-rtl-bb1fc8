// tb_route_unit: routing decisions of three routers of a 4x4 mesh (32-port
// switch geometry: n = 4, k = 8). The expected egress side/row of each output
// port is derived from the IOM placement (output port p on IOM 7 - p/4; IOMs
// 0..3 on the West side rows 0..3, IOMs 4..7 on the East side rows 3..0), then the
// expected direction from the turn-column rule, and the diversion from the hop
// count and the congestion values applied. A few cases are also checked against
// hand-worked values.
module tb_route_unit;
  import clos_pkg::*;
  localparam int MESH = 4, NIO = 4, KIOM = 8;
  int checks = 0, failures = 0;
  int n_div = 0;

  pkt_t              pin;
  logic [CONG_W-1:0] cong [NDIR];
  logic [1:0]        dir_b, dir_t, dir_c;
  pkt_t              pout_b, pout_t, pout_c;
  logic              div_b, div_t, div_c;

  // bottom row, column 1; top row, column 2; inner router (1,1)
  route_unit #(.ROW(3), .COL(1), .MESH(MESH), .N_IO(NIO), .K_IOM(KIOM)) u_b (
    .pkt_in (pin), .cong, .dir (dir_b), .pkt_out (pout_b), .divert (div_b));
  route_unit #(.ROW(0), .COL(2), .MESH(MESH), .N_IO(NIO), .K_IOM(KIOM)) u_t (
    .pkt_in (pin), .cong, .dir (dir_t), .pkt_out (pout_t), .divert (div_t));
  route_unit #(.ROW(1), .COL(1), .MESH(MESH), .N_IO(NIO), .K_IOM(KIOM)) u_c (
    .pkt_in (pin), .cong, .dir (dir_c), .pkt_out (pout_c), .divert (div_c));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s dst=%0d tc=%0d", what, pin.dst, pin.turn_col); end
  endtask

  function automatic int iabs(input int x);
    return x < 0 ? -x : x;
  endfunction

  // expected behaviour of router (row, col)
  task automatic expect_dir(input int row, input int col, input logic [1:0] dir,
                            input logic div, input pkt_t pout);
    int iomd, erow, ecol, ldir, hl, hv, j, vrow, vdir;
    bit west, can, ediv;
    iomd = KIOM - 1 - int'(pin.dst) / NIO;
    west = iomd < KIOM / 2;
    erow = west ? iomd : KIOM - 1 - iomd;
    ecol = west ? 0 : MESH - 1;
    if (west ? (col > int'(pin.turn_col)) : (col < int'(pin.turn_col))) ldir = west ? DIR_W : DIR_E;
    else if (row != erow) ldir = (row < erow) ? DIR_S : DIR_N;
    else ldir = west ? DIR_W : DIR_E;
    hl = iabs(col - ecol) + iabs(row - erow);
    j = (col + MESH / 2) % MESH;
    can = (row == 0) || (row == MESH - 1);
    vdir = (row == 0) ? DIR_N : DIR_S;
    vrow = (row == 0) ? MESH - 1 : 0;
    hv = 1 + iabs(j - ecol) + iabs(vrow - erow);
    ediv = can && !pin.diverted && ldir != vdir && hv <= hl &&
           (hv + int'(cong[vdir]) < hl + int'(cong[ldir]));
    check(div == ediv, "divert decision");
    check(int'(dir) == (ediv ? vdir : ldir), "direction");
    if (ediv) begin
      check(pout.diverted && int'(pout.turn_col) == ecol, "diverted header");
      n_div++;
    end else check(pout == pin, "header unchanged");
  endtask

  initial begin
    pin = '0;
    for (int d = 0; d < NDIR; d++) cong[d] = '0;
    #1;
    // hand-worked: dst 0 lives on IOM 7 = East row 0. From (3,1), turn col 1:
    // vertical leg now, going North (packet already diverted once).
    pin.dst = 0; pin.turn_col = 1; pin.diverted = 1; #1;
    check(int'(dir_b) == DIR_N && !div_b, "hand: (3,1) dst0 north");
    // same packet, turn col 3: keep going East first
    pin.turn_col = 3; #1;
    check(int'(dir_b) == DIR_E, "hand: (3,1) dst0 east");
    // dst 16 lives on IOM 3 = West row 3; at (3,1) with turn col 0: go West
    pin.dst = 16; pin.turn_col = 0; pin.diverted = 0; #1;
    check(int'(dir_b) == DIR_W && !div_b, "hand: (3,1) dst16 west");
    pin.dst = 0; pin.turn_col = 3;
    // dst 0 at (3,1), turn col 3: local hops 2+3 = 5; via South link to (0,3) of
    // the next CM: 1 + 0 + 0 = 1 hop. Divert when South is not more congested.
    cong[DIR_E] = 8'd3; cong[DIR_S] = 8'd0; #1;
    check(div_b && int'(dir_b) == DIR_S && pout_b.diverted && pout_b.turn_col == 3, "hand: divert south");
    pin.diverted = 1; #1;
    check(!div_b && int'(dir_b) == DIR_E, "hand: no second diversion");
    pin.diverted = 0;
    // the inner router never diverts
    #1 check(!div_c, "hand: inner router");

    for (int it = 0; it < 4000; it++) begin
      pin.dst      = PORT_W'($urandom % (NIO * KIOM));
      pin.turn_col = COORD_W'($urandom % MESH);
      pin.diverted = ($urandom % 4 == 0);
      pin.payload  = $urandom;
      for (int d = 0; d < NDIR; d++) cong[d] = CONG_W'($urandom % 12);
      #1;
      expect_dir(3, 1, dir_b, div_b, pout_b);
      expect_dir(0, 2, dir_t, div_t, pout_t);
      expect_dir(1, 1, dir_c, div_c, pout_c);
    end
    check(n_div > 100, "diversions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
