// clos_pkg: types and helper functions shared by the Clos-MDN switch.
//
// The switch moves fixed-size packets. Every packet travels through the fabric as a
// single word (store-and-forward, one packet per link per cycle), so a packet is one
// packed struct. The header carries the destination output port, the source input
// port, a flag telling whether the packet has already been diverted to a neighbouring
// central module (CM), and the column in which it makes its routing turn. The widths
// are this design's choice: PORT_W = 10 bits allows switches of up to 1024 ports.
//
// Geometry used throughout (figures of the 32x32 example):
//   n = N_IO ports per input/output module (IOM), k = K_IOM IOMs, m = n CMs.
//   Each CM is a MESH x MESH grid of mini-routers with MESH = k/2. The West side of
//   every CM faces IOMs 0..k/2-1 (IOM i on row i), the East side faces IOMs
//   k/2..k-1 (IOM i on row k-1-i). North and South sides carry the links between
//   neighbouring CMs. Output port p lives on IOM k-1-p/n, input port p on IOM p/n.
package clos_pkg;

  localparam int PORT_W    = 10;  // external port index width
  localparam int COORD_W   = 6;   // mesh row/column width (mesh up to 64x64)
  localparam int PAYLOAD_W = 32;  // payload carried by each packet
  localparam int CONG_W    = 8;   // width of the congestion estimates exchanged
  localparam int NDIR      = 4;
  localparam int NVC       = 2;

  typedef struct packed {
    logic [PORT_W-1:0]    dst;       // destination output port of the switch
    logic [PORT_W-1:0]    src;       // input port the packet arrived on
    logic                 diverted;  // already moved to a neighbouring CM once
    logic [COORD_W-1:0]   turn_col;  // column of the vertical leg inside the CM
    logic [PAYLOAD_W-1:0] payload;
  } pkt_t;

  localparam int PKT_W = $bits(pkt_t);

  // Router port directions. The numbering is used as an array index everywhere.
  localparam int DIR_N = 0;
  localparam int DIR_E = 1;
  localparam int DIR_S = 2;
  localparam int DIR_W = 3;

  function automatic int opposite(input int d);
    return (d + 2) % 4;
  endfunction

  // Larger and smaller share of a split edge buffer (2/3 and 1/3 of BUFF).
  function automatic int major_share(input int buff);
    return (2 * buff + 2) / 3;
  endfunction

  function automatic int minor_share(input int buff);
    return buff - major_share(buff);
  endfunction

  // Depth of the input buffer of virtual channel vc on input port dir of a
  // mini-router in column col of a mesh of width mesh.
  //  * West edge router, West input: VC0 gets 2/3, VC1 1/3.
  //  * East edge router, East input: VC0 gets 1/3, VC1 2/3.
  //  * Inner West input carries only eastbound (VC0) traffic; inner East input
  //    only westbound (VC1) traffic: one buffer of full depth.
  //  * North and South inputs carry both directions: BUFF/2 per VC.
  function automatic int vc_depth(input int col, input int mesh, input int buff,
                                  input int dir, input int vc);
    if (dir == DIR_W) begin
      if (col == 0) return (vc == 0) ? major_share(buff) : minor_share(buff);
      return (vc == 0) ? buff : 0;
    end else if (dir == DIR_E) begin
      if (col == mesh - 1) return (vc == 0) ? minor_share(buff) : major_share(buff);
      return (vc == 0) ? 0 : buff;
    end
    return buff / 2;
  endfunction

  // Where an output port leaves the central stage: the side of the CM (1 = West)
  // and the row on that side.
  function automatic logic dst_is_west(input int dst, input int n_io, input int k_iom);
    return (k_iom - 1 - dst / n_io) < (k_iom / 2);
  endfunction

  function automatic int dst_row(input int dst, input int n_io, input int k_iom);
    if (dst_is_west(dst, n_io, k_iom)) return k_iom - 1 - dst / n_io;
    return dst / n_io;
  endfunction

  // Turn column chosen when a packet enters a CM from an IOM on row src_row
  // (side src_west). Packets that cross the mesh (parallel input and output
  // sides) use the Modulo rule: one intermediate column (src_row+dst_row) mod
  // (mesh-1), counted from the entry side, before the last column. Packets that
  // leave on the side they entered turn in the entry column.
  function automatic int turn_column(input logic src_west, input int src_row,
                                     input logic dwest, input int drow, input int mesh);
    int t;
    t = (mesh > 1) ? (src_row + drow) % (mesh - 1) : 0;
    if (src_west && !dwest) return t;
    if (!src_west && dwest) return mesh - 1 - t;
    return src_west ? 0 : mesh - 1;
  endfunction

endpackage
