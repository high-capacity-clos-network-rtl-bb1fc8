// output_queue: queue of one external output port inside an input/output module.
//
// It can take in up to M_WR packets in the same cycle, one from each central
// module link, and hands one packet per time slot to the output line. Writers are
// accepted in link order while room remains (writer j is accepted if fewer than
// `free` writers below it are also writing); the rest see wr_accept low and retry.
// Accepted packets are stored in link order behind the current tail. rd pops the
// head (dout/empty are valid combinationally). Depth is this design's choice.
module output_queue #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8,
  parameter int M_WR  = 4,
  localparam int CW = $clog2(DEPTH + 1),
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [M_WR-1:0]  wr_valid,
  input  logic [WIDTH-1:0] wr_data [M_WR],
  output logic [M_WR-1:0]  wr_accept,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [CW-1:0]    count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    head;
  localparam int NW = $clog2(M_WR + 1);
  logic [CW-1:0]    free_slots;
  logic [NW-1:0]    n_acc;
  logic [AW-1:0]    wpos [M_WR];

  assign empty = (count == '0);
  assign dout  = mem[head];

  always_comb begin
    free_slots = CW'(DEPTH) - count;
    n_acc = '0;
    for (int j = 0; j < M_WR; j++) begin
      wr_accept[j] = 1'b0;
      wpos[j] = '0;
      if (wr_valid[j] && CW'(n_acc) < free_slots) begin
        wr_accept[j] = 1'b1;
        wpos[j] = AW'((int'(head) + int'(count) + int'(n_acc)) % DEPTH);
        n_acc = n_acc + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < M_WR; j++)
      if (wr_accept[j]) mem[wpos[j]] <= wr_data[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
    end else begin
      if (rd) head <= (head == AW'(DEPTH - 1)) ? '0 : head + 1'b1;
      count <= count + CW'(n_acc) - CW'(rd);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty);
endmodule
