// rr_arbiter: round-robin arbiter for one output of a mini-router crossbar.
//
// N requesters; one grant per cycle among the active requests, searched starting
// just after the requester granted last, so every waiting requester is served
// within N grants. The pointer moves only when a grant is given (advance high).
// The grant is combinational from req; the pointer updates at the clock edge.
module rr_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // grant was used this cycle
  output logic [N-1:0] grant
);
  logic [$clog2(N)-1:0] last;     // index granted most recently

  always_comb begin
    logic [$clog2(N)-1:0] idx;
    grant = '0;
    for (int i = 1; i <= N; i++) begin
      idx = $clog2(N)'((32'(last) + 32'(i)) % N);
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) last <= $clog2(N)'(N - 1);
    else if (advance && grant != '0) begin
      for (int i = 0; i < N; i++)
        if (grant[i]) last <= $clog2(N)'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_subset: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
