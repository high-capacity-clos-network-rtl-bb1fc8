// tb_pkt_fifo: random push/pop traffic against a queue model; checks data order,
// empty/full flags and the occupancy count. Depth 3 exercises pointer wrap at a
// non-power-of-two depth.
module tb_pkt_fifo;
  localparam int W = 16, D = 3;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  pkt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (!empty) check(dout == model[0], "data");
      push = ($urandom % 2 == 0) && (!full || (cyc % 7 == 0 && !empty));
      pop  = ($urandom % 3 != 0) && !empty;
      if (push && full && !pop) push = 0;
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
