// tb_output_queue: several writers per cycle and one reader. Checks that writers
// are accepted in link order up to the free space, that packets come out in the
// order (cycle, then link index) they were accepted, and the occupancy count.
module tb_output_queue;
  localparam int W = 16, D = 6, M = 4;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] wr_valid, wr_accept;
  logic [W-1:0] wr_data [M];
  logic rd, empty;
  logic [W-1:0] dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int multi = 0;
  logic [W-1:0] model [$];

  output_queue #(.WIDTH(W), .DEPTH(D), .M_WR(M)) dut (.*);
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
    int free, n;
    wr_valid = '0; rd = 0;
    for (int j = 0; j < M; j++) wr_data[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      if (!empty) check(dout == model[0], "order");
      wr_valid = M'($urandom);
      for (int j = 0; j < M; j++) wr_data[j] = W'($urandom);
      rd = !empty && ($urandom % 3 == 0);
      #1;
      free = D - model.size();
      n = 0;
      for (int j = 0; j < M; j++) begin
        check(wr_accept[j] == (wr_valid[j] && n < free), "accept rule");
        if (wr_valid[j] && n < free) n++;
      end
      if (n > 1) multi++;
      @(posedge clk);
      #1;
      if (rd) void'(model.pop_front());
      n = 0;
      for (int j = 0; j < M; j++)
        if (wr_valid[j] && n < free) begin model.push_back(wr_data[j]); n++; end
    end
    check(multi > 0, "multi-write happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
