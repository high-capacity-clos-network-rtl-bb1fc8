// tb_rr_arbiter: random request patterns; checks that the grant is the first
// requester after the last grant (round-robin order worked out by the testbench),
// that no grant is given without a request, and that a constantly requesting
// input is served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic advance;
  int checks = 0, failures = 0;
  int last = N - 1;
  int wait0 = 0;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s req=%b grant=%b last=%0d", what, req, grant, last); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    req = '0; advance = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      req = N'($urandom) | N'(1);   // input 0 always requests
      advance = ($urandom % 4 != 0);
      #1;
      exp = '0;
      for (int i = 1; i <= N; i++)
        if (exp == '0 && req[(last + i) % N]) exp[(last + i) % N] = 1'b1;
      check(grant == exp, "round-robin order");
      @(posedge clk);
      if (advance) begin
        for (int i = 0; i < N; i++) if (exp[i]) last = i;
        if (exp[0]) wait0 = 0; else wait0++;
        check(wait0 < N, "starvation bound");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
