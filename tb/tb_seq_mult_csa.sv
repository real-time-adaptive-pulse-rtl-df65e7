// tb_seq_mult_csa: 16 x 16 unsigned products of corner and random operands;
// each product must equal a*b and done must come N+1 = 17 clocks after the
// start clock. A start while busy must be ignored.
module tb_seq_mult_csa;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  seq_mult_csa #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    start = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0] x, y;
      int n;
      x = (t == 0) ? '1 : (t == 1) ? '0 : 16'($urandom);
      y = (t == 0) ? '1 : (t == 2) ? 16'h8000 : 16'($urandom);
      @(negedge clk); start = 1; a = x; b = y;
      @(negedge clk); start = (t % 5 == 0); a = ~x; b = ~y;   // ignored while busy
      n = 1;
      while (!done) begin @(negedge clk); start = 0; n++; end
      chk(p == 32'(x) * 32'(y), $sformatf("%0d * %0d got %0d", x, y, p));
      // n counts falling edges from the one that drove start, i.e. clocks + 1
      chk(n - 1 == N + 1, $sformatf("latency %0d", n - 1));
      @(negedge clk); start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
