// tb_csa_multi_operand_adder: sums of 1 to 16 random 16-bit operands,
// including all-ones operands, fed with random gaps; each total must equal
// the arithmetic sum and appear one clock after the last operand.
module tb_csa_multi_operand_adder;
  localparam int N = 16, K = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_last, out_valid;
  logic [N-1:0] in_data;
  logic [N+$clog2(K)-1:0] out_data;
  csa_multi_operand_adder #(.N(N), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int k;
      longint e;
      k = (t % 16) + 1;
      e = 0;
      for (int i = 0; i < k; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_last = (i == k - 1);
        in_data = (t % 10 == 3) ? 16'hFFFF : 16'($urandom);
        e += in_data;
      end
      @(posedge clk); #1;
      chk(out_valid && out_data == (N+$clog2(K))'(e), $sformatf("k=%0d got %0d exp %0d valid %0d", k, out_data, e, out_valid));
      @(negedge clk); in_valid = 0; in_last = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
