// tb_matsum_tree: N = 4 (7 scaled matrices plus R, 3 adder stages). Random
// rho and SS elements stream in one per clock with random gaps; each output
// must be R + sum of round(rho*SS / 2^16), exactly, 1 + log2(2N) = 4 clocks
// after its input, with in_last carried along. A run of large positive
// elements checks that the sum saturates at the largest value.
module tb_matsum_tree;
  localparam int N = 4, W = 32, F = 16, LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_last, out_valid, out_last;
  logic signed [W-1:0] rho [2*N-1];
  logic signed [W-1:0] ss  [2*N-1];
  logic signed [W-1:0] r_el, sum;
  matsum_tree #(.N(N), .W(W), .FRAC(F)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  longint exp_q [$];
  int     t_q [$], last_q [$];
  int     t = 0;
  always @(posedge clk) t++;

  always @(negedge clk) if (rst_n && out_valid) begin
    longint e;
    int ti;
    e = exp_q.pop_front(); ti = t_q.pop_front();
    chk(longint'(sum) == e, $sformatf("got %0d exp %0d", sum, e));
    chk(t - ti == LAT, $sformatf("latency %0d", t - ti));
    chk(out_last == last_q.pop_front(), "last");
  end

  task automatic feed(input bit big);
    longint e;
    @(negedge clk);
    in_valid = ($urandom_range(0, 3) != 0);
    in_last = $urandom_range(0, 1);
    e = 0;
    for (int n = 0; n < 2*N-1; n++) begin
      rho[n] = big ? 32'h7000_0000 : int'($urandom_range(0, 262144));
      ss[n]  = big ? 32'h7000_0000 : int'($urandom_range(0, 262144)) - 131072;
      e += (longint'(rho[n]) * ss[n] + 32768) >>> 16;
    end
    r_el = big ? 32'h7fff_0000 : int'($urandom_range(0, 131072)) - 65536;
    e += r_el;
    if (big) e = 64'sh7fff_ffff;
    if (in_valid) begin exp_q.push_back(e); t_q.push_back(t); last_q.push_back(in_last); end
  endtask

  initial begin
    in_valid = 0; in_last = 0; r_el = 0;
    for (int n = 0; n < 2*N-1; n++) begin rho[n] = 0; ss[n] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) feed(i % 50 == 7);
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    chk(exp_q.size() == 0, "missing outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
