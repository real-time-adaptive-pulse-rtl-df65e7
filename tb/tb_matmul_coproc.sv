// tb_matmul_coproc: random fixed-point products checked against an integer
// reference model, for a 4x4 and an 8x8 case and a rectangular 3x5 * 5x2
// case, with random back-pressure on the output. The compute time of the
// unstalled 8x8 case is checked against m*p*(n+1) clocks.
module tb_matmul_coproc;
  localparam int MAXD = 20, W = 16, F = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(MAXD+1)-1:0] cfg_m, cfg_n, cfg_p;
  logic s_valid, s_ready, s_last, m_valid, m_ready, m_last, busy;
  logic signed [W-1:0] s_data, m_data;

  matmul_coproc #(.MAX_DIM(MAXD), .W(W), .FRAC(F)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int a [MAXD][MAXD], b [MAXD][MAXD];
  bit stall_en;
  always @(posedge clk) m_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic run(input int m, input int n, input int p, input bit stall, input bit timed);
    int t0, t1;
    cfg_m = ($clog2(MAXD+1))'(m); cfg_n = ($clog2(MAXD+1))'(n); cfg_p = ($clog2(MAXD+1))'(p);
    stall_en = stall;
    for (int i = 0; i < m; i++) for (int j = 0; j < n; j++) a[i][j] = $signed($urandom_range(0, 65535)) - 32768;
    for (int i = 0; i < n; i++) for (int j = 0; j < p; j++) b[i][j] = $signed($urandom_range(0, 65535)) - 32768;
    for (int i = 0; i < m; i++) for (int j = 0; j < n; j++) begin
      s_valid <= 1; s_data <= W'(a[i][j]); s_last <= 0; @(posedge clk);
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < p; j++) begin
      s_valid <= 1; s_data <= W'(b[i][j]); s_last <= (i == n-1 && j == p-1); @(posedge clk);
    end
    s_valid <= 0; s_last <= 0;
    t0 = $time / 10;
    for (int i = 0; i < m; i++) for (int j = 0; j < p; j++) begin
      longint acc, e;
      acc = 0;
      for (int k = 0; k < n; k++) acc += longint'(a[i][k]) * b[k][j];
      e = (acc + (1 << (F-1))) >>> F;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      do @(posedge clk); while (!(m_valid && m_ready));
      chk(m_data == W'(e), $sformatf("%0dx%0dx%0d c[%0d][%0d] got %0d exp %0d", m, n, p, i, j, m_data, e));
      chk(m_last == (i == m-1 && j == p-1), "m_last");
    end
    t1 = $time / 10;
    // t0 is the clock the last input beat is driven, one before it is taken
    if (timed) chk(t1 - t0 == m*p*(n+1) + 1, $sformatf("compute clocks %0d expected %0d", t1 - t0, m*p*(n+1) + 1));
    repeat (3) @(posedge clk);
  endtask

  initial begin
    s_valid = 0; s_data = 0; s_last = 0; stall_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(4, 4, 4, 1, 0);
    run(8, 8, 8, 0, 1);
    run(3, 5, 2, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
