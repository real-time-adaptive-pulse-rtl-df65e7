// tb_matinv_coproc: inverts random symmetric positive-definite matrices
// (M = B*B^T + n*I/4, Q15.16) of size 4, 8 and 20 and compares the result
// with a double-precision Gauss-Jordan inverse computed here. Tolerance:
// 2e-3 absolute plus 1% of the largest inverse entry. A singular-looking
// matrix (a negative diagonal) must raise not_pd.
module tb_matinv_coproc;
  localparam int MAXD = 20, W = 32, F = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(MAXD+1)-1:0] cfg_n;
  logic s_valid, s_ready, s_last, m_valid, m_ready, m_last, busy, not_pd;
  logic signed [W-1:0] s_data, m_data;

  matinv_coproc #(.MAX_DIM(MAXD), .W(W), .FRAC(F)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  real mr [MAXD][MAXD], inv [MAXD][MAXD];
  int  mq [MAXD][MAXD];

  task automatic gauss_jordan(input int n);
    real a [MAXD][2*MAXD];
    for (int i = 0; i < n; i++) for (int j = 0; j < 2*n; j++)
      a[i][j] = (j < n) ? real'(mq[i][j]) / 65536.0 : ((j - n == i) ? 1.0 : 0.0);
    for (int p = 0; p < n; p++) begin
      real piv;
      piv = a[p][p];
      for (int j = 0; j < 2*n; j++) a[p][j] /= piv;
      for (int i = 0; i < n; i++) if (i != p) begin
        real f;
        f = a[i][p];
        for (int j = 0; j < 2*n; j++) a[i][j] -= f * a[p][j];
      end
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) inv[i][j] = a[i][j + n];
  endtask

  task automatic run(input int n, input bit bad);
    real b [MAXD][MAXD];
    real mx;
    int cnt;
    cfg_n = ($clog2(MAXD+1))'(n);
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) b[i][j] = real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      real s;
      s = (i == j) ? n / 4.0 : 0.0;
      for (int k = 0; k < n; k++) s += b[i][k] * b[j][k];
      mr[i][j] = s;
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) mq[i][j] = $rtoi(mr[i][j] * 65536.0);
    if (bad) mq[n-1][n-1] = -65536;
    gauss_jordan(n);
    mx = 0;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) if ((inv[i][j] > mx) || (-inv[i][j] > mx)) mx = (inv[i][j] > 0) ? inv[i][j] : -inv[i][j];
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      s_valid <= 1; s_data <= mq[i][j]; s_last <= (i == n-1 && j == n-1); @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    s_valid <= 0; s_last <= 0;
    cnt = 0;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      real got, err;
      do @(posedge clk); while (!(m_valid && m_ready));
      got = real'(m_data) / 65536.0;
      err = got - inv[i][j]; if (err < 0) err = -err;
      if (!bad)
        chk(err <= 0.002 + 0.01 * mx, $sformatf("n=%0d inv[%0d][%0d] got %f exp %f", n, i, j, got, inv[i][j]));
      chk(m_last == (i == n-1 && j == n-1), "m_last");
    end
    chk(not_pd == bad, $sformatf("not_pd=%0d for n=%0d", not_pd, n));
    repeat (3) @(posedge clk);
  endtask

  initial begin
    s_valid = 0; s_data = 0; s_last = 0; m_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(4, 0);
    run(8, 0);
    run(20, 0);
    run(5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
