// tb_ls_coproc: least-squares range profile estimation at L = 10 gates and
// N = 4 waveform samples. A random waveform s and range profile x give
// y = S x (+ small noise); the coprocessor's x_LS is compared with a
// double-precision normal-equation solution of the same data. A second run
// in fixed-waveform mode (cfg_reuse) sends only a new y and must reuse the
// stored A, finishing much sooner.
module tb_ls_coproc;
  localparam int L = 10, N = 4, W = 32, F = 16, R = L + N - 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_reuse, s_valid, s_ready, s_last, m_valid, m_ready, m_last, busy, a_valid, not_pd;
  logic signed [W-1:0] s_data, m_data;

  ls_coproc #(.L(L), .N(N), .W(W), .FRAC(F)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  real s [N], y [R], xe [L];
  int  sq [N], yq [R];

  // double-precision LS: solve (S^T S) x = S^T y by Gauss-Jordan
  task automatic ls_ref();
    real a [L][L+1];
    for (int i = 0; i < L; i++) begin
      for (int j = 0; j < L; j++) begin
        a[i][j] = 0;
        for (int r = 0; r < R; r++)
          if (r - i >= 0 && r - i < N && r - j >= 0 && r - j < N)
            a[i][j] += (sq[r-i] / 65536.0) * (sq[r-j] / 65536.0);
      end
      a[i][L] = 0;
      for (int r = 0; r < R; r++) if (r - i >= 0 && r - i < N) a[i][L] += (sq[r-i] / 65536.0) * (yq[r] / 65536.0);
    end
    for (int p = 0; p < L; p++) begin
      real piv;
      piv = a[p][p];
      for (int j = 0; j <= L; j++) a[p][j] /= piv;
      for (int i = 0; i < L; i++) if (i != p) begin
        real f;
        f = a[i][p];
        for (int j = 0; j <= L; j++) a[i][j] -= f * a[p][j];
      end
    end
    for (int i = 0; i < L; i++) xe[i] = a[i][L];
  endtask

  task automatic make_y();
    real x [L];
    for (int i = 0; i < L; i++) x[i] = real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0;
    for (int r = 0; r < R; r++) begin
      y[r] = real'(int'($urandom_range(0, 200)) - 100) / 10000.0;
      for (int c = 0; c < L; c++) if (r - c >= 0 && r - c < N) y[r] += s[r-c] * x[c];
      yq[r] = $rtoi(y[r] * 65536.0);
    end
  endtask

  task automatic send(input int v, input bit last);
    s_valid <= 1; s_data <= v; s_last <= last;
    do @(posedge clk); while (!s_ready);
  endtask

  task automatic collect(input string tag, output int t_done);
    for (int i = 0; i < L; i++) begin
      real got, err;
      do @(posedge clk); while (!(m_valid && m_ready));
      got = real'(m_data) / 65536.0;
      err = got - xe[i]; if (err < 0) err = -err;
      chk(err < 0.01, $sformatf("%s x[%0d] got %f exp %f", tag, i, got, xe[i]));
      chk(m_last == (i == L-1), "m_last");
    end
    t_done = $time / 10;
  endtask

  initial begin
    int t0, t1, t2, t3;
    s_valid = 0; s_data = 0; s_last = 0; m_ready = 1; cfg_reuse = 0;
    // a waveform with a well-conditioned S^T S
    s[0] = 0.9; s[1] = -0.5; s[2] = 0.3; s[3] = 0.6;
    for (int n = 0; n < N; n++) sq[n] = $rtoi(s[n] * 65536.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    make_y(); ls_ref();
    t0 = $time / 10;
    for (int n = 0; n < N; n++) send(sq[n], 0);
    for (int r = 0; r < R; r++) send(yq[r], r == R-1);
    s_valid <= 0; s_last <= 0;
    collect("full", t1);
    chk(a_valid && !not_pd, "A stored after a full run");

    cfg_reuse = 1;
    make_y(); ls_ref();
    t2 = $time / 10;
    for (int r = 0; r < R; r++) send(yq[r], r == R-1);
    s_valid <= 0; s_last <= 0;
    collect("reuse", t3);
    chk((t3 - t2) * 5 < (t1 - t0), $sformatf("reuse run %0d clocks vs full %0d", t3 - t2, t1 - t0));
    // fixed-waveform run: R words in, then L outputs of R+1 clocks each (+ handshakes)
    chk(t3 - t2 <= R + L * (R + 2) + 4, $sformatf("reuse run took %0d clocks", t3 - t2));
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
