// tb_rmmse_coproc: one RMMSE iteration at N = 4 waveform samples and G = 6
// range gates (L = 8 maximum). Random waveform s, noise covariance R = r0*I,
// powers rho and received samples y are sent; every gate estimate x(g) is
// compared with a double-precision evaluation of
// w = rho(g+N-1) (sum_n rho(g+n+N-1) SS(n) + R)^-1 s, x = w^T y(g..g+N-1)
// built from the same quantised inputs. The result stream is stalled at
// random; a second pass with new rho checks that the block restarts cleanly.
module tb_rmmse_coproc;
  localparam int N = 4, L = 8, G = 6, W = 32, F = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(L+1)-1:0] cfg_gates;
  logic s_valid, s_ready, s_last, m_valid, m_ready, m_last, busy, not_pd;
  logic signed [W-1:0] s_data, m_data;

  rmmse_coproc #(.N(N), .L(L), .W(W), .FRAC(F)) dut (.*);

  int checks = 0, failures = 0, stalls = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int sq [N], rq [N*N], yq [G+N-1], pq [G+2*N-2];
  real xe [G];

  function automatic real fq(input int v); return real'(v) / 65536.0; endfunction
  function automatic real sh(input int n, input int i);
    int k;
    k = i - n;
    return (k >= 0 && k < N) ? fq(sq[k]) : 0.0;
  endfunction

  task automatic model();
    for (int g = 0; g < G; g++) begin
      real a [N][N+1];
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          a[i][j] = fq(rq[i*N+j]);
          for (int n = -N+1; n < N; n++) a[i][j] += fq(pq[g+n+N-1]) * sh(n, i) * sh(n, j);
        end
        a[i][N] = fq(sq[i]);
      end
      for (int p = 0; p < N; p++) begin
        real piv;
        piv = a[p][p];
        for (int j = 0; j <= N; j++) a[p][j] /= piv;
        for (int i = 0; i < N; i++) if (i != p) begin
          real f;
          f = a[i][p];
          for (int j = 0; j <= N; j++) a[i][j] -= f * a[p][j];
        end
      end
      xe[g] = 0;
      for (int i = 0; i < N; i++) xe[g] += fq(pq[g+N-1]) * a[i][N] * fq(yq[g+i]);
    end
  endtask

  task automatic send(input int v, input bit last);
    s_valid <= 1; s_data <= v; s_last <= last;
    do @(posedge clk); while (!s_ready);
  endtask

  task automatic run(input string tag);
    int total;
    total = N + N*N + (G+N-1) + (G+2*N-2);
    fork
      begin
        int k = 0;
        for (int i = 0; i < N; i++)       begin k++; send(sq[i], k == total); end
        for (int i = 0; i < N*N; i++)     begin k++; send(rq[i], k == total); end
        for (int i = 0; i < G+N-1; i++)   begin k++; send(yq[i], k == total); end
        for (int i = 0; i < G+2*N-2; i++) begin k++; send(pq[i], k == total); end
        s_valid <= 0; s_last <= 0;
      end
      begin
        for (int g = 0; g < G; g++) begin
          real got, err;
          do @(posedge clk); while (!(m_valid && m_ready));
          got = fq(m_data);
          err = got - xe[g]; if (err < 0) err = -err;
          if (g == 1) $display("%s x[1] got %f exp %f", tag, got, xe[g]);
          chk(err < 0.01 + 0.01 * (xe[g] < 0 ? -xe[g] : xe[g]),
              $sformatf("%s x[%0d] got %f exp %f", tag, g, got, xe[g]));
          chk(m_last == (g == G-1), $sformatf("%s m_last at %0d", tag, g));
        end
      end
    join
    repeat (3) @(posedge clk);
    chk(!busy, {tag, " busy after last"});
    chk(!not_pd, {tag, " not_pd"});
  endtask

  always @(posedge clk) begin
    m_ready <= ($urandom_range(0, 3) != 0);
    if (m_valid && !m_ready) stalls++;
  end

  initial begin
    cfg_gates = G; s_valid = 0; s_data = 0; s_last = 0;
    for (int i = 0; i < N; i++) sq[i] = int'($urandom_range(0, 65536)) - 32768 + (i == 0 ? 65536 : 0);
    for (int i = 0; i < N*N; i++) rq[i] = (i % (N+1) == 0) ? 32768 : 0;
    for (int i = 0; i < G+N-1; i++) yq[i] = int'($urandom_range(0, 131072)) - 65536;
    for (int i = 0; i < G+2*N-2; i++) pq[i] = 6554 + int'($urandom_range(0, 131072));
    model();
    repeat (3) @(posedge clk);
    rst_n = 1;
    run("pass1");
    for (int i = 0; i < G+2*N-2; i++) pq[i] = 6554 + int'($urandom_range(0, 65536));
    model();
    run("pass2");
    chk(stalls > 0, "output stall never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
