// tb_apc_soc: end-to-end test of the whole fabric at its default sizes
// (8192-point pulse compressor, 20x20 matrix engines, LS with 60 gates and
// 6 samples, RMMSE with 16 samples).
//
// Pulse compressor: a P-sample chirp template is used with the three
// reference sources (host-written spectrum, template learned on the receive
// channel, template learned on the template channel with a Hamming window);
// each time a return delayed by D samples is captured and the compressed
// frame is compared with the circular correlation / N. A second trigger
// during a capture must be dropped (overflow).
// Coprocessors: a 4x4 matrix product with output stalls, a 4x4 inverse, a
// non-positive-definite matrix, an LS run and a fixed-waveform LS rerun, and
// an RMMSE pass over a few gates, each checked against a real-valued model.
// Arithmetic units: random additions through the three adders, a
// ten-operand carry-save sum and one sequential multiplication.
// Every mechanism is counted and must have happened at least once.
module tb_apc_soc;
  localparam int N = 8192, W = 16, WI = 24, P = 2000, D = 37;
  localparam int MMD = 20, MID = 20, LSL = 60, LSN = 6, RMN = 16, RML = 500, XW = 32;
  localparam int RMG = 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] pc_ref_src;
  logic pc_learn, pc_win_en, pc_trigger, pc_adc_valid, pc_win_we, pc_ref_we;
  logic [$clog2(N):0] pc_cfg_len;
  logic signed [W-1:0] pc_adc_re, pc_adc_im, pc_tmpl_re, pc_tmpl_im;
  logic [$clog2(N)-1:0] pc_win_addr, pc_ref_addr;
  logic [W-1:0] pc_win_data;
  logic signed [WI-1:0] pc_ref_re, pc_ref_im;
  logic pc_valid, pc_sof, pc_overflow, pc_capturing, pc_template_done;
  logic signed [W-1:0] pc_re, pc_im;
  logic [2*W-1:0] pc_power;

  logic [$clog2(MMD+1)-1:0] mm_cfg_m, mm_cfg_n, mm_cfg_p;
  logic mm_s_valid, mm_s_ready, mm_s_last, mm_m_valid, mm_m_ready, mm_m_last, mm_busy;
  logic signed [15:0] mm_s_data, mm_m_data;
  logic [$clog2(MID+1)-1:0] mi_cfg_n;
  logic mi_s_valid, mi_s_ready, mi_s_last, mi_m_valid, mi_m_ready, mi_m_last, mi_busy, mi_not_pd;
  logic signed [XW-1:0] mi_s_data, mi_m_data;
  logic ls_cfg_reuse, ls_s_valid, ls_s_ready, ls_s_last, ls_m_valid, ls_m_ready, ls_m_last;
  logic ls_busy, ls_a_valid, ls_not_pd;
  logic signed [XW-1:0] ls_s_data, ls_m_data;
  logic [$clog2(RML+1)-1:0] rm_cfg_gates;
  logic rm_s_valid, rm_s_ready, rm_s_last, rm_m_valid, rm_m_ready, rm_m_last, rm_busy, rm_not_pd;
  logic signed [XW-1:0] rm_s_data, rm_m_data;

  logic [15:0] ar_a, ar_b, ar_rca_sum, ar_csel_sum, ar_cskip_sum, ar_mo_data;
  logic ar_cin, ar_rca_cout, ar_csel_cout, ar_cskip_cout, ar_mo_valid, ar_mo_last, ar_mo_out_valid;
  logic [19:0] ar_mo_out_data;
  logic ar_mul_start, ar_mul_busy, ar_mul_done;
  logic [31:0] ar_mul_p;

  apc_soc dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // mechanism counters
  int n_capture = 0, n_zero_pad = 0, n_overflow = 0, n_tdone = 0, n_host_ref = 0;
  int n_learn_main = 0, n_learn_tmpl = 0, n_window = 0, n_frames = 0;
  int n_mm = 0, n_mm_stall = 0, n_mi = 0, n_not_pd = 0, n_ls = 0, n_ls_reuse = 0;
  int n_rm_gates = 0, n_rm_stall = 0, n_adds = 0, n_mo = 0, n_mul = 0;

  always @(posedge clk) if (rst_n) begin
    if (pc_overflow) n_overflow++;
    if (pc_template_done) n_tdone++;
    if (mm_m_valid && !mm_m_ready) n_mm_stall++;
    if (rm_m_valid && !rm_m_ready) n_rm_stall++;
  end
  always @(posedge clk) begin
    mm_m_ready <= ($urandom_range(0, 3) != 0);
    rm_m_ready <= ($urandom_range(0, 3) != 0) && !(rm_busy && n_rm_stall < 3);
  end

  function automatic real fq(input longint v); return real'(v) / 65536.0; endfunction
  function automatic real rabs(input real v); return v < 0 ? -v : v; endfunction

  // ------------------------------------------------------------ pulse compressor
  int tr [P], ti [P], wr [P], wi [P], hw [P];
  real ct [N], st [N];

  task automatic shot(input int len, input int dly, input bit use_tmpl);
    pc_trigger <= 1; @(posedge clk); pc_trigger <= 0;
    n_capture++;
    if (len < N) n_zero_pad++;
    for (int k = 0; k < len; k++) begin
      int sr, si;
      sr = (k >= dly && k - dly < P) ? tr[k - dly] : 0;
      si = (k >= dly && k - dly < P) ? ti[k - dly] : 0;
      pc_adc_valid <= 1;
      pc_adc_re <= use_tmpl ? W'(0) : W'(sr);  pc_adc_im <= use_tmpl ? W'(0) : W'(si);
      pc_tmpl_re <= use_tmpl ? W'(sr) : W'(0); pc_tmpl_im <= use_tmpl ? W'(si) : W'(0);
      @(posedge clk);
    end
    pc_adc_re <= 0; pc_adc_im <= 0; pc_tmpl_re <= 0; pc_tmpl_im <= 0;
  endtask

  task automatic check_frame(input string tag);
    int bad, peak_k;
    longint peak;
    bad = 0; peak = 0; peak_k = -1;
    while (!(pc_valid && pc_sof)) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      real er, ei;
      er = 0; ei = 0;
      // x[j] = t[j-D], nonzero for j in [D, D+P); corr[k] = sum_m x[m+k] conj(w[m])
      for (int m = 0; m < P; m++) begin
        int j;
        j = (m + k) % N;
        if (j >= D && j - D < P) begin
          er += real'(tr[j - D]) * wr[m] + real'(ti[j - D]) * wi[m];
          ei += real'(ti[j - D]) * wr[m] - real'(tr[j - D]) * wi[m];
        end
      end
      er = er / 32768.0 / N; ei = ei / 32768.0 / N;
      if (rabs(pc_re - er) > 12.0 || rabs(pc_im - ei) > 12.0) begin
        bad++;
        if (bad < 5) $display("%s n=%0d got %0d,%0d exp %f,%f", tag, k, pc_re, pc_im, er, ei);
      end
      if (longint'(pc_power) > peak) begin peak = pc_power; peak_k = k; end
      chk(pc_valid, "frame samples contiguous");
      @(posedge clk);
    end
    chk(bad == 0, $sformatf("%s: %0d samples off", tag, bad));
    chk(peak_k == D, $sformatf("%s: peak at %0d, expected %0d", tag, peak_k, D));
    n_frames++;
  endtask

  task automatic pulse_compressor_test();
    for (int i = 0; i < N; i++) begin ct[i] = $cos(2.0 * PI * i / N); st[i] = $sin(2.0 * PI * i / N); end
    pc_cfg_len = ($clog2(N)+1)'(P + D + 3);
    // host-written reference spectrum conj(DFT(t))/N, fraction of 2^(WI-1)
    for (int k = 0; k < N; k++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int m = 0; m < P; m++) begin
        int ix;
        ix = (k * m) % N;
        er += tr[m] * ct[ix] + ti[m] * st[ix];
        ei += ti[m] * ct[ix] - tr[m] * st[ix];
      end
      pc_ref_we <= 1; pc_ref_addr <= k[$clog2(N)-1:0];
      pc_ref_re <= WI'($rtoi(er / N * 256.0));
      pc_ref_im <= WI'($rtoi(-ei / N * 256.0));
      @(posedge clk);
    end
    pc_ref_we <= 0;
    n_host_ref++;
    fork
      shot(P + D + 3, D, 0);
      begin
        repeat (50) @(posedge clk);
        pc_trigger <= 1; @(posedge clk); pc_trigger <= 0;
      end
    join
    check_frame("host");
    chk(n_overflow == 1, $sformatf("overflow pulses %0d", n_overflow));

    // template learned on the receive channel
    pc_ref_src = 2'd1; pc_learn = 1;
    pc_cfg_len = ($clog2(N)+1)'(P + 3);
    shot(P + 3, 0, 0);
    while (n_tdone == 0) @(posedge clk);
    pc_learn = 0; n_learn_main++;
    pc_cfg_len = ($clog2(N)+1)'(P + D + 3);
    shot(P + D + 3, D, 0);
    check_frame("learn-main");

    // template channel with a Hamming window
    for (int m = 0; m < N; m++) begin
      pc_win_we <= 1; pc_win_addr <= m[$clog2(N)-1:0]; pc_win_data <= (m < P) ? W'(hw[m]) : W'(0);
      @(posedge clk);
    end
    pc_win_we <= 0;
    for (int m = 0; m < P; m++) begin
      wr[m] = (tr[m] * hw[m] + 16384) >>> 15;
      wi[m] = (ti[m] * hw[m] + 16384) >>> 15;
    end
    pc_ref_src = 2'd2; pc_learn = 1; pc_win_en = 1;
    pc_cfg_len = ($clog2(N)+1)'(P + 3);
    shot(P + 3, 0, 1);
    while (n_tdone == 1) @(posedge clk);
    pc_learn = 0; n_learn_tmpl++; n_window++;
    pc_cfg_len = ($clog2(N)+1)'(P + D + 3);
    shot(P + D + 3, D, 0);
    check_frame("learn-tmpl-hamming");
  endtask

  // ------------------------------------------------------------ matrix multiply
  task automatic matmul_test();
    int a [4][4], b [4][4];
    mm_cfg_m = 4; mm_cfg_n = 4; mm_cfg_p = 4;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      a[i][j] = int'($urandom_range(0, 65535)) - 32768;
      b[i][j] = int'($urandom_range(0, 65535)) - 32768;
    end
    for (int i = 0; i < 16; i++) begin
      mm_s_valid <= 1; mm_s_data <= 16'(a[i/4][i%4]); mm_s_last <= 0;
      do @(posedge clk); while (!mm_s_ready);
    end
    for (int i = 0; i < 16; i++) begin
      mm_s_valid <= 1; mm_s_data <= 16'(b[i/4][i%4]); mm_s_last <= (i == 15);
      do @(posedge clk); while (!mm_s_ready);
    end
    mm_s_valid <= 0; mm_s_last <= 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < 4; k++) acc += longint'(a[i][k]) * b[k][j];
      acc = (acc + (1 << 14)) >>> 15;
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      do @(posedge clk); while (!(mm_m_valid && mm_m_ready));
      chk(mm_m_data == 16'(acc), $sformatf("mm c[%0d][%0d] got %0d exp %0d", i, j, mm_m_data, acc));
      chk(mm_m_last == (i == 3 && j == 3), "mm last");
    end
    n_mm++;
  endtask

  // ------------------------------------------------------------ matrix inverse
  task automatic matinv_test(input bit bad);
    real a [4][8];
    int q [4][4];
    mi_cfg_n = 4;
    for (int i = 0; i < 4; i++) for (int j = 0; j <= i; j++) begin
      q[i][j] = (i == j) ? (bad && i == 2 ? -65536 : 131072 + int'($urandom_range(0, 65536)))
                         : int'($urandom_range(0, 32768)) - 16384;
      q[j][i] = q[i][j];
    end
    for (int i = 0; i < 16; i++) begin
      mi_s_valid <= 1; mi_s_data <= q[i/4][i%4]; mi_s_last <= (i == 15);
      do @(posedge clk); while (!mi_s_ready);
    end
    mi_s_valid <= 0; mi_s_last <= 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 8; j++) a[i][j] = (j < 4) ? fq(q[i][j]) : (j - 4 == i ? 1.0 : 0.0);
    for (int p = 0; p < 4; p++) begin
      real piv;
      piv = a[p][p];
      for (int j = 0; j < 8; j++) a[p][j] /= piv;
      for (int i = 0; i < 4; i++) if (i != p) begin
        real f;
        f = a[i][p];
        for (int j = 0; j < 8; j++) a[i][j] -= f * a[p][j];
      end
    end
    for (int i = 0; i < 16; i++) begin
      do @(posedge clk); while (!(mi_m_valid && mi_m_ready));
      if (!bad) chk(rabs(fq(mi_m_data) - a[i/4][4 + i%4]) < 0.002,
                    $sformatf("inv[%0d] got %f exp %f", i, fq(mi_m_data), a[i/4][4 + i%4]));
      chk(mi_m_last == (i == 15), "mi last");
    end
    @(posedge clk);
    chk(mi_not_pd == bad, $sformatf("not_pd %0d expected %0d", mi_not_pd, bad));
    if (bad && mi_not_pd) n_not_pd++;
    if (!bad) n_mi++;
  endtask

  // ------------------------------------------------------------ LS
  localparam int LSR = LSL + LSN - 1;
  int sq [LSN], yq [LSR];
  real xe [LSL];

  task automatic ls_model();
    real a [LSL][LSL+1];
    for (int i = 0; i < LSL; i++) begin
      for (int j = 0; j < LSL; j++) begin
        a[i][j] = 0;
        for (int r = 0; r < LSR; r++)
          if (r - i >= 0 && r - i < LSN && r - j >= 0 && r - j < LSN) a[i][j] += fq(sq[r-i]) * fq(sq[r-j]);
      end
      a[i][LSL] = 0;
      for (int r = 0; r < LSR; r++) if (r - i >= 0 && r - i < LSN) a[i][LSL] += fq(sq[r-i]) * fq(yq[r]);
    end
    for (int p = 0; p < LSL; p++) begin
      real piv;
      piv = a[p][p];
      for (int j = 0; j <= LSL; j++) a[p][j] /= piv;
      for (int i = 0; i < LSL; i++) if (i != p) begin
        real f;
        f = a[i][p];
        for (int j = 0; j <= LSL; j++) a[i][j] -= f * a[p][j];
      end
    end
    for (int i = 0; i < LSL; i++) xe[i] = a[i][LSL];
  endtask

  task automatic ls_make_y();
    real x [LSL];
    for (int i = 0; i < LSL; i++) x[i] = real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0;
    for (int r = 0; r < LSR; r++) begin
      real y;
      y = real'(int'($urandom_range(0, 200)) - 100) / 10000.0;
      for (int c = 0; c < LSL; c++) if (r - c >= 0 && r - c < LSN) y += fq(sq[r-c]) * x[c];
      yq[r] = $rtoi(y * 65536.0);
    end
  endtask

  task automatic ls_run(input bit reuse);
    int k;
    ls_cfg_reuse = reuse;
    k = 0;
    if (!reuse) for (int i = 0; i < LSN; i++) begin
      ls_s_valid <= 1; ls_s_data <= sq[i]; ls_s_last <= 0;
      do @(posedge clk); while (!ls_s_ready);
    end
    for (int i = 0; i < LSR; i++) begin
      ls_s_valid <= 1; ls_s_data <= yq[i]; ls_s_last <= (i == LSR-1);
      do @(posedge clk); while (!ls_s_ready);
    end
    ls_s_valid <= 0; ls_s_last <= 0;
    for (int i = 0; i < LSL; i++) begin
      do @(posedge clk); while (!(ls_m_valid && ls_m_ready));
      chk(rabs(fq(ls_m_data) - xe[i]) < 0.02, $sformatf("ls%0d x[%0d] got %f exp %f", reuse, i, fq(ls_m_data), xe[i]));
      chk(ls_m_last == (i == LSL-1), "ls last");
    end
    if (reuse) n_ls_reuse++; else n_ls++;
  endtask

  task automatic ls_test();
    for (int i = 0; i < LSN; i++) sq[i] = int'($urandom_range(0, 65536)) - 32768 + (i == 0 ? 65536 : 0);
    ls_make_y(); ls_model();
    ls_run(0);
    chk(ls_a_valid, "A stored after LS run");
    ls_make_y(); ls_model();
    ls_run(1);
  endtask

  // ------------------------------------------------------------ RMMSE
  int rs [RMN], rr [RMN*RMN], ry [RMG+RMN-1], rp [RMG+2*RMN-2];
  real rxe [RMG];

  function automatic real rsh(input int n, input int i);
    int k;
    k = i - n;
    return (k >= 0 && k < RMN) ? fq(rs[k]) : 0.0;
  endfunction

  task automatic rm_model();
    for (int g = 0; g < RMG; g++) begin
      real a [RMN][RMN+1];
      for (int i = 0; i < RMN; i++) begin
        for (int j = 0; j < RMN; j++) begin
          a[i][j] = fq(rr[i*RMN+j]);
          for (int n = -RMN+1; n < RMN; n++) a[i][j] += fq(rp[g+n+RMN-1]) * rsh(n, i) * rsh(n, j);
        end
        a[i][RMN] = fq(rs[i]);
      end
      for (int p = 0; p < RMN; p++) begin
        real piv;
        piv = a[p][p];
        for (int j = 0; j <= RMN; j++) a[p][j] /= piv;
        for (int i = 0; i < RMN; i++) if (i != p) begin
          real f;
          f = a[i][p];
          for (int j = 0; j <= RMN; j++) a[i][j] -= f * a[p][j];
        end
      end
      rxe[g] = 0;
      for (int i = 0; i < RMN; i++) rxe[g] += fq(rp[g+RMN-1]) * a[i][RMN] * fq(ry[g+i]);
    end
  endtask

  task automatic rmmse_test();
    rm_cfg_gates = RMG;
    for (int i = 0; i < RMN; i++) rs[i] = int'($urandom_range(0, 32768)) - 16384 + (i == 0 ? 32768 : 0);
    for (int i = 0; i < RMN*RMN; i++) rr[i] = (i % (RMN+1) == 0) ? 32768 : 0;
    for (int i = 0; i < RMG+RMN-1; i++) ry[i] = int'($urandom_range(0, 131072)) - 65536;
    for (int i = 0; i < RMG+2*RMN-2; i++) rp[i] = 6554 + int'($urandom_range(0, 65536));
    rm_model();
    fork
      begin
        for (int i = 0; i < RMN; i++)        begin rm_s_valid <= 1; rm_s_data <= rs[i]; do @(posedge clk); while (!rm_s_ready); end
        for (int i = 0; i < RMN*RMN; i++)    begin rm_s_valid <= 1; rm_s_data <= rr[i]; do @(posedge clk); while (!rm_s_ready); end
        for (int i = 0; i < RMG+RMN-1; i++)  begin rm_s_valid <= 1; rm_s_data <= ry[i]; do @(posedge clk); while (!rm_s_ready); end
        for (int i = 0; i < RMG+2*RMN-2; i++) begin
          rm_s_valid <= 1; rm_s_data <= rp[i]; rm_s_last <= (i == RMG+2*RMN-3);
          do @(posedge clk); while (!rm_s_ready);
        end
        rm_s_valid <= 0; rm_s_last <= 0;
      end
      for (int g = 0; g < RMG; g++) begin
        do @(posedge clk); while (!(rm_m_valid && rm_m_ready));
        chk(rabs(fq(rm_m_data) - rxe[g]) < 0.01 + 0.02 * rabs(rxe[g]),
            $sformatf("rmmse x[%0d] got %f exp %f", g, fq(rm_m_data), rxe[g]));
        chk(rm_m_last == (g == RMG-1), "rm last");
        n_rm_gates++;
      end
    join
    chk(!rm_not_pd, "rmmse not_pd");
  endtask

  // ------------------------------------------------------------ arithmetic units
  task automatic arith_test();
    longint e;
    for (int i = 0; i < 200; i++) begin
      logic [16:0] es;
      @(negedge clk);
      ar_a = $urandom; ar_b = (i == 0) ? ~ar_a : 16'($urandom); ar_cin = (i == 0) ? 1'b1 : 1'($urandom);
      #1;
      es = 17'(ar_a) + 17'(ar_b) + 17'(ar_cin);
      chk({ar_rca_cout, ar_rca_sum} == es && {ar_csel_cout, ar_csel_sum} == es && {ar_cskip_cout, ar_cskip_sum} == es,
          $sformatf("adders %h + %h + %0d", ar_a, ar_b, ar_cin));
      n_adds++;
    end
    e = 0;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      ar_mo_valid = 1; ar_mo_last = (i == 9); ar_mo_data = $urandom; e += ar_mo_data;
    end
    @(posedge clk); #1;
    chk(ar_mo_out_valid && ar_mo_out_data == 20'(e), $sformatf("multi-operand sum %0d exp %0d", ar_mo_out_data, e));
    n_mo++;
    @(negedge clk); ar_mo_valid = 0; ar_mo_last = 0;
    ar_a = $urandom; ar_b = $urandom; ar_mul_start = 1;
    @(negedge clk); ar_mul_start = 0;
    while (!ar_mul_done) @(negedge clk);
    chk(ar_mul_p == 32'(ar_a) * 32'(ar_b), $sformatf("product %0d", ar_mul_p));
    n_mul++;
  endtask

  initial begin
    ar_a = 0; ar_b = 0; ar_cin = 0; ar_mo_valid = 0; ar_mo_last = 0; ar_mo_data = 0; ar_mul_start = 0;
    pc_ref_src = 0; pc_learn = 0; pc_win_en = 0; pc_trigger = 0; pc_adc_valid = 1; pc_win_we = 0; pc_ref_we = 0;
    pc_cfg_len = 0; pc_adc_re = 0; pc_adc_im = 0; pc_tmpl_re = 0; pc_tmpl_im = 0;
    pc_win_addr = 0; pc_win_data = 0; pc_ref_addr = 0; pc_ref_re = 0; pc_ref_im = 0;
    mm_cfg_m = 0; mm_cfg_n = 0; mm_cfg_p = 0; mm_s_valid = 0; mm_s_data = 0; mm_s_last = 0;
    mi_cfg_n = 0; mi_s_valid = 0; mi_s_data = 0; mi_s_last = 0; mi_m_ready = 1;
    ls_cfg_reuse = 0; ls_s_valid = 0; ls_s_data = 0; ls_s_last = 0; ls_m_ready = 1;
    rm_cfg_gates = 0; rm_s_valid = 0; rm_s_data = 0; rm_s_last = 0;
    for (int m = 0; m < P; m++) begin
      real ph;
      ph = PI * m * m / P;
      tr[m] = $rtoi(13000.0 * $cos(ph));
      ti[m] = $rtoi(13000.0 * $sin(ph));
      hw[m] = $rtoi(32767.0 * (0.54 - 0.46 * $cos(2.0 * PI * m / (P - 1))) + 0.5);
      wr[m] = tr[m]; wi[m] = ti[m];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // the engines run concurrently, as they would under one host
    fork
      pulse_compressor_test();
      begin matmul_test(); matinv_test(0); matinv_test(1); end
      ls_test();
      rmmse_test();
      arith_test();
    join
    chk(n_capture > 0,    "never: trigger capture");
    chk(n_zero_pad > 0,   "never: zero-padded frame");
    chk(n_overflow > 0,   "never: overflow drop");
    chk(n_host_ref > 0,   "never: host reference");
    chk(n_learn_main > 0, "never: template learned on receive channel");
    chk(n_learn_tmpl > 0, "never: template learned on template channel");
    chk(n_window > 0,     "never: weighting window");
    chk(n_frames == 3,    $sformatf("compressed frames %0d", n_frames));
    chk(n_mm > 0,         "never: matrix product");
    chk(n_mm_stall > 0,   "never: matmul output stall");
    chk(n_mi > 0,         "never: matrix inverse");
    chk(n_not_pd > 0,     "never: not positive definite");
    chk(n_ls > 0,         "never: LS run");
    chk(n_ls_reuse > 0,   "never: LS fixed-waveform reuse");
    chk(n_rm_gates > 0,   "never: RMMSE gate");
    chk(n_rm_stall > 0,   "never: RMMSE output stall");
    chk(n_adds > 0,       "never: two-operand additions");
    chk(n_mo > 0,         "never: multi-operand sum");
    chk(n_mul > 0,        "never: sequential multiplication");
    $display("mechanisms: capture=%0d zero_pad=%0d overflow=%0d host_ref=%0d learn_main=%0d learn_tmpl=%0d window=%0d frames=%0d",
             n_capture, n_zero_pad, n_overflow, n_host_ref, n_learn_main, n_learn_tmpl, n_window, n_frames);
    $display("mechanisms: mm=%0d mm_stall=%0d mi=%0d not_pd=%0d ls=%0d ls_reuse=%0d rm_gates=%0d rm_stall=%0d",
             n_mm, n_mm_stall, n_mi, n_not_pd, n_ls, n_ls_reuse, n_rm_gates, n_rm_stall);
    $display("mechanisms: adds=%0d multi_operand=%0d multiply=%0d", n_adds, n_mo, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
