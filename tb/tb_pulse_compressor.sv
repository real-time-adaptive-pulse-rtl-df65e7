// tb_pulse_compressor: end-to-end matched filter check at N = 64.
//
// A chirp template t (P samples) is used in the three reference modes:
//  1. host-loaded spectrum conj(DFT(t))/N,
//  2. template learned from the main channel,
//  3. template learned from the template channel with a Hamming window.
// After each, a return x = t delayed by D samples is captured and the
// compressed output must equal the circular correlation corr[n]/N of x with
// the (windowed) template, within a few LSBs. A trigger sent during a
// capture must be dropped and flagged as overflow.
module tb_pulse_compressor;
  import apc_pkg::*;
  localparam int N = 64, W = 16, WI = 24, P = 24, D = 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ref_src_e ref_src;
  logic learn, win_en, trigger, adc_valid, win_we, ref_we;
  logic [$clog2(N):0] cfg_len;
  logic signed [W-1:0] adc_re, adc_im, tmpl_re, tmpl_im;
  logic [$clog2(N)-1:0] win_addr, ref_addr;
  logic [W-1:0] win_data;
  logic signed [WI-1:0] ref_re, ref_im;
  logic pc_valid, pc_sof, overflow, capturing, template_done;
  logic signed [W-1:0] pc_re, pc_im;
  logic [2*W-1:0] pc_power;

  pulse_compressor #(.N(N), .W(W), .WI(WI)) dut (.*);

  int checks = 0, failures = 0;
  int tr [P], ti [P];           // template
  int wr [P], wi [P];           // template as used for the reference
  int hw [P];                   // Hamming window
  int n_ovf = 0, n_tdone = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overflow) n_ovf++;
    if (template_done) n_tdone++;
  end

  // capture len samples: sample k is x[k] of the given arrays, delayed by dly
  task automatic shot(input int len, input int dly, input bit use_tmpl);
    trigger <= 1; @(posedge clk); trigger <= 0;
    for (int k = 0; k < len; k++) begin
      int sr, si;
      sr = (k >= dly && k - dly < P) ? tr[k - dly] : 0;
      si = (k >= dly && k - dly < P) ? ti[k - dly] : 0;
      adc_valid <= 1;
      adc_re <= use_tmpl ? W'(0) : W'(sr);  adc_im <= use_tmpl ? W'(0) : W'(si);
      tmpl_re <= use_tmpl ? W'(sr) : W'(0); tmpl_im <= use_tmpl ? W'(si) : W'(0);
      @(posedge clk);
    end
    adc_re <= 0; adc_im <= 0; tmpl_re <= 0; tmpl_im <= 0;
  endtask

  // wait for one compressed frame and compare with corr(x, w)/N
  task automatic check_frame(input string tag);
    int k;
    real er, ei;
    int maxerr;
    maxerr = 0;
    while (!(pc_valid && pc_sof)) @(posedge clk);
    for (k = 0; k < N; k++) begin
      er = 0; ei = 0;
      for (int m = 0; m < P; m++) begin
        // x[j] = t[j-D]; corr[n] = sum_m x[(m+n) mod N] conj(w[m])
        int j, xr, xi;
        j = (m + k) % N;
        xr = (j >= D && j - D < P) ? tr[j - D] : 0;
        xi = (j >= D && j - D < P) ? ti[j - D] : 0;
        er += (real'(xr) * wr[m] + real'(xi) * wi[m]);
        ei += (real'(xi) * wr[m] - real'(xr) * wi[m]);
      end
      er = er / 32768.0 / N; ei = ei / 32768.0 / N;
      chk((pc_re - er) < 8.0 && (er - pc_re) < 8.0 && (pc_im - ei) < 8.0 && (ei - pc_im) < 8.0,
          $sformatf("%s n=%0d got %0d,%0d exp %f,%f", tag, k, pc_re, pc_im, er, ei));
      if (k == D) chk(pc_power > 32'd100000, $sformatf("%s peak power %0d at delay", tag, pc_power));
      @(posedge clk);
    end
  endtask

  initial begin
    ref_src = REF_HOST; learn = 0; win_en = 0; trigger = 0; adc_valid = 1; win_we = 0; ref_we = 0;
    cfg_len = ($clog2(N)+1)'(P + D + 3);
    adc_re = 0; adc_im = 0; tmpl_re = 0; tmpl_im = 0;
    win_addr = 0; win_data = 0; ref_addr = 0; ref_re = 0; ref_im = 0;
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

    // 1. host-loaded reference spectrum: conj(DFT(t))/N in WI-bit fractions
    for (int k = 0; k < N; k++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int m = 0; m < P; m++) begin
        er += tr[m] * $cos(2*PI*k*m/N) + ti[m] * $sin(2*PI*k*m/N);
        ei += ti[m] * $cos(2*PI*k*m/N) - tr[m] * $sin(2*PI*k*m/N);
      end
      ref_we <= 1; ref_addr <= k[$clog2(N)-1:0];
      ref_re <= WI'($rtoi(er / N * 256.0));
      ref_im <= WI'($rtoi(-ei / N * 256.0));
      @(posedge clk);
    end
    ref_we <= 0;
    fork
      shot(P + D + 3, D, 0);
      begin
        // a second trigger in the middle of the capture is dropped
        repeat (6) @(posedge clk);
        trigger <= 1; @(posedge clk); trigger <= 0;
      end
    join
    check_frame("host");
    chk(n_ovf == 1, $sformatf("overflow pulses %0d", n_ovf));

    // 2. template learned on the main channel, no window
    ref_src = REF_MAIN; learn = 1;
    shot(P + 3, 0, 0);
    while (n_tdone == 0) @(posedge clk);
    learn = 0;
    shot(P + D + 3, D, 0);
    check_frame("learn-main");

    // 3. template channel with a Hamming window
    for (int m = 0; m < N; m++) begin
      win_we <= 1; win_addr <= m[$clog2(N)-1:0]; win_data <= (m < P) ? W'(hw[m]) : W'(0);
      @(posedge clk);
    end
    win_we <= 0;
    for (int m = 0; m < P; m++) begin
      wr[m] = (tr[m] * hw[m] + 16384) >>> 15;
      wi[m] = (ti[m] * hw[m] + 16384) >>> 15;
    end
    ref_src = REF_TMPL; learn = 1; win_en = 1;
    shot(P + 3, 0, 1);
    while (n_tdone == 1) @(posedge clk);
    learn = 0;
    shot(P + D + 3, D, 0);
    check_frame("learn-tmpl-hamming");
    chk(n_tdone == 2, $sformatf("template captures %0d", n_tdone));

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
