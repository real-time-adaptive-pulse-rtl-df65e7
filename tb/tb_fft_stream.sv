// tb_fft_stream: checks the streaming FFT and IFFT against a direct DFT.
//
// Two back-to-back random frames go through a 64-point forward FFT (all
// stages halving, so the expected result is DFT/N) and a 64-point inverse
// FFT fed with the forward FFT's output, which must return the input / N
// within a few LSBs. The latency of the first frame is checked against
// (N-1) + log2(N) + N + 1 cycles.
module tb_fft_stream;
  localparam int N = 64;
  localparam int W = 16;
  localparam int LAT = (N - 1) + $clog2(N) + N + 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof;
  logic signed [W-1:0] in_re, in_im;
  logic f_valid, f_sof, i_valid, i_sof;
  logic signed [W-1:0] f_re, f_im, i_re, i_im;

  fft_stream #(.N(N), .W(W), .INVERSE(1'b0)) dut_f (
    .clk, .rst_n, .in_valid, .in_sof, .in_re, .in_im,
    .out_valid(f_valid), .out_sof(f_sof), .out_re(f_re), .out_im(f_im));
  fft_stream #(.N(N), .W(W), .INVERSE(1'b1)) dut_i (
    .clk, .rst_n, .in_valid(f_valid), .in_sof(f_sof), .in_re(f_re), .in_im(f_im),
    .out_valid(i_valid), .out_sof(i_sof), .out_re(i_re), .out_im(i_im));

  int checks = 0, failures = 0;
  int xr [2][N], xi [2][N];
  int cyc = 0, t_in0 = -1, t_out0 = -1;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // forward: expected DFT/N
  int fk = 0, ff = 0;
  always @(posedge clk) if (rst_n && f_valid) begin
    real er, ei;
    if (f_sof) begin fk = 0; if (t_out0 < 0) t_out0 = cyc; end
    er = 0; ei = 0;
    for (int n = 0; n < N; n++) begin
      er += xr[ff][n] * $cos(2*PI*fk*n/N) + xi[ff][n] * $sin(2*PI*fk*n/N);
      ei += xi[ff][n] * $cos(2*PI*fk*n/N) - xr[ff][n] * $sin(2*PI*fk*n/N);
    end
    er /= N; ei /= N;
    chk((f_re - er) < 6.0 && (er - f_re) < 6.0 && (f_im - ei) < 6.0 && (ei - f_im) < 6.0,
        $sformatf("fft frame %0d bin %0d got %0d,%0d exp %f,%f", ff, fk, f_re, f_im, er, ei));
    fk++; if (fk == N) ff++;
  end

  // inverse of forward: x/N
  int ik = 0, ifr = 0;
  always @(posedge clk) if (rst_n && i_valid) begin
    real er, ei;
    if (i_sof) ik = 0;
    er = real'(xr[ifr][ik]) / N; ei = real'(xi[ifr][ik]) / N;
    chk((i_re - er) < 3.0 && (er - i_re) < 3.0 && (i_im - ei) < 3.0 && (ei - i_im) < 3.0,
        $sformatf("ifft frame %0d n %0d got %0d,%0d exp %f,%f", ifr, ik, i_re, i_im, er, ei));
    ik++; if (ik == N) ifr++;
  end

  initial begin
    in_valid = 0; in_sof = 0; in_re = 0; in_im = 0;
    for (int fr = 0; fr < 2; fr++)
      for (int n = 0; n < N; n++) begin
        xr[fr][n] = $signed($urandom_range(0, 40000)) - 20000;
        xi[fr][n] = $signed($urandom_range(0, 40000)) - 20000;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int fr = 0; fr < 2; fr++)
      for (int n = 0; n < N; n++) begin
        in_valid <= 1; in_sof <= (n == 0); in_re <= W'(xr[fr][n]); in_im <= W'(xi[fr][n]);
        if (fr == 0 && n == 0) t_in0 = cyc;
        @(posedge clk);
      end
    in_valid <= 0; in_sof <= 0;
    wait (ifr == 2);
    repeat (2) @(posedge clk);
    chk(ff == 2, "two forward frames seen");
    // t_in0 is taken when the sample is driven, one cycle before the DUT samples it
    chk(t_out0 - t_in0 == LAT + 1, $sformatf("latency %0d expected %0d", t_out0 - t_in0, LAT));
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
