// fft_sdf_stage: one radix-2 decimation-in-frequency butterfly stage of a
// single-path delay-feedback (SDF) streaming FFT.
//
// The stage works on windows of 2*D consecutive samples (D = HALF). During the
// first D samples of a window the inputs are pushed into a D-deep delay line
// while the line's head (the lower-branch results of the previous window) is
// sent out. During the last D samples the head a and the input b form the
// butterfly: a+b goes out at once and (a-b)*W^j is pushed into the delay line,
// to leave during the next window. W^j = exp(-+ 2*pi*i*j/(2D)) comes from a
// table evaluated at elaboration. Each sample carries a valid bit and a
// start-of-frame bit through the delay line, so a frame of 2D*k samples may be
// followed by any gap; in_sof restarts the window counter. The delay line is
// a D-word circular buffer (a RAM on an FPGA), whose tags count as invalid
// until it has been filled once after reset.
//
// Arithmetic: W-bit two's complement re/im. When SCALE is set both butterfly
// outputs are halved (arithmetic shift), so a+b cannot overflow; the twiddle
// product is rounded and saturated. INVERSE conjugates the twiddles (IFFT).
// Timing: the stage runs every clock; outputs are registered, so an input
// sample j < D of a window leaves D+1 cycles later, j >= D leaves 1 cycle later.
// Structure follows the radix-2 pipelined stages the pulse compressor uses;
// the SDF form, the valid tagging and the halving are this design's choices.
module fft_sdf_stage #(
  parameter int unsigned HALF    = 4,
  parameter int unsigned W       = 16,
  parameter bit          INVERSE = 1'b0,
  parameter bit          SCALE   = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_sof,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int unsigned CW = $clog2(2 * HALF);
  localparam int unsigned JW = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned TN = (HALF > 1) ? HALF : 2;
  localparam real PI = 3.14159265358979323846;
  localparam longint TW_ONE = (64'sd1 <<< (W - 1)) - 1;

  typedef logic signed [W-1:0] tw_tab_t [TN];

  function automatic tw_tab_t mk_cos();
    tw_tab_t t;
    for (int j = 0; j < int'(TN); j++)
      t[j] = W'($rtoi($cos(PI * j / HALF) * TW_ONE + (($cos(PI * j / HALF) >= 0.0) ? 0.5 : -0.5)));
    return t;
  endfunction

  // sin table already carries the sign of the forward (-) or inverse (+) kernel
  function automatic tw_tab_t mk_sin();
    tw_tab_t t;
    real v;
    for (int j = 0; j < int'(TN); j++) begin
      v = (INVERSE ? 1.0 : -1.0) * $sin(PI * j / HALF) * TW_ONE;
      t[j] = W'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_COS = mk_cos();
  localparam tw_tab_t TW_SIN = mk_sin();

  typedef struct packed {
    logic                valid;
    logic                sof;
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } smp_t;

  // delay line: circular buffer of HALF words; the word at wptr is the
  // oldest (head) and is overwritten by the new push in the same clock
  localparam int unsigned PW = (HALF > 1) ? $clog2(HALF) : 1;
  smp_t              dl [HALF];
  smp_t              head, push, raw;
  logic [PW-1:0]     wptr;
  logic              primed;     // the buffer has been filled once since reset
  logic [CW-1:0]     cnt, idx;
  logic              upper;      // second half of the window: butterfly
  logic [JW-1:0]     j;

  assign idx   = in_sof ? '0 : cnt;
  assign upper = idx[CW-1];
  assign j     = (HALF > 1) ? JW'(idx) : '0;
  assign raw   = dl[(HALF > 1) ? wptr : '0];
  always_comb begin
    head       = raw;
    head.valid = raw.valid & primed;
    head.sof   = raw.sof & primed;
  end

  logic signed [W:0]    sum_re, sum_im, dif_re, dif_im;
  logic signed [W-1:0]  a_re, a_im, d_re, d_im;
  logic signed [2*W:0]  p_re, p_im;
  logic signed [W-1:0]  tr, ti;

  always_comb begin
    sum_re = head.re + in_re;
    sum_im = head.im + in_im;
    dif_re = head.re - in_re;
    dif_im = head.im - in_im;
    if (SCALE) begin
      a_re = W'(sum_re >>> 1); a_im = W'(sum_im >>> 1);
      d_re = W'(dif_re >>> 1); d_im = W'(dif_im >>> 1);
    end else begin
      a_re = W'(apc_pkg::sat64(64'(sum_re), W)); a_im = W'(apc_pkg::sat64(64'(sum_im), W));
      d_re = W'(apc_pkg::sat64(64'(dif_re), W)); d_im = W'(apc_pkg::sat64(64'(dif_im), W));
    end
    // twiddle multiply with round-half-up and saturation
    p_re = (2*W+1)'(d_re * TW_COS[j]) - (2*W+1)'(d_im * TW_SIN[j]) + (2*W+1)'(TW_ONE >>> 1);
    p_im = (2*W+1)'(d_re * TW_SIN[j]) + (2*W+1)'(d_im * TW_COS[j]) + (2*W+1)'(TW_ONE >>> 1);
    tr = W'(apc_pkg::sat64(64'(p_re >>> (W - 1)), W));
    ti = W'(apc_pkg::sat64(64'(p_im >>> (W - 1)), W));
    if (upper) begin
      push.valid = head.valid & in_valid;
      push.sof   = 1'b0;
      push.re    = (j == '0) ? d_re : tr;
      push.im    = (j == '0) ? d_im : ti;
    end else begin
      push.valid = in_valid;
      push.sof   = in_sof;
      push.re    = in_re;
      push.im    = in_im;
    end
  end

  always_ff @(posedge clk) dl[(HALF > 1) ? wptr : '0] <= push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      wptr <= '0;
      primed <= 1'b0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      cnt   <= idx + CW'(1);
      if (HALF > 1) wptr <= (wptr == PW'(HALF - 1)) ? '0 : wptr + PW'(1);
      if (HALF == 1 || wptr == PW'(HALF - 1)) primed <= 1'b1;
      if (upper) begin
        out_valid <= head.valid & in_valid;
        out_sof   <= head.sof;
        out_re    <= a_re;
        out_im    <= a_im;
      end else begin
        out_valid <= head.valid;
        out_sof   <= 1'b0;
        out_re    <= head.re;
        out_im    <= head.im;
      end
    end
  end
endmodule
