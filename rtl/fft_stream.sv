// fft_stream: streaming N-point radix-2 FFT or IFFT with natural-order output.
//
// log2(N) pipelined decimation-in-frequency butterfly stages (fft_sdf_stage,
// delay lines of N/2, N/4, ... 1) accept one complex sample per clock, so a
// frame can follow the previous one without a gap; their bit-reversed result
// is put back in natural order by bitrev_reorder. Each stage halves its
// outputs when the matching bit of SCALE_MASK is set (bit s = stage s); with
// all bits set the result is X[k]/N, which cannot overflow.
// INVERSE=1 uses conjugate twiddles, giving N*IDFT scaled by the same mask.
//
// Interface: in_valid/in_sof/in_re/in_im, a frame is N contiguous valid
// samples starting with in_sof. The output frame has the same form.
// Latency from the first input sample to the first output sample:
// (N-1) + log2(N) cycles through the stages, then N+1 in the reorder buffer.
// Radix-2 streaming stages and 16-bit fixed point follow the pulse
// compressor's description; the SDF form and the scaling schedule are this
// design's choice.
module fft_stream #(
  parameter int unsigned N          = 8192,
  parameter int unsigned W          = 16,
  parameter bit          INVERSE    = 1'b0,
  parameter logic [31:0] SCALE_MASK = 32'hFFFF_FFFF
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
  localparam int unsigned S = $clog2(N);

  logic                v  [S+1];
  logic                f  [S+1];
  logic signed [W-1:0] re [S+1];
  logic signed [W-1:0] im [S+1];

  assign v[0]  = in_valid;
  assign f[0]  = in_sof;
  assign re[0] = in_re;
  assign im[0] = in_im;

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_sdf_stage #(
      .HALF(N >> (s + 1)), .W(W), .INVERSE(INVERSE), .SCALE(SCALE_MASK[s])
    ) u_stage (
      .clk, .rst_n,
      .in_valid(v[s]),  .in_sof(f[s]),  .in_re(re[s]),  .in_im(im[s]),
      .out_valid(v[s+1]), .out_sof(f[s+1]), .out_re(re[s+1]), .out_im(im[s+1])
    );
  end

  bitrev_reorder #(.N(N), .W(W)) u_reorder (
    .clk, .rst_n,
    .in_valid(v[S]), .in_sof(f[S]), .in_re(re[S]), .in_im(im[S]),
    .out_valid, .out_sof, .out_re, .out_im
  );
endmodule
