// window_weight: weighting-function block applied to a template pulse.
//
// Each sample of a frame is multiplied by a window coefficient chosen by the
// sample's position in the frame (counter reset by in_sof). The coefficients
// (Kaiser, Hamming, Hanning or any other taper) live in an N-word table that
// the host writes through coef_we/coef_addr/coef_data; they are unsigned
// fractions with W-1 fraction bits (1.0 = 2^(W-1)-1). When enable is low, or
// the frame is not a template frame (in_tag low), samples pass unchanged.
// Latency: one clock. The document names the block and the window types; the
// host-loaded table and the fraction format are this design's choice.
module window_weight #(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  logic [W-1:0]         coef_data,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic                 in_tag,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic                 out_tag,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im
);
  localparam int unsigned AW = $clog2(N);

  logic [W-1:0]        coef [N];
  logic [AW-1:0]       cnt, idx;
  logic signed [W:0]   c;
  logic signed [2*W:0] pr, pi;

  assign idx = in_sof ? '0 : cnt;
  assign c   = $signed({1'b0, coef[idx]});
  assign pr  = (2*W+1)'(in_re * c) + (2*W+1)'(1 <<< (W - 2));
  assign pi  = (2*W+1)'(in_im * c) + (2*W+1)'(1 <<< (W - 2));

  always_ff @(posedge clk) if (coef_we) coef[coef_addr] <= coef_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0; out_sof <= 1'b0; out_tag <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      if (in_valid) cnt <= idx + AW'(1);
      out_valid <= in_valid;
      out_sof   <= in_sof;
      out_tag   <= in_tag;
      if (enable && in_tag) begin
        out_re <= W'(pr >>> (W - 1));
        out_im <= W'(pi >>> (W - 1));
      end else begin
        out_re <= in_re;
        out_im <= in_im;
      end
    end
  end
endmodule
