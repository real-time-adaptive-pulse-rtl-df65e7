// cmul: pipelined complex multiplier of the matched filter.
//
// Multiplies the signal spectrum a by the (already conjugated) reference
// spectrum b: p = a*b, computed with four real products and two additions.
// Both operands are W-bit two's complement fractions with W-1 fraction bits;
// the product is rounded (half up) back to W-1 fraction bits and saturated.
// valid and sof travel with the data. Latency: one clock (registered output).
// The block and its place after the FFT follow the pulse compressor's
// structure; rounding and saturation are this design's choice.
module cmul #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic                out_valid,
  output logic                out_sof,
  output logic signed [W-1:0] p_re,
  output logic signed [W-1:0] p_im
);
  logic signed [2*W:0] full_re, full_im;

  always_comb begin
    full_re = (2*W+1)'(a_re * b_re) - (2*W+1)'(a_im * b_im) + (2*W+1)'(1 <<< (W - 2));
    full_im = (2*W+1)'(a_re * b_im) + (2*W+1)'(a_im * b_re) + (2*W+1)'(1 <<< (W - 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sof <= 1'b0; p_re <= '0; p_im <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_sof;
      p_re      <= W'(apc_pkg::sat64(64'(full_re >>> (W - 1)), W));
      p_im      <= W'(apc_pkg::sat64(64'(full_im >>> (W - 1)), W));
    end
  end
endmodule
