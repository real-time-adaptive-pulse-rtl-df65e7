// ref_spectrum_mem: memory for the matched filter's reference spectrum.
//
// N complex words. Two ways to fill it, matching the template schemes of the
// pulse compressor: the host writes pre-calculated (already conjugated)
// coefficients through host_we/host_addr, or a template frame coming out of
// the FFT is captured with cap_valid/cap_sof and stored conjugated, word k at
// address k. A capture write takes priority over a host write in the same
// cycle. The read port is synchronous: rd_re/rd_im hold word rd_addr one
// clock after it is presented.
module ref_spectrum_mem #(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 host_we,
  input  logic [$clog2(N)-1:0] host_addr,
  input  logic signed [W-1:0]  host_re,
  input  logic signed [W-1:0]  host_im,
  input  logic                 cap_valid,
  input  logic                 cap_sof,
  input  logic signed [W-1:0]  cap_re,
  input  logic signed [W-1:0]  cap_im,
  output logic                 cap_done,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic signed [W-1:0]  rd_re,
  output logic signed [W-1:0]  rd_im
);
  localparam int unsigned AW = $clog2(N);

  logic [2*W-1:0]       mem [N];
  logic [AW-1:0]        ccnt, cidx;
  logic signed [W-1:0]  cap_conj_im;

  assign cidx        = cap_sof ? '0 : ccnt;
  // conjugate, saturating the one value whose negation does not fit
  assign cap_conj_im = (cap_im == {1'b1, {(W-1){1'b0}}}) ? {1'b0, {(W-1){1'b1}}} : -cap_im;

  always_ff @(posedge clk) begin
    if (cap_valid)    mem[cidx]      <= {cap_re, cap_conj_im};
    else if (host_we) mem[host_addr] <= {host_re, host_im};
    {rd_re, rd_im} <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccnt <= '0; cap_done <= 1'b0;
    end else begin
      cap_done <= 1'b0;
      if (cap_valid) begin
        ccnt <= cidx + AW'(1);
        if (cidx == AW'(N - 1)) cap_done <= 1'b1;
      end
    end
  end
endmodule
