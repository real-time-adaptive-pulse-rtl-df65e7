// matsum_tree: pipelined adder tree that forms one element of C(l) + R for
// the RMMSE coprocessor.
//
// C(l) + R = sum_{n=-N+1}^{N-1} rho(l+n+N-1) * SS(n) + R, SS(n) = s_n s_n^T.
// Per clock the tree takes the same element (i,j) of all 2N-1 matrices SS(n),
// the 2N-1 power values rho and R[i][j]. The first (leaf) stage scales each
// SS(n) element by its rho; then log2(2N) register-separated stages of
// two-input adders reduce the 2N terms pairwise (leaves padded with zeros to
// a power of two) to the single element of C(l)+R. A whole N x N matrix
// therefore streams through in N*N clocks, one element per clock, after a
// latency of 1 + log2(2N) clocks.
// Numbers are W-bit fixed point with FRAC fraction bits; the leaf products
// are rounded to FRAC bits and the sums saturate.
// The pairwise tree over the 2N-1 scaled matrices and R follows the
// document; working element by element is the sequential micro-architecture
// it describes for the two-input additions.
module matsum_tree #(
  parameter int unsigned N    = 16,
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_last,
  input  logic signed [W-1:0] rho  [2*N-1],
  input  logic signed [W-1:0] ss   [2*N-1],
  input  logic signed [W-1:0] r_el,
  output logic                out_valid,
  output logic                out_last,
  output logic signed [W-1:0] sum
);
  localparam int unsigned M  = $clog2(2 * N);   // adder stages
  localparam int unsigned NL = 1 << M;          // leaves, padded

  logic signed [W-1:0] lv [M+1][NL];
  logic                vld [M+1];
  logic                lst [M+1];

  // leaf stage: rho * SS(n), plus R in the last leaf
  logic signed [2*W-1:0] prod [2*N-1];
  always_comb
    for (int t = 0; t < int'(2*N-1); t++) prod[t] = rho[t] * ss[t];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(NL); t++) lv[0][t] <= '0;
      vld[0] <= 1'b0;
      lst[0] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      lst[0] <= in_last;
      for (int t = 0; t < int'(NL); t++) begin
        if (t < int'(2*N-1))
          lv[0][t] <= W'(apc_pkg::sat64(64'((prod[t] + (2*W)'(1 <<< (FRAC - 1))) >>> FRAC), W));
        else if (t == int'(2*N-1)) lv[0][t] <= r_el;
        else lv[0][t] <= '0;
      end
    end
  end

  for (genvar s = 0; s < M; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int t = 0; t < int'(NL >> (s + 1)); t++) lv[s+1][t] <= '0;
        vld[s+1] <= 1'b0;
        lst[s+1] <= 1'b0;
      end else begin
        vld[s+1] <= vld[s];
        lst[s+1] <= lst[s];
        for (int t = 0; t < int'(NL >> (s + 1)); t++)
          lv[s+1][t] <= W'(apc_pkg::sat64(64'(lv[s][2*t]) + 64'(lv[s][2*t+1]), W));
      end
    end
  end

  assign out_valid = vld[M];
  assign out_last  = lst[M];
  assign sum       = lv[M][0];
endmodule
