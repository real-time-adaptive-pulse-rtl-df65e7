// matinv_coproc: matrix inversion coprocessor by Cholesky decomposition,
// forward substitution and backward substitution.
//
// The host streams a symmetric positive-definite matrix M (cfg_n x cfg_n,
// row by row; only the lower triangle is used) into the slave port.
// 1. Decomposition: M = L*L^T, column by column,
//      L[j][j] = sqrt(M[j][j] - sum_k<j L[j][k]^2)
//      L[i][j] = (M[i][j] - sum_k<j L[i][k]*L[j][k]) / L[j][j]
//    The reciprocal 1/L[j][j] is computed once per column and reused.
// 2. Forward substitution: X = L^-1, solving L*X = I column by column.
// 3. Backward substitution: Z = L^-T * X, solving L^T*Z = X, so Z = M^-1.
// M^-1 is then streamed out row by row; m_last marks its last element.
// One multiplier/accumulator does all products (one per clock); the square
// root and the reciprocal are bit-serial (one result bit per clock).
// A pivot that is not positive sets not_pd and is replaced by the smallest
// positive value, so the run always completes.
// Number format: W-bit two's complement with FRAC fraction bits (Q15.16 by
// default, the 32-bit fixed-point variant; the 16-bit <16,1> format cannot
// hold the inverse of a matrix whose entries are below one).
// Timing (unstalled): n^2 clocks to load, about n^3/6 + n*(W/2+FRAC+n) clocks
// to decompose, about n^3/3 clocks for each substitution, n^2 to send.
// The Cholesky method and the three-block structure follow the document; the
// bit-serial root and reciprocal and the number format are this design's.
module matinv_coproc #(
  parameter int unsigned MAX_DIM = 20,
  parameter int unsigned W       = 32,
  parameter int unsigned FRAC    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_DIM+1)-1:0] cfg_n,
  input  logic                         s_valid,
  output logic                         s_ready,
  input  logic signed [W-1:0]          s_data,
  input  logic                         s_last,
  output logic                         m_valid,
  input  logic                         m_ready,
  output logic signed [W-1:0]          m_data,
  output logic                         m_last,
  output logic                         busy,
  output logic                         not_pd
);
  localparam int unsigned DW  = $clog2(MAX_DIM + 1);
  localparam int unsigned AW  = $clog2(MAX_DIM * MAX_DIM);
  localparam int unsigned ACW = 2 * W + DW + 2;
  localparam int unsigned RW  = (W + FRAC + 1) / 2 + 1;   // square-root result bits
  localparam int unsigned QW  = 2 * FRAC + 2;             // reciprocal quotient bits
  localparam logic signed [W-1:0] ONE = W'(1) <<< FRAC;

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_CH_DOT, S_CH_SQRT, S_CH_DIV, S_FW_DOT, S_BW_DOT, S_OUT
  } state_e;
  state_e state;

  logic signed [W-1:0] ml [MAX_DIM*MAX_DIM];   // M, overwritten by L (lower triangle)
  logic signed [W-1:0] xz [MAX_DIM*MAX_DIM];   // X = L^-1, overwritten by Z = M^-1
  logic signed [W-1:0] rdiag [MAX_DIM];        // 1 / L[j][j]

  logic [DW-1:0]         i, j, k, c;
  logic signed [ACW-1:0] acc;
  logic [AW-1:0]         la;                    // load address

  // bit-serial square root / reciprocal
  logic [W+FRAC-1:0]     rad;                   // radicand, value << FRAC
  logic [RW-1:0]         root;
  logic [$clog2(QW+1)-1:0] bitn;
  logic [QW-1:0]         rem;
  logic [QW-1:0]         quo;
  logic [W-1:0]          dvs;

  function automatic logic [AW-1:0] at(input logic [DW-1:0] row, input logic [DW-1:0] col);
    return AW'(row * cfg_n + col);
  endfunction

  function automatic logic signed [W-1:0] fx_mul(input logic signed [W-1:0] a,
                                                 input logic signed [W-1:0] b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return W'(apc_pkg::sat64(64'((p + (2*W)'(1 <<< (FRAC - 1))) >>> FRAC), W));
  endfunction

  logic signed [W-1:0] dot_res;                // (acc rounded) in W bits
  assign dot_res = W'(apc_pkg::sat64(64'((acc + ACW'(1 <<< (FRAC - 1))) >>> FRAC), W));

  logic signed [W-1:0] pivot;
  assign pivot = ml[at(j, j)] - dot_res;

  logic [RW-1:0]   trial;
  logic [2*RW-1:0] trial_sq;
  assign trial    = root | (RW'(1) << bitn);
  assign trial_sq = trial * trial;

  logic [QW:0] rem_sh;
  assign rem_sh = {rem[QW-1:0], (bitn == $clog2(QW+1)'(2*FRAC)) ? 1'b1 : 1'b0};

  assign s_ready = (state == S_IDLE) || (state == S_LOAD);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; i <= '0; j <= '0; k <= '0; c <= '0; acc <= '0; la <= '0;
      rad <= '0; root <= '0; bitn <= '0; rem <= '0; quo <= '0; dvs <= '0;
      m_valid <= 1'b0; m_data <= '0; m_last <= 1'b0; not_pd <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      unique case (state)
        S_IDLE, S_LOAD: if (s_valid) begin
          ml[la] <= s_data;
          if (state == S_IDLE) not_pd <= 1'b0;
          state <= S_LOAD;
          if (la == AW'(cfg_n * cfg_n - 1)) begin
            la <= '0; state <= S_CH_DOT; i <= '0; j <= '0; k <= '0; acc <= '0;
          end else la <= la + AW'(1);
        end

        // ---------------- Cholesky decomposition ----------------
        S_CH_DOT: begin
          if (k < j) begin
            acc <= acc + ACW'(ml[at(i, k)] * ml[at(j, k)]);
            k   <= k + DW'(1);
          end else if (i == j) begin
            // diagonal: square root of the pivot
            if (pivot <= 0) begin
              not_pd <= 1'b1;
              rad    <= (W+FRAC)'(1);
            end else rad <= (W+FRAC)'(pivot) << FRAC;
            root  <= '0;
            bitn  <= $clog2(QW+1)'(RW - 1);
            state <= S_CH_SQRT;
          end else begin
            ml[at(i, j)] <= fx_mul(ml[at(i, j)] - dot_res, rdiag[j]);
            acc <= '0; k <= '0;
            if (i == cfg_n - DW'(1)) begin
              j <= j + DW'(1); i <= j + DW'(1);
              if (j == cfg_n - DW'(1)) begin
                state <= S_FW_DOT; c <= '0; i <= '0; k <= '0;
              end
            end else i <= i + DW'(1);
          end
        end
        S_CH_SQRT: begin
          if ((2*RW)'(trial_sq) <= (2*RW)'(rad)) root <= trial;
          if (bitn == '0) begin
            // root holds floor(sqrt(rad)) after this clock; reciprocal next
            state <= S_CH_DIV;
            bitn  <= $clog2(QW+1)'(QW - 1);
            rem   <= '0;
            quo   <= '0;
            dvs   <= W'(((2*RW)'(trial_sq) <= (2*RW)'(rad)) ? trial : root);
            ml[at(j, j)] <= W'(((2*RW)'(trial_sq) <= (2*RW)'(rad)) ? trial : root);
          end else bitn <= bitn - 1'b1;
        end
        S_CH_DIV: begin
          // restoring division of 2^(2*FRAC) by L[j][j]
          if (rem_sh >= (QW+1)'(dvs)) begin
            rem <= QW'(rem_sh - (QW+1)'(dvs));
            quo[bitn] <= 1'b1;
          end else rem <= QW'(rem_sh);
          if (bitn == '0) begin
            rdiag[j] <= W'(apc_pkg::sat64(64'({quo[QW-1:1], (rem_sh >= (QW+1)'(dvs))}), W));
            state <= S_CH_DOT; acc <= '0; k <= '0;
            if (j == cfg_n - DW'(1)) begin
              state <= S_FW_DOT; c <= '0; i <= '0;
            end else i <= j + DW'(1);
          end else bitn <= bitn - 1'b1;
        end

        // ---------------- forward substitution: L X = I ----------------
        S_FW_DOT: begin
          if (i < c) begin
            xz[at(i, c)] <= '0;
            i <= i + DW'(1); k <= c; acc <= '0;
          end else if (k < i) begin
            acc <= acc + ACW'(ml[at(i, k)] * xz[at(k, c)]);
            k   <= k + DW'(1);
          end else begin
            xz[at(i, c)] <= fx_mul(((i == c) ? ONE : '0) - dot_res, rdiag[i]);
            acc <= '0; k <= c;
            if (i == cfg_n - DW'(1)) begin
              i <= '0; k <= c + DW'(1);
              c <= c + DW'(1);
              if (c == cfg_n - DW'(1)) begin
                state <= S_BW_DOT; c <= '0; i <= cfg_n - DW'(1); k <= cfg_n;
              end
            end else i <= i + DW'(1);
          end
        end

        // ---------------- backward substitution: L^T Z = X ----------------
        S_BW_DOT: begin
          if (k < cfg_n) begin
            acc <= acc + ACW'(ml[at(k, i)] * xz[at(k, c)]);
            k   <= k + DW'(1);
          end else begin
            xz[at(i, c)] <= fx_mul(xz[at(i, c)] - dot_res, rdiag[i]);
            acc <= '0;
            k   <= i;
            if (i == '0) begin
              i <= cfg_n - DW'(1); k <= cfg_n;
              c <= c + DW'(1);
              if (c == cfg_n - DW'(1)) begin
                state <= S_OUT; i <= '0; c <= '0;
              end
            end else i <= i - DW'(1);
          end
        end

        S_OUT: if (!m_valid || m_ready) begin
          m_valid <= 1'b1;
          m_data  <= xz[at(i, c)];
          m_last  <= (i == cfg_n - DW'(1)) && (c == cfg_n - DW'(1));
          if (c == cfg_n - DW'(1)) begin
            c <= '0;
            i <= i + DW'(1);
            if (i == cfg_n - DW'(1)) state <= S_IDLE;
          end else c <= c + DW'(1);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));
  a_last: assert property (@(posedge clk) disable iff (!rst_n)
    s_valid && s_ready && s_last |-> la == AW'(cfg_n * cfg_n - 1));
endmodule
