// ls_coproc: single least-squares adaptive pulse compression (LS-APC)
// coprocessor.
//
// Estimates the range profile x (L range gates) from the transmitted
// waveform s (N samples) and the received vector y (L+N-1 samples):
//     x_LS = (S^T S)^-1 S^T y
// where S is the (L+N-1) x L convolution (Toeplitz) matrix of s, never
// stored: S[r][c] = s[r-c] for 0 <= r-c < N, else 0. The stages, run one
// after the other, are:
//   1. G = S^T S, each entry a sum over the rows where two columns of S
//      overlap (N-|i-j| products);
//   2. G^-1 by the Cholesky coprocessor (matinv_coproc);
//   3. A = G^-1 S^T (L x (L+N-1)), kept in a local memory;
//   4. x = A y, streamed out.
// Fixed-waveform mode: with cfg_reuse set, steps 1-3 are skipped and the A
// kept from the previous run is applied to the new y; the input stream then
// holds only y. Otherwise it holds s (N words) followed by y (L+N-1 words).
// The output stream holds the L estimates, m_last on the last.
// Data are real W-bit fixed point with FRAC fraction bits (Q15.16). One
// multiply-accumulate per clock in every stage.
// The stage order and the fixed-waveform reuse of A follow the document;
// real-valued data (the document writes S^H) and the sequencing are this
// design's choices; the noise covariance R of the full LS formula is not
// used, as in the coprocessor's block diagram.
module ls_coproc #(
  parameter int unsigned L    = 60,
  parameter int unsigned N    = 6,
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_reuse,
  input  logic                s_valid,
  output logic                s_ready,
  input  logic signed [W-1:0] s_data,
  input  logic                s_last,
  output logic                m_valid,
  input  logic                m_ready,
  output logic signed [W-1:0] m_data,
  output logic                m_last,
  output logic                busy,
  output logic                a_valid,
  output logic                not_pd
);
  localparam int unsigned R   = L + N - 1;            // rows of S, length of y
  localparam int unsigned IW  = $clog2(R + 1) + 1;
  localparam int unsigned ACW = 2 * W + IW + 2;
  localparam int unsigned DW  = $clog2(L + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_LD_S, S_LD_Y, S_G, S_G_SEND, S_INV_RECV, S_A, S_X, S_X_OUT
  } state_e;
  state_e state;

  logic signed [W-1:0] sv   [N];
  logic signed [W-1:0] yv   [R];
  logic signed [W-1:0] gm   [L*L];      // G, then G^-1
  logic signed [W-1:0] am   [L*R];      // A = G^-1 S^T
  logic [IW-1:0]       i, j, k, kend, ld;
  logic signed [ACW-1:0] acc;
  logic signed [W-1:0]   acc_w;

  assign acc_w = W'(apc_pkg::sat64(64'((acc + ACW'(1 <<< (FRAC - 1))) >>> FRAC), W));

  // the matrix inversion coprocessor
  logic                inv_s_valid, inv_s_ready, inv_s_last;
  logic signed [W-1:0] inv_s_data, inv_m_data;
  logic                inv_m_valid, inv_m_last, inv_busy;

  matinv_coproc #(.MAX_DIM(L), .W(W), .FRAC(FRAC)) u_inv (
    .clk, .rst_n, .cfg_n(DW'(L)),
    .s_valid(inv_s_valid), .s_ready(inv_s_ready), .s_data(inv_s_data), .s_last(inv_s_last),
    .m_valid(inv_m_valid), .m_ready(1'b1), .m_data(inv_m_data), .m_last(inv_m_last),
    .busy(inv_busy), .not_pd);

  assign s_ready     = (state == S_IDLE) || (state == S_LD_S) || (state == S_LD_Y);
  assign busy        = (state != S_IDLE);
  assign inv_s_valid = (state == S_G_SEND);
  assign inv_s_data  = gm[i * L + j];
  assign inv_s_last  = (i == IW'(L - 1)) && (j == IW'(L - 1));

  // first overlapping row of columns a and b, and one past the last
  function automatic logic [IW-1:0] maxv(input logic [IW-1:0] a, input logic [IW-1:0] b);
    return (a > b) ? a : b;
  endfunction
  function automatic logic [IW-1:0] minv(input logic [IW-1:0] a, input logic [IW-1:0] b);
    return (a < b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; i <= '0; j <= '0; k <= '0; kend <= '0; ld <= '0; acc <= '0;
      a_valid <= 1'b0; m_valid <= 1'b0; m_data <= '0; m_last <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (s_valid) begin
          if (cfg_reuse && a_valid) begin
            yv[0] <= s_data; ld <= IW'(1); state <= S_LD_Y;
          end else begin
            sv[0] <= s_data; ld <= IW'(1); state <= S_LD_S; a_valid <= 1'b0;
            if (N == 1) begin ld <= '0; state <= S_LD_Y; end
          end
        end
        S_LD_S: if (s_valid) begin
          sv[ld] <= s_data;
          ld <= ld + IW'(1);
          if (ld == IW'(N - 1)) begin ld <= '0; state <= S_LD_Y; end
        end
        S_LD_Y: if (s_valid) begin
          yv[ld] <= s_data;
          ld <= ld + IW'(1);
          if (ld == IW'(R - 1)) begin
            ld <= '0;
            i <= '0; j <= '0; acc <= '0;
            if (a_valid) state <= S_X;
            else begin
              state <= S_G;
              k <= '0; kend <= IW'(N);            // column 0 with column 0
            end
          end
        end

        // 1. G[i][j] = sum_r s[r-i] s[r-j], rows r in [max(i,j), min(i,j)+N)
        S_G: begin
          if (k < kend) begin
            acc <= acc + ACW'(sv[k - i] * sv[k - j]);
            k   <= k + IW'(1);
          end else begin
            gm[i * L + j] <= acc_w;
            acc <= '0;
            if (j == IW'(L - 1)) begin
              if (i == IW'(L - 1)) begin
                state <= S_G_SEND; i <= '0; j <= '0;
              end else begin
                i <= i + IW'(1); j <= '0;
                k <= i + IW'(1); kend <= IW'(N);   // column i+1 with column 0
              end
            end else begin
              j <= j + IW'(1);
              k    <= maxv(i, j + IW'(1));
              kend <= minv(i, j + IW'(1)) + IW'(N);
            end
          end
        end

        // 2. send G to the inversion coprocessor, take G^-1 back
        S_G_SEND: if (inv_s_ready) begin
          if (j == IW'(L - 1)) begin
            j <= '0;
            i <= i + IW'(1);
            if (i == IW'(L - 1)) begin state <= S_INV_RECV; i <= '0; end
          end else j <= j + IW'(1);
        end
        S_INV_RECV: if (inv_m_valid) begin
          gm[i * L + j] <= inv_m_data;
          if (j == IW'(L - 1)) begin
            j <= '0;
            i <= i + IW'(1);
          end else j <= j + IW'(1);
          if (inv_m_last) begin
            state <= S_A; i <= '0; j <= '0; acc <= '0;
            k <= '0; kend <= IW'(1);                // A[0][0]: columns c in [0, 1)
          end
        end

        // 3. A[i][r] = sum_c G^-1[i][c] s[r-c], c in [max(0,r-N+1), min(r,L-1)]
        //    (i = row of A, j = r)
        S_A: begin
          if (k < kend) begin
            acc <= acc + ACW'(gm[i * L + k] * sv[j - k]);
            k   <= k + IW'(1);
          end else begin
            am[i * R + j] <= acc_w;
            acc <= '0;
            if (j == IW'(R - 1)) begin
              j <= '0;
              k <= '0; kend <= IW'(1);
              if (i == IW'(L - 1)) begin
                state <= S_X; i <= '0; a_valid <= 1'b1;
              end else i <= i + IW'(1);
            end else begin
              j    <= j + IW'(1);
              k    <= (j + IW'(1) >= IW'(N)) ? j + IW'(2) - IW'(N) : '0;
              kend <= minv(j + IW'(1), IW'(L - 1)) + IW'(1);
            end
          end
        end

        // 4. x[i] = sum_r A[i][r] y[r]
        S_X: begin
          if (j < IW'(R)) begin
            acc <= acc + ACW'(am[i * R + j] * yv[j]);
            j   <= j + IW'(1);
          end else state <= S_X_OUT;
        end
        S_X_OUT: if (!m_valid || m_ready) begin
          m_valid <= 1'b1;
          m_data  <= acc_w;
          m_last  <= (i == IW'(L - 1));
          acc     <= '0;
          j       <= '0;
          if (i == IW'(L - 1)) state <= S_IDLE;
          else begin
            i <= i + IW'(1);
            state <= S_X;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));
  a_inv_last: assert property (@(posedge clk) disable iff (!rst_n)
    inv_m_valid && inv_m_last |-> state == S_INV_RECV);
endmodule
