// rmmse_coproc: RMMSE adaptive pulse compression coprocessor (one
// re-iteration over a range profile).
//
// For every range gate g the MMSE filter is
//     w(g) = rho(g+N-1) * (C(g) + R)^-1 * s,
//     C(g) = sum_{n=-N+1}^{N-1} rho(g+n+N-1) * SS(n),  SS(n) = s_n s_n^T,
// where s_n is the waveform shifted by n samples (s_n[i] = s[i-n], zero
// outside) and rho holds the current power estimates of the range bins. The
// estimate is x(g) = w(g)^T [y(g) ... y(g+N-1)].
// Operation:
//   load  - the slave stream carries s (N words), R (N*N, row by row),
//           y (G+N-1 words) and rho (G+2N-2 words), G = cfg_gates;
//   SS    - the 2N-1 matrices SS(n) are computed once into on-chip memory;
//   gates - per gate, matsum_tree streams C(g)+R element by element straight
//           into the Cholesky inversion coprocessor; as the rows of the
//           inverse come back, the matrix-vector product with s, the scaling
//           by rho(g+N-1) and the dot product with the y window are done on
//           the fly, and x(g) leaves on the master stream (m_last on the
//           last gate).
// Updating rho from the estimates (and its scaling by eta) between
// iterations is left to the host, which sends the next rho.
// Data are real W-bit fixed point with FRAC fraction bits (Q15.16).
// Timing per gate: N*N clocks of summation (plus the tree latency) while
// the inverse loads, the inversion itself, then N*N clocks of output.
// The formulas, the stored SS(n) and R, the summation tree and leaving the
// eta step to software follow the document; real-valued data, the stream
// layout and the on-the-fly weight computation are this design's choices.
module rmmse_coproc #(
  parameter int unsigned N    = 16,
  parameter int unsigned L    = 500,
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(L+1)-1:0]     cfg_gates,
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [W-1:0]        s_data,
  input  logic                       s_last,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic signed [W-1:0]        m_data,
  output logic                       m_last,
  output logic                       busy,
  output logic                       not_pd
);
  localparam int unsigned NS  = 2 * N - 1;          // number of shifted waveforms
  localparam int unsigned NN  = N * N;
  localparam int unsigned YL  = L + N - 1;
  localparam int unsigned RL  = L + 2 * N - 2;
  localparam int unsigned CW  = $clog2(RL + NN + 1) + 1;
  localparam int unsigned EW  = $clog2(NN);
  localparam int unsigned NW  = $clog2(N + 1);
  localparam int unsigned ACW = 2 * W + NW + 2;

  typedef enum logic [3:0] {
    S_IDLE, S_LD_S, S_LD_R, S_LD_Y, S_LD_RHO, S_SS, S_SUM, S_WAIT_INV, S_OUT
  } state_e;
  state_e state;

  logic signed [W-1:0] sv   [N];
  logic signed [W-1:0] rm   [NN];
  logic signed [W-1:0] ssm  [NS][NN];
  logic signed [W-1:0] yv   [YL];
  logic signed [W-1:0] rho  [RL];

  logic [CW-1:0]       ld, gate;
  logic [EW-1:0]       e;              // element index i*N+j
  logic [NW-1:0]       ri, rj;         // row / column of the returning inverse
  logic signed [ACW-1:0] acc_row, acc_x;

  function automatic logic signed [W-1:0] fx(input logic signed [ACW-1:0] v);
    return W'(apc_pkg::sat64(64'((v + ACW'(1 <<< (FRAC - 1))) >>> FRAC), W));
  endfunction

  // ---------------- summation tree and inversion ----------------
  logic signed [W-1:0] t_rho [NS];
  logic signed [W-1:0] t_ss  [NS];
  logic                t_valid, t_last, sum_valid, sum_last;
  logic signed [W-1:0] sum;

  assign t_valid = (state == S_SUM);
  assign t_last  = (e == EW'(NN - 1));
  always_comb begin
    for (int n = 0; n < int'(NS); n++) begin
      t_rho[n] = rho[gate + CW'(n)];
      t_ss[n]  = ssm[n][e];
    end
  end

  matsum_tree #(.N(N), .W(W), .FRAC(FRAC)) u_sum (
    .clk, .rst_n, .in_valid(t_valid), .in_last(t_last),
    .rho(t_rho), .ss(t_ss), .r_el(rm[e]),
    .out_valid(sum_valid), .out_last(sum_last), .sum);

  logic                inv_s_ready, inv_m_valid, inv_m_last, inv_busy;
  logic signed [W-1:0] inv_m_data;
  matinv_coproc #(.MAX_DIM(N), .W(W), .FRAC(FRAC)) u_inv (
    .clk, .rst_n, .cfg_n(NW'(N)),
    .s_valid(sum_valid), .s_ready(inv_s_ready), .s_data(sum), .s_last(sum_last),
    .m_valid(inv_m_valid), .m_ready(1'b1), .m_data(inv_m_data), .m_last(inv_m_last),
    .busy(inv_busy), .not_pd);

  // weight of the row that is complete with this inverse element
  logic signed [ACW-1:0] row_full;
  logic signed [W-1:0]   w_i;
  logic signed [2*W-1:0] w_prod;
  assign row_full = acc_row + ACW'(inv_m_data * sv[rj]);
  assign w_prod   = fx(row_full) * rho[gate + CW'(N - 1)];
  assign w_i      = W'(apc_pkg::sat64(64'((w_prod + (2*W)'(1 <<< (FRAC - 1))) >>> FRAC), W));

  // ---------------- shifted waveform products ----------------
  function automatic logic signed [W-1:0] sh(input int n, input int i);
    // s_n[i] = s[i-n], n in [-N+1, N-1]
    int k;
    k = i - n;
    return (k >= 0 && k < int'(N)) ? sv[k] : '0;
  endfunction

  assign s_ready = (state == S_IDLE) || (state == S_LD_S) || (state == S_LD_R)
                || (state == S_LD_Y) || (state == S_LD_RHO);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (state == S_SS) begin
      for (int n = 0; n < int'(NS); n++) begin
        logic signed [2*W-1:0] p;
        p = sh(n - int'(N) + 1, int'(e) / int'(N)) * sh(n - int'(N) + 1, int'(e) % int'(N));
        ssm[n][e] <= W'(apc_pkg::sat64(64'((p + (2*W)'(1 <<< (FRAC - 1))) >>> FRAC), W));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ld <= '0; gate <= '0; e <= '0; ri <= '0; rj <= '0;
      acc_row <= '0; acc_x <= '0; m_valid <= 1'b0; m_data <= '0; m_last <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (s_valid) begin
          sv[0] <= s_data; ld <= CW'(1); state <= S_LD_S;
        end
        S_LD_S: if (s_valid) begin
          sv[ld] <= s_data; ld <= ld + CW'(1);
          if (ld == CW'(N - 1)) begin ld <= '0; state <= S_LD_R; end
        end
        S_LD_R: if (s_valid) begin
          rm[ld] <= s_data; ld <= ld + CW'(1);
          if (ld == CW'(NN - 1)) begin ld <= '0; state <= S_LD_Y; end
        end
        S_LD_Y: if (s_valid) begin
          yv[ld] <= s_data; ld <= ld + CW'(1);
          if (ld == CW'(cfg_gates) + CW'(N - 2)) begin ld <= '0; state <= S_LD_RHO; end
        end
        S_LD_RHO: if (s_valid) begin
          rho[ld] <= s_data; ld <= ld + CW'(1);
          if (ld == CW'(cfg_gates) + CW'(2 * N - 3)) begin
            ld <= '0; state <= S_SS; e <= '0; gate <= '0;
          end
        end
        S_SS: begin
          e <= e + EW'(1);
          if (e == EW'(NN - 1)) begin e <= '0; state <= S_SUM; end
        end
        S_SUM: begin
          // one element of C(g)+R per clock into the tree
          e <= e + EW'(1);
          if (e == EW'(NN - 1)) begin
            e <= '0; state <= S_WAIT_INV; ri <= '0; rj <= '0; acc_row <= '0; acc_x <= '0;
          end
        end
        S_WAIT_INV: if (inv_m_valid) begin
          if (rj == NW'(N - 1)) begin
            acc_row <= '0;
            acc_x   <= acc_x + ACW'(w_i * yv[gate + CW'(ri)]);
            rj <= '0;
            ri <= ri + NW'(1);
            if (inv_m_last) state <= S_OUT;
          end else begin
            acc_row <= row_full;
            rj <= rj + NW'(1);
          end
        end
        S_OUT: if (!m_valid || m_ready) begin
          m_valid <= 1'b1;
          m_data  <= fx(acc_x);
          m_last  <= (gate == CW'(cfg_gates) - CW'(1));
          if (gate == CW'(cfg_gates) - CW'(1)) state <= S_IDLE;
          else begin
            gate  <= gate + CW'(1);
            state <= S_SUM;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));
  a_inv_ready: assert property (@(posedge clk) disable iff (!rst_n)
    sum_valid |-> inv_s_ready);
endmodule
