// matmul_coproc: fully sequential fixed-point matrix multiplication
// coprocessor, MM = M1 x M2.
//
// The host streams M1 (cfg_m x cfg_n) and then M2 (cfg_n x cfg_p), both row
// by row, into the slave port; the coprocessor keeps them in two local
// memories, then computes each c_ik = sum_j a_ij * b_jk with one multiplier
// and one accumulator (one product per clock) and streams MM row by row out
// of the master port, s_last/m_last marking the last element.
// Elements are W-bit fractions with FRAC fraction bits (the <16,1> format by
// default); the accumulator is wide and the result is rounded half up and
// saturated to W bits.
// Timing: loading takes one clock per element; each result element takes
// cfg_n clocks of multiply-accumulate plus one clock to hand it to the
// output register, so the compute phase lasts cfg_m*cfg_p*(cfg_n+1) clocks
// when the master port is never stalled.
// Sequential operation, local buffers, stream ports and the number format
// follow the document; the handshake details are this design's.
module matmul_coproc #(
  parameter int unsigned MAX_DIM = 20,
  parameter int unsigned W       = 16,
  parameter int unsigned FRAC    = 15
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_DIM+1)-1:0] cfg_m,
  input  logic [$clog2(MAX_DIM+1)-1:0] cfg_n,
  input  logic [$clog2(MAX_DIM+1)-1:0] cfg_p,
  input  logic                         s_valid,
  output logic                         s_ready,
  input  logic signed [W-1:0]          s_data,
  input  logic                         s_last,
  output logic                         m_valid,
  input  logic                         m_ready,
  output logic signed [W-1:0]          m_data,
  output logic                         m_last,
  output logic                         busy
);
  localparam int unsigned DW = $clog2(MAX_DIM + 1);
  localparam int unsigned AW = $clog2(MAX_DIM * MAX_DIM);
  localparam int unsigned ACW = 2 * W + DW + 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD1, S_LOAD2, S_MAC, S_OUT} state_e;
  state_e state;

  logic signed [W-1:0]   ma [MAX_DIM*MAX_DIM];
  logic signed [W-1:0]   mb [MAX_DIM*MAX_DIM];
  logic [DW-1:0]         r, c, i, j, k;     // load row/col, result row/col, inner index
  logic signed [ACW-1:0] acc;
  logic signed [ACW-1:0] rnd;

  assign s_ready = (state == S_LOAD1) || (state == S_LOAD2) || (state == S_IDLE);
  assign busy    = (state != S_IDLE);
  assign rnd     = (acc + (ACW'(1) <<< (FRAC - 1))) >>> FRAC;

  function automatic logic [AW-1:0] at(input logic [DW-1:0] row, input logic [DW-1:0] col,
                                       input logic [DW-1:0] ncols);
    return AW'(row * ncols + col);
  endfunction

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) begin
      if (state == S_LOAD2) mb[at(r, c, cfg_p)] <= s_data;
      else                  ma[at(r, c, cfg_n)] <= s_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; r <= '0; c <= '0; i <= '0; j <= '0; k <= '0; acc <= '0;
      m_valid <= 1'b0; m_data <= '0; m_last <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_LOAD1: if (s_valid) begin
          state <= S_LOAD1;
          if (c == cfg_n - DW'(1)) begin
            c <= '0;
            r <= r + DW'(1);
            if (r == cfg_m - DW'(1)) begin state <= S_LOAD2; r <= '0; end
          end else c <= c + DW'(1);
        end
        S_LOAD2: if (s_valid) begin
          if (c == cfg_p - DW'(1)) begin
            c <= '0;
            r <= r + DW'(1);
            if (r == cfg_n - DW'(1)) begin
              state <= S_MAC; r <= '0; i <= '0; j <= '0; k <= '0; acc <= '0;
            end
          end else c <= c + DW'(1);
        end
        S_MAC: begin
          acc <= acc + ACW'(ma[at(i, k, cfg_n)] * mb[at(k, j, cfg_p)]);
          k   <= k + DW'(1);
          if (k == cfg_n - DW'(1)) state <= S_OUT;
        end
        S_OUT: if (!m_valid || m_ready) begin
          m_valid <= 1'b1;
          m_data  <= W'(apc_pkg::sat64(64'(rnd), W));
          m_last  <= (i == cfg_m - DW'(1)) && (j == cfg_p - DW'(1));
          acc     <= '0;
          k       <= '0;
          state   <= S_MAC;
          if (j == cfg_p - DW'(1)) begin
            j <= '0;
            i <= i + DW'(1);
            if (i == cfg_m - DW'(1)) state <= S_IDLE;
          end else j <= j + DW'(1);
        end
        default: state <= S_IDLE;
      endcase
      if (m_valid && m_ready && !(state == S_OUT)) m_valid <= 1'b0;
    end
  end

  // s_last is informative: it must mark the last element of M2
  a_last: assert property (@(posedge clk) disable iff (!rst_n)
    s_valid && s_ready && s_last |-> state == S_LOAD2 && r == cfg_n - DW'(1) && c == cfg_p - DW'(1));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));
endmodule
