// apc_soc: top level of the adaptive pulse compression system-on-chip.
//
// The programmable logic holds the hardware accelerators that the host
// processor reaches over its bus; the host, its bus bridges, the converters
// and the DMA engines are outside this module, so their sides of the
// accelerators appear here as plain ports:
//   pc_* - the streaming FFT pulse compressor (Chapter 4): receive samples
//          from the converter interface, trigger, host writes of window and
//          reference spectrum, compressed output and its power;
//   mm_* - the matrix multiplication coprocessor (Chapter 3);
//   mi_* - the Cholesky matrix inversion coprocessor (Chapter 3);
//   ls_* - the least-squares adaptive pulse compression coprocessor
//          (Chapter 5), which contains its own inversion unit;
//   rm_* - the RMMSE coprocessor (Chapter 5): summation tree plus inversion;
//   ar_* - the arithmetic units of the Chapter 3 study (ripple-carry,
//          carry-select and carry-skip adders on shared operands, the
//          sequential carry-save multi-operand adder and multiplier), which
//          stand alone and feed no other engine.
// Every coprocessor has a host-side slave stream (s_valid/s_ready/s_data/
// s_last) for its operands and a master stream (m_*) for results, with
// back-pressure on both; each starts on the first operand word and shows
// busy until its last result has left.
// All blocks share one clock and an active-low asynchronous reset.
// Defaults are the document's sizes: 8192-point FFT on 16-bit I/Q samples,
// 4x4 to 20x20 matrices in <16,1> fixed point, 60 gates by 6 samples for
// LS, 16-sample waveform for RMMSE. The Q15.16 32-bit format of the
// inversion-based blocks and the ranges for RMMSE gates are this design's.
module apc_soc #(
  parameter int unsigned PC_N   = 8192,
  parameter int unsigned PC_W   = 16,
  parameter int unsigned PC_WI  = 24,
  parameter int unsigned MM_DIM = 20,
  parameter int unsigned MI_DIM = 20,
  parameter int unsigned LS_L   = 60,
  parameter int unsigned LS_N   = 6,
  parameter int unsigned RM_N   = 16,
  parameter int unsigned RM_L   = 500,
  parameter int unsigned XW     = 32,
  parameter int unsigned AR_W   = 16,
  parameter int unsigned XFRAC  = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // ---- pulse compressor ----
  input  logic [1:0]                     pc_ref_src,    // 0 host, 1 main channel, 2 template channel
  input  logic                           pc_learn,
  input  logic                           pc_win_en,
  input  logic [$clog2(PC_N):0]          pc_cfg_len,
  input  logic                           pc_trigger,
  input  logic                           pc_adc_valid,
  input  logic signed [PC_W-1:0]         pc_adc_re,
  input  logic signed [PC_W-1:0]         pc_adc_im,
  input  logic signed [PC_W-1:0]         pc_tmpl_re,
  input  logic signed [PC_W-1:0]         pc_tmpl_im,
  input  logic                           pc_win_we,
  input  logic [$clog2(PC_N)-1:0]        pc_win_addr,
  input  logic [PC_W-1:0]                pc_win_data,
  input  logic                           pc_ref_we,
  input  logic [$clog2(PC_N)-1:0]        pc_ref_addr,
  input  logic signed [PC_WI-1:0]        pc_ref_re,
  input  logic signed [PC_WI-1:0]        pc_ref_im,
  output logic                           pc_valid,
  output logic                           pc_sof,
  output logic signed [PC_W-1:0]         pc_re,
  output logic signed [PC_W-1:0]         pc_im,
  output logic [2*PC_W-1:0]              pc_power,
  output logic                           pc_overflow,
  output logic                           pc_capturing,
  output logic                           pc_template_done,
  // ---- matrix multiplication coprocessor ----
  input  logic [$clog2(MM_DIM+1)-1:0]    mm_cfg_m,
  input  logic [$clog2(MM_DIM+1)-1:0]    mm_cfg_n,
  input  logic [$clog2(MM_DIM+1)-1:0]    mm_cfg_p,
  input  logic                           mm_s_valid,
  output logic                           mm_s_ready,
  input  logic signed [15:0]             mm_s_data,
  input  logic                           mm_s_last,
  output logic                           mm_m_valid,
  input  logic                           mm_m_ready,
  output logic signed [15:0]             mm_m_data,
  output logic                           mm_m_last,
  output logic                           mm_busy,
  // ---- matrix inversion coprocessor ----
  input  logic [$clog2(MI_DIM+1)-1:0]    mi_cfg_n,
  input  logic                           mi_s_valid,
  output logic                           mi_s_ready,
  input  logic signed [XW-1:0]           mi_s_data,
  input  logic                           mi_s_last,
  output logic                           mi_m_valid,
  input  logic                           mi_m_ready,
  output logic signed [XW-1:0]           mi_m_data,
  output logic                           mi_m_last,
  output logic                           mi_busy,
  output logic                           mi_not_pd,
  // ---- LS coprocessor ----
  input  logic                           ls_cfg_reuse,
  input  logic                           ls_s_valid,
  output logic                           ls_s_ready,
  input  logic signed [XW-1:0]           ls_s_data,
  input  logic                           ls_s_last,
  output logic                           ls_m_valid,
  input  logic                           ls_m_ready,
  output logic signed [XW-1:0]           ls_m_data,
  output logic                           ls_m_last,
  output logic                           ls_busy,
  output logic                           ls_a_valid,
  output logic                           ls_not_pd,
  // ---- RMMSE coprocessor ----
  input  logic [$clog2(RM_L+1)-1:0]      rm_cfg_gates,
  input  logic                           rm_s_valid,
  output logic                           rm_s_ready,
  input  logic signed [XW-1:0]           rm_s_data,
  input  logic                           rm_s_last,
  output logic                           rm_m_valid,
  input  logic                           rm_m_ready,
  output logic signed [XW-1:0]           rm_m_data,
  output logic                           rm_m_last,
  output logic                           rm_busy,
  output logic                           rm_not_pd,
  // ---- arithmetic units ----
  input  logic [AR_W-1:0]                ar_a,
  input  logic [AR_W-1:0]                ar_b,
  input  logic                           ar_cin,
  output logic [AR_W-1:0]                ar_rca_sum,
  output logic                           ar_rca_cout,
  output logic [AR_W-1:0]                ar_csel_sum,
  output logic                           ar_csel_cout,
  output logic [AR_W-1:0]                ar_cskip_sum,
  output logic                           ar_cskip_cout,
  input  logic                           ar_mo_valid,
  input  logic                           ar_mo_last,
  input  logic [AR_W-1:0]                ar_mo_data,
  output logic                           ar_mo_out_valid,
  output logic [AR_W+3:0]                ar_mo_out_data,
  input  logic                           ar_mul_start,
  output logic                           ar_mul_busy,
  output logic                           ar_mul_done,
  output logic [2*AR_W-1:0]              ar_mul_p
);
  pulse_compressor #(.N(PC_N), .W(PC_W), .WI(PC_WI)) u_pc (
    .clk, .rst_n,
    .ref_src(apc_pkg::ref_src_e'(pc_ref_src)), .learn(pc_learn), .win_en(pc_win_en),
    .cfg_len(pc_cfg_len), .trigger(pc_trigger),
    .adc_valid(pc_adc_valid), .adc_re(pc_adc_re), .adc_im(pc_adc_im),
    .tmpl_re(pc_tmpl_re), .tmpl_im(pc_tmpl_im),
    .win_we(pc_win_we), .win_addr(pc_win_addr), .win_data(pc_win_data),
    .ref_we(pc_ref_we), .ref_addr(pc_ref_addr), .ref_re(pc_ref_re), .ref_im(pc_ref_im),
    .pc_valid, .pc_sof, .pc_re, .pc_im, .pc_power,
    .overflow(pc_overflow), .capturing(pc_capturing), .template_done(pc_template_done));

  matmul_coproc #(.MAX_DIM(MM_DIM), .W(16), .FRAC(15)) u_mm (
    .clk, .rst_n, .cfg_m(mm_cfg_m), .cfg_n(mm_cfg_n), .cfg_p(mm_cfg_p),
    .s_valid(mm_s_valid), .s_ready(mm_s_ready), .s_data(mm_s_data), .s_last(mm_s_last),
    .m_valid(mm_m_valid), .m_ready(mm_m_ready), .m_data(mm_m_data), .m_last(mm_m_last),
    .busy(mm_busy));

  matinv_coproc #(.MAX_DIM(MI_DIM), .W(XW), .FRAC(XFRAC)) u_mi (
    .clk, .rst_n, .cfg_n(mi_cfg_n),
    .s_valid(mi_s_valid), .s_ready(mi_s_ready), .s_data(mi_s_data), .s_last(mi_s_last),
    .m_valid(mi_m_valid), .m_ready(mi_m_ready), .m_data(mi_m_data), .m_last(mi_m_last),
    .busy(mi_busy), .not_pd(mi_not_pd));

  ls_coproc #(.L(LS_L), .N(LS_N), .W(XW), .FRAC(XFRAC)) u_ls (
    .clk, .rst_n, .cfg_reuse(ls_cfg_reuse),
    .s_valid(ls_s_valid), .s_ready(ls_s_ready), .s_data(ls_s_data), .s_last(ls_s_last),
    .m_valid(ls_m_valid), .m_ready(ls_m_ready), .m_data(ls_m_data), .m_last(ls_m_last),
    .busy(ls_busy), .a_valid(ls_a_valid), .not_pd(ls_not_pd));

  rmmse_coproc #(.N(RM_N), .L(RM_L), .W(XW), .FRAC(XFRAC)) u_rm (
    .clk, .rst_n, .cfg_gates(rm_cfg_gates),
    .s_valid(rm_s_valid), .s_ready(rm_s_ready), .s_data(rm_s_data), .s_last(rm_s_last),
    .m_valid(rm_m_valid), .m_ready(rm_m_ready), .m_data(rm_m_data), .m_last(rm_m_last),
    .busy(rm_busy), .not_pd(rm_not_pd));

  rca_adder #(.N(AR_W)) u_rca (
    .a(ar_a), .b(ar_b), .cin(ar_cin), .sum(ar_rca_sum), .cout(ar_rca_cout));
  carry_select_adder #(.N(AR_W), .B(4)) u_csel (
    .a(ar_a), .b(ar_b), .cin(ar_cin), .sum(ar_csel_sum), .cout(ar_csel_cout));
  carry_skip_adder #(.N(AR_W), .B(4)) u_cskip (
    .a(ar_a), .b(ar_b), .cin(ar_cin), .sum(ar_cskip_sum), .cout(ar_cskip_cout));
  csa_multi_operand_adder #(.N(AR_W), .K(16)) u_mo (
    .clk, .rst_n, .in_valid(ar_mo_valid), .in_last(ar_mo_last), .in_data(ar_mo_data),
    .out_valid(ar_mo_out_valid), .out_data(ar_mo_out_data));
  seq_mult_csa #(.N(AR_W)) u_mul (
    .clk, .rst_n, .start(ar_mul_start), .a(ar_a), .b(ar_b),
    .busy(ar_mul_busy), .done(ar_mul_done), .p(ar_mul_p));
endmodule
