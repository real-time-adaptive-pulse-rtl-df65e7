// pulse_compressor: real-time frequency-domain matched filter.
//
// A trigger captures cfg_len receive samples (16-bit I/Q) into the input
// FIFO; the frame counter zero-pads them to N points and streams them
// through an N-point FFT. Each spectrum bin is multiplied by the stored
// reference spectrum (the conjugate template spectrum) and an N-point IFFT
// returns the compressed pulse, i.e. the correlation of the received samples
// with the template, in natural order.
//
// The reference spectrum comes from one of three sources (ref_src):
//   REF_HOST  pre-calculated coefficients written through ref_we/ref_addr;
//   REF_MAIN  a template pulse captured on the main channel: a trigger with
//             learn set is windowed, transformed, conjugated and stored
//             instead of being compressed;
//   REF_TMPL  as REF_MAIN, but the template is taken from the dedicated
//             template channel tmpl_re/tmpl_im.
// The weighting window (table written through win_we) is applied only to
// template frames, when win_en is set.
//
// Number format: samples are W-bit fractions. Inside, data are widened to
// WI bits. Every forward FFT stage halves (X/N), the product is rounded to
// WI-1 fraction bits, and the IFFT does not scale, so pc_re/pc_im equal
// corr[n]/N, where corr is the correlation of the W-bit fractions; the W most
// significant bits of the WI-bit result are output. pc_power = re^2 + im^2
// for display. Latency from the first sample of a frame entering the FFT to
// the first compressed sample: about 4N clocks (two FFT passes, each through
// N-1 clocks of delay lines plus an N-clock reorder buffer).
// The FFT / multiply / IFFT chain, the trigger-gated FIFO, the three template
// sources and the window follow the document; the internal width, the
// scaling schedule and the record of which frame is a template are this
// design's own choices.
module pulse_compressor
  import apc_pkg::*;
#(
  parameter int unsigned N  = 8192,
  parameter int unsigned W  = 16,
  parameter int unsigned WI = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  ref_src_e             ref_src,
  input  logic                 learn,
  input  logic                 win_en,
  input  logic [$clog2(N):0]   cfg_len,
  // receive channels and trigger
  input  logic                 trigger,
  input  logic                 adc_valid,
  input  logic signed [W-1:0]  adc_re,
  input  logic signed [W-1:0]  adc_im,
  input  logic signed [W-1:0]  tmpl_re,
  input  logic signed [W-1:0]  tmpl_im,
  // host access to the window and reference tables
  input  logic                 win_we,
  input  logic [$clog2(N)-1:0] win_addr,
  input  logic [W-1:0]         win_data,
  input  logic                 ref_we,
  input  logic [$clog2(N)-1:0] ref_addr,
  input  logic signed [WI-1:0] ref_re,
  input  logic signed [WI-1:0] ref_im,
  // compressed output
  output logic                 pc_valid,
  output logic                 pc_sof,
  output logic signed [W-1:0]  pc_re,
  output logic signed [W-1:0]  pc_im,
  output logic [2*W-1:0]       pc_power,
  // status
  output logic                 overflow,
  output logic                 capturing,
  output logic                 template_done
);
  localparam int unsigned AW = $clog2(N);

  // input FIFO and frame counter
  logic                b_valid, b_sof, b_tag;
  logic signed [W-1:0] b_re, b_im;
  pc_input_buffer #(.N(N), .W(W)) u_buf (
    .clk, .rst_n, .trigger, .cfg_len,
    .cfg_tag(learn && ref_src != REF_HOST), .cfg_tmpl_sel(learn && ref_src == REF_TMPL),
    .adc_valid, .adc_re, .adc_im, .tmpl_re, .tmpl_im,
    .out_valid(b_valid), .out_sof(b_sof), .out_tag(b_tag), .out_re(b_re), .out_im(b_im),
    .overflow, .capturing);

  // weighting window, template frames only
  logic                w_valid, w_sof, w_tag;
  logic signed [W-1:0] w_re, w_im;
  window_weight #(.N(N), .W(W)) u_win (
    .clk, .rst_n, .enable(win_en),
    .coef_we(win_we), .coef_addr(win_addr), .coef_data(win_data),
    .in_valid(b_valid), .in_sof(b_sof), .in_tag(b_tag), .in_re(b_re), .in_im(b_im),
    .out_valid(w_valid), .out_sof(w_sof), .out_tag(w_tag), .out_re(w_re), .out_im(w_im));

  // forward FFT
  logic                 f_valid, f_sof;
  logic signed [WI-1:0] f_re, f_im;
  fft_stream #(.N(N), .W(WI), .INVERSE(1'b0), .SCALE_MASK(32'hFFFF_FFFF)) u_fft (
    .clk, .rst_n, .in_valid(w_valid), .in_sof(w_sof),
    .in_re({w_re, (WI-W)'(0)}), .in_im({w_im, (WI-W)'(0)}),
    .out_valid(f_valid), .out_sof(f_sof), .out_re(f_re), .out_im(f_im));

  // which frames in the FFT are templates: queue of tags, in frame order
  logic [3:0] tagq;
  logic [2:0] tq_cnt;
  logic       tq_push, tq_pop, cur_tag, f_tag;
  assign tq_push = w_valid && w_sof;
  assign tq_pop  = f_valid && f_sof;
  assign f_tag   = tq_pop ? tagq[0] : cur_tag;

  logic [3:0] tq_next;
  logic [2:0] tc_next;
  always_comb begin
    tq_next = tagq;
    tc_next = tq_cnt;
    if (tq_pop) begin
      tq_next = {1'b0, tq_next[3:1]};
      tc_next = tc_next - 3'd1;
    end
    if (tq_push) begin
      tq_next[tc_next[1:0]] = w_tag;
      tc_next = tc_next + 3'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tagq <= '0; tq_cnt <= '0; cur_tag <= 1'b0;
    end else begin
      tagq    <= tq_next;
      tq_cnt  <= tc_next;
      cur_tag <= f_tag;
    end
  end

  // reference spectrum memory: capture template spectra, read for multiply
  logic [AW-1:0]        kcnt, kidx;
  logic signed [WI-1:0] r_re, r_im;
  assign kidx = f_sof ? '0 : kcnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) kcnt <= '0;
    else if (f_valid) kcnt <= kidx + AW'(1);
  end

  ref_spectrum_mem #(.N(N), .W(WI)) u_ref (
    .clk, .rst_n,
    .host_we(ref_we), .host_addr(ref_addr), .host_re(ref_re), .host_im(ref_im),
    .cap_valid(f_valid && f_tag), .cap_sof(f_sof), .cap_re(f_re), .cap_im(f_im),
    .cap_done(template_done),
    .rd_addr(kidx), .rd_re(r_re), .rd_im(r_im));

  // signal spectrum delayed one clock to meet the synchronous reference read
  logic                 d_valid, d_sof;
  logic signed [WI-1:0] d_re, d_im;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_sof <= 1'b0; d_re <= '0; d_im <= '0;
    end else begin
      d_valid <= f_valid && !f_tag;
      d_sof   <= f_sof;
      d_re    <= f_re;
      d_im    <= f_im;
    end
  end

  logic                 m_valid, m_sof;
  logic signed [WI-1:0] m_re, m_im;
  cmul #(.W(WI)) u_cmul (
    .clk, .rst_n, .in_valid(d_valid), .in_sof(d_sof),
    .a_re(d_re), .a_im(d_im), .b_re(r_re), .b_im(r_im),
    .out_valid(m_valid), .out_sof(m_sof), .p_re(m_re), .p_im(m_im));

  // inverse FFT, unscaled
  logic                 i_valid, i_sof;
  logic signed [WI-1:0] i_re, i_im;
  fft_stream #(.N(N), .W(WI), .INVERSE(1'b1), .SCALE_MASK(32'h0)) u_ifft (
    .clk, .rst_n, .in_valid(m_valid), .in_sof(m_sof), .in_re(m_re), .in_im(m_im),
    .out_valid(i_valid), .out_sof(i_sof), .out_re(i_re), .out_im(i_im));

  // keep the W most significant bits, rounded half up with saturation
  logic signed [W-1:0] o_re, o_im;
  assign o_re = W'(sat64(64'((64'(i_re) + 64'(1 <<< (WI - W - 1))) >>> (WI - W)), W));
  assign o_im = W'(sat64(64'((64'(i_im) + 64'(1 <<< (WI - W - 1))) >>> (WI - W)), W));

  logic [2*W-1:0] sq_re, sq_im;
  always_comb begin
    logic signed [2*W-1:0] a, b;
    a = o_re * o_re;
    b = o_im * o_im;
    sq_re = $unsigned(a);
    sq_im = $unsigned(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_valid <= 1'b0; pc_sof <= 1'b0; pc_re <= '0; pc_im <= '0; pc_power <= '0;
    end else begin
      pc_valid <= i_valid;
      pc_sof   <= i_sof;
      pc_re    <= o_re;
      pc_im    <= o_im;
      pc_power <= sq_re + sq_im;
    end
  end
endmodule
