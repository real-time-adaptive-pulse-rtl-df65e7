// pc_input_buffer: trigger-activated input FIFO and frame counter of the
// pulse compressor.
//
// A rising edge on trigger starts a capture: the next cfg_len valid samples
// of the selected channel (the main ADC channel, or the template channel when
// cfg_tmpl_sel is set) are written into an N-deep FIFO, and a frame record
// (length, template tag) is queued. Once a whole capture is in the FIFO the
// frame counter sends an FFT frame: cfg_len samples from the FIFO followed by
// N-cfg_len zeros, as N contiguous valid samples, with out_sof on the first
// and out_tag (template frame) on all of them. Captures and frames overlap: a
// new trigger may be captured while the previous frame is being sent.
// A trigger that arrives while a capture is running, or when the FIFO or the
// record queue has no room, is dropped and reported by a one-clock pulse on
// overflow. cfg_len of 0 is treated as N.
// Timing: the frame starts 2 clocks after the last sample of its capture is
// written; frames are separated by at least one idle clock.
// The trigger-gated FIFO with a counter is the document's; the record queue,
// the drop policy and sending only complete captures are this design's.
module pc_input_buffer #(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trigger,
  input  logic [$clog2(N):0]   cfg_len,
  input  logic                 cfg_tag,
  input  logic                 cfg_tmpl_sel,
  input  logic                 adc_valid,
  input  logic signed [W-1:0]  adc_re,
  input  logic signed [W-1:0]  adc_im,
  input  logic signed [W-1:0]  tmpl_re,
  input  logic signed [W-1:0]  tmpl_im,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic                 out_tag,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic                 overflow,
  output logic                 capturing
);
  localparam int unsigned AW = $clog2(N);

  typedef struct packed {
    logic [AW:0] len;
    logic        tag;
  } rec_t;

  // sample FIFO
  logic [2*W-1:0] fifo [N];
  logic [AW-1:0]  wptr, rptr;
  logic [AW:0]    fcount;
  logic           push, pop;

  // frame record queue, two entries
  rec_t           recq [2];
  logic           rq_wp, rq_rp;
  logic [1:0]     rq_count;
  logic           rq_push, rq_pop;

  // capture state
  logic           trig_q, trig_rise;
  logic [AW:0]    cap_left, len_eff;
  logic           cap_sel;

  // emit state
  logic           emitting;
  logic [AW:0]    ecnt;
  rec_t           cur;

  assign trig_rise = trigger & ~trig_q;
  assign len_eff   = (cfg_len == '0 || cfg_len > (AW+1)'(N)) ? (AW+1)'(N) : cfg_len;
  assign push      = capturing && adc_valid;
  assign rq_push   = trig_rise && !capturing && (rq_count < 2'd2)
                     && ((AW+1)'(N) - fcount >= len_eff);
  assign overflow  = trig_rise && !rq_push;

  assign pop       = emitting && (ecnt < cur.len);
  assign rq_pop    = !emitting && (rq_count != 2'd0) && (fcount >= recq[rq_rp].len)
                     && !(capturing && rq_count == 2'd1);

  always_ff @(posedge clk) if (push) fifo[wptr] <= cap_sel ? {tmpl_re, tmpl_im} : {adc_re, adc_im};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q <= 1'b0; capturing <= 1'b0; cap_left <= '0; cap_sel <= 1'b0;
      wptr <= '0; rptr <= '0; fcount <= '0;
      rq_wp <= 1'b0; rq_rp <= 1'b0; rq_count <= '0;
      for (int i = 0; i < 2; i++) recq[i] <= '0;
      emitting <= 1'b0; ecnt <= '0; cur <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_tag <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      trig_q <= trigger;

      // capture: the record is queued at the trigger; the frame is only sent
      // when its capture has finished (see rq_pop)
      if (rq_push) begin
        capturing        <= 1'b1;
        cap_left         <= len_eff;
        cap_sel          <= cfg_tmpl_sel;
        recq[rq_wp]      <= '{len: len_eff, tag: cfg_tag};
        rq_wp            <= ~rq_wp;
      end else if (push) begin
        wptr     <= wptr + AW'(1);
        cap_left <= cap_left - (AW+1)'(1);
        if (cap_left == (AW+1)'(1)) capturing <= 1'b0;
      end
      rq_count <= rq_count + (rq_push ? 2'd1 : 2'd0) - (rq_pop ? 2'd1 : 2'd0);
      fcount   <= fcount + (push ? (AW+1)'(1) : '0) - (pop ? (AW+1)'(1) : '0);

      // frame counter
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (rq_pop) begin
        emitting <= 1'b1;
        cur      <= recq[rq_rp];
        rq_rp    <= ~rq_rp;
        ecnt     <= '0;
      end else if (emitting) begin
        out_valid <= 1'b1;
        out_sof   <= (ecnt == '0);
        out_tag   <= cur.tag;
        if (pop) begin
          {out_re, out_im} <= fifo[rptr];
          rptr <= rptr + AW'(1);
        end else begin
          out_re <= '0;
          out_im <= '0;
        end
        ecnt <= ecnt + (AW+1)'(1);
        if (ecnt == (AW+1)'(N - 1)) emitting <= 1'b0;
      end
    end
  end

  // the FIFO never over- or under-runs
  a_no_overrun:  assert property (@(posedge clk) disable iff (!rst_n) push |-> fcount < (AW+1)'(N));
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) pop |-> fcount != '0);
endmodule
