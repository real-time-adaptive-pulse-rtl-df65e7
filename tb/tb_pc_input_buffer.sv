// tb_pc_input_buffer: N = 16. Triggers start captures of cfg_len samples
// from the receive or template channel while samples arrive with random
// gaps. Every frame out must be the captured samples, in order, followed by
// zeros up to N, as N back-to-back valid samples with sof on the first and
// the capture's tag on all. A trigger during a capture must be dropped with
// an overflow pulse; a frame must start 2 clocks after its last sample.
module tb_pc_input_buffer;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic trigger, cfg_tag, cfg_tmpl_sel, adc_valid, out_valid, out_sof, out_tag, overflow, capturing;
  logic [$clog2(N):0] cfg_len;
  logic signed [W-1:0] adc_re, adc_im, tmpl_re, tmpl_im, out_re, out_im;
  pc_input_buffer #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, ovf = 0, frames = 0, sent = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // expected frames: samples and tag, built from what the buffer accepted
  int exp_q [$];
  int tag_q [$];
  int len_q [$];
  int cur_n = 0, last_push_t = 0, first_out_t [$];
  bit tmpl_now = 0, tag_now = 0, prev_cap = 0;
  int t = 0;

  always @(posedge clk) begin
    t++;
    if (rst_n) begin
      if (capturing && adc_valid) begin
        exp_q.push_back(tmpl_now ? {tmpl_re, tmpl_im} : {adc_re, adc_im});
        cur_n++;
        last_push_t = t;
      end
      if (prev_cap && !capturing) begin
        for (int k = cur_n; k < N; k++) exp_q.push_back(0);
        len_q.push_back(cur_n); tag_q.push_back(tag_now); cur_n = 0;
        first_out_t.push_back(last_push_t + 2);
      end
      prev_cap = capturing;
      if (overflow) ovf++;
    end
  end

  int k_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = exp_q.pop_front();
    chk({out_re, out_im} == e, $sformatf("frame %0d sample %0d got %h exp %h", frames, k_out, {out_re, out_im}, e));
    chk(out_sof == (k_out == 0), "sof");
    chk(out_tag == tag_q[0], "tag");
    if (k_out == 0) begin
      int ft;
      ft = first_out_t.pop_front();
      chk(t == ft + 1, $sformatf("frame start at %0d exp %0d", t, ft + 1));
    end
    k_out++;
    if (k_out == N) begin k_out = 0; frames++; void'(tag_q.pop_front()); end
  end

  always @(negedge clk) begin
    adc_valid <= ($urandom_range(0, 2) != 0);
    adc_re <= $urandom; adc_im <= $urandom; tmpl_re <= $urandom; tmpl_im <= $urandom;
  end

  task automatic fire(input int len, input bit tmpl, input bit tag);
    @(negedge clk);
    cfg_len = len; cfg_tmpl_sel = tmpl; cfg_tag = tag; trigger = 1;
    tmpl_now = tmpl; tag_now = tag;
    @(negedge clk); trigger = 0;
  endtask

  initial begin
    trigger = 0; cfg_len = 5; cfg_tag = 0; cfg_tmpl_sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fire(5, 0, 0);
    repeat (2) @(negedge clk);
    fire(7, 0, 0);                      // during capture: dropped
    repeat (30) @(negedge clk);
    fire(9, 1, 1);
    repeat (20) @(negedge clk);
    fire(0, 0, 0);                      // 0 means N
    repeat (60) @(negedge clk);
    fire(3, 0, 0);
    repeat (40) @(negedge clk);
    chk(frames == 4, $sformatf("frames %0d", frames));
    chk(ovf == 1, $sformatf("overflow pulses %0d", ovf));
    chk(exp_q.size() == 0, "leftover samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
