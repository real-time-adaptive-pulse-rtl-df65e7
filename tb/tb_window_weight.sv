// tb_window_weight: loads a Hamming table (N = 32) and sends template and
// non-template frames with the window enabled and disabled. Weighted samples
// must equal round(x * coef / 2^15) one clock later; other samples pass
// unchanged.
module tb_window_weight;
  localparam int N = 32, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, coef_we, in_valid, in_sof, in_tag, out_valid, out_sof, out_tag;
  logic [$clog2(N)-1:0] coef_addr;
  logic [W-1:0] coef_data;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  window_weight #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  int cf [N];

  task automatic frame(input bit en, input bit tag);
    for (int k = 0; k < N; k++) begin
      int er, ei;
      @(negedge clk);
      enable = en; in_valid = 1; in_sof = (k == 0); in_tag = tag;
      in_re = $urandom; in_im = $urandom;
      er = (en && tag) ? int'((longint'(in_re) * cf[k] + 16384) >>> 15) : int'(in_re);
      ei = (en && tag) ? int'((longint'(in_im) * cf[k] + 16384) >>> 15) : int'(in_im);
      @(posedge clk); #1;
      chk(out_re == er && out_im == ei, $sformatf("en=%0d tag=%0d k=%0d got %0d exp %0d", en, tag, k, out_re, er));
      chk(out_valid && out_sof == (k == 0) && out_tag == tag, "flags");
    end
  endtask

  initial begin
    enable = 0; coef_we = 0; coef_addr = 0; coef_data = 0; in_valid = 0; in_sof = 0; in_tag = 0; in_re = 0; in_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      cf[k] = $rtoi(32767.0 * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * k / (N - 1))) + 0.5);
      @(negedge clk); coef_we = 1; coef_addr = k; coef_data = cf[k];
    end
    @(negedge clk); coef_we = 0;
    frame(1, 1); frame(1, 0); frame(0, 1); frame(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
