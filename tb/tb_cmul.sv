// tb_cmul: random operands, including full-scale corners, through the
// complex multiplier at W = 16. Each product is compared with a rounded,
// saturated integer model one clock after the inputs, together with the
// valid and start-of-frame flags.
module tb_cmul;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_sof, out_valid, out_sof;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, p_re, p_im;
  cmul #(.W(W)) dut (.*);

  int checks = 0, failures = 0, sats = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    longint er, ei;
    in_valid = 0; in_sof = 0; a_re = 0; a_im = 0; b_re = 0; b_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0); in_sof = (t % 37 == 0);
      if (t < 4) begin
        a_re = -32768; a_im = (t[0]) ? -32768 : 32767; b_re = -32768; b_im = (t[1]) ? -32768 : 32767;
      end else begin
        a_re = $urandom; a_im = $urandom; b_re = $urandom; b_im = $urandom;
      end
      er = (longint'(a_re) * b_re - longint'(a_im) * b_im + (1 <<< (W-2))) >>> (W-1);
      ei = (longint'(a_re) * b_im + longint'(a_im) * b_re + (1 <<< (W-2))) >>> (W-1);
      if (er != sat(er) || ei != sat(ei)) sats++;
      @(posedge clk); #1;
      chk(p_re == sat(er) && p_im == sat(ei), $sformatf("t=%0d got %0d,%0d exp %0d,%0d", t, p_re, p_im, sat(er), sat(ei)));
      chk(out_valid == in_valid && out_sof == in_sof, "flags");
    end
    chk(sats > 0, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
