// tb_ref_spectrum_mem: N = 16. Host writes a table and reads it back (one
// clock read latency), then a captured frame overwrites it: every word must
// read back conjugated, the most negative imaginary value saturating, and
// cap_done must pulse once on the last word. A host write in the same clock
// as a capture write must lose.
module tb_ref_spectrum_mem;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_we, cap_valid, cap_sof, cap_done;
  logic [$clog2(N)-1:0] host_addr, rd_addr;
  logic signed [W-1:0] host_re, host_im, cap_re, cap_im, rd_re, rd_im;
  ref_spectrum_mem #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, dones = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  int hr [N], hi [N], cr [N], ci [N];
  always @(negedge clk) if (cap_done) dones++;

  task automatic readback(input bit capd);
    for (int k = 0; k < N; k++) begin
      int er, ei;
      @(negedge clk); rd_addr = k;
      @(posedge clk); #1;
      er = capd ? cr[k] : hr[k];
      ei = capd ? ((ci[k] == -32768) ? 32767 : -ci[k]) : hi[k];
      chk(rd_re == er && rd_im == ei, $sformatf("cap=%0d k=%0d got %0d,%0d exp %0d,%0d", capd, k, rd_re, rd_im, er, ei));
    end
  endtask

  initial begin
    host_we = 0; cap_valid = 0; cap_sof = 0; host_addr = 0; rd_addr = 0;
    host_re = 0; host_im = 0; cap_re = 0; cap_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      hr[k] = int'($urandom_range(0, 65535)) - 32768; hi[k] = int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk); host_we = 1; host_addr = k; host_re = hr[k]; host_im = hi[k];
    end
    @(negedge clk); host_we = 0;
    readback(0);
    for (int k = 0; k < N; k++) begin
      cr[k] = int'($urandom_range(0, 65535)) - 32768; ci[k] = (k == 3) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk); cap_valid = 1; cap_sof = (k == 0); cap_re = cr[k]; cap_im = ci[k];
      host_we = (k == 5); host_addr = 5; host_re = 1; host_im = 1;
      if (k % 4 == 2) begin @(negedge clk); cap_valid = 0; host_we = 0; end
    end
    @(negedge clk); cap_valid = 0; cap_sof = 0; host_we = 0;
    repeat (2) @(posedge clk);
    chk(dones == 1, $sformatf("cap_done pulses %0d", dones));
    readback(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
