// tb_carry_select_adder: 16-bit and 64-bit instances checked exhaustively on corner
// operands (all-ones, alternating patterns, carry chains through whole
// blocks) and on 2000 random operand pairs against the built-in addition,
// sum and carry-out, both values of the carry-in.
module tb_carry_select_adder;
  logic [15:0] a16, b16, s16;
  logic [63:0] a64, b64, s64;
  logic        ci, co16, co64;
  carry_select_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(ci), .sum(s16), .cout(co16));
  carry_select_adder #(.N(64)) dut64 (.a(a64), .b(b64), .cin(ci), .sum(s64), .cout(co64));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic one(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [16:0] e16;
    logic [64:0] e64;
    a16 = x[15:0]; b16 = y[15:0]; a64 = x; b64 = y; ci = c;
    #1;
    e16 = {1'b0, x[15:0]} + {1'b0, y[15:0]} + 17'(c);
    e64 = {1'b0, x} + {1'b0, y} + 65'(c);
    chk({co16, s16} == e16, $sformatf("16-bit %h + %h + %0d", x[15:0], y[15:0], c));
    chk({co64, s64} == e64, $sformatf("64-bit %h + %h + %0d", x, y, c));
  endtask

  initial begin
    logic [63:0] corner [6];
    corner = '{64'h0, {64{1'b1}}, 64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 64'h1, 64'h0F0F_0F0F_0F0F_0F0F};
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) for (int c = 0; c < 2; c++) one(corner[i], corner[j], c[0]);
    for (int i = 0; i < 2000; i++) one({$urandom, $urandom}, {$urandom, $urandom}, $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TIMEOUT"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
