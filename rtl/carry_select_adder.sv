// carry_select_adder: N-bit carry-select adder built from B-bit blocks.
//
// Every block above the first adds its slice twice with ripple-carry adders,
// once for a carry-in of 0 and once for 1; the real carry from the block
// below then only selects one of the two sums and carries. The delay is
// one B-bit ripple plus one multiplexer per block.
// Purely combinational. N must be a multiple of B.
// The document names and compares the architecture; the block size B is
// this design's.
module carry_select_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned B = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = N / B;
  logic [NB:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [B-1:0] s0, s1;
    logic         c0, c1;
    rca_adder #(.N(B)) u_a0 (.a(a[k*B +: B]), .b(b[k*B +: B]), .cin(1'b0), .sum(s0), .cout(c0));
    rca_adder #(.N(B)) u_a1 (.a(a[k*B +: B]), .b(b[k*B +: B]), .cin(1'b1), .sum(s1), .cout(c1));
    assign sum[k*B +: B] = c[k] ? s1 : s0;
    assign c[k + 1]      = c[k] ? c1 : c0;
  end
  assign cout = c[NB];
endmodule
