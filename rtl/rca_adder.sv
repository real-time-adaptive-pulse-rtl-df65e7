// rca_adder: N-bit ripple-carry adder.
//
// Bit i forms propagate p = a ^ b and generate g = a & b; the carry into the
// next bit is c(i+1) = p ? c(i) : g, and the sum bit is p ^ c(i). The carry
// ripples through all N bits, so the delay grows linearly with N.
// Purely combinational: sum and cout follow a, b and cin.
// The propagate/generate carry rule is the document's; the port list is
// this design's.
module rca_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    logic p, g;
    assign p        = a[i] ^ b[i];
    assign g        = a[i] & b[i];
    assign c[i + 1] = p ? c[i] : g;
    assign sum[i]   = p ^ c[i];
  end
  assign cout = c[N];
endmodule
