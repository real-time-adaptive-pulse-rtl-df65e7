// carry_skip_adder: N-bit carry-skip adder built from B-bit ripple blocks.
//
// Each block ripples its carry as usual, but when every bit of the block
// propagates (a ^ b all ones) the carry-out equals the carry-in, so the
// block's carry-out is taken straight from its carry-in and skips the
// ripple chain. Purely combinational. N must be a multiple of B.
// The document names and compares the architecture; the block size B is
// this design's.
module carry_skip_adder #(
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
    logic rc;
    rca_adder #(.N(B)) u_add (.a(a[k*B +: B]), .b(b[k*B +: B]), .cin(c[k]), .sum(sum[k*B +: B]), .cout(rc));
    assign c[k + 1] = (&(a[k*B +: B] ^ b[k*B +: B])) ? c[k] : rc;
  end
  assign cout = c[NB];
endmodule
