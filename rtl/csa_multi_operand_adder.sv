// csa_multi_operand_adder: sequential multi-operand adder with carry-save
// accumulation.
//
// Operands arrive one per clock on in_valid/in_data (unsigned N-bit). Each
// is added to a redundant (sum, carry) pair with a row of full adders, so no
// carry propagates while operands keep coming. After the operand flagged
// in_last, one ripple-carry addition of sum and carry gives the total on
// out_data with out_valid for one clock, one clock after the last operand.
// Up to K operands; the result is N + log2(K) bits wide.
// The carry-save principle and the sequential organisation are the
// document's; the widths, the handshake and the final adder are this
// design's.
module csa_multi_operand_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_last,
  input  logic [N-1:0]                  in_data,
  output logic                          out_valid,
  output logic [N+$clog2(K)-1:0]        out_data
);
  localparam int unsigned RW = N + $clog2(K);
  logic [RW-1:0] s, c, x, ns, nc, fin;
  logic          fcout;

  assign x  = RW'(in_data);
  assign ns = s ^ c ^ x;
  assign nc = ((s & c) | (s & x) | (c & x)) << 1;

  rca_adder #(.N(RW)) u_fin (.a(ns), .b(nc), .cin(1'b0), .sum(fin), .cout(fcout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; c <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          s <= '0; c <= '0;
          out_valid <= 1'b1;
          out_data  <= fin;
        end else begin
          s <= ns; c <= nc;
        end
      end
    end
  end

  // the final carry-out is zero as long as no more than K operands are summed
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n) in_valid && in_last |-> !fcout);
endmodule
