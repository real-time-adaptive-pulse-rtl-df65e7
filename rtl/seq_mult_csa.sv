// seq_mult_csa: sequential N x N unsigned multiplier with carry-save
// partial-product accumulation.
//
// start loads a and b. Each clock one partial product (a AND bit i of b,
// shifted by i) is added into a redundant sum/carry pair with a row of full
// adders, so there is no carry propagation in the loop. After N clocks one
// ripple-carry addition resolves the pair: p (2N bits) is valid with done
// for one clock, N+1 clocks after start. busy is high meanwhile; start is
// ignored while busy.
// The CSA-based sequential multiplier is the document's choice among the
// sequential multipliers it compares; the handshake and timing are this
// design's.
module seq_mult_csa #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0]       s, c, pp, ns, nc, fin;
  logic [N-1:0]         ra, rb;
  logic [$clog2(N+1)-1:0] i;
  logic                 fcout;

  assign pp = rb[0] ? ((2*N)'(ra) << i) : '0;
  assign ns = s ^ c ^ pp;
  assign nc = ((s & c) | (s & pp) | (c & pp)) << 1;

  rca_adder #(.N(2*N)) u_fin (.a(s), .b(c), .cin(1'b0), .sum(fin), .cout(fcout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; c <= '0; ra <= '0; rb <= '0; i <= '0; busy <= 1'b0; done <= 1'b0; p <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          ra <= a; rb <= b; s <= '0; c <= '0; i <= '0; busy <= 1'b1;
        end
      end else if (i == ($clog2(N+1))'(N)) begin
        p    <= fin;
        done <= 1'b1;
        busy <= 1'b0;
      end else begin
        s  <= ns;
        c  <= nc;
        rb <= rb >> 1;
        i  <= i + 1'b1;
      end
    end
  end

  a_no_carry_out: assert property (@(posedge clk) disable iff (!rst_n) busy && i == ($clog2(N+1))'(N) |-> !fcout);
endmodule
