// bitrev_reorder: turns frames of N samples in bit-reversed order into
// natural order.
//
// Two banks of N words (ping-pong). A frame is written into one bank at the
// bit-reversed address of its arrival index while the previous frame is read
// out of the other bank in address order. Reading starts the cycle after the
// last sample of a frame is written, so the latency is N+1 cycles and frames
// may arrive back to back. The input frame must be N contiguous valid samples
// starting with in_sof. The bank memories have one write and one read port.
module bitrev_reorder #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_sof,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int unsigned AW = $clog2(N);

  logic [2*W-1:0] mem [2*N];
  logic [AW-1:0]  wcnt, rcnt, widx, wbr;
  logic           wbank, rbank, rd_active;

  assign widx = in_sof ? '0 : wcnt;
  always_comb for (int b = 0; b < int'(AW); b++) wbr[b] = widx[AW-1-b];

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, wbr}] <= {in_re, in_im};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; wbank <= 1'b0; rcnt <= '0; rbank <= 1'b0; rd_active <= 1'b0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (rd_active) begin
        {out_re, out_im} <= mem[{rbank, rcnt}];
        out_valid <= 1'b1;
        out_sof   <= (rcnt == '0);
        rcnt      <= rcnt + AW'(1);
        if (rcnt == AW'(N - 1)) rd_active <= 1'b0;
      end
      // a completed frame starts its read-out next cycle (wins over the above)
      if (in_valid) begin
        wcnt <= widx + AW'(1);
        if (widx == AW'(N - 1)) begin
          wbank     <= ~wbank;
          rbank     <= wbank;
          rd_active <= 1'b1;
          rcnt      <= '0;
        end
      end
    end
  end
endmodule
