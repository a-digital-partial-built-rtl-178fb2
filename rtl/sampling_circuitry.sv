// Sampling circuitry: sums 2^N six-bit ADC codes into a 12-bit sample F.
//
// A 6-bit full adder adds the ADC code D to the 6-bit buffer output F[5:0];
// the sum E is written back into the buffer and the adder's carry advances a
// 6-bit counter that holds F[11:6]. So F = {carry count, buffer} is the exact
// running sum. On a cycle with `restart` high the window begins anew: the
// buffer takes D alone and the counter clears, so F at the end of the window
// holds the sum of that window's codes. The adder/counter/buffer split is the
// structure's own; the restart input (rather than a separate reset) is this
// design's choice. One code is added per clock while `en` is high.
module sampling_circuitry
  import bist_pkg::*;
#(
  parameter int unsigned DW = D_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           restart,
  input  logic [DW-1:0]  d,
  output logic [2*DW-1:0] f
);

  logic [DW-1:0] buf_q;   // 6bit BUF: low half of the sum
  logic [DW-1:0] cnt_q;   // 6bit CNT: number of adder carries
  logic [DW-1:0] e;       // adder sum
  logic          carry;   // adder carry out

  // 6bit Full Adder; its b input reads zero on a restart cycle
  always_comb {carry, e} = {1'b0, d} + {1'b0, (restart ? '0 : buf_q)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (en) begin
      buf_q <= e;
      if (restart)    cnt_q <= '0;
      else if (carry) cnt_q <= cnt_q + 1'b1;
    end
  end

  assign f = {cnt_q, buf_q};

endmodule
