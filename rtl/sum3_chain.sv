// sum3_chain: a chain of two adders that adds each input sample to the two before it.
//
// The first adder sums the current sample and a registered copy of the previous one;
// its registered result meets the next sample in the second adder, so
//   y(t) = x(t) + x(t-1) + x(t-2)
// with one sample per cycle and no repeated additions. The synapse unit uses it to sum
// the three weights of a bank (one feature per frame, each weight in three patterns);
// the output processor uses it to add up the errors of the three patterns a feature
// takes part in. y is combinational from x; the two internal registers reset to zero.
// The two-adder arrangement follows the HiPNeT-1 paper's datapath figures; the output width
// W+2 holds any result.
module sum3_chain #(
  parameter int unsigned W = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  output logic signed [W+1:0] y
);

  logic signed [W-1:0] x_q;     // x(t-1)
  logic signed [W:0]   pair_q;  // x(t-1) + x(t-2)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      pair_q <= '0;
    end else begin
      x_q    <= x;
      pair_q <= (W+1)'(x) + (W+1)'(x_q);
    end
  end

  assign y = (W+2)'(x) + (W+2)'(pair_q);

endmodule
