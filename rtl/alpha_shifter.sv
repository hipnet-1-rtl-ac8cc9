// alpha_shifter: the learning-constant unit of the output processor.
//
// The learning rate is restricted to negative powers of two, so multiplying by it is an
// arithmetic (sign-extending) right shift by alpha bit positions. The unit also applies
// the minus sign of the update rule dw = -alpha * (o - d) and clamps the result to the
// DELTA_W-bit increment that is sent back to the synapse units:
//   dw = clamp( -(esum >>> alpha) )
// Combinational. The shift follows the HiPNeT-1 paper; placing the sign change and the clamp
// here, and the 3-bit shift amount, are this design's choice.
module alpha_shifter
  import hipnet_pkg::*;
(
  input  esum_t  esum,
  input  alpha_t alpha,
  output delta_t dw
);

  localparam delta_t DMAX = delta_t'((1 << (DELTA_W-1)) - 1);
  localparam delta_t DMIN = delta_t'(1 << (DELTA_W-1));

  logic signed [ESUM_W:0] neg;

  always_comb begin
    neg = -((ESUM_W+1)'(esum >>> alpha));
    if (neg > (ESUM_W+1)'(DMAX))      dw = DMAX;
    else if (neg < (ESUM_W+1)'(DMIN)) dw = DMIN;
    else                              dw = neg[DELTA_W-1:0];
  end

endmodule
