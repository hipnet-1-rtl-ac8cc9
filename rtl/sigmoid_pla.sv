// sigmoid_pla: the sigmoid/error PLA of the output processor.
//
// A purely combinational lookup. Its input is the neuron's sum reduced to 6 bits
// (x, two's complement, value x/4, i.e. -8.0 .. +7.75) and the desired-output bit d.
// It produces the neuron output
//   o = min(63, round(64 / (1 + exp(-x/4))))        (6 bits, value o/64)
// and the error term err = o - 64*d (7 bits, -64 .. +63), the error calculation being
// folded into the same table as in the HiPNeT-1 paper. The table below is that formula
// evaluated for the 64 input codes. Using 6 bits of the sum, a 6-bit output and an extra
// desired-output input follow the HiPNeT-1 paper; the binary point of x, the rounding and
// the scale of d are this design's choice.
module sigmoid_pla
  import hipnet_pkg::*;
(
  input  logic signed [FWDW_W-1:0] x,
  input  logic                     desired,
  output out_t                     o,
  output err_t                     err
);

  always_comb begin
    unique case (x)
      -6'sd32: o = 6'd0;
      -6'sd31: o = 6'd0;
      -6'sd30: o = 6'd0;
      -6'sd29: o = 6'd0;
      -6'sd28: o = 6'd0;
      -6'sd27: o = 6'd0;
      -6'sd26: o = 6'd0;
      -6'sd25: o = 6'd0;
      -6'sd24: o = 6'd0;
      -6'sd23: o = 6'd0;
      -6'sd22: o = 6'd0;
      -6'sd21: o = 6'd0;
      -6'sd20: o = 6'd0;
      -6'sd19: o = 6'd1;
      -6'sd18: o = 6'd1;
      -6'sd17: o = 6'd1;
      -6'sd16: o = 6'd1;
      -6'sd15: o = 6'd1;
      -6'sd14: o = 6'd2;
      -6'sd13: o = 6'd2;
      -6'sd12: o = 6'd3;
      -6'sd11: o = 6'd4;
      -6'sd10: o = 6'd5;
      -6'sd9: o = 6'd6;
      -6'sd8: o = 6'd8;
      -6'sd7: o = 6'd9;
      -6'sd6: o = 6'd12;
      -6'sd5: o = 6'd14;
      -6'sd4: o = 6'd17;
      -6'sd3: o = 6'd21;
      -6'sd2: o = 6'd24;
      -6'sd1: o = 6'd28;
      6'sd0: o = 6'd32;
      6'sd1: o = 6'd36;
      6'sd2: o = 6'd40;
      6'sd3: o = 6'd43;
      6'sd4: o = 6'd47;
      6'sd5: o = 6'd50;
      6'sd6: o = 6'd52;
      6'sd7: o = 6'd55;
      6'sd8: o = 6'd56;
      6'sd9: o = 6'd58;
      6'sd10: o = 6'd59;
      6'sd11: o = 6'd60;
      6'sd12: o = 6'd61;
      6'sd13: o = 6'd62;
      6'sd14: o = 6'd62;
      6'sd15: o = 6'd63;
      6'sd16: o = 6'd63;
      6'sd17: o = 6'd63;
      6'sd18: o = 6'd63;
      6'sd19: o = 6'd63;
      6'sd20: o = 6'd63;
      6'sd21: o = 6'd63;
      6'sd22: o = 6'd63;
      6'sd23: o = 6'd63;
      6'sd24: o = 6'd63;
      6'sd25: o = 6'd63;
      6'sd26: o = 6'd63;
      6'sd27: o = 6'd63;
      6'sd28: o = 6'd63;
      6'sd29: o = 6'd63;
      6'sd30: o = 6'd63;
      6'sd31: o = 6'd63;
      default: o = '0;
    endcase
  end

  assign err = err_t'({1'b0, o}) - (desired ? err_t'(64) : err_t'(0));

endmodule
