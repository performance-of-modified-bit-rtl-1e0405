// mbpm_0707: modified bit parallel multiplier by 1/sqrt(2) ~ 0.707.
//
// A multiplierless constant multiplier built from three shifters and two
// adders: the input is shifted right by 1, that result again by 1 and that
// again by 2, giving x/2, x/4 and x/16; the first two are added and the third
// subtracted:
//     y = (x >>> 1) + (x >>> 2) - (x >>> 4)   ~  0.6875 * x
// The shifts are arithmetic (two's complement, rounding toward minus
// infinity), so every partial product is an integer of the input width.
// This shift/add structure is the design's own; it approximates 0.7071 by
// 0.6875 (-2.8 %). Purely combinational; the output has the input width,
// which cannot overflow since |y| < |x|.
module mbpm_0707 #(
  parameter int unsigned W = 19
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] sh1, sh2, sh4, sum12;

  always_comb begin
    sh1   = x   >>> 1;   // first shifter  (>>1): x/2
    sh2   = sh1 >>> 1;   // second shifter (>>1): x/4
    sh4   = sh2 >>> 2;   // third shifter  (>>2): x/16
    sum12 = sh1 + sh2;   // first adder
    y     = sum12 - sh4; // second adder, subtracting
  end

endmodule
