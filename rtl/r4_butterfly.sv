// r4_butterfly: programmable radix-4 butterfly (processing element).
//
// Forms one output of the 4-point DFT of the operands a0..a3,
//     y_k = a0 + (-j)^k a1 + (-j)^(2k) a2 + (-j)^(3k) a3 ,   k = 0..3,
// selected by the input k, so that a single-path stage can produce the four
// outputs of a butterfly on four successive uses. It takes three complex
// add/subtract steps and no multiplier:
//     p = a0 + a2 (k even) or a0 - a2 (k odd)
//     r = a1 + a3 (k even) or a1 - a3 (k odd)
//     k=0: p + r     k=2: p - r     k=1: p - j r     k=3: p + j r
// Multiplying r by -j or +j only swaps its real and imaginary parts and
// picks the sign of the final adders. Every adder is a carry-select adder.
//
// Interface: operands are W-bit two's complement, output W+2 bits (a sum of
// four operands cannot overflow). Purely combinational. The radix-4
// butterfly equations follow the design; splitting it into this
// add/subtract sequence is this implementation's choice.
module r4_butterfly #(
  parameter int unsigned W = 16
) (
  input  logic signed [3:0][W-1:0] a_re,
  input  logic signed [3:0][W-1:0] a_im,
  input  r4sdc_pkg::digit_t        k,
  output logic signed [W+1:0]      y_re,
  output logic signed [W+1:0]      y_im
);
  localparam int unsigned OW = W + 2;

  logic [OW-1:0] x_re [4];
  logic [OW-1:0] x_im [4];
  logic [OW-1:0] p_re, p_im, r_re, r_im;
  logic [OW-1:0] f_re, f_im;       // second operand of the final adders
  logic          odd, sub_re, sub_im;

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      x_re[q] = OW'(signed'(a_re[q]));   // sign extension
      x_im[q] = OW'(signed'(a_im[q]));
    end
    odd = k[0];
    // odd k: final operand is -j r (k=1) or +j r (k=3)
    f_re   = odd ? r_im : r_re;
    f_im   = odd ? r_re : r_im;
    sub_re = k[1];                 // k=2: p-r, k=3: re = p_re - r_im
    sub_im = odd ? ~k[1] : k[1];   // k=1: im = p_im - r_re, k=3: +
  end

  csla #(.W(OW)) u_p_re (.a(x_re[0]), .b(x_re[2]), .sub(odd), .s(p_re));
  csla #(.W(OW)) u_p_im (.a(x_im[0]), .b(x_im[2]), .sub(odd), .s(p_im));
  csla #(.W(OW)) u_r_re (.a(x_re[1]), .b(x_re[3]), .sub(odd), .s(r_re));
  csla #(.W(OW)) u_r_im (.a(x_im[1]), .b(x_im[3]), .sub(odd), .s(r_im));
  csla #(.W(OW)) u_y_re (.a(p_re), .b(f_re), .sub(sub_re), .s(y_re));
  csla #(.W(OW)) u_y_im (.a(p_im), .b(f_im), .sub(sub_im), .s(y_im));

endmodule
