// twiddle_mult: multiplierless twiddle-factor rotation between the stages.
//
// Stage-1 output k of butterfly n is multiplied by W16^e, e = n*k, with
// W16 = exp(-j*2*pi/16). Only seven factors occur and none needs a ROM or a
// general multiplier:
//   e=0  1            : pass through
//   e=4  -j           : (b, -a)
//   e=2  0.707(1-j)   : (M(a+b), M(b-a))           M = modified bit parallel
//   e=6  -j * W^2     : (M(b-a), -M(a+b))              multiplier (0.707)
//   e=1  C - jS       : (Ca + Sb, Cb - Sa)
//   e=3  S - jC       : (Sa + Cb, Sb - Ca)
//   e=9  -(C - jS)    : -(e=1 result)
// for an input a + jb, with C = cos(pi/8) and S = sin(pi/8). These two are
// also shift-and-add constants:
//   C ~ 1 - 2^-4 - 2^-6 + 2^-9 = 0.923828   (exact 0.923880)
//   S ~ 2^-2 + 2^-3 + 2^-7     = 0.382813   (exact 0.382683)
// All shifts are arithmetic and truncate toward minus infinity.
// Using the 0.707 shift/add multiplier for W^2 and W^6 follows the design;
// the constants for C and S, and deriving W^6 and W^9 from W^2 and W^1, are
// this implementation's choices, since the design gives only the 0.707 one.
//
// Interface: input IN_W bits, output IN_W+1 bits (a rotation can grow a
// component by up to sqrt(2)). One register stage, frozen while en is low.
module twiddle_mult #(
  parameter int unsigned IN_W = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  input  r4sdc_pkg::digit_t      k,
  input  r4sdc_pkg::digit_t      n,
  output logic                   out_valid,
  output logic signed [IN_W:0]   out_re,
  output logic signed [IN_W:0]   out_im
);
  localparam int unsigned OW = IN_W + 1;
  localparam int unsigned XW = IN_W + 2;   // headroom for C*a + S*b

  logic signed [OW-1:0] a, b, s_ab, d_ba, m_s, m_d;
  logic signed [XW-1:0] ax, bx, ca, cb, sa, sb;
  logic signed [OW-1:0] y_re, y_im;
  logic [3:0]           e;

  function automatic logic signed [XW-1:0] mul_c(logic signed [XW-1:0] x);
    return x - (x >>> 4) - (x >>> 6) + (x >>> 9);
  endfunction

  function automatic logic signed [XW-1:0] mul_s(logic signed [XW-1:0] x);
    return (x >>> 2) + (x >>> 3) + (x >>> 7);
  endfunction

  mbpm_0707 #(.W(OW)) u_m_sum  (.x(s_ab), .y(m_s));
  mbpm_0707 #(.W(OW)) u_m_diff (.x(d_ba), .y(m_d));

  always_comb begin
    e    = r4sdc_pkg::twiddle_exp(k, n);
    a    = OW'(in_re);
    b    = OW'(in_im);
    s_ab = a + b;
    d_ba = b - a;
    ax   = XW'(in_re);
    bx   = XW'(in_im);
    ca   = mul_c(ax);
    cb   = mul_c(bx);
    sa   = mul_s(ax);
    sb   = mul_s(bx);
    unique case (e)
      4'd1:    begin y_re = OW'(ca + sb);    y_im = OW'(cb - sa);    end
      4'd2:    begin y_re = m_s;             y_im = m_d;             end
      4'd3:    begin y_re = OW'(sa + cb);    y_im = OW'(sb - ca);    end
      4'd4:    begin y_re = b;               y_im = -a;              end
      4'd6:    begin y_re = m_d;             y_im = -m_s;            end
      4'd9:    begin y_re = OW'(-(ca + sb)); y_im = OW'(sa - cb);    end
      default: begin y_re = a;               y_im = b;               end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_re    <= y_re;
      out_im    <= y_im;
    end
  end

endmodule
