// tb_ref_pkg: reference arithmetic for the FFT testbenches.
//
// Written from the equations, not from the RTL: integer division rounded
// toward minus infinity stands in for arithmetic right shifts, and the DFT
// is also available in floating point for tolerance checks.
package tb_ref_pkg;

  typedef struct {
    longint re;
    longint im;
  } cplx_t;

  // floor(x / 2^s)
  function automatic longint fdiv(longint x, int s);
    longint d = longint'(1) << s;
    longint q = x / d;
    if ((x % d) != 0 && x < 0) q = q - 1;
    return q;
  endfunction

  // 0.707 constant of the modified bit parallel multiplier: x/2 + x/4 - x/16
  function automatic longint ref_m707(longint x);
    return fdiv(x, 1) + fdiv(x, 2) - fdiv(x, 4);
  endfunction

  // cos(pi/8) ~ 1 - 1/16 - 1/64 + 1/512, sin(pi/8) ~ 1/4 + 1/8 + 1/128
  function automatic longint ref_c(longint x);
    return x - fdiv(x, 4) - fdiv(x, 6) + fdiv(x, 9);
  endfunction
  function automatic longint ref_s(longint x);
    return fdiv(x, 2) + fdiv(x, 3) + fdiv(x, 7);
  endfunction

  // x * W16^e for the exponents that occur between the stages
  function automatic cplx_t ref_rot(cplx_t x, int e);
    cplx_t y;
    case (e)
      0: y = x;
      1: begin y.re = ref_c(x.re) + ref_s(x.im); y.im = ref_c(x.im) - ref_s(x.re); end
      2: begin y.re = ref_m707(x.re + x.im); y.im = ref_m707(x.im - x.re); end
      3: begin y.re = ref_s(x.re) + ref_c(x.im); y.im = ref_s(x.im) - ref_c(x.re); end
      4: begin y.re = x.im; y.im = -x.re; end
      6: begin y.re = ref_m707(x.im - x.re); y.im = -ref_m707(x.re + x.im); end
      9: begin y.re = -(ref_c(x.re) + ref_s(x.im)); y.im = -(ref_c(x.im) - ref_s(x.re)); end
      default: begin y.re = 0; y.im = 0; $error("bad twiddle exponent %0d", e); end
    endcase
    return y;
  endfunction

  // output k of the 4-point DFT: sum_q a[q] * (-j)^(q*k)
  function automatic cplx_t ref_bfly(cplx_t a[4], int k);
    cplx_t y = '{0, 0};
    for (int q = 0; q < 4; q++) begin
      case ((q * k) % 4)
        0: begin y.re += a[q].re; y.im += a[q].im; end
        1: begin y.re += a[q].im; y.im -= a[q].re; end   // * -j
        2: begin y.re -= a[q].re; y.im -= a[q].im; end   // * -1
        default: begin y.re -= a[q].im; y.im += a[q].re; end   // * +j
      endcase
    end
    return y;
  endfunction

  // 16-point FFT computed the way the hardware rounds it; result by bin
  function automatic void ref_fft16(input cplx_t x[16], output cplx_t big_x[16]);
    cplx_t mid[4][4];   // [k1][n]
    cplx_t a[4];
    for (int k1 = 0; k1 < 4; k1++)
      for (int n = 0; n < 4; n++) begin
        for (int q = 0; q < 4; q++) a[q] = x[n + 4 * q];
        mid[k1][n] = ref_rot(ref_bfly(a, k1), n * k1);
      end
    for (int k1 = 0; k1 < 4; k1++) begin
      for (int n = 0; n < 4; n++) a[n] = mid[k1][n];
      for (int k2 = 0; k2 < 4; k2++) big_x[4 * k2 + k1] = ref_bfly(a, k2);
    end
  endfunction

  // exact DFT bin k in floating point
  function automatic void exact_dft(input cplx_t x[16], input int k, output real yr, output real yi);
    real ang;
    yr = 0.0;
    yi = 0.0;
    for (int i = 0; i < 16; i++) begin
      ang = -2.0 * 3.14159265358979 * real'(i * k) / 16.0;
      yr += real'(x[i].re) * $cos(ang) - real'(x[i].im) * $sin(ang);
      yi += real'(x[i].re) * $sin(ang) + real'(x[i].im) * $cos(ang);
    end
  endfunction

endpackage
