// r4sdc_pkg: constants and small helpers shared by the 16-point radix-4
// single-path delay commutator (R4SDC) FFT.
//
// The transform is a radix-4 decimation-in-frequency FFT of N = 16 points,
// which takes log4(16) = 2 stages. Stage 1 works on butterflies whose inputs
// are L = 4 samples apart, stage 2 on adjacent samples (L = 1). Between the
// stages every sample is rotated by the twiddle factor W16^(n*k), where n is
// the stage-1 butterfly index and k the stage-1 butterfly output.
//
// Bins leave the pipeline in radix-4 digit-reversed order: output slot
// t = 4*k1 + k2 carries bin k = 4*k2 + k1. The pipeline latency, counted in
// accepted input samples, is the sum of the delay-commutator fill times
// (3*4 and 3*1) and two pipeline registers (stage-1 output, twiddle output).
package r4sdc_pkg;

  localparam int unsigned N_POINTS = 16;
  localparam int unsigned RADIX    = 4;
  localparam int unsigned L_STAGE1 = N_POINTS / RADIX;                // 4
  localparam int unsigned L_STAGE2 = N_POINTS / (RADIX * RADIX);      // 1
  // Accepted samples between x[0] going in and bin slot 0 coming out.
  localparam int unsigned LATENCY  = 3 * L_STAGE1 + 1 + 1 + 3 * L_STAGE2;  // 17

  typedef logic [1:0] digit_t;   // one radix-4 digit
  typedef logic [3:0] bin_t;     // bin / slot index of the 16-point frame

  // Exponent e of the twiddle factor W16^e applied between the stages.
  // Only 0, 1, 2, 3, 4, 6 and 9 occur.
  function automatic logic [3:0] twiddle_exp(digit_t k, digit_t n);
    return 4'(k) * 4'(n);
  endfunction

  // Bin carried by output slot t (radix-4 digit reversal).
  function automatic bin_t slot_to_bin(bin_t t);
    return {t[1:0], t[3:2]};
  endfunction

endpackage
