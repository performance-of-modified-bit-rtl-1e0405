// delay_commutator: single-path delay commutator of one radix-4 stage.
//
// The input is one complex sample per accepted clock. Samples are counted in
// blocks of 4*L and each block is read as four quarters; butterfly n of a
// block (n = 0..L-1) takes x[n], x[n+L], x[n+2L] and x[n+3L].
//
// A delay line of 3*L samples holds the last three quarters. While the
// fourth quarter arrives, its taps at 3L, 2L and L together with the live
// input are exactly the four operands of butterfly n = position in the
// quarter; they go to the butterfly for output k = 0 and are loaded into
// four hold registers of L entries each. During quarters 0, 1 and 2 of the
// next block the hold registers circulate once per quarter and offer the
// same operands again for outputs k = 1, 2 and 3. The stage thus emits the
// butterfly outputs in the order k*L + n, one per accepted sample, which is
// the order the next stage needs. Memory is 3L + 4L = 7L samples.
//
// Interface: the state advances when en && in_valid. op_valid marks
// operands of a complete group (false until the first fourth quarter after
// reset). k and n name the butterfly output and butterfly to form.
// Combinational from input to operands. The split into delay line and hold
// registers is this implementation's choice; the single input path,
// delay elements and multiplexer follow the design.
module delay_commutator #(
  parameter int unsigned L = 4,
  parameter int unsigned W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  logic signed [W-1:0]      in_re,
  input  logic signed [W-1:0]      in_im,
  output logic signed [3:0][W-1:0] op_re,
  output logic signed [3:0][W-1:0] op_im,
  output logic                     op_valid,
  output r4sdc_pkg::digit_t        k,
  output r4sdc_pkg::digit_t        n
);
  localparam int unsigned PW = (L > 1) ? $clog2(L) : 1;

  logic [1:0]          quarter;
  logic [PW-1:0]       pos;
  logic                primed;    // one full fourth quarter has been seen
  logic                adv;
  logic signed [W-1:0] dl_re [3*L];   // dl[d-1] = sample delayed by d
  logic signed [W-1:0] dl_im [3*L];
  logic signed [W-1:0] hd_re [4][L];  // hd[q][L-1] is the one offered
  logic signed [W-1:0] hd_im [4][L];
  logic signed [3:0][W-1:0] tap_re, tap_im;

  assign adv = en && in_valid;

  always_comb begin
    tap_re[0] = dl_re[3*L-1];  tap_im[0] = dl_im[3*L-1];
    tap_re[1] = dl_re[2*L-1];  tap_im[1] = dl_im[2*L-1];
    tap_re[2] = dl_re[L-1];    tap_im[2] = dl_im[L-1];
    tap_re[3] = in_re;         tap_im[3] = in_im;
    if (quarter == 2'd3) begin
      op_re = tap_re;
      op_im = tap_im;
      k     = 2'd0;
    end else begin
      for (int q = 0; q < 4; q++) begin
        op_re[q] = hd_re[q][L-1];
        op_im[q] = hd_im[q][L-1];
      end
      k = quarter + 2'd1;
    end
    n        = 2'(pos);
    op_valid = in_valid && (quarter == 2'd3 || primed);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      quarter <= '0;
      pos     <= '0;
      primed  <= 1'b0;
      for (int d = 0; d < 3 * L; d++) begin
        dl_re[d] <= '0;
        dl_im[d] <= '0;
      end
      for (int q = 0; q < 4; q++)
        for (int e = 0; e < L; e++) begin
          hd_re[q][e] <= '0;
          hd_im[q][e] <= '0;
        end
    end else if (adv) begin
      // position counter inside the quarter, then the quarter
      if (32'(pos) == L - 1) begin
        pos     <= '0;
        quarter <= quarter + 2'd1;
      end else begin
        pos <= pos + PW'(1);
      end
      if (quarter == 2'd3) primed <= 1'b1;
      // delay line
      dl_re[0] <= in_re;
      dl_im[0] <= in_im;
      for (int d = 1; d < 3 * L; d++) begin
        dl_re[d] <= dl_re[d-1];
        dl_im[d] <= dl_im[d-1];
      end
      // hold registers: load from the taps in quarter 3, circulate otherwise
      for (int q = 0; q < 4; q++) begin
        hd_re[q][0] <= (quarter == 2'd3) ? tap_re[q] : hd_re[q][L-1];
        hd_im[q][0] <= (quarter == 2'd3) ? tap_im[q] : hd_im[q][L-1];
        for (int e = 1; e < L; e++) begin
          hd_re[q][e] <= hd_re[q][e-1];
          hd_im[q][e] <= hd_im[q][e-1];
        end
      end
    end
  end

endmodule
