// r4sdc_fft16: 16-point radix-4 pipelined FFT with single-path delay
// commutators and a multiplierless twiddle multiplier.
//
// Data path (one complex sample per clock, decimation in frequency):
//   input -> stage 1 (R4SDC, butterfly span L=4)
//         -> twiddle rotation by W16^(n*k) (shift/add, 0.707 by the
//            modified bit parallel multiplier)
//         -> stage 2 (R4SDC, span L=1) -> output
// Stage 1 splits the 16-point DFT into four 4-point DFTs, stage 2 computes
// them. Frames are taken back to back: sample 16*f + i of the input stream
// is x[i] of frame f, counting from the first sample after reset.
//
// Interface: real_in/imag_in are DATA_W-bit two's complement integers,
// accepted when in_valid is high. The pipeline is data driven: it advances
// only on clocks with in_valid high, so a frame's bins come out while the
// following samples are fed in (feed zeros or the next frame to flush).
// real_out/imag_out are the unscaled DFT sums, DATA_W+5 bits, valid while
// out_valid is high; out_bin is the bin index k. Bins come in radix-4
// digit-reversed order 0,4,8,12,1,5,9,13,2,...,15.
// Timing: bin slot 0 of a frame is on the output right after the clock that
// accepts sample 17 of that frame's stream (LATENCY = 17 accepted samples),
// and with in_valid held high one bin leaves per clock.
// Reset (rst_n) is synchronous and active low. The two-stage R4SDC structure, the
// commutator/multiplexer/adder arrangement and the 0.707 multiplier follow
// the design; word widths, handshake, output order and reset are this
// implementation's choices.
module r4sdc_fft16 #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] real_in,
  input  logic signed [DATA_W-1:0] imag_in,
  output logic                     out_valid,
  output logic signed [DATA_W+4:0] real_out,
  output logic signed [DATA_W+4:0] imag_out,
  output r4sdc_pkg::bin_t          out_bin
);
  localparam int unsigned W1 = DATA_W + 2;   // after stage 1
  localparam int unsigned W2 = DATA_W + 3;   // after the twiddle rotation

  logic                 en;
  logic                 s1_valid, tw_valid, s2_valid;
  logic signed [W1-1:0] s1_re, s1_im;
  r4sdc_pkg::digit_t    s1_k, s1_n;
  logic signed [W2-1:0] tw_re, tw_im;
  r4sdc_pkg::digit_t    s2_k, s2_n;
  logic                 fresh;     // the output registers moved last clock
  r4sdc_pkg::bin_t      slot;

  assign en = in_valid;

  r4sdc_stage #(.L(r4sdc_pkg::L_STAGE1), .IN_W(DATA_W)) u_stage1 (
    .clk, .rst_n, .en, .in_valid,
    .in_re(real_in), .in_im(imag_in),
    .out_valid(s1_valid), .out_re(s1_re), .out_im(s1_im),
    .out_k(s1_k), .out_n(s1_n)
  );

  twiddle_mult #(.IN_W(W1)) u_twiddle (
    .clk, .rst_n, .en, .in_valid(s1_valid),
    .in_re(s1_re), .in_im(s1_im), .k(s1_k), .n(s1_n),
    .out_valid(tw_valid), .out_re(tw_re), .out_im(tw_im)
  );

  r4sdc_stage #(.L(r4sdc_pkg::L_STAGE2), .IN_W(W2)) u_stage2 (
    .clk, .rst_n, .en, .in_valid(tw_valid),
    .in_re(tw_re), .in_im(tw_im),
    .out_valid(s2_valid), .out_re(real_out), .out_im(imag_out),
    .out_k(s2_k), .out_n(s2_n)
  );

  // Output slot counter: counts bins leaving, mapped to bin numbers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fresh <= 1'b0;
      slot  <= '0;
    end else begin
      fresh <= en;
      if (out_valid) slot <= slot + 4'd1;
    end
  end

  assign out_valid = s2_valid && fresh;
  assign out_bin   = r4sdc_pkg::slot_to_bin(slot);

  // The slot counter and stage 2 agree on the 4-point DFT output index.
  always_comb
    if (rst_n && out_valid) assert (s2_k == slot[1:0] && s2_n == 2'd0);

endmodule
