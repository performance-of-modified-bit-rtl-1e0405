// r4sdc_stage: one radix-4 single-path delay commutator (R4SDC) stage.
//
// A delay commutator gathers the four operands of each radix-4 butterfly
// from the serial input, a programmable butterfly forms one of its four
// outputs per accepted sample, and a pipeline register holds the result.
// Because the butterfly computes one output per clock rather than four at
// once, the adders are busy on every clock and the stage keeps one sample
// in and one sample out per clock.
//
// Interface: samples enter on in_re/in_im when in_valid is high and en is
// high; the whole stage, register included, is frozen while en is low.
// out_k and out_n tell which butterfly output (k) of which butterfly (n)
// the output register holds; the output order inside a block of 4*L
// samples is k*L + n. Timing: the first output of a block (k=0, n=0) is
// registered on the clock that accepts sample 3L of that block, so the
// stage latency is 3L accepted samples plus one register.
module r4sdc_stage #(
  parameter int unsigned L    = 4,
  parameter int unsigned IN_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic signed [IN_W+1:0] out_re,
  output logic signed [IN_W+1:0] out_im,
  output r4sdc_pkg::digit_t      out_k,
  output r4sdc_pkg::digit_t      out_n
);
  logic signed [3:0][IN_W-1:0] op_re, op_im;
  logic                        op_valid;
  r4sdc_pkg::digit_t           k, n;
  logic signed [IN_W+1:0]      y_re, y_im;

  delay_commutator #(.L(L), .W(IN_W)) u_comm (
    .clk, .rst_n, .en, .in_valid, .in_re, .in_im,
    .op_re, .op_im, .op_valid, .k, .n
  );

  r4_butterfly #(.W(IN_W)) u_bf (
    .a_re(op_re), .a_im(op_im), .k, .y_re, .y_im
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_k     <= '0;
      out_n     <= '0;
    end else if (en) begin
      out_valid <= op_valid;
      out_re    <= y_re;
      out_im    <= y_im;
      out_k     <= k;
      out_n     <= n;
    end
  end

endmodule
