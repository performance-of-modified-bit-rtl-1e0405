// csla: carry-select adder/subtractor.
//
// The operands are cut into blocks of BLK bits. Each block adds its slice
// twice, once assuming a carry-in of 0 and once of 1; the carry arriving from
// the block below only selects between the two ready results, so the carry
// travels through one multiplexer per block instead of BLK full adders.
// Subtraction is a + ~b + 1, the +1 entering as the carry into block 0.
//
// Interface: s = a + b (sub = 0) or a - b (sub = 1), modulo 2^W. Purely
// combinational. The use of carry-select adders for the butterfly additions
// follows the design; the block size and the add/subtract control are this
// implementation's choice.
module csla #(
  parameter int unsigned W   = 18,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [W-1:0] bx;
  logic [NB:0]  c;

  assign bx   = sub ? ~b : b;
  assign c[0] = sub;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    localparam int unsigned LO = i * BLK;
    localparam int unsigned HI = (LO + BLK > W) ? W - 1 : LO + BLK - 1;
    localparam int unsigned BW = HI - LO + 1;
    logic [BW:0] s0, s1;   // {carry-out, sum} for carry-in 0 and 1
    assign s0 = {1'b0, a[HI:LO]} + {1'b0, bx[HI:LO]};
    assign s1 = {1'b0, a[HI:LO]} + {1'b0, bx[HI:LO]} + (BW + 1)'(1);
    assign s[HI:LO] = c[i] ? s1[BW-1:0] : s0[BW-1:0];
    assign c[i+1]   = c[i] ? s1[BW]     : s0[BW];
  end

endmodule
