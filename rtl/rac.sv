// rac: ROM and accumulator of distributed arithmetic. It computes the inner
// product C0*v0 + C1*v1 + C2*v2 + C3*v3 of four variables with four constant
// coefficients, taking the variables one bit position per cycle.
//
// The 4-bit address (bit j of v0..v3) selects one of 16 ROM words. Each word
// is the sum of the coefficients whose address bit is set: 0, C0, C1,
// C0+C1, ... The accumulator runs most significant bit first:
// acc <= 2*acc + ROM, except for the first (sign) bit, whose word is
// subtracted. After N steps the accumulator holds the inner product of the
// top N bits of the variables. The output y shifts it up by `shamt`, the
// low bits that were not processed, and rounds away the COEF_FRAC fractional
// bits, saturating to OW bits. y reflects this cycle's step (acc_next), so a
// sequencer can capture it on the same edge as the last step.
//
// Interface: clr clears the accumulator (priority over en); en performs a
// step; neg marks the sign-bit step. When en is low the accumulator holds,
// which stands for clock gating.
// Timing: one step per clock; y is combinational.
// The ROM contents, the +/- adder and the sign-time control follow the
// document's DA structure. The bit order, the word widths and the rounding
// are this design's choices.
module rac
  import dct_pkg::*;
#(
  parameter int C0    = K_B,
  parameter int C1    = K_D,
  parameter int C2    = K_E,
  parameter int C3    = K_G,
  parameter int OW    = 12,
  parameter int ACC_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic                 neg,
  input  logic [3:0]           addr,
  input  logic [4:0]           shamt,
  output logic signed [OW-1:0] y
);

  typedef logic signed [ACC_W-1:0] acc_t;

  // ROM word for a 4-bit address: the sum of the selected coefficients.
  function automatic acc_t rom_word(input logic [3:0] a);
    acc_t s;
    s = '0;
    if (a[0]) s = s + acc_t'(C0);
    if (a[1]) s = s + acc_t'(C1);
    if (a[2]) s = s + acc_t'(C2);
    if (a[3]) s = s + acc_t'(C3);
    return s;
  endfunction

  acc_t rom [16];
  always_comb begin
    for (int i = 0; i < 16; i++) rom[i] = rom_word(4'(i));
  end

  acc_t acc, acc_next, scaled, rounded;

  always_comb begin
    acc_next = acc;
    if (en) acc_next = (acc <<< 1) + (neg ? -rom[addr] : rom[addr]);
    scaled   = acc_next <<< shamt;
    rounded  = (scaled + acc_t'(1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (rounded > acc_t'((1 <<< (OW - 1)) - 1))
      y = OW'((1 <<< (OW - 1)) - 1);
    else if (rounded < -acc_t'(1 <<< (OW - 1)))
      y = OW'(-(1 <<< (OW - 1)));
    else
      y = OW'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc_next;
  end

endmodule
