// debe: dynamic effective bitwidth extraction for one group of four RAC
// inputs (E0..E3 for RAC2/6, or O0..O3 for RAC1/3/5/7).
//
// The four butterfly outputs are kept at full width in the E/O registers.
// From them this block finds the effective width W: the smallest two's
// complement width that holds all four values. That is the register width
// less the bits that only repeat the sign. The number of bits the RACs
// process is N = min(W, nmax, MAX_BITS). nmax comes from the classifier, and
// MAX_BITS (8) is the bit-serial budget of one 8-cycle vector period. Bits
// are fed most significant first, one bit position of all four values per
// cycle: bit W-1 (the sign, weighted negative) down to bit W-N. When W > N
// the W-N low bits are dropped; `shamt` = W-N tells the RACs how far to shift
// the result back up. After N steps `en` stays low, which gates the RACs for
// the rest of the period.
//
// Interface: load samples nmax (the value registers are loaded by the same
// pulse elsewhere). step/run come from the core sequencer. bits/en/neg/shamt
// drive the RACs. w_eff/n_bits are exposed for observation.
// Timing: combinational from the value registers and the nmax register.
// The document gives the function: reject sign-extension bits, limit by the
// classifier, take one bit per cycle, and truncate only when the width is
// over eight. Taking the top N bits, MSB first, is this design's choice.
module debe
  import dct_pkg::*;
#(
  parameter int VW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [3:0]           nmax_in,
  input  logic signed [VW-1:0] v [4],
  input  logic                 run,
  input  logic [2:0]           step,
  output logic [3:0]           bits,
  output logic                 en,
  output logic                 neg,
  output logic [4:0]           shamt,
  output logic [4:0]           w_eff,
  output logic [3:0]           n_bits
);

  logic [3:0] nmax;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    nmax <= '0;
    else if (load) nmax <= nmax_in;
  end

  // Effective width of the group: highest bit that differs from its sign,
  // plus the sign bit.
  always_comb begin
    w_eff = 5'd1;
    for (int i = 0; i < 4; i++) begin
      for (int p = 0; p < VW - 1; p++) begin
        if (v[i][p] != v[i][VW-1] && 5'(p + 2) > w_eff) w_eff = 5'(p + 2);
      end
    end
    n_bits = 4'(MAX_BITS);
    if (5'(nmax) < 5'(n_bits)) n_bits = nmax;
    if (w_eff < 5'(n_bits))    n_bits = 4'(w_eff);
  end

  // Bit extraction, one bit position per step.
  logic [4:0]           pos;
  logic signed [VW-1:0] sv;
  always_comb begin
    pos   = w_eff - 5'd1 - 5'(step);
    en    = run && (4'(step) < n_bits);
    neg   = (step == 3'd0);
    shamt = (n_bits == 4'd0) ? 5'd0 : w_eff - 5'(n_bits);
    for (int i = 0; i < 4; i++) begin
      sv      = v[i] >>> pos;
      bits[i] = en && sv[0];
    end
  end

endmodule
