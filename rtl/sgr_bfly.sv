// sgr_bfly: selective gated input registers, first-level even/odd butterfly
// and the even/odd registers of one 1-D DCT core.
//
// Samples arrive one per cycle. Only the input register D[sel] is enabled in
// a given cycle, so exactly one of D0..D7 changes while the other seven hold;
// in silicon that enable is a clock gate. When `load` is high the butterfly
// result is captured in the even registers E0..E3 (E_i = D_i + D_7-i) and
// the odd registers O0..O3 (O_i = D_i - D_7-i). They are enabled for that one
// cycle in every eight. A `load` and a new sample may come in the same cycle:
// the E/O registers then take the old D values.
//
// Interface: x/x_valid/sel write D[sel]; load captures E/O; e/o are the
// registered butterfly outputs, IW+1 bits wide.
// Timing: e/o change one clock edge after a cycle with load high.
// The register set and the butterfly follow the document. Clock gating is
// written as register enables, and the reset is this design's choice.
module sgr_bfly #(
  parameter int IW = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic [2:0]           sel,
  input  logic signed [IW-1:0] x,
  input  logic                 load,
  output logic signed [IW:0]   e [4],
  output logic signed [IW:0]   o [4]
);

  logic signed [IW-1:0] d [8];
  logic signed [IW:0]   bf_e [4];
  logic signed [IW:0]   bf_o [4];

  // Selective gated registers D0..D7: one enable per cycle.
  for (genvar i = 0; i < 8; i++) begin : g_d
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                          d[i] <= '0;
      else if (x_valid && sel == 3'(i))    d[i] <= x;
    end
  end

  // First-level even/odd decomposition.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bf_e[i] = (IW+1)'(d[i]) + (IW+1)'(d[7-i]);
      bf_o[i] = (IW+1)'(d[i]) - (IW+1)'(d[7-i]);
    end
  end

  // Even/odd registers, enabled once per eight cycles.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        e[i] <= '0;
        o[i] <= '0;
      end
    end else if (load) begin
      e <= bf_e;
      o <= bf_o;
    end
  end

endmodule
