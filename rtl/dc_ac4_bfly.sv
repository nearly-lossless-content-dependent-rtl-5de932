// dc_ac4_bfly: bit-parallel DC and AC4 outputs of a 1-D core.
//
// Once the DCT matrix is scaled by 1/a, the DC and AC4 rows are all +1/-1:
// DC = E0+E1+E2+E3 and AC4 = E0-E1-E2+E3. A second even/odd split of the even
// terms gives them with four adders: s03 = E0+E3, s12 = E1+E2, DC = s03+s12,
// AC4 = s03-s12. These two frequencies are therefore exact: no RAC, no
// bit-serial truncation.
//
// Interface: e[0..3] are the even registers (VW bits); dc/ac4 come out
// sign-extended to OW bits (OW >= VW+2).
// Timing: purely combinational.
// The structure follows the document. The widths are this design's choice.
module dc_ac4_bfly #(
  parameter int VW = 10,
  parameter int OW = 12
) (
  input  logic signed [VW-1:0] e [4],
  output logic signed [OW-1:0] dc,
  output logic signed [OW-1:0] ac4
);

  logic signed [VW:0] s03, s12;

  always_comb begin
    s03 = (VW+1)'(e[0]) + (VW+1)'(e[3]);
    s12 = (VW+1)'(e[1]) + (VW+1)'(e[2]);
    dc  = OW'(s03) + OW'(s12);
    ac4 = OW'(s03) - OW'(s12);
  end

endmodule
