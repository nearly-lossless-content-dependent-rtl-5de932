// p2s: parallel-to-serial output register.
//
// The column core delivers the eight coefficients of a column together. This
// block holds them and sends them out one per cycle over the next eight
// cycles, index 0 first, with a tag (the column's position and block
// information) held alongside. A new load may come in the cycle that shows
// the last element, so back-to-back columns stream without a gap.
//
// Interface: ld/d/tag load a vector. q/q_valid/q_idx/q_tag are the serial
// output.
// Timing: element k is on q in the k-th cycle after the load edge.
// The document names the block only. Its behaviour here is this design's
// choice.
module p2s #(
  parameter int OW   = 16,
  parameter int TAGW = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld,
  input  logic signed [OW-1:0] d [8],
  input  logic [TAGW-1:0]      tag,
  output logic signed [OW-1:0] q,
  output logic                 q_valid,
  output logic [2:0]           q_idx,
  output logic [TAGW-1:0]      q_tag
);

  logic signed [OW-1:0] buf_q [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) buf_q[k] <= '0;
      q_valid <= 1'b0;
      q_idx   <= '0;
      q_tag   <= '0;
    end else if (ld) begin
      buf_q   <= d;
      q_tag   <= tag;
      q_valid <= 1'b1;
      q_idx   <= '0;
    end else if (q_valid) begin
      q_idx <= q_idx + 3'd1;
      if (q_idx == 3'd7) q_valid <= 1'b0;
    end
  end

  assign q = buf_q[q_idx];

  // A load may only come while idle or with the last element on the output.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    ld |-> (!q_valid || q_idx == 3'd7))
    else $error("p2s: vector loaded before the previous one was sent");

endmodule
