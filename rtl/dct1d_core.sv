// dct1d_core: one 1-D 8-point DCT core, used for both the row and the
// column pass of the 2-D transform.
//
// Input samples arrive serially, one per cycle, into the selective gated
// registers D0..D7. After the eighth sample the even/odd butterfly fills
// E0..E3 and O0..O3. Eight outputs follow, all scaled by 1/a:
//  * Y0 and Y4 come from the DC/AC4 butterfly, bit-parallel and exact.
//  * Y2 and Y6 come from two RACs fed by the DEBE unit of E0..E3.
//  * Y1, Y3, Y5 and Y7 come from four RACs fed by the DEBE unit of O0..O3.
// Each DEBE unit takes its bit budget from the advanced input classifier.
// All four odd RACs share one control pair (en/neg), and so do the two even
// RACs. The DA phase takes eight cycles, so the core accepts one sample per
// cycle without stalling.
//
// Interface: x/x_valid are the serial input. mb_mode/qp are sampled with the
// eighth sample of each vector and come back out as y_mode/y_qp with the
// result. y[0..7] is the result in frequency order with a one-cycle y_valid.
// stat records the classifier and DEBE decisions for that vector.
// Timing: y and y_valid are loaded on the 9th clock edge after the edge that
// takes the eighth sample. With back-to-back input, a result comes out
// every 8 cycles.
// STAGE = 2 doubles the classifier thresholds for the column pass.
// The structure follows the document's 1-D core: D/E/O registers, AIC, two
// DEBE units, the DC/AC4 butterfly and six RACs. The widths, the rounding of
// the RAC outputs and the fixed latency are this design's choices.
module dct1d_core
  import dct_pkg::*;
#(
  parameter int          IW            = 9,
  parameter int          OW            = 12,
  parameter int          STAGE         = 1,
  parameter th_set_t     TH_INTRA_EVEN = {8'd2, 8'd1, 8'd1},
  parameter th_set_t     TH_INTRA_ODD  = {8'd4, 8'd2, 8'd1},
  parameter th_set_t     TH_INTER_EVEN = {8'd8, 8'd4, 8'd2},
  parameter th_set_t     TH_INTER_ODD  = {8'd12, 8'd6, 8'd3},
  parameter class_bits_t CLASS_BITS    = {4'd8, 4'd6, 4'd4, 4'd0}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [IW-1:0] x,
  input  mb_mode_e             mb_mode,
  input  logic [QP_W-1:0]      qp,
  output logic signed [OW-1:0] y [8],
  output logic                 y_valid,
  output mb_mode_e             y_mode,
  output logic [QP_W-1:0]      y_qp,
  output vec_stat_t            stat
);

  localparam int VW = IW + 1;

  // Sequencer
  logic [2:0] sel, step;
  logic       first, last, load, run, cap;

  dct1d_ctrl u_ctrl (
    .clk, .rst_n, .x_valid, .sel, .first, .last, .load, .run, .step, .cap
  );

  // Input registers, butterfly, E/O registers
  logic signed [VW-1:0] e [4];
  logic signed [VW-1:0] o [4];

  sgr_bfly #(.IW(IW)) u_sgr (
    .clk, .rst_n, .x_valid, .sel, .x, .load, .e, .o
  );

  // Advanced input classifier
  logic [1:0]      cls_e, cls_o;
  logic [3:0]      nmax_e, nmax_o;
  mb_mode_e        aic_mode;
  logic [QP_W-1:0] aic_qp;

  aic #(
    .IW(IW), .STAGE(STAGE),
    .TH_INTRA_EVEN(TH_INTRA_EVEN), .TH_INTRA_ODD(TH_INTRA_ODD),
    .TH_INTER_EVEN(TH_INTER_EVEN), .TH_INTER_ODD(TH_INTER_ODD),
    .CLASS_BITS(CLASS_BITS)
  ) u_aic (
    .clk, .rst_n, .x_valid, .first, .last, .x, .mb_mode, .qp,
    .cls_even(cls_e), .cls_odd(cls_o), .nmax_even(nmax_e), .nmax_odd(nmax_o),
    .mode_q(aic_mode), .qp_q(aic_qp)
  );

  // Dynamic effective bitwidth extraction, one unit per group
  logic [3:0] bits_e, bits_o;
  logic       en_e, en_o, neg_e, neg_o;
  logic [4:0] sh_e, sh_o, w_e, w_o;
  logic [3:0] n_e, n_o;

  debe #(.VW(VW)) u_debe_even (
    .clk, .rst_n, .load, .nmax_in(nmax_e), .v(e), .run, .step,
    .bits(bits_e), .en(en_e), .neg(neg_e), .shamt(sh_e), .w_eff(w_e), .n_bits(n_e)
  );

  debe #(.VW(VW)) u_debe_odd (
    .clk, .rst_n, .load, .nmax_in(nmax_o), .v(o), .run, .step,
    .bits(bits_o), .en(en_o), .neg(neg_o), .shamt(sh_o), .w_eff(w_o), .n_bits(n_o)
  );

  // DC / AC4 butterfly
  logic signed [OW-1:0] y_dc, y_ac4;

  dc_ac4_bfly #(.VW(VW), .OW(OW)) u_dcac4 (.e, .dc(y_dc), .ac4(y_ac4));

  // RACs
  logic signed [OW-1:0] y_rac [8];

  rac #(.C0( K_C), .C1( K_F), .C2(-K_F), .C3(-K_C), .OW(OW)) u_rac2 (
    .clk, .rst_n, .clr(load), .en(en_e), .neg(neg_e), .addr(bits_e), .shamt(sh_e), .y(y_rac[2]));
  rac #(.C0( K_F), .C1(-K_C), .C2( K_C), .C3(-K_F), .OW(OW)) u_rac6 (
    .clk, .rst_n, .clr(load), .en(en_e), .neg(neg_e), .addr(bits_e), .shamt(sh_e), .y(y_rac[6]));
  rac #(.C0( K_B), .C1( K_D), .C2( K_E), .C3( K_G), .OW(OW)) u_rac1 (
    .clk, .rst_n, .clr(load), .en(en_o), .neg(neg_o), .addr(bits_o), .shamt(sh_o), .y(y_rac[1]));
  rac #(.C0( K_D), .C1(-K_G), .C2(-K_B), .C3(-K_E), .OW(OW)) u_rac3 (
    .clk, .rst_n, .clr(load), .en(en_o), .neg(neg_o), .addr(bits_o), .shamt(sh_o), .y(y_rac[3]));
  rac #(.C0( K_E), .C1(-K_B), .C2( K_G), .C3( K_D), .OW(OW)) u_rac5 (
    .clk, .rst_n, .clr(load), .en(en_o), .neg(neg_o), .addr(bits_o), .shamt(sh_o), .y(y_rac[5]));
  rac #(.C0( K_G), .C1(-K_E), .C2( K_D), .C3(-K_B), .OW(OW)) u_rac7 (
    .clk, .rst_n, .clr(load), .en(en_o), .neg(neg_o), .addr(bits_o), .shamt(sh_o), .y(y_rac[7]));

  assign y_rac[0] = y_dc;
  assign y_rac[4] = y_ac4;

  // Tag of the vector in the DA phase, and the output registers
  mb_mode_e        tag_mode;
  logic [QP_W-1:0] tag_qp;
  vec_stat_t       tag_stat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_mode <= MB_INTRA;
      tag_qp   <= '0;
      tag_stat <= '0;
    end else if (load) begin
      tag_mode          <= aic_mode;
      tag_qp            <= aic_qp;
      tag_stat.cls_even <= cls_e;
      tag_stat.cls_odd  <= cls_o;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) y[k] <= '0;
      y_valid <= 1'b0;
      y_mode  <= MB_INTRA;
      y_qp    <= '0;
      stat    <= '0;
    end else begin
      y_valid <= cap;
      if (cap) begin
        y             <= y_rac;
        y_mode        <= tag_mode;
        y_qp          <= tag_qp;
        stat          <= tag_stat;
        stat.w_even   <= w_e;
        stat.w_odd    <= w_o;
        stat.n_even   <= n_e;
        stat.n_odd    <= n_o;
      end
    end
  end

endmodule
