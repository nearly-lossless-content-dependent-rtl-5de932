// aic: advanced input classifier of one 1-D DCT core.
//
// While the eight samples of an input vector arrive, the block tracks their
// maximum and minimum. With the eighth sample it forms the peak-to-peak
// amplitude PPA = max - min and compares it with three thresholds per
// coefficient group. A threshold is TH * QP for the first (row) stage and
// 2 * TH * QP for the second (column) stage. There is one threshold set for
// intra and one for inter macroblocks, and in each set one table for the
// even RACs (RAC2/6) and one shared by the odd RACs (RAC1/3/5/7). The number
// of thresholds the PPA reaches is the class, 0..3. CLASS_BITS maps the
// class to the largest number of bits the RACs of that group may process.
// Class 0 allows none, so those AC outputs come out as zero.
//
// Interface: x_valid/first/last mark the samples of a vector. mb_mode and qp
// are sampled with the last sample. Outputs are registered on the last
// sample and hold until the next vector ends. mode_q/qp_q pass the sampled
// mode and QP on as a tag.
// Timing: results are valid one edge after the cycle of the last sample.
// From the document: PPA as the criterion, four classes, separate intra and
// inter sets, thresholds that scale with QP, a doubled second stage, and one
// shared setting for the odd RACs. It gives no threshold values, so the
// default tables and bits per class are this design's choices. The intra
// tables were lowered until simulated intra content lost under 0.1 dB PSNR
// after H.263 quantisation at QP 6..12.
module aic
  import dct_pkg::*;
#(
  parameter int          IW            = 9,
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
  input  logic                 first,
  input  logic                 last,
  input  logic signed [IW-1:0] x,
  input  mb_mode_e             mb_mode,
  input  logic [QP_W-1:0]      qp,
  output logic [1:0]           cls_even,
  output logic [1:0]           cls_odd,
  output logic [3:0]           nmax_even,
  output logic [3:0]           nmax_odd,
  output mb_mode_e             mode_q,
  output logic [QP_W-1:0]      qp_q
);

  localparam int TW = (IW + 1 > 8 + QP_W + 1) ? IW + 1 : 8 + QP_W + 1;

  logic signed [IW-1:0] mx, mn, mx_n, mn_n;
  logic        [IW:0]   ppa;
  logic        [TW-1:0] thr_e [3];
  logic        [TW-1:0] thr_o [3];
  logic        [1:0]    ce, co;
  th_set_t              th_e, th_o;

  // Running peak values of the current vector.
  always_comb begin
    mx_n = (first || x > mx) ? x : mx;
    mn_n = (first || x < mn) ? x : mn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0;
      mn <= '0;
    end else if (x_valid) begin
      mx <= mx_n;
      mn <= mn_n;
    end
  end

  // Thresholds as a function of mode, QP and stage.
  always_comb begin
    th_e = (mb_mode == MB_INTRA) ? TH_INTRA_EVEN : TH_INTER_EVEN;
    th_o = (mb_mode == MB_INTRA) ? TH_INTRA_ODD  : TH_INTER_ODD;
    for (int k = 0; k < 3; k++) begin
      thr_e[k] = (TW'(th_e[k]) * TW'(qp)) << (STAGE - 1);
      thr_o[k] = (TW'(th_o[k]) * TW'(qp)) << (STAGE - 1);
    end
    ppa = (IW+1)'((IW+1)'(mx_n) - (IW+1)'(mn_n));
    ce = '0;
    co = '0;
    for (int k = 0; k < 3; k++) begin
      if (TW'(ppa) >= thr_e[k]) ce = ce + 2'd1;
      if (TW'(ppa) >= thr_o[k]) co = co + 2'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cls_even  <= '0;
      cls_odd   <= '0;
      nmax_even <= '0;
      nmax_odd  <= '0;
      mode_q    <= MB_INTRA;
      qp_q      <= '0;
    end else if (x_valid && last) begin
      cls_even  <= ce;
      cls_odd   <= co;
      nmax_even <= CLASS_BITS[ce];
      nmax_odd  <= CLASS_BITS[co];
      mode_q    <= mb_mode;
      qp_q      <= qp;
    end
  end

endmodule
