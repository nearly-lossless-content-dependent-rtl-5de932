// dct2d_top: content-dependent low-power 8x8 2-D DCT (row-column method).
//
// Pixels or prediction residuals enter in raster order, one per cycle. The
// row core (dct1d_core, STAGE 1) turns each 8-sample row into eight
// coefficients. The transpose register array collects the eight rows of a
// block and streams the block out column by column. The column core
// (dct1d_core, STAGE 2, classifier thresholds doubled) transforms each
// column, and the parallel-to-serial register sends the results out one per
// cycle. Both cores are distributed-arithmetic designs whose bit-serial work
// is cut by the classifier (PPA against QP) and by dynamic effective
// bitwidth extraction.
//
// Interface:
//   in_valid/in_data  9-bit signed samples, 64 per block in raster order;
//                     in_valid may drop between samples.
//   in_mode/in_qp     macroblock mode and QP, taken with each block's first
//                     sample.
//   out_valid/out_data  16-bit coefficient Z(v,u) = 8 x the orthonormal 2-D
//                     DCT value (the transform is scaled by 1/a per pass).
//   out_u/out_v       horizontal and vertical frequency of out_data. Output
//                     goes column by column: u = 0..7, and v = 0..7 within
//                     each column.
//   out_mode/out_qp   the block's mode and QP.
//   row_stat/col_stat with row_stat_valid/col_stat_valid: the classifier
//                     and bitwidth decisions of each 1-D vector.
// Timing: one sample per cycle, no stalls. With back-to-back blocks the
// output stream is also one coefficient per cycle. The first coefficient of
// a block is taken on the 29th clock edge after the edge that took the
// block's last sample.
// The pipeline (row core, transpose array, column core, output P2S) follows
// the document. The widths, the port protocol and the ping-pong transpose
// are this design's choices.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int IW = 9,
  parameter int RW = 12,
  parameter int OW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  input  mb_mode_e             in_mode,
  input  logic [QP_W-1:0]      in_qp,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data,
  output logic [2:0]           out_u,
  output logic [2:0]           out_v,
  output mb_mode_e             out_mode,
  output logic [QP_W-1:0]      out_qp,
  output logic                 row_stat_valid,
  output vec_stat_t            row_stat,
  output logic                 col_stat_valid,
  output vec_stat_t            col_stat
);

  // Block-level mode and QP, taken with the first sample of a block.
  logic [5:0]      pix_cnt;
  mb_mode_e        blk_mode;
  logic [QP_W-1:0] blk_qp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt  <= '0;
      blk_mode <= MB_INTRA;
      blk_qp   <= '0;
    end else if (in_valid) begin
      pix_cnt <= pix_cnt + 6'd1;
      if (pix_cnt == 6'd0) begin
        blk_mode <= in_mode;
        blk_qp   <= in_qp;
      end
    end
  end

  // Row pass
  logic signed [RW-1:0] row_y [8];
  logic                 row_valid;
  mb_mode_e             row_mode;
  logic [QP_W-1:0]      row_qp;

  dct1d_core #(.IW(IW), .OW(RW), .STAGE(1)) u_row (
    .clk, .rst_n, .x_valid(in_valid), .x(in_data),
    .mb_mode(blk_mode), .qp(blk_qp),
    .y(row_y), .y_valid(row_valid), .y_mode(row_mode), .y_qp(row_qp),
    .stat(row_stat)
  );
  assign row_stat_valid = row_valid;

  // Transpose register array
  logic                 tr_valid;
  logic signed [RW-1:0] tr_data;
  mb_mode_e             tr_mode;
  logic [QP_W-1:0]      tr_qp;

  transpose_regs #(.RW(RW)) u_tr (
    .clk, .rst_n,
    .wr_valid(row_valid), .wr_row(row_y), .wr_mode(row_mode), .wr_qp(row_qp),
    .rd_valid(tr_valid), .rd_data(tr_data), .rd_col(), .rd_row(),
    .rd_mode(tr_mode), .rd_qp(tr_qp), .wr_bank(), .rd_bank()
  );

  // Column pass
  logic signed [OW-1:0] col_y [8];
  logic                 col_valid;
  mb_mode_e             col_mode;
  logic [QP_W-1:0]      col_qp;
  logic [2:0]           col_idx;

  dct1d_core #(.IW(RW), .OW(OW), .STAGE(2)) u_col (
    .clk, .rst_n, .x_valid(tr_valid), .x(tr_data),
    .mb_mode(tr_mode), .qp(tr_qp),
    .y(col_y), .y_valid(col_valid), .y_mode(col_mode), .y_qp(col_qp),
    .stat(col_stat)
  );
  assign col_stat_valid = col_valid;

  // Index of the column that the column core delivers next.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         col_idx <= '0;
    else if (col_valid) col_idx <= col_idx + 3'd1;
  end

  // Parallel-to-serial output
  localparam int TAGW = 1 + QP_W + 3;
  logic [TAGW-1:0] out_tag;

  p2s #(.OW(OW), .TAGW(TAGW)) u_p2s (
    .clk, .rst_n, .ld(col_valid), .d(col_y), .tag({col_mode, col_qp, col_idx}),
    .q(out_data), .q_valid(out_valid), .q_idx(out_v), .q_tag(out_tag)
  );

  always_comb begin
    out_mode = mb_mode_e'(out_tag[TAGW-1]);
    out_qp   = out_tag[TAGW-2 -: QP_W];
    out_u    = out_tag[2:0];
  end

endmodule
