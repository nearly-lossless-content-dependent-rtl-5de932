// transpose_regs: transpose register array between the row and the column
// 1-D DCT cores.
//
// The row core delivers the eight coefficients of a row in parallel, once
// every eight cycles. The whole row is written into the array in one cycle,
// so each register of a row is written once per block. Two 8x8 banks
// alternate (ping-pong): the row core fills one while the column core reads
// the other. The read side walks the full bank column by column, one element
// per cycle, through a multiplexer (no register changes on a read). When all
// 64 elements are out, the bank is free again. The macroblock mode and QP of
// the block travel with its bank.
//
// Interface: wr_valid/wr_row write the next row of the bank being filled.
// rd_valid/rd_data is the column-major stream. rd_col/rd_row give the
// element's position: rd_col = horizontal frequency, rd_row = image row.
// Timing: a bank can be read from the cycle after its eighth row is written.
// Reading takes 64 cycles, the time the row side needs to fill the other
// bank at one sample per cycle, so neither side ever waits.
// The document gives a register array written a whole row at a time. The
// double buffering and the read order are this design's choices.
module transpose_regs
  import dct_pkg::*;
#(
  parameter int RW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  input  logic signed [RW-1:0] wr_row [8],
  input  mb_mode_e             wr_mode,
  input  logic [QP_W-1:0]      wr_qp,
  output logic                 rd_valid,
  output logic signed [RW-1:0] rd_data,
  output logic [2:0]           rd_col,
  output logic [2:0]           rd_row,
  output mb_mode_e             rd_mode,
  output logic [QP_W-1:0]      rd_qp,
  output logic                 wr_bank,
  output logic                 rd_bank
);

  logic signed [RW-1:0] mem [2][8][8];
  logic [1:0]           full;
  mb_mode_e             tag_mode [2];
  logic [QP_W-1:0]      tag_qp [2];
  logic [2:0]           wr_idx;
  logic                 rd_done;

  // Write side: one whole row per write.
  always_ff @(posedge clk) begin
    if (wr_valid) mem[wr_bank][wr_idx] <= wr_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx <= '0;
      wr_bank <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        tag_mode[b] <= MB_INTRA;
        tag_qp[b]   <= '0;
      end
    end else if (wr_valid) begin
      wr_idx <= wr_idx + 3'd1;
      if (wr_idx == 3'd7) begin
        tag_mode[wr_bank] <= wr_mode;
        tag_qp[wr_bank]   <= wr_qp;
        wr_bank           <= ~wr_bank;
      end
    end
  end

  // Read side: column-major walk of the full bank.
  always_comb begin
    rd_valid = full[rd_bank];
    rd_data  = mem[rd_bank][rd_row][rd_col];
    rd_mode  = tag_mode[rd_bank];
    rd_qp    = tag_qp[rd_bank];
    rd_done  = rd_valid && rd_row == 3'd7 && rd_col == 3'd7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_row  <= '0;
      rd_col  <= '0;
      rd_bank <= 1'b0;
    end else if (rd_valid) begin
      rd_row <= rd_row + 3'd1;
      if (rd_row == 3'd7) rd_col <= rd_col + 3'd1;
      if (rd_done) rd_bank <= ~rd_bank;
    end
  end

  // Bank full flags: set by the last row write, cleared by the last read.
  for (genvar b = 0; b < 2; b++) begin : g_full
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        full[b] <= 1'b0;
      else if (wr_valid && wr_idx == 3'd7 && wr_bank == 1'(b))
        full[b] <= 1'b1;
      else if (rd_done && rd_bank == 1'(b))
        full[b] <= 1'b0;
    end
  end

  // The row side must never write into a bank that is still being read.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> !full[wr_bank])
    else $error("transpose_regs: row written into a full bank");

endmodule
