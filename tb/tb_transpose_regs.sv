// tb_transpose_regs: writes blocks of eight random rows, a row every eight
// cycles (sometimes later), each block with its own mode/QP. The read stream
// must deliver every block column by column (element [r][c] in order c, r)
// with the right position, mode and QP. Both banks must be used, and the
// reader must start the cycle after a block's last row is written.
`timescale 1ns/1ps
module tb_transpose_regs;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               wr_valid, rd_valid, wr_bank, rd_bank;
  logic signed [11:0] wr_row [8];
  mb_mode_e           wr_mode, rd_mode;
  logic [QP_W-1:0]    wr_qp, rd_qp;
  logic signed [11:0] rd_data;
  logic [2:0]         rd_col, rd_row;

  transpose_regs #(.RW(12)) dut (.*);

  typedef struct { int v, r, c, mode, qp; } exp_t;
  exp_t eq [$];
  int checks = 0, failures = 0, banks [2], start_ok = 0;
  longint cyc = 0, full_cyc = -1;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d %s", cyc, s);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (rd_valid) begin
        exp_t e;
        e = eq.pop_front();
        if (e.r == 0 && e.c == 0) begin
          chk(cyc == full_cyc + 1, "reader start");
          banks[rd_bank]++;
        end
        chk(rd_data == 12'(e.v) && rd_row == 3'(e.r) && rd_col == 3'(e.c) &&
            rd_mode == mb_mode_e'(e.mode) && rd_qp == QP_W'(e.qp),
            $sformatf("read r%0d c%0d: %0d exp %0d", e.r, e.c, rd_data, e.v));
      end
    end
  end

  initial begin
    int blk [8][8], mode, q;
    wr_valid = 0; wr_mode = MB_INTRA; wr_qp = 0;
    foreach (wr_row[i]) wr_row[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      mode = $urandom_range(0, 1);
      q = $urandom_range(1, 31);
      foreach (blk[r, c]) blk[r][c] = $urandom_range(0, 4095) - 2048;
      for (int c = 0; c < 8; c++)
        for (int r = 0; r < 8; r++) eq.push_back('{v: blk[r][c], r: r, c: c, mode: mode, qp: q});
      for (int r = 0; r < 8; r++) begin
        wr_valid <= 1;
        for (int c = 0; c < 8; c++) wr_row[c] <= 12'(blk[r][c]);
        wr_mode <= mb_mode_e'(mode);
        wr_qp <= QP_W'(q);
        @(posedge clk);
        if (r == 7) full_cyc = cyc;
        wr_valid <= 0;
        repeat (7 + ((b % 4 == 1) ? $urandom_range(0, 5) : 0)) @(posedge clk);
      end
    end
    repeat (80) @(posedge clk);
    chk(eq.size() == 0, "elements never read");
    chk(banks[0] > 0 && banks[1] > 0, "ping-pong banks not both used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
