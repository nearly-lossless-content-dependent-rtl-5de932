// tb_dct2d_top: end-to-end test of the 2-D DCT at its default sizes.
//
// Streams blocks of several kinds through the design: flat, smooth and
// textured intra blocks, and small, medium and large inter residuals, with
// QP from 1 to 31, sometimes back to back and sometimes with gaps in the
// input. Every output coefficient is compared with the reference model,
// along with its position, mode and QP. Each row and column vector's class,
// effective width and bit count are compared too. Blocks whose vectors all
// ran at full precision are also compared with a floating-point DCT. The
// test checks throughput (one coefficient per cycle for back-to-back
// blocks) and the latency from a block's last sample to its first output
// (29 clock edges). It counts how often each mechanism happened: every class in
// both stages and both groups, truncation by the 8-bit budget, truncation
// set by the classifier, early RAC shut-off, input gaps, both transpose
// banks, both modes. A mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_dct2d_top;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NBLK = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic signed [8:0]   in_data;
  mb_mode_e            in_mode;
  logic [QP_W-1:0]     in_qp;
  logic                out_valid;
  logic signed [15:0]  out_data;
  logic [2:0]          out_u, out_v;
  mb_mode_e            out_mode;
  logic [QP_W-1:0]     out_qp;
  logic                row_stat_valid, col_stat_valid;
  vec_stat_t           row_stat, col_stat;

  dct2d_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int u, v, val, mode, qp, blk, exact; real fval; } exp_t;
  exp_t      exp_q [$];
  ref_stat_t rs_q [$];
  ref_stat_t cs_q [$];

  // Mechanism counters
  int n_cls_row_e [4], n_cls_row_o [4], n_cls_col_e [4], n_cls_col_o [4];
  int n_trunc_budget = 0, n_trunc_aic = 0, n_early_off = 0, n_gap = 0;
  int n_bank1 = 0, n_intra = 0, n_inter = 0, n_exact_blk = 0, n_b2b = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic void note_stat(ref_stat_t s, bit col);
    if (!col) begin
      n_cls_row_e[s.cls_even]++;
      n_cls_row_o[s.cls_odd]++;
    end else begin
      n_cls_col_e[s.cls_even]++;
      n_cls_col_o[s.cls_odd]++;
    end
    if ((s.n_even == 8 && s.w_even > 8) || (s.n_odd == 8 && s.w_odd > 8)) n_trunc_budget++;
    if ((s.n_even > 0 && s.n_even < 8 && s.n_even < s.w_even) ||
        (s.n_odd > 0 && s.n_odd < 8 && s.n_odd < s.w_odd)) n_trunc_aic++;
    if (s.n_even < 8 || s.n_odd < 8) n_early_off++;
  endfunction

  // Build the expected results of one block.
  function automatic void model_block(int blk [8][8], int mode, int qp, int id);
    int        r [8][8];
    int        x [8], y [8];
    ref_stat_t st;
    int        z [8][8];
    bit        exact = 1'b1;
    for (int yy = 0; yy < 8; yy++) begin
      for (int i = 0; i < 8; i++) x[i] = blk[yy][i];
      ref_1d(x, mode, qp, 1, 12, y, st);
      rs_q.push_back(st);
      if (st.n_even != st.w_even || st.n_odd != st.w_odd) exact = 1'b0;
      for (int i = 0; i < 8; i++) r[yy][i] = y[i];
    end
    for (int u = 0; u < 8; u++) begin
      for (int i = 0; i < 8; i++) x[i] = r[i][u];
      ref_1d(x, mode, qp, 2, 16, y, st);
      cs_q.push_back(st);
      if (st.n_even != st.w_even || st.n_odd != st.w_odd) exact = 1'b0;
      for (int v = 0; v < 8; v++) z[v][u] = y[v];
    end
    if (exact) n_exact_blk++;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++)
        exp_q.push_back('{u: u, v: v, val: z[v][u], mode: mode, qp: qp, blk: id,
                          exact: exact, fval: fdct8(blk, v, u)});
  endfunction

  // Output monitor
  longint last_in_cyc [$];
  longint prev_out_cyc = -10;
  int     run_len = 0, max_run = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        check(1'b0, "output with nothing expected");
      end else begin
        e = exp_q.pop_front();
        check(out_data == 16'(e.val) && out_u == 3'(e.u) && out_v == 3'(e.v) &&
              out_mode == mb_mode_e'(e.mode) && out_qp == QP_W'(e.qp),
              $sformatf("blk %0d (u%0d,v%0d): got %0d u%0d v%0d, exp %0d",
                        e.blk, e.u, e.v, out_data, out_u, out_v, e.val));
        if (e.exact) begin
          real d;
          d = real'(out_data) - e.fval;
          check(d < 4.0 && d > -4.0,
                $sformatf("blk %0d (u%0d,v%0d): %0d far from float %f", e.blk, e.u, e.v, out_data, e.fval));
        end
        if (e.u == 0 && e.v == 0) begin
          longint t;
          t = last_in_cyc.pop_front();
          check(cyc - t == 29, $sformatf("latency %0d, expected 29", cyc - t));
        end
      end
      run_len = (prev_out_cyc == cyc - 1) ? run_len + 1 : 1;
      if (run_len > max_run) max_run = run_len;
      prev_out_cyc = cyc;
    end
  end

  // Stat monitors
  always @(posedge clk) begin
    if (rst_n && row_stat_valid) begin
      ref_stat_t s;
      s = rs_q.pop_front();
      check(row_stat.cls_even == 2'(s.cls_even) && row_stat.cls_odd == 2'(s.cls_odd) &&
            row_stat.w_even == 5'(s.w_even) && row_stat.w_odd == 5'(s.w_odd) &&
            row_stat.n_even == 4'(s.n_even) && row_stat.n_odd == 4'(s.n_odd),
            "row vector classifier/DEBE decision");
      note_stat(s, 1'b0);
    end
    if (rst_n && col_stat_valid) begin
      ref_stat_t s;
      s = cs_q.pop_front();
      check(col_stat.cls_even == 2'(s.cls_even) && col_stat.cls_odd == 2'(s.cls_odd) &&
            col_stat.w_even == 5'(s.w_even) && col_stat.w_odd == 5'(s.w_odd) &&
            col_stat.n_even == 4'(s.n_even) && col_stat.n_odd == 4'(s.n_odd),
            "column vector classifier/DEBE decision");
      note_stat(s, 1'b1);
    end
    if (rst_n && dut.u_tr.wr_bank) n_bank1++;
  end

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Stimulus
  initial begin
    int blk [8][8];
    int kind, mode, qp, base, gx, gy, amp;
    bit gaps;
    in_valid = 1'b0;
    in_data  = '0;
    in_mode  = MB_INTRA;
    in_qp    = 5'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      kind = (b < 8) ? b % 8 : $urandom_range(0, 7);
      qp   = $urandom_range(1, 31);
      base = $urandom_range(16, 239);
      gx   = $urandom_range(0, 12) - 6;
      gy   = $urandom_range(0, 12) - 6;
      case (kind)
        0, 1, 2, 3: mode = 0;
        default:    mode = 1;
      endcase
      if (kind == 4) qp = $urandom_range(1, 2);
      if (kind == 7) qp = $urandom_range(1, 4);
      for (int yy = 0; yy < 8; yy++)
        for (int xx = 0; xx < 8; xx++) begin
          case (kind)
            0: blk[yy][xx] = base + $urandom_range(0, 1);                            // flat
            1: blk[yy][xx] = clip(base + gx * xx + gy * yy, 0, 255);                 // smooth
            2: blk[yy][xx] = $urandom_range(0, 255);                                 // texture
            3: blk[yy][xx] = clip(base + 3 * gx * xx + $urandom_range(0, 20), 0, 255);
            4: blk[yy][xx] = $urandom_range(0, 16) - 8;                              // small residual
            5: blk[yy][xx] = $urandom_range(0, 80) - 40;                             // medium residual
            6: blk[yy][xx] = $urandom_range(0, 510) - 255;                           // large residual
            default: blk[yy][xx] = (xx < 4) ? $urandom_range(0, 6) : -$urandom_range(0, 6);
          endcase
        end
      if (mode == 0) n_intra++; else n_inter++;
      model_block(blk, mode, qp, b);
      gaps = (b % 5 == 3);
      if (!gaps) n_b2b++;
      for (int p = 0; p < 64; p++) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          n_gap++;
          repeat ($urandom_range(1, 3)) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= 9'(blk[p / 8][p % 8]);
        in_mode  <= mb_mode_e'(mode);
        in_qp    <= QP_W'(qp);
        @(posedge clk);
        if (p == 63) last_in_cyc.push_back(cyc);
      end
    end
    in_valid <= 1'b0;
    repeat (200) @(posedge clk);

    check(exp_q.size() == 0, $sformatf("%0d outputs never came", exp_q.size()));
    // Back-to-back blocks must stream at one coefficient per cycle.
    check(max_run >= 64 * 4, $sformatf("longest output run %0d", max_run));
    for (int c = 0; c < 4; c++) begin
      check(n_cls_row_e[c] > 0, $sformatf("row even class %0d never seen", c));
      check(n_cls_row_o[c] > 0, $sformatf("row odd class %0d never seen", c));
      check(n_cls_col_e[c] > 0, $sformatf("column even class %0d never seen", c));
      check(n_cls_col_o[c] > 0, $sformatf("column odd class %0d never seen", c));
    end
    check(n_trunc_budget > 0, "no truncation by the 8-bit budget");
    check(n_trunc_aic > 0, "no truncation set by the classifier");
    check(n_early_off > 0, "no early RAC shut-off");
    check(n_gap > 0, "no input gaps");
    check(n_bank1 > 0, "second transpose bank never used");
    check(n_intra > 0 && n_inter > 0, "both modes not exercised");
    check(n_exact_blk > 0, "no full-precision block for the float comparison");
    $display("mechanisms: row cls even %p odd %p, col cls even %p odd %p",
             n_cls_row_e, n_cls_row_o, n_cls_col_e, n_cls_col_o);
    $display("mechanisms: budget-trunc %0d aic-trunc %0d early-off %0d gaps %0d exact-blocks %0d max-run %0d",
             n_trunc_budget, n_trunc_aic, n_early_off, n_gap, n_exact_blk, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (NBLK * 64 * 3 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
