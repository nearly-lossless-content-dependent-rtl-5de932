// tb_dct1d_core: runs random vectors through two 1-D cores: a row-stage core
// (9-bit in, 12-bit out) and a column-stage core (12-bit in, 16-bit out,
// thresholds doubled). Input is back to back for most vectors and has gaps
// for some. Every result is compared with the reference model (outputs, mode
// and QP tag, and the classifier/DEBE record). The result registers must
// load on the 9th clock edge after the edge that takes the eighth sample, so
// the testbench takes the result on the 10th. Back-to-back vectors must give
// one result every 8 cycles.
`timescale 1ns/1ps
module tb_dct1d_core;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               x_valid;
  logic signed [8:0]  x1;
  logic signed [11:0] x2;
  mb_mode_e           mb_mode;
  logic [QP_W-1:0]    qp;
  logic signed [11:0] y1 [8];
  logic signed [15:0] y2 [8];
  logic               v1, v2;
  mb_mode_e           m1, m2;
  logic [QP_W-1:0]    q1, q2;
  vec_stat_t          s1, s2;

  dct1d_core dut1 (.clk, .rst_n, .x_valid, .x(x1), .mb_mode, .qp,
    .y(y1), .y_valid(v1), .y_mode(m1), .y_qp(q1), .stat(s1));
  dct1d_core #(.IW(12), .OW(16), .STAGE(2)) dut2 (.clk, .rst_n, .x_valid, .x(x2), .mb_mode, .qp,
    .y(y2), .y_valid(v2), .y_mode(m2), .y_qp(q2), .stat(s2));

  typedef struct { int y [8]; ref_stat_t st; int mode, qp; longint t; } exp_t;
  exp_t q1e [$], q2e [$];

  int checks = 0, failures = 0, n_trunc = 0, n_zero = 0;
  longint cyc = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d %s", cyc, s);
    end
  endtask

  function automatic bit same_stat(vec_stat_t h, ref_stat_t r);
    return h.cls_even == 2'(r.cls_even) && h.cls_odd == 2'(r.cls_odd) &&
           h.w_even == 5'(r.w_even) && h.w_odd == 5'(r.w_odd) &&
           h.n_even == 4'(r.n_even) && h.n_odd == 4'(r.n_odd);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (v1) begin
        exp_t e;
        e = q1e.pop_front();
        for (int k = 0; k < 8; k++) chk(y1[k] == 12'(e.y[k]), $sformatf("row core Y%0d %0d exp %0d", k, y1[k], e.y[k]));
        chk(m1 == mb_mode_e'(e.mode) && q1 == QP_W'(e.qp) && same_stat(s1, e.st), "row core tag/stat");
        chk(cyc == e.t + 10, $sformatf("row core latency %0d", cyc - e.t));
        if (s1.n_odd < s1.w_odd || s1.n_even < s1.w_even) n_trunc++;
        if (s1.n_odd == 0) n_zero++;
      end
      if (v2) begin
        exp_t e;
        e = q2e.pop_front();
        for (int k = 0; k < 8; k++) chk(y2[k] == 16'(e.y[k]), $sformatf("col core Y%0d %0d exp %0d", k, y2[k], e.y[k]));
        chk(m2 == mb_mode_e'(e.mode) && q2 == QP_W'(e.qp) && same_stat(s2, e.st), "col core tag/stat");
      end
    end
  end

  initial begin
    x_valid = 0; x1 = 0; x2 = 0; mb_mode = MB_INTRA; qp = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int a [8], b [8], ya [8], yb [8], mode, q, amp;
      ref_stat_t sa, sb;
      exp_t ea, eb;
      mode = $urandom_range(0, 1);
      q    = $urandom_range(1, 31);
      amp  = 1 << $urandom_range(0, 8);
      foreach (a[i]) begin
        a[i] = $urandom_range(0, 2 * amp) - amp;
        if (a[i] > 255) a[i] = 255;
        b[i] = ($urandom_range(0, 2 * amp) - amp) * 8;
        if (b[i] > 2047) b[i] = 2047;
      end
      ref_1d(a, mode, q, 1, 12, ya, sa);
      ref_1d(b, mode, q, 2, 16, yb, sb);
      for (int i = 0; i < 8; i++) begin
        if (t % 7 == 3 && $urandom_range(0, 2) == 0) begin
          x_valid <= 0;
          @(posedge clk);
        end
        x_valid <= 1;
        x1 <= 9'(a[i]);
        x2 <= 12'(b[i]);
        mb_mode <= mb_mode_e'(mode);
        qp <= QP_W'(q);
        @(posedge clk);
      end
      ea.y = ya; ea.st = sa; ea.mode = mode; ea.qp = q; ea.t = cyc;
      eb.y = yb; eb.st = sb; eb.mode = mode; eb.qp = q; eb.t = cyc;
      q1e.push_back(ea);
      q2e.push_back(eb);
    end
    x_valid <= 0;
    repeat (30) @(posedge clk);
    chk(q1e.size() == 0 && q2e.size() == 0, "results missing");
    chk(n_trunc > 0 && n_zero > 0, "truncation or zeroed AC never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
