// tb_quality: quality and computation workload at QP 6, 8, 10 and 12, in
// intra and inter mode, on generated content. Each frame is 16 blocks: a
// smooth shaded area, an edge, fine texture and a noisy area for intra; for
// inter, the residual of a slightly moved copy of the same content.
// For every block, the design's coefficients and a floating-point DCT are
// both quantised and dequantised as in H.263 (intra: DC step 8, AC level =
// |F|/(2QP); inter: level = (|F| - QP/2)/(2QP)), inverse transformed in
// floating point and compared with the input. The test reports the PSNR
// of both paths and their difference (the quality drop), and the share of
// RAC bit-cycles used out of eight per RAC vector (the computation cost).
// Every output is also checked against the reference model, and the
// quality drop must stay under 0.5 dB for each QP and mode.
`timescale 1ns/1ps
module tb_quality;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NFRAME = 4;   // frames of 16 blocks per QP and mode

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
  int hw [8][8];
  int nout = 0;
  longint bits_used = 0, bits_full = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      hw[out_v][out_u] = out_data;
      nout++;
    end
    if (rst_n && row_stat_valid) begin
      bits_used += 2 * row_stat.n_even + 4 * row_stat.n_odd;
      bits_full += 6 * 8;
    end
    if (rst_n && col_stat_valid) begin
      bits_used += 2 * col_stat.n_even + 4 * col_stat.n_odd;
      bits_full += 6 * 8;
    end
  end

  function automatic int sgn_div(real v, real d);
    return (v >= 0.0) ? int'($floor(v / d)) : -int'($floor(-v / d));
  endfunction

  // Quantise and dequantise one coefficient, H.263 style. f is orthonormal.
  function automatic real qdq(real f, int u, int v, int qp, int intra);
    int lv;
    real a;
    if (intra && u == 0 && v == 0) begin
      lv = int'($floor(f / 8.0 + 0.5));
      return lv * 8.0;
    end
    a = (f < 0.0) ? -f : f;
    if (intra) lv = int'($floor(a / (2.0 * qp)));
    else       lv = (a < qp / 2.0) ? 0 : int'($floor((a - qp / 2.0) / (2.0 * qp)));
    if (lv == 0) return 0.0;
    a = qp * (2.0 * lv + 1.0) - ((qp % 2 == 0) ? 1.0 : 0.0);
    return (f < 0.0) ? -a : a;
  endfunction

  function automatic real sqerr(real c [8][8], int blk [8][8]);
    real s = 0.0, r, cu, cv, e;
    for (int yy = 0; yy < 8; yy++)
      for (int xx = 0; xx < 8; xx++) begin
        r = 0.0;
        for (int v = 0; v < 8; v++)
          for (int u = 0; u < 8; u++) begin
            cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
            r += cu * cv / 4.0 * c[v][u] * $cos((2.0 * xx + 1.0) * u * 3.14159265358979 / 16.0)
                                         * $cos((2.0 * yy + 1.0) * v * 3.14159265358979 / 16.0);
          end
        e = r - blk[yy][xx];
        s += e * e;
      end
    return s;
  endfunction

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Generated picture content at pixel (x, y) of a 32x32 frame, frame n.
  function automatic int pic(int x, int y, int n);
    int v;
    if (x < 16 && y < 16)      v = 60 + 3 * x + 2 * y + n;                          // shading
    else if (x >= 16 && y < 16) v = ((x + y + n) % 16 < 8) ? 200 : 40;              // edges
    else if (x < 16)            v = 128 + int'(40.0 * $sin(x * 1.3 + n) * $cos(y * 0.9)); // texture
    else                        v = 110 + $urandom_range(0, 30);                     // noise
    return clip(v, 0, 255);
  endfunction

  initial begin
    int qps [4] = '{6, 8, 10, 12};
    int blk [8][8], z [8][8], y [8], r [8][8], x [8];
    real cf [8][8], ch [8][8];
    real se_f, se_h, psnr_f, psnr_h;
    ref_stat_t st;
    int nblk;
    in_valid = 0; in_data = 0; in_mode = MB_INTRA; in_qp = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int mode = 0; mode < 2; mode++) begin
      for (int qi = 0; qi < 4; qi++) begin
        se_f = 0.0;
        se_h = 0.0;
        nblk = 0;
        bits_used = 0;
        bits_full = 0;
        for (int n = 0; n < NFRAME; n++)
          for (int by = 0; by < 4; by++)
            for (int bx = 0; bx < 4; bx++) begin
              for (int yy = 0; yy < 8; yy++)
                for (int xx = 0; xx < 8; xx++) begin
                  int p;
                  p = pic(bx * 8 + xx, by * 8 + yy, n);
                  if (mode == 1) p = p - pic(bx * 8 + xx + 1, by * 8 + yy, n);
                  blk[yy][xx] = p;
                end
              // reference model
              for (int yy = 0; yy < 8; yy++) begin
                for (int i = 0; i < 8; i++) x[i] = blk[yy][i];
                ref_1d(x, mode, qps[qi], 1, 12, y, st);
                for (int i = 0; i < 8; i++) r[yy][i] = y[i];
              end
              for (int u = 0; u < 8; u++) begin
                for (int i = 0; i < 8; i++) x[i] = r[i][u];
                ref_1d(x, mode, qps[qi], 2, 16, y, st);
                for (int v = 0; v < 8; v++) z[v][u] = y[v];
              end
              nout = 0;
              for (int p = 0; p < 64; p++) begin
                in_valid <= 1;
                in_data <= 9'(blk[p / 8][p % 8]);
                in_mode <= mb_mode_e'(mode);
                in_qp <= QP_W'(qps[qi]);
                @(posedge clk);
              end
              in_valid <= 0;
              while (nout < 64) @(posedge clk);
              for (int v = 0; v < 8; v++)
                for (int u = 0; u < 8; u++) begin
                  checks++;
                  if (hw[v][u] != z[v][u]) failures++;
                  cf[v][u] = qdq(fdct8(blk, v, u) / 8.0, u, v, qps[qi], mode == 0);
                  ch[v][u] = qdq(real'(hw[v][u]) / 8.0, u, v, qps[qi], mode == 0);
                end
              se_f += sqerr(cf, blk);
              se_h += sqerr(ch, blk);
              nblk++;
            end
        psnr_f = 10.0 * $log10(255.0 * 255.0 * nblk * 64.0 / se_f);
        psnr_h = 10.0 * $log10(255.0 * 255.0 * nblk * 64.0 / se_h);
        $display("%s QP=%0d: PSNR float %6.2f dB, design %6.2f dB, drop %5.3f dB, RAC bit-cycles used %5.3f",
                 mode ? "inter" : "intra", qps[qi], psnr_f, psnr_h, psnr_f - psnr_h,
                 real'(bits_used) / real'(bits_full));
        checks++;
        if (psnr_f - psnr_h > 0.5) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 4 * NFRAME * 16 * 200 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
