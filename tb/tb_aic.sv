// tb_aic: feeds random 8-sample vectors (flat to full-range) with random
// mode and QP into the classifier, for stage 1 and stage 2 instances. After
// each vector it compares the class and bit budget of both groups with a PPA
// computed here, against thresholds TH*QP (stage 1) and 2*TH*QP (stage 2).
// The mode/QP tag must come back unchanged.
`timescale 1ns/1ps
module tb_aic;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               x_valid, first, last;
  logic signed [11:0] x;
  mb_mode_e           mb_mode;
  logic [QP_W-1:0]    qp;
  logic [1:0]         ce1, co1, ce2, co2;
  logic [3:0]         ne1, no1, ne2, no2;
  mb_mode_e           m1, m2;
  logic [QP_W-1:0]    q1, q2;

  aic #(.IW(12), .STAGE(1)) dut1 (.clk, .rst_n, .x_valid, .first, .last, .x, .mb_mode, .qp,
    .cls_even(ce1), .cls_odd(co1), .nmax_even(ne1), .nmax_odd(no1), .mode_q(m1), .qp_q(q1));
  aic #(.IW(12), .STAGE(2)) dut2 (.clk, .rst_n, .x_valid, .first, .last, .x, .mb_mode, .qp,
    .cls_even(ce2), .cls_odd(co2), .nmax_even(ne2), .nmax_odd(no2), .mode_q(m2), .qp_q(q2));

  int checks = 0, failures = 0;
  int seen [4];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", s);
    end
  endtask

  initial begin
    x_valid = 0; first = 0; last = 0; x = 0; mb_mode = MB_INTRA; qp = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int v [8], mx, mn, ppa, mode, q, amp, base;
      mode = $urandom_range(0, 1);
      q    = $urandom_range(1, 31);
      amp  = 1 << $urandom_range(0, 10);
      base = $urandom_range(0, 2000) - 1000;
      foreach (v[i]) v[i] = base + $urandom_range(0, amp) - amp / 2;
      mx = v[0]; mn = v[0];
      foreach (v[i]) begin
        if (v[i] > mx) mx = v[i];
        if (v[i] < mn) mn = v[i];
      end
      ppa = mx - mn;
      for (int i = 0; i < 8; i++) begin
        x_valid <= 1;
        first <= (i == 0);
        last <= (i == 7);
        x <= 12'(v[i]);
        mb_mode <= mb_mode_e'(mode);
        qp <= QP_W'(q);
        @(posedge clk);
        if ($urandom_range(0, 5) == 0) begin
          x_valid <= 0;
          @(posedge clk);
        end
      end
      x_valid <= 0;
      @(posedge clk);
      #1;
      for (int st = 1; st <= 2; st++) begin
        int ce, co;
        ce = 0;
        co = 0;
        for (int k = 0; k < 3; k++) begin
          if (ppa >= th_even(mode, k) * q * st) ce++;
          if (ppa >= th_odd(mode, k) * q * st) co++;
        end
        if (st == 1) begin
          chk(ce1 == 2'(ce) && co1 == 2'(co) && ne1 == 4'(class_bits(ce)) && no1 == 4'(class_bits(co)),
              $sformatf("stage1 ppa %0d q %0d mode %0d: %0d/%0d exp %0d/%0d", ppa, q, mode, ce1, co1, ce, co));
          seen[co]++;
        end else begin
          chk(ce2 == 2'(ce) && co2 == 2'(co) && ne2 == 4'(class_bits(ce)) && no2 == 4'(class_bits(co)),
              $sformatf("stage2 ppa %0d q %0d mode %0d", ppa, q, mode));
        end
      end
      chk(m1 == mb_mode_e'(mode) && q1 == QP_W'(q) && m2 == mb_mode_e'(mode) && q2 == QP_W'(q), "tag");
    end
    foreach (seen[c]) chk(seen[c] > 0, $sformatf("class %0d never produced", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
