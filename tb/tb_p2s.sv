// tb_p2s: loads random 8-element vectors with random tags, back to back
// (every eight cycles) and with idle gaps. Each vector must come out one
// element per cycle, in index order, starting the cycle after its load,
// with its tag.
`timescale 1ns/1ps
module tb_p2s;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               ld, q_valid;
  logic signed [15:0] d [8];
  logic [8:0]         tag, q_tag;
  logic signed [15:0] q;
  logic [2:0]         q_idx;

  p2s #(.OW(16), .TAGW(9)) dut (.*);

  typedef struct { int v, idx, tag; longint t; } exp_t;
  exp_t eq [$];
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint ld_q [$];
  longint cur_ld = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (ld) ld_q.push_back(cyc);
      if (q_valid) begin
        exp_t e;
        e = eq.pop_front();
        if (q_idx == 3'd0) cur_ld = ld_q.pop_front();
        e.t = cur_ld;
        checks++;
        if (!(q == 16'(e.v) && q_idx == 3'(e.idx) && q_tag == 9'(e.tag) && cyc == e.t + 1 + e.idx)) begin
          failures++;
          if (failures < 10) $display("FAIL @%0d q=%0d idx=%0d exp %0d %0d", cyc, q, q_idx, e.v, e.idx);
        end
      end
    end
  end

  initial begin
    ld = 0; tag = 0;
    foreach (d[i]) d[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int tg;
      tg = $urandom_range(0, 511);
      ld <= 1;
      tag <= 9'(tg);
      for (int k = 0; k < 8; k++) begin
        int v;
        v = $urandom_range(0, 65535) - 32768;
        d[k] <= 16'(v);
        eq.push_back('{v: v, idx: k, tag: tg, t: 0});
      end
      @(posedge clk);
      ld <= 0;
      repeat (7 + ((n % 3 == 2) ? $urandom_range(1, 4) : 0)) @(posedge clk);
    end
    repeat (12) @(posedge clk);
    checks++;
    if (eq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
