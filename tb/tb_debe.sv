// tb_debe: loads four random values of random width and a random bit budget,
// then steps through eight cycles. The effective width must be the largest
// two's complement width of the four values, and the bit count must be
// min(width, budget, 8). Each enabled step must present bit (W-1-step) of
// every value, with the sign flag on the first step. The enable must drop
// after N steps, and the shift must equal W-N.
`timescale 1ns/1ps
module tb_debe;
  import dct_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               load, run;
  logic [3:0]         nmax_in;
  logic signed [12:0] v [4];
  logic [2:0]         step;
  logic [3:0]         bits;
  logic               en, neg;
  logic [4:0]         shamt, w_eff;
  logic [3:0]         n_bits;

  debe #(.VW(13)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", s);
    end
  endtask

  initial begin
    load = 0; run = 0; nmax_in = 0; step = 0;
    foreach (v[i]) v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int w, vals [4], we, nb, nm;
      w  = $urandom_range(1, 13);
      nm = $urandom_range(0, 8);
      foreach (vals[i]) vals[i] = $urandom_range(0, (1 << w) - 1) - (1 << (w - 1));
      we = 1;
      foreach (vals[i]) if (swidth(vals[i]) > we) we = swidth(vals[i]);
      nb = min3(we, nm, 8);
      load <= 1;
      nmax_in <= 4'(nm);
      foreach (v[i]) v[i] <= 13'(vals[i]);
      @(posedge clk);
      load <= 0;
      nmax_in <= 4'($urandom_range(0, 8));   // must not disturb the held budget
      for (int s = 0; s < 8; s++) begin
        run <= 1;
        step <= 3'(s);
        #1;
        @(negedge clk);
        chk(w_eff == 5'(we) && n_bits == 4'(nb) && shamt == 5'((nb == 0) ? 0 : we - nb),
            $sformatf("w %0d n %0d sh %0d, exp %0d %0d", w_eff, n_bits, shamt, we, nb));
        chk(en == (s < nb), $sformatf("en at step %0d of %0d", s, nb));
        if (s < nb) begin
          int p;
          p = we - 1 - s;
          chk(bits == {vals[3][p], vals[2][p], vals[1][p], vals[0][p]} && neg == (s == 0),
              $sformatf("bits at step %0d", s));
        end
        @(posedge clk);
      end
      run <= 0;
    end
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
