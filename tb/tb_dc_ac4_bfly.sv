// tb_dc_ac4_bfly: random even-register values; DC must be their sum and AC4
// the sum of the outer pair minus the sum of the inner pair.
`timescale 1ns/1ps
module tb_dc_ac4_bfly;
  logic signed [9:0]  e [4];
  logic signed [11:0] dc, ac4;

  dc_ac4_bfly #(.VW(10), .OW(12)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int v [4];
      foreach (v[i]) begin
        v[i] = (t < 4) ? ((t % 2) ? 511 : -512) : $urandom_range(0, 1023) - 512;
        e[i] = 10'(v[i]);
      end
      #1;
      checks += 2;
      if (dc !== 12'(v[0] + v[1] + v[2] + v[3])) failures++;
      if (ac4 !== 12'(v[0] - v[1] - v[2] + v[3])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
