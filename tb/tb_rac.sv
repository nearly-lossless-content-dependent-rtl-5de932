// tb_rac: drives the ROM-and-accumulator bit-serially, MSB first, with four
// random values of W bits, processing N <= W of their top bits. The result
// must be the inner product of the coefficients with the values truncated
// to those N bits, shifted back and rounded (coefficients have 12
// fractional bits). The test also checks that the accumulator holds while
// `en` is low and that `clr` clears it.
`timescale 1ns/1ps
module tb_rac;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int C0 = 5681, C1 = 4816, C2 = -3218, C3 = 1130;

  logic              clr, en, neg;
  logic [3:0]        addr;
  logic [4:0]        shamt;
  logic signed [15:0] y;

  rac #(.C0(C0), .C1(C1), .C2(C2), .C3(C3), .OW(16)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    clr = 0; en = 0; neg = 0; addr = 0; shamt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int w, n, sh, v [4];
      longint acc;
      int expv;
      w  = $urandom_range(1, 13);
      n  = $urandom_range(0, (w < 8) ? w : 8);
      sh = w - n;
      foreach (v[i]) v[i] = $urandom_range(0, (1 << w) - 1) - (1 << (w - 1));
      acc = 0;
      if (n > 0)
        acc = longint'(C0) * ((v[0] >>> sh) <<< sh) + longint'(C1) * ((v[1] >>> sh) <<< sh)
            + longint'(C2) * ((v[2] >>> sh) <<< sh) + longint'(C3) * ((v[3] >>> sh) <<< sh);
      expv = int'((acc + 2048) >>> 12);
      clr <= 1;
      @(posedge clk);
      clr <= 0;
      shamt <= 5'(sh);
      for (int s = 0; s < n; s++) begin
        int p;
        p = w - 1 - s;
        en   <= 1;
        neg  <= (s == 0);
        addr <= {v[3][p], v[2][p], v[1][p], v[0][p]};
        @(posedge clk);
      end
      en <= 0;
      // idle cycles: accumulator must hold
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      checks++;
      if (y !== 16'(expv)) begin
        failures++;
        if (failures < 10) $display("FAIL w%0d n%0d: y=%0d exp=%0d", w, n, y, expv);
      end
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
