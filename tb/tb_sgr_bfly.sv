// tb_sgr_bfly: checks the selective gated input registers and the butterfly.
// Random vectors are written one sample per cycle, in random register order
// and with gaps. After `load` the E/O registers must equal the sums and
// differences of mirrored samples. A register not selected must keep its
// value, and E/O must hold while load is low.
`timescale 1ns/1ps
module tb_sgr_bfly;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              x_valid, load;
  logic [2:0]        sel;
  logic signed [8:0] x;
  logic signed [9:0] e [4];
  logic signed [9:0] o [4];

  sgr_bfly #(.IW(9)) dut (.*);

  int checks = 0, failures = 0;
  int d [8];

  initial begin
    x_valid = 0; load = 0; sel = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (d[i]) d[i] = 0;
    for (int t = 0; t < 300; t++) begin
      // Write all eight registers in a random order; some twice.
      for (int n = 0; n < 12; n++) begin
        int s, v;
        s = (n < 8) ? n : $urandom_range(0, 7);
        if (n < 8) s = (n * 5 + t) % 8;
        v = $urandom_range(0, 510) - 255;
        x_valid <= ($urandom_range(0, 4) != 0);
        sel <= 3'(s);
        x <= 9'(v);
        @(posedge clk);
        #1;
        if (x_valid) d[s] = v;
      end
      x_valid <= 0;
      load <= 1;
      @(posedge clk);
      load <= 0;
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (e[i] !== 10'(d[i] + d[7-i]) || o[i] !== 10'(d[i] - d[7-i])) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d i%0d e=%0d o=%0d exp %0d %0d", t, i, e[i], o[i], d[i]+d[7-i], d[i]-d[7-i]);
        end
      end
      // Without load the even/odd registers hold while D changes.
      x_valid <= 1; sel <= 3'd0; x <= 9'(d[0] ^ 1);
      @(posedge clk);
      x_valid <= 0;
      #1;
      d[0] = d[0] ^ 1;
      checks++;
      if (e[0] !== 10'((d[0] ^ 1) + d[7])) failures++;
    end
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
