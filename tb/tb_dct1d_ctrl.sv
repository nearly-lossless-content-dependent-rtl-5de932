// tb_dct1d_ctrl: counts samples with random gaps. The select index must
// cycle 0..7, and `load` must follow the eighth sample by one cycle.
// `run` must then last exactly eight cycles with step 0..7, and `cap` must
// come with step 7, nine cycles after the eighth sample. Back-to-back
// vectors must produce a cap every eight cycles.
`timescale 1ns/1ps
module tb_dct1d_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       x_valid, first, last, load, run, cap;
  logic [2:0] sel, step;

  dct1d_ctrl dut (.*);

  int checks = 0, failures = 0;
  int nsamp = 0, caps = 0, loads = 0;
  longint cyc = 0, last8 [$], ld_cyc = -100;
  longint cap_cyc [$];

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
      if (x_valid) begin
        chk(sel == 3'(nsamp % 8) && first == (nsamp % 8 == 0) && last == (nsamp % 8 == 7), "sel");
        if (nsamp % 8 == 7) last8.push_back(cyc);
        nsamp++;
      end
      if (cap) begin
        chk(run && step == 3'd7 && cyc == ld_cyc + 8, "cap at step 7");
        caps++;
      end
      if (load) begin
        longint t;
        t = last8.pop_front();
        chk(cyc == t + 1, "load one cycle after the eighth sample");
        ld_cyc = cyc;
        loads++;
      end
      if (run && !load) chk(step == 3'(cyc - ld_cyc - 1), "step count");
      if (!run && ld_cyc >= 0 && cyc > ld_cyc && cyc <= ld_cyc + 8) chk(1'b0, "run dropped early");
    end
  end

  initial begin
    x_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      x_valid <= (t < 1000) || ($urandom_range(0, 3) != 0);
      @(posedge clk);
    end
    x_valid <= 0;
    repeat (20) @(posedge clk);
    chk(loads == nsamp / 8 && caps == loads, $sformatf("loads %0d caps %0d samples %0d", loads, caps, nsamp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
