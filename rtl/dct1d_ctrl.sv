// dct1d_ctrl: sequencer of one 1-D 8-point DCT core.
//
// It counts input samples modulo 8 and gives the index of the input register
// to enable (sel), plus first/last flags for the classifier. The cycle after
// the eighth sample it raises `load`. That captures the butterfly outputs and
// the classifier result and clears the accumulators. It then runs the
// bit-serial phase: `run` is high for eight cycles with `step` 0..7, one DA
// step per cycle. On the edge that completes step 7 it raises `cap` for the
// output registers. A new `load` may fall on that same edge, so the core
// takes one vector every eight cycles with no bubble. The bit-serial phase
// lasts a fixed eight cycles: the RACs stop earlier by themselves when
// fewer bits are needed.
//
// Interface: x_valid counts a sample. Input gaps are allowed; nothing stalls.
// Timing: load = 1 edge after the 8th sample, cap = 8 edges after load.
// The document gives only one-register-per-cycle selection and the 8-cycle
// period. The exact sequencing is this design's choice.
module dct1d_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_valid,
  output logic [2:0] sel,
  output logic       first,
  output logic       last,
  output logic       load,
  output logic       run,
  output logic [2:0] step,
  output logic       cap
);

  always_comb begin
    first = (sel == 3'd0);
    last  = (sel == 3'd7);
    cap   = run && (step == 3'd7);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      load <= 1'b0;
      run  <= 1'b0;
      step <= '0;
    end else begin
      if (x_valid) sel <= sel + 3'd1;
      load <= x_valid && last;
      if (load) begin
        run  <= 1'b1;
        step <= '0;
      end else if (run) begin
        step <= step + 3'd1;
        if (step == 3'd7) run <= 1'b0;
      end
    end
  end

endmodule
