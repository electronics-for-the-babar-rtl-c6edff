// tb_tick_gen: checks that sample_en comes every 4 clocks, trig_en every 16
// (the last clock of a tick) and that sync restarts the phase at 0.
module tb_tick_gen;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [3:0] phase;
  logic sample_en, trig_en;
  int checks = 0, failures = 0;

  tick_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int ref_phase, n_s, n_t;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_phase = 0; n_s = 0; n_t = 0;
    for (int i = 0; i < 200; i++) begin
      if (i == 77) sync = 1;
      #1;
      check(phase == 4'(ref_phase), "phase");
      check(sample_en == (ref_phase % 4 == 3), "sample_en");
      check(trig_en == (ref_phase == 15), "trig_en");
      n_s += sample_en; n_t += trig_en;
      @(posedge clk);
      ref_phase = sync ? 0 : (ref_phase + 1) % 16;
      #1 sync = 0;
    end
    check(n_s == 49, "sample rate 1/4 (19 before, 30 after the sync)");
    check(n_t == 11, "tick rate 1/16 (4 before, 7 after the sync)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
