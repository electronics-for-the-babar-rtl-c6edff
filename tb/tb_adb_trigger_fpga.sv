// tb_adb_trigger_fpga: random per-sample hit patterns; after every trigger
// tick the output must be the OR of the 4 samples of that tick and hold
// for the next 16 clocks.
module tb_adb_trigger_fpga;
  localparam int N = 48;
  logic clk = 0, rst_n = 0;
  logic [3:0] phase;
  logic sample_en, trig_en, sync = 0;
  logic [N-1:0] hits_in = '0, hits_out;
  int checks = 0, failures = 0;

  tick_gen u_tick (.*);
  adb_trigger_fpga #(.N_CH(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [N-1:0] acc, expv;
    int ticks;
    acc = '0; expv = '0; ticks = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 1600; cyc++) begin
      // hit lines change once per sample, just after a sample edge
      if (phase[1:0] == 2'd0) hits_in = ($urandom_range(0, 3) == 0) ? N'({$urandom, $urandom}) & N'({$urandom, $urandom}) : '0;
      if (sample_en) acc |= hits_in;
      if (trig_en) begin expv = acc; acc = '0; ticks++; end
      @(posedge clk); #1;
      if (ticks > 0) check(hits_out == expv, "tick OR of 4 samples");
    end
    check(ticks == 100, "one output per 16 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
