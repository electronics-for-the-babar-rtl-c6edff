// tb_rib_trigger_serializer: a new random 144-bit snapshot every tick is
// loaded at phase 0; the 9 lines are deserialised in the testbench (bit p
// of line l in the clock after phase p) and compared with the snapshot.
module tb_rib_trigger_serializer;
  localparam int N = 144, L = 9;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [3:0] phase;
  logic sample_en, trig_en;
  logic [N-1:0] hits = '0;
  logic [L-1:0] lines;
  int checks = 0, failures = 0;

  tick_gen u_tick (.*);
  rib_trigger_serializer #(.N_CH(N)) dut (.clk, .rst_n, .phase, .hits, .lines);

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
    logic [L*16-1:0] snap, got;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(L == (N + 15) / 16, "line count");
    for (int t = 0; t < 50; t++) begin
      while (phase != 4'd0) begin @(posedge clk); #1; end
      hits = N'({$urandom, $urandom, $urandom, $urandom, $urandom});
      snap = (L*16)'(hits);
      for (int p = 0; p < 16; p++) begin
        @(posedge clk); #1;
        if (p == 0) hits = ~hits;   // must not disturb the loaded snapshot
        for (int l = 0; l < L; l++) got[l*16 + p] = lines[l];
      end
      check(got == snap, "lines carry the snapshot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
