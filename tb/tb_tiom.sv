// tb_tiom: 58 serial trigger lines carry a new random snapshot every tick
// (bit p of line l in the clock after phase p, phase restarted by sync).
// The three 20-bit links are collected from link_first over 16 clocks and
// the 960-bit payload must hold a snapshot sent on the lines one tick
// earlier in its low 928 bits and a tick counter, rising by one per tick,
// in its top 32 bits.
module tb_tiom;
  localparam int NI = 58;
  logic clk = 0, rst_n = 0, sync = 0, soft_reset = 0;
  logic [3:0] phase;
  logic sample_en, trig_en, link_first;
  logic [NI-1:0] lines_in = '0;
  logic [2:0][19:0] link_word;
  logic [NI*16-1:0] snaps [int];
  int tickno = 0;
  int checks = 0, failures = 0;

  tick_gen u_tick (.clk, .rst_n, .sync, .phase, .sample_en, .trig_en);
  tiom #(.N_IN(NI)) dut (.*);

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

  // line driver
  always @(posedge clk) begin
    if (rst_n) begin
      if (phase == 4'd0) begin
        tickno = tickno + 1;
        for (int w = 0; w < NI * 16 / 32 + 1; w++) snaps[tickno][w*32 +: 32] = $urandom;
      end
      for (int l = 0; l < NI; l++) lines_in[l] <= snaps[tickno][l*16 + int'(phase)];
    end
  end

  initial begin
    logic [959:0] pay;
    logic [31:0] last_cnt;
    int matched, n_pay;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sync = 1; @(posedge clk); #1 sync = 0;
    n_pay = 0;
    for (int t = 0; t < 30; t++) begin
      while (!link_first) begin @(posedge clk); #1; end
      for (int k = 0; k < 16; k++) begin
        for (int L = 0; L < 3; L++) pay[(L*16 + k)*20 +: 20] = link_word[L];
        @(posedge clk); #1;
      end
      if (t >= 3) begin
        matched = 0;
        for (int d = 1; d <= 3; d++)
          if (snaps.exists(tickno - d) && pay[NI*16-1:0] == snaps[tickno - d]) matched = d;
        check(matched == 2, "payload is the snapshot sent two line ticks before");
        check(pay[959:928] == last_cnt + 1, "tick counter advances by one");
        n_pay++;
      end
      last_cnt = pay[959:928];
    end
    check(n_pay == 27, "one payload per tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
