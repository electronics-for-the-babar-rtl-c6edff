// tb_elefant: whole ELEFANT digital core. Random charge and sparse TDC hits
// enter every sample (one sample per 4 clocks). The testbench keeps its own
// history of the expected 7-bit words and hit bits, sends Level-1 accepts
// and checks the read-out event: trigger time, tag, hit-flag byte and the
// 32 samples of every hit channel, which must be the samples taken DEPTH to
// DEPTH-31 samples before the accept (the ~12 us latency). The prompt
// trigger lines are checked every sample.
module tb_elefant;
  localparam int DEPTH = 179;
  logic clk = 0, rst_n = 0, sample_en = 0, hit_mode = 0, l1_accept = 0, clear = 0;
  logic [7:0][5:0] fadc_data = '0, tdc_time = '0;
  logic [7:0] tdc_hit = '0, l1_tag = 0, trig_hits;
  logic [5:0] fadc_thresh = 6'd10;
  logic avail, dropped, copy_busy, rd_start = 0, rd_busy, dvalid, dlast, dready = 1;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  elefant #(.N_CH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int wexp [int][8];   // expected word of sample k, channel c
  int hexp [int][8];
  int fprev [8][3];
  int nsamp = 0;
  int phase = 0;

  // sample clock and stimulus: inputs change right after a sample edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (sample_en) begin
        for (int c = 0; c < 8; c++) begin
          wexp[nsamp][c] = tdc_hit[c] ? 64 + tdc_time[c] : fprev[c][0];
          hexp[nsamp][c] = hit_mode ? (fprev[c][0] > fprev[c][2] + fadc_thresh) : tdc_hit[c];
          fprev[c][2] = fprev[c][1]; fprev[c][1] = fprev[c][0]; fprev[c][0] = fadc_data[c];
        end
        nsamp++;
      end
      #1;
      if (sample_en) begin
        for (int c = 0; c < 8; c++) begin
          fadc_data[c] = 6'($urandom_range(0, 40));
          tdc_hit[c]   = ($urandom_range(0, 29) == 0);
          tdc_time[c]  = 6'($urandom);
        end
      end
      phase = (phase + 1) % 4;
      sample_en = (phase == 3);
      if (nsamp > 0 && !sample_en && phase == 1) begin
        checks++;
        for (int c = 0; c < 8; c++) if (trig_hits[c] != hexp[nsamp-1][c][0]) begin
          failures++; $display("FAIL trigger line ch %0d sample %0d", c, nsamp - 1);
        end
      end
    end
  end

  task automatic read_event(int n_at, logic [7:0] tag);
    byte unsigned q[$];
    logic [7:0] flags;
    flags = 0;
    for (int s = 0; s < 32; s++) for (int c = 0; c < 8; c++) flags[c] |= hexp[n_at - 1 - DEPTH + s][c][0];
    q.push_back(8'(n_at)); q.push_back(tag); q.push_back(flags);
    for (int c = 0; c < 8; c++) if (flags[c])
      for (int s = 0; s < 32; s++) q.push_back(8'(wexp[n_at - 1 - DEPTH + s][c]));
    wait (avail);
    @(posedge clk); #2 rd_start = 1; @(posedge clk); #2 rd_start = 0;
    while (q.size() > 0) begin
      if (dvalid) begin
        byte unsigned e;
        e = q.pop_front();
        check(dout == e, "event byte");
        check(dlast == (q.size() == 0), "last marker");
      end
      @(posedge clk); #2;
    end
  endtask

  initial begin
    int n_at [3];
    logic [7:0] tags [3];
    for (int c = 0; c < 8; c++) for (int j = 0; j < 3; j++) fprev[c][j] = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    for (int ev = 0; ev < 3; ev++) begin
      hit_mode = (ev == 2);
      wait (nsamp > DEPTH + 60 + ev * 100);
      @(posedge clk); #2;
      while (phase != 1) begin @(posedge clk); #2; end
      n_at[ev] = nsamp; tags[ev] = 8'(ev * 11 + 3);
      l1_tag = tags[ev]; l1_accept = 1; @(posedge clk); #2 l1_accept = 0;
      read_event(n_at[ev], tags[ev]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
