// tb_elefant_readout: the event buffer is modelled by a function of
// (sample, channel). For several hit-flag patterns, with random
// back-pressure, the byte stream must be time, tag, flags and then 32
// samples of each flagged channel in order, last byte marked, buffer
// released once. With no back-pressure an event must take 3 + 32 x hits
// clocks.
module tb_elefant_readout;
  import dch_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, avail = 1, dready = 1;
  anc_t anc;
  logic [4:0] rd_sample;
  logic [2:0] rd_ch;
  logic [6:0] rd_data;
  logic release_buf, busy, dvalid, dlast;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  elefant_readout #(.N_CH(8)) dut (.*);

  assign rd_data = 7'(rd_sample * 3 + rd_ch * 17 + 1);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    byte unsigned expq[$];
    int n_rel, cyc;
    logic [7:0] pats [6];
    pats = '{8'h00, 8'h01, 8'h80, 8'h5A, 8'hFF, 8'h24};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 12; p++) begin
      bit stall;
      stall = (p >= 6);
      anc = '{trig_time: 8'(p * 7), tag: 8'(p + 100), hit_flags: pats[p % 6]};
      expq.delete();
      expq.push_back(anc.trig_time); expq.push_back(anc.tag); expq.push_back(anc.hit_flags);
      for (int c = 0; c < 8; c++)
        if (anc.hit_flags[c]) for (int s = 0; s < 32; s++) expq.push_back(8'((s * 3 + c * 17 + 1) % 128));
      start = 1; @(posedge clk); #1 start = 0;
      n_rel = 0; cyc = 0;
      while (expq.size() > 0 && cyc < 2000) begin
        dready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        if (dvalid && dready) begin
          byte unsigned e;
          e = expq.pop_front();
          check(dout == e, "byte value");
          check(dlast == (expq.size() == 0), "last marker");
          n_rel += release_buf;
        end
        @(posedge clk); #1; cyc++;
      end
      check(expq.size() == 0, "all bytes received");
      check(n_rel == 1, "buffer released once");
      if (!stall) check(cyc == 3 + 32 * $countones(anc.hit_flags), "readout takes 3 + 32 x hits clocks");
      check(!busy, "idle after the event");
    end
    // no event available: start must be ignored
    avail = 0; start = 1; @(posedge clk); #1 start = 0;
    check(!busy && !dvalid, "no readout without an event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
