// tb_adb: a 48-channel board (6 ELEFANTs). Every channel sees a constant
// charge; two channels get one TDC hit each. The down-sampled trigger
// output must show exactly those hits in the right tick. After a Level-1
// accept whose window holds the hits, every chip is read over the shared
// bus: headers for all, 32 samples only for the hit channels, with the hit
// sample carrying {1, vernier time}.
module tb_adb;
  import dch_pkg::*;
  localparam int NE = 6, NC = 48;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [3:0] phase;
  logic sample_en, trig_en;
  logic [NC-1:0][5:0] fadc_data, tdc_time;
  logic [NC-1:0] tdc_hit = '0, trig_out;
  logic hit_mode = 0, l1_accept = 0, clear = 0, dropped, rd_start = 0, dvalid, dlast, dready = 1;
  logic [5:0] fadc_thresh = 6'd20;
  logic [7:0] l1_tag = 8'h5C, dout;
  logic [NE-1:0] avail;
  logic [3:0] rd_chip = 0;
  int checks = 0, failures = 0;
  int nsamp = 0;

  tick_gen u_tick (.*);
  adb #(.N_ELEF(NE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int HIT_S = 40;
  localparam int HA = 11, HB = 32;   // hit channels (chip 1 ch 3, chip 4 ch 0)

  always @(posedge clk) if (rst_n && sample_en) nsamp <= nsamp + 1;

  initial begin
    int n_at, trig_seen;
    for (int c = 0; c < NC; c++) begin fadc_data[c] = 6'(c % 30 + 2); tdc_time[c] = 6'(c + 7); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // one TDC hit on each of two channels during sample HIT_S
    wait (nsamp == HIT_S); #1;
    tdc_hit[HA] = 1; tdc_hit[HB] = 1;
    wait (nsamp == HIT_S + 1); #1;
    tdc_hit = '0;
    // trigger output: the two hits in exactly one tick
    trig_seen = 0;
    repeat (64) begin
      @(posedge clk); #1;
      if (trig_en) begin
        @(posedge clk); #1;
        if (trig_out != '0) begin
          trig_seen++;
          check(trig_out == ((NC'(1) << HA) | (NC'(1) << HB)), "trigger bits of the hit channels");
        end
      end
    end
    check(trig_seen == 1, "hits appear in one trigger tick");
    // accept so that the hit sample is the 11th of the 32-sample window
    wait (nsamp == HIT_S + PIPE_DEPTH - 10 + 1);
    @(posedge clk); #1;
    n_at = nsamp;
    l1_accept = 1; @(posedge clk); #1 l1_accept = 0;
    repeat (40) @(posedge clk); #1;
    check(avail == '1, "every chip holds the event");
    for (int e = 0; e < NE; e++) begin
      byte unsigned q[$];
      logic [7:0] flags;
      flags = 0;
      if (e == HA / 8) flags[HA % 8] = 1;
      if (e == HB / 8) flags[HB % 8] = 1;
      q.push_back(8'(n_at)); q.push_back(l1_tag); q.push_back(flags);
      for (int c = 0; c < 8; c++) if (flags[c])
        for (int s = 0; s < 32; s++)
          q.push_back((n_at - 1 - PIPE_DEPTH + s == HIT_S) ? 8'(64 + e * 8 + c + 7) : 8'((e * 8 + c) % 30 + 2));
      rd_chip = 4'(e); rd_start = 1; @(posedge clk); #1 rd_start = 0;
      while (q.size() > 0) begin
        if (dvalid) begin
          byte unsigned x;
          x = q.pop_front();
          check(dout == x, "bus byte");
          check(dlast == (q.size() == 0), "last byte");
        end else check(0, "bus idle during readout");
        @(posedge clk); #1;
      end
    end
    check(avail == '0, "all events read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
