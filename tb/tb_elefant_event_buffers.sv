// tb_elefant_event_buffers: a model pipeline memory feeds the block. Five
// Level-1 accepts are sent without reading (the fifth must be dropped),
// then every buffer is read back sample by sample and channel by channel
// and compared with the model window, tag, time and OR of the hit bits.
// Finally Clear Readout must empty the buffers. The copy must take 32
// clocks.
module tb_elefant_event_buffers;
  import dch_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0, sample_en = 0, l1_accept = 0, clear = 0, release_buf = 0;
  logic [7:0] l1_tag = 0;
  logic [AW-1:0] tail_addr = 0, pipe_addr;
  logic [63:0] pipe_data;
  logic avail, busy, dropped;
  anc_t anc;
  logic [4:0] rd_sample = 0;
  logic [2:0] rd_ch = 0;
  logic [6:0] rd_data;
  logic [63:0] model [256];
  int checks = 0, failures = 0;

  elefant_event_buffers #(.N_CH(8), .N_BUF(4), .AW(AW)) dut (.*);

  assign pipe_data = model[pipe_addr];

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

  int base_of [5];
  int time_of [5];

  initial begin
    int cyc, t0, n_drop;
    logic [7:0] flags;
    for (int a = 0; a < 256; a++) begin
      model[a] = {$urandom, $urandom};
      // make hit bits sparse: only channel (a % 8) may carry a hit
      for (int c = 0; c < 8; c++) if (c != (a % 8) || (a % 5) != 0) model[a][c*8+7] = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // some samples pass, so the trigger time is known
    for (int s = 0; s < 10; s++) begin sample_en = 1; @(posedge clk); #1 sample_en = 0; end
    n_drop = 0;
    for (int e = 0; e < 5; e++) begin
      tail_addr = AW'(e * 37 + 11);
      base_of[e] = e * 37 + 11;
      time_of[e] = 10 + e;
      l1_tag = 8'(8'hA0 + e);
      l1_accept = 1;
      @(posedge clk);
      #1 l1_accept = 0;
      t0 = 0;
      while (busy) begin @(posedge clk); #1 t0++; end
      if (e < 4) check(t0 == 32, "copy takes 32 clocks");
      sample_en = 1; @(posedge clk); #1 sample_en = 0;
      if (e == 4) check(!busy, "fifth accept not started");
    end
    // the fifth accept was dropped: check the dropped pulse directly
    l1_accept = 1; #1 check(dropped, "accept with all 4 buffers full is dropped"); 
    @(posedge clk); #1 l1_accept = 0;
    for (int e = 0; e < 4; e++) begin
      check(avail, "buffer available");
      flags = 0;
      for (int s = 0; s < 32; s++)
        for (int c = 0; c < 8; c++) begin
          logic [63:0] w;
          w = model[(base_of[e] + s) % 256];
          flags[c] |= w[c*8+7];
          rd_sample = 5'(s); rd_ch = 3'(c);
          #1 check(rd_data == w[c*8 +: 7], "sample data");
        end
      check(anc.hit_flags == flags, "hit flag byte");
      check(anc.tag == 8'(8'hA0 + e), "trigger tag");
      check(anc.trig_time == 8'(time_of[e]), "trigger time");
      release_buf = 1; @(posedge clk); #1 release_buf = 0;
    end
    check(!avail, "all buffers read");
    // clear readout
    tail_addr = 8'd5; l1_accept = 1; @(posedge clk); #1 l1_accept = 0;
    repeat (40) @(posedge clk); #1;
    check(avail, "new event stored");
    clear = 1; @(posedge clk); #1 clear = 0;
    check(!avail, "clear readout empties the buffers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
