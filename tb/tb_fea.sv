// tb_fea: inner front end assembly (2 boards x 8 ELEFANTs, 128 channels)
// driven only through its command port, as the DIOM would. Two channels on
// different boards get one TDC hit each; the trigger lines must show them
// at line/bit = channel / 16, channel % 16. A Level-1 accept command stores
// the event, an Event Read command and a grant must then return a packet
// of all 16 chip records (time, tag, hit flags, samples of hit channels)
// board by board, closed by the trailer. The hit sample must sit where the
// ~12 us latency puts it relative to the trigger time.
module tb_fea;
  import dch_pkg::*;
  localparam int ID = 3, NCH = 128, HA = 5, HB = 70, HIT_S = 60, TIME = 9;
  logic clk = 0, rst_n = 0, soft_reset = 0, cmd_valid = 0, grant = 0, tx_ready = 1;
  cmd_t cmd;
  logic [7:0] tx_data;
  logic tx_valid, tx_last, cal_strobe, dropped;
  logic [NCH-1:0][5:0] fadc_data, tdc_time;
  logic [NCH-1:0] tdc_hit = '0;
  logic [7:0] trig_lines;
  logic [4:0][7:0] dac;
  logic [3:0] cal_select;
  int nsamp = 0;
  int checks = 0, failures = 0;

  fea #(.KIND(0), .FEA_ID(4'(ID))) dut (.*);

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

  always @(posedge clk) if (rst_n && dut.sample_en) nsamp <= nsamp + 1;

  task automatic send(opcode_e op, int fea, int addr, int data);
    cmd = '{op: op, fea: 4'(fea), addr: 4'(addr), data: 8'(data)};
    cmd_valid = 1; @(posedge clk); #1 cmd_valid = 0;
  endtask

  initial begin
    byte unsigned got[$], expq[$];
    logic [7:0][15:0] tl;
    int t, trig_ok;
    for (int c = 0; c < NCH; c++) begin fadc_data[c] = 6'(c % 50 + 1); tdc_time[c] = 6'(c % 64); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send(OP_CFG_WRITE, ID, 0, 8'd190);
    send(OP_SYNC, 15, 0, 0);
    check(dac[0] == 8'd190, "threshold DAC register");
    wait (nsamp == HIT_S); #1;
    tdc_hit[HA] = 1; tdc_hit[HB] = 1;
    wait (nsamp == HIT_S + 1); #1;
    tdc_hit = '0;
    // trigger lines over the next ticks
    trig_ok = 0;
    repeat (4) begin
      wait (dut.phase == 4'd0); @(posedge clk); #1;
      for (int p = 0; p < 16; p++) begin
        for (int l = 0; l < 8; l++) tl[l][p] = trig_lines[l];
        @(posedge clk); #1;
      end
      if (tl != '0) begin
        logic [127:0] expt;
        expt = '0; expt[HA] = 1; expt[HB] = 1;
        check(tl == expt, "trigger lines carry the two hits");
        trig_ok++;
      end
    end
    check(trig_ok == 1, "hits in exactly one trigger tick");
    wait (nsamp == HIT_S + PIPE_DEPTH - TIME);
    send(OP_L1_ACCEPT, 15, 0, 8'h77);
    repeat (40) @(posedge clk); #1;
    send(OP_EVENT_READ, ID, 0, 0);
    repeat (300) @(posedge clk); #1;
    grant = 1; @(posedge clk); #1 grant = 0;
    while (1) begin
      if (tx_valid) begin
        got.push_back(tx_data);
        if (tx_last) break;
      end
      @(posedge clk); #1;
    end
    t = got[0];
    for (int e = 0; e < 16; e++) begin
      logic [7:0] flags;
      flags = 0;
      if (e == HA / 8) flags[HA % 8] = 1;
      if (e == HB / 8) flags[HB % 8] = 1;
      expq.push_back(8'(t)); expq.push_back(8'h77); expq.push_back(flags);
      for (int c = 0; c < 8; c++) if (flags[c])
        for (int s = 0; s < 32; s++)
          expq.push_back(((t - 1 - PIPE_DEPTH + s) % 256 == HIT_S) ? 8'(64 + (e * 8 + c) % 64)
                                                                   : 8'((e * 8 + c) % 50 + 1));
    end
    expq.push_back(8'(8'h80 | ID));
    check(got.size() == expq.size(), "packet length");
    check(got == expq, "packet contents");
    check((t - 1 - PIPE_DEPTH) % 256 <= HIT_S && HIT_S < (t - 1 - PIPE_DEPTH) % 256 + 32, "hit inside the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
