// tb_rib: readout interface board against model boards (2 boards x 3
// chips; chip c of board b answers a readout with 2+b+c bytes). Checks:
// configuration writes reach the DAC and mode outputs and read back
// through a granted packet; L1 accept, tag, clear and calibration strobe
// pulses; sync restarts the tick; commands for another FEA are ignored;
// an event read fills the FIFOs in parallel and, on grant, the packet holds
// board 0's chips, then board 1's, then the trailer, under random
// back-pressure; soft reset clears the registers.
module tb_rib;
  import dch_pkg::*;
  localparam int NA = 2, NE = 3, ID = 5, NCH = NA * NE * 8, NL = (NCH + 15) / 16;
  logic clk = 0, rst_n = 0, soft_reset = 0, cmd_valid = 0, grant = 0, tx_ready = 1;
  cmd_t cmd;
  logic [7:0] tx_data, l1_tag, dac_thresh, dac_cal, dac_ladder_top, dac_ladder_mid, dac_ladder_bot;
  logic tx_valid, tx_last, sample_en, trig_en, hit_mode, l1_accept, clear, cal_strobe;
  logic [3:0] phase, cal_select;
  logic [5:0] fadc_thresh;
  logic [NA-1:0][NE-1:0] avail;
  logic [NA-1:0][3:0] rd_chip;
  logic [NA-1:0] rd_start, bus_valid, bus_last, bus_ready;
  logic [NA-1:0][7:0] bus_data;
  logic [NCH-1:0] trig_hits = '0;
  logic [NL-1:0] trig_lines;
  int checks = 0, failures = 0;

  rib #(.N_ADB(NA), .N_ELEF(NE), .FEA_ID(4'(ID)), .FIFO_DEPTH(4)) dut (.*);

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

  // model boards
  int remaining [NA];
  int cur_chip [NA];
  int sent [NA];
  int stalls = 0;
  for (genvar b = 0; b < NA; b++) begin : g_model
    always @(posedge clk) begin
      if (!rst_n) remaining[b] <= 0;
      else if (rd_start[b]) begin
        check(remaining[b] == 0, "start only when the bus is idle");
        remaining[b] <= 2 + b + rd_chip[b];
        cur_chip[b]  <= rd_chip[b];
        sent[b]      <= 0;
        avail[b][rd_chip[b]] <= 1'b0;
      end else if (bus_valid[b] && bus_ready[b]) begin
        remaining[b] <= remaining[b] - 1;
        sent[b] <= sent[b] + 1;
      end
      if (bus_valid[b] && !bus_ready[b]) stalls <= stalls + 1;
    end
    assign bus_valid[b] = remaining[b] > 0;
    assign bus_last[b]  = remaining[b] == 1;
    assign bus_data[b]  = 8'(b * 64 + cur_chip[b] * 16 + sent[b]);
  end

  task automatic send(opcode_e op, int fea, int addr, int data);
    cmd = '{op: op, fea: 4'(fea), addr: 4'(addr), data: 8'(data)};
    cmd_valid = 1; @(posedge clk); #1 cmd_valid = 0;
  endtask

  task automatic get_packet(ref byte unsigned got[$]);
    int guard;
    got.delete(); guard = 0;
    grant = 1; @(posedge clk); #1 grant = 0;
    forever begin
      tx_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (tx_valid && tx_ready) begin
        got.push_back(tx_data);
        if (tx_last) begin @(posedge clk); #1; break; end
      end
      @(posedge clk); #1;
      if (++guard > 2000) begin check(0, "packet ends"); break; end
    end
    tx_ready = 1;
  endtask

  initial begin
    byte unsigned got[$], expq[$];
    int n_l1, n_clr, n_cal;
    avail = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // configuration
    send(OP_CFG_WRITE, ID, 0, 8'h3C);
    send(OP_CFG_WRITE, 15, 2, 8'hA1);
    send(OP_CFG_WRITE, ID, 5, 1);
    send(OP_CFG_WRITE, ID, 6, 8'd17);
    send(OP_CFG_WRITE, ID, 7, 8'h09);
    send(OP_CFG_WRITE, ID + 1, 1, 8'h77);    // another FEA: ignored
    #1;
    check(dac_thresh == 8'h3C && dac_ladder_top == 8'hA1, "DAC registers written");
    check(hit_mode == 1 && fadc_thresh == 6'd17 && cal_select == 4'h9, "mode registers written");
    check(dac_cal == 8'h00, "command for another FEA ignored");
    send(OP_CFG_READ, ID, 2, 0);
    repeat (3) @(posedge clk); #1;
    get_packet(got);
    expq = '{8'hC2, 8'hA1, 8'(ID)};
    check(got == expq, "configuration read reply packet");
    // pulses
    n_l1 = 0; n_clr = 0; n_cal = 0;
    fork
      repeat (20) begin @(posedge clk); #1; n_l1 += l1_accept; n_clr += clear; n_cal += cal_strobe; end
      begin
        send(OP_L1_ACCEPT, 15, 0, 8'h9E);
        send(OP_CLEAR, ID, 0, 0);
        send(OP_CAL_STROBE, ID, 0, 0);
      end
    join
    check(n_l1 == 1 && l1_tag == 8'h9E, "L1 accept and tag forwarded");
    check(n_clr == 1, "clear readout forwarded");
    check(n_cal == 1, "calibration strobe");
    @(posedge clk); #1;
    send(OP_SYNC, 15, 0, 0);
    check(phase == 4'd0, "sync restarts the trigger tick");
    // event read: every chip holds one event
    avail = '1;
    send(OP_EVENT_READ, ID, 0, 0);
    repeat (10) @(posedge clk); #1;
    check(stalls > 0, "board readout stalls on a full FIFO");
    get_packet(got);
    expq.delete();
    for (int b = 0; b < NA; b++)
      for (int c = 0; c < NE; c++)
        for (int i = 0; i < 2 + b + c; i++) expq.push_back(8'(b * 64 + c * 16 + i));
    expq.push_back(8'(8'h80 | ID));
    check(got == expq, "event packet: board 0 chips, board 1 chips, trailer");
    check(avail == '0, "every chip read once");
    // trigger line
    trig_hits = '0; trig_hits[17] = 1'b1;   // line 1, bit 1
    wait (phase == 4'd0); @(posedge clk); #1;
    repeat (1) @(posedge clk); #1;
    check(trig_lines[1] == 1'b1 && trig_lines[0] == 1'b0, "trigger line bit");
    // soft reset
    soft_reset = 1; @(posedge clk); #1 soft_reset = 0;
    check(dac_thresh == 0 && hit_mode == 0, "soft reset clears the registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
