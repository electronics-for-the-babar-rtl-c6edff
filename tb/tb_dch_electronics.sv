// tb_dch_electronics: end-to-end run of one quadrant of the chamber readout
// (12 FEAs, 232 ELEFANTs; the top reduced to N_QUAD = 1, grant delay 600), driven through the
// C-LINK command ports and the per-channel FADC/TDC inputs, observed on the
// D-LINK, G-LINK, DAC and status ports.
//   Event A: TDC hits on two channels per quadrant; checked in the D-LINK
//            packets (hit flags, {1, vernier} at the right sample, sparse
//            records elsewhere) and on the trigger links.
//   Event B: FADC-rise hit mode; a pulse on all 64 channels of one inner
//            board fills that board's FIFO, so its readout stalls.
//   Then: five accepts without readout overflow the 4 event buffers, Clear
//   Readout empties them, a configuration read returns its value, a
//   calibration strobe and an FEA reset reach the analog-side ports.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
module tb_dch_electronics;
  import dch_pkg::*;
  localparam int NQ = 1;
  localparam int GD = 600;   // long grant delay: a full board fills its FIFO before the grant
  localparam int HIT_A = 40;
  int hit_b;              // sample of event B, set once event A is read out
  localparam int CHB [3] = '{0, 128, 272};
  localparam int LNB [3] = '{0, 8, 17};
  localparam int NB  [3] = '{2, 3, 4};
  localparam int NEL [3] = '{8, 6, 6};

  logic clk = 0, rst_n = 0;
  logic [NQ-1:0] clink_valid = '0, dlink_valid;
  cmd_t [NQ-1:0] clink_word;
  logic [NQ-1:0][15:0] dlink_word;
  logic [NQ-1:0][1:0][2:0][19:0] glink_word;
  logic [NQ-1:0][1:0] glink_first;
  logic [NQ-1:0][3:0][CH_WEDGE-1:0][5:0] fadc_data, tdc_time;
  logic [NQ-1:0][3:0][CH_WEDGE-1:0] tdc_hit;
  logic [NQ-1:0][11:0][4:0][7:0] dac;
  logic [NQ-1:0][11:0][3:0] cal_select;
  logic [NQ-1:0][11:0] cal_strobe, dropped;
  int checks = 0, failures = 0;

  dch_electronics #(.N_QUAD(1), .GRANT_DELAY(GD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- stimulus model ----------------
  function automatic int base_q(int q, int w, int c);
    return (c * 7 + w * 3 + q) % 30 + 1;
  endfunction
  function automatic int hit_w(int q, int h); return (h == 0) ? q : (q + 1) % 4; endfunction
  function automatic int hit_c(int q, int h); return (h == 0) ? 5 + q : 200 + 3 * q; endfunction

  int nsamp = 0;          // samples since the sync (all FEAs count in step)
  bit counting = 0;
  always @(posedge clk) if (counting && dut.g_quad[0].u_quad.g_wedge[0].g_fea[0].u_fea.sample_en) nsamp <= nsamp + 1;

  // mechanisms
  int n_tdc_hits = 0, n_fadc_hits = 0, n_sparse_skip = 0, n_stall = 0, n_drop = 0;
  int n_clear = 0, n_cfg_read = 0, n_cal = 0, n_reset = 0, n_trig_bits = 0, n_grant_rounds = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.g_quad[0].u_quad.g_wedge[0].g_fea[0].u_fea.u_rib.bus_valid[1] &&
        !dut.g_quad[0].u_quad.g_wedge[0].g_fea[0].u_fea.u_rib.bus_ready[1]) n_stall++;
    if (dropped != '0) n_drop++;
    if (cal_strobe != '0) n_cal++;
  end

  // collected D-LINK words per quadrant
  logic [15:0] dq [NQ][$];
  always @(posedge clk) if (rst_n) for (int q = 0; q < NQ; q++) if (dlink_valid[q]) dq[q].push_back(dlink_word[q]);

  // collected trigger payload bits: per quadrant and TIOM, OR over ticks
  logic [959:0] trig_or [NQ][2];
  logic [959:0] pay_cur [NQ][2];
  int kpos [NQ][2];
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < NQ; q++) for (int t = 0; t < 2; t++) begin
      if (glink_first[q][t]) kpos[q][t] = 0;
      if (kpos[q][t] < 16) begin
        for (int L = 0; L < 3; L++) pay_cur[q][t][(L*16 + kpos[q][t])*20 +: 20] = glink_word[q][t][L];
        kpos[q][t]++;
        if (kpos[q][t] == 16) trig_or[q][t][927:0] |= pay_cur[q][t][927:0];
      end
    end
  end

  task automatic send_all(opcode_e op, int fea, int addr, int data);
    for (int q = 0; q < NQ; q++) clink_word[q] = '{op: op, fea: 4'(fea), addr: 4'(addr), data: 8'(data)};
    clink_valid = '1; @(posedge clk); #1 clink_valid = '0;
  endtask

  // wait until every quadrant sent its round trailer
  task automatic wait_rounds(int nwords_min);
    int done;
    done = 0;
    while (!done) begin
      @(posedge clk); #1;
      done = 1;
      for (int q = 0; q < NQ; q++)
        if (dq[q].size() == 0 || dq[q][$][15:12] != 4'hF || dq[q].size() < nwords_min) done = 0;
    end
    n_grant_rounds++;
  endtask

  // split a quadrant's words into FEA packets and check them
  // mode 0: event A, 1: event B, 2: no events (after clear)
  task automatic check_round(int q, int mode, int tag);
    byte unsigned pk [12][$];
    int f, t_time;
    foreach (dq[q][i]) begin
      if (dq[q][i][15:12] != 4'hF) pk[dq[q][i][15:12]].push_back(dq[q][i][7:0]);
    end
    for (f = 0; f < 12; f++) begin
      int w, k, pos, nchip;
      w = f / 3; k = f % 3; pos = 0;
      nchip = NB[k] * NEL[k];
      if (mode == 2) begin
        check(pk[f].size() == 1 && pk[f][0] == 8'(8'h80 | f), "empty packet after clear");
        continue;
      end
      for (int e = 0; e < nchip; e++) begin
        logic [7:0] flags, expf;
        if (pos + 3 > pk[f].size()) begin check(0, "packet too short"); break; end
        t_time = pk[f][pos]; flags = pk[f][pos + 2];
        check(pk[f][pos + 1] == 8'(tag), "trigger tag");
        pos += 3;
        expf = 0;
        if (mode == 0) begin
          for (int h = 0; h < 2; h++)
            if (hit_w(q, h) == w && hit_c(q, h) >= CHB[k] + e * 8 && hit_c(q, h) < CHB[k] + e * 8 + 8)
              expf[hit_c(q, h) - CHB[k] - e * 8] = 1;
        end else if (q == 0 && f == 0 && e >= 8) expf = 8'hFF;
        check(flags == expf, "hit flags");
        if (flags == 0) n_sparse_skip++;
        for (int c = 0; c < 8; c++) if (flags[c]) begin
          int gc, first;
          gc = CHB[k] + e * 8 + c;
          first = t_time - 1 - PIPE_DEPTH;   // sample number of the first word (mod 256)
          for (int s = 0; s < 32; s++) begin
            int sn, expv;
            sn = (first + s) & 255;
            if (mode == 0) begin
              expv = (sn == HIT_A) ? 64 + (gc + q) % 64 : base_q(q, w, gc);
              if (sn == HIT_A && pk[f][pos + s] == 8'(expv)) n_tdc_hits++;
            end else begin
              // the word of sample n carries the charge of sample n-1
              expv = (((sn - 1 - hit_b) & 255) < 3) ? base_q(q, w, gc) + 20 : base_q(q, w, gc);
            end
            check(pk[f][pos + s] == 8'(expv), "sample word");
          end
          if (mode == 1) n_fadc_hits++;
          pos += 32;
        end
      end
      check(pos + 1 == pk[f].size() && pk[f][pos] == 8'(8'h80 | f), "packet trailer");
    end
    dq[q].delete();
  endtask

  initial begin
    for (int q = 0; q < NQ; q++) for (int w = 0; w < 4; w++) for (int c = 0; c < CH_WEDGE; c++) begin
      fadc_data[q][w][c] = 6'(base_q(q, w, c));
      tdc_time[q][w][c]  = 6'((c + q) % 64);
      tdc_hit[q][w][c]   = 1'b0;
    end
    for (int q = 0; q < NQ; q++) for (int t = 0; t < 2; t++) begin trig_or[q][t] = '0; kpos[q][t] = 16; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    send_all(OP_SYNC, 15, 0, 0);
    counting = 1;
    send_all(OP_CFG_WRITE, 15, REG_DISC_THRESH, 190);
    send_all(OP_CFG_WRITE, 15, REG_FADC_THRESH, 10);
    send_all(OP_CFG_WRITE, 15, REG_HIT_MODE, 0);

    // ---------------- event A: TDC hits ----------------
    wait (nsamp == HIT_A); #1;
    for (int q = 0; q < NQ; q++) for (int h = 0; h < 2; h++) tdc_hit[q][hit_w(q, h)][hit_c(q, h)] = 1;
    wait (nsamp == HIT_A + 1); #1;
    for (int q = 0; q < NQ; q++) for (int h = 0; h < 2; h++) tdc_hit[q][hit_w(q, h)][hit_c(q, h)] = 0;
    wait (nsamp == HIT_A + PIPE_DEPTH - 12);
    send_all(OP_L1_ACCEPT, 15, 0, 8'h21);
    repeat (40) @(posedge clk); #1;
    send_all(OP_EVENT_READ, 15, 0, 0);
    wait_rounds(1);
    for (int q = 0; q < NQ; q++) check_round(q, 0, 8'h21);
    // trigger links: exactly the hit channels, at their line and bit
    for (int q = 0; q < NQ; q++) begin
      logic [959:0] expt [2];
      expt[0] = '0; expt[1] = '0;
      for (int h = 0; h < 2; h++) begin
        int w, c, k, line;
        w = hit_w(q, h); c = hit_c(q, h);
        k = (c >= CHB[2]) ? 2 : (c >= CHB[1]) ? 1 : 0;
        line = (w % 2) * LINES_WEDGE + LNB[k] + (c - CHB[k]) / 16;
        expt[w / 2][line * 16 + (c - CHB[k]) % 16] = 1'b1;
      end
      for (int t = 0; t < 2; t++) begin
        check(trig_or[q][t] == expt[t], "trigger link bits");
        n_trig_bits += $countones(trig_or[q][t]);
      end
    end

    // ---------------- event B: FADC-rise hits, FIFO stall ----------------
    send_all(OP_CFG_WRITE, 15, REG_HIT_MODE, 1);
    hit_b = nsamp + 4;
    wait (nsamp == hit_b); #1;
    for (int c = 64; c < 128; c++) fadc_data[0][0][c] = 6'(base_q(0, 0, c) + 20);
    wait (nsamp == hit_b + 3); #1;
    for (int c = 64; c < 128; c++) fadc_data[0][0][c] = 6'(base_q(0, 0, c));
    wait (nsamp == hit_b + PIPE_DEPTH - 10);
    send_all(OP_L1_ACCEPT, 15, 0, 8'h22);
    repeat (40) @(posedge clk); #1;
    send_all(OP_EVENT_READ, 15, 0, 0);
    wait_rounds(1);
    for (int q = 0; q < NQ; q++) check_round(q, 1, 8'h22);

    // ---------------- overflow and clear ----------------
    for (int i = 0; i < 5; i++) begin
      send_all(OP_L1_ACCEPT, 15, 0, 8'h30 + i);
      repeat (40) @(posedge clk); #1;
    end
    check(n_drop > 0, "fifth accept dropped");
    send_all(OP_CLEAR, 15, 0, 0);
    n_clear++;
    send_all(OP_EVENT_READ, 15, 0, 0);
    wait_rounds(13);
    for (int q = 0; q < NQ; q++) check_round(q, 2, 0);

    // ---------------- configuration read, calibration, reset ----------------
    send_all(OP_CFG_WRITE, 4, REG_CAL_CHARGE, 8'h5D);
    send_all(OP_CFG_READ, 4, REG_CAL_CHARGE, 0);
    wait_rounds(13);
    for (int q = 0; q < NQ; q++) begin
      logic [15:0] w4 [$];
      foreach (dq[q][i]) if (dq[q][i][15:12] == 4'd4) w4.push_back(dq[q][i]);
      check(w4.size() == 3 && w4[0][7:0] == 8'hC1 && w4[1][7:0] == 8'h5D && w4[2][7:0] == 8'h04,
            "configuration read reply");
      if (w4.size() == 3 && w4[1][7:0] == 8'h5D) n_cfg_read++;
      dq[q].delete();
    end
    check(dac[0][4][1] == 8'h5D && dac[0][3][0] == 8'd190, "DAC ports");
    send_all(OP_CAL_STROBE, 15, 0, 0);
    repeat (3) @(posedge clk); #1;
    send_all(OP_RESET, 4, 0, 0);
    repeat (2) @(posedge clk); #1;
    check(dac[0][4][1] == 8'h00 && dac[0][3][0] == 8'd190, "reset of one FEA clears only its registers");
    if (dac[0][4][1] == 8'h00) n_reset++;

    $display("mechanisms: tdc_hits=%0d fadc_hit_channels=%0d sparse_skips=%0d fifo_stall_cycles=%0d",
             n_tdc_hits, n_fadc_hits, n_sparse_skip, n_stall);
    $display("            overflow_drops=%0d clears=%0d cfg_reads=%0d cal_strobes=%0d resets=%0d trig_bits=%0d rounds=%0d",
             n_drop, n_clear, n_cfg_read, n_cal, n_reset, n_trig_bits, n_grant_rounds);
    check(n_tdc_hits == 2 * NQ, "TDC hits read out");
    check(n_fadc_hits == 64, "FADC-rise hits read out");
    check(n_sparse_skip > 0, "sparse readout skipped channels");
    check(n_stall > 0, "FIFO full stalled a board");
    check(n_drop > 0, "event buffer overflow");
    check(n_clear > 0, "clear readout");
    check(n_cfg_read == NQ, "configuration reads");
    check(n_cal > 0, "calibration strobe");
    check(n_reset > 0, "FEA reset");
    check(n_trig_bits == 2 * NQ, "trigger bits");
    check(n_grant_rounds == 4, "grant rounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
