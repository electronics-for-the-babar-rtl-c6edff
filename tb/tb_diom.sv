// tb_diom: data I/O module with 12 model FEAs (FEA f answers a grant with
// f % 3 + 1 bytes, with random gaps). Checks: reset addressing of FEAs and
// TIOMs, sync to the TIOMs, forwarding of other commands, the grant
// delay (first grant GRANT_DELAY + 2 clocks after the Event Read), that
// FEAs are granted one at a time in order, the D-LINK word format and the
// round trailer, and that two queued reads give two rounds.
module tb_diom;
  import dch_pkg::*;
  localparam int NF = 12, GD = 10;
  logic clk = 0, rst_n = 0, clink_valid = 0;
  cmd_t clink_word, fea_cmd;
  logic fea_cmd_valid, tiom_sync, dlink_valid, busy;
  logic [NF-1:0] fea_reset, grant, fea_valid, fea_last, fea_ready;
  logic [1:0] tiom_reset;
  logic [NF-1:0][7:0] fea_data;
  logic [15:0] dlink_word;
  int checks = 0, failures = 0;

  diom #(.N_FEA(NF), .GRANT_DELAY(GD)) dut (.*);

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

  int left [NF];
  int idx [NF];
  logic [NF-1:0] gap;
  int grants_seen [$];
  for (genvar f = 0; f < NF; f++) begin : g_fea
    always @(posedge clk) begin
      if (!rst_n) left[f] <= 0;
      else if (grant[f]) begin left[f] <= f % 3 + 1; idx[f] <= 0; end
      else if (fea_valid[f] && fea_ready[f]) begin left[f] <= left[f] - 1; idx[f] <= idx[f] + 1; end
      gap[f] <= ($urandom_range(0, 3) == 0);
    end
    assign fea_valid[f] = (left[f] > 0) && !gap[f];
    assign fea_last[f]  = (left[f] == 1);
    assign fea_data[f]  = 8'(f * 16 + idx[f]);
  end
  always @(posedge clk) if (rst_n) for (int f = 0; f < NF; f++) if (grant[f]) grants_seen.push_back(f);

  task automatic send(opcode_e op, int fea, int addr, int data);
    clink_word = '{op: op, fea: 4'(fea), addr: 4'(addr), data: 8'(data)};
    clink_valid = 1; @(posedge clk); #1 clink_valid = 0;
  endtask

  initial begin
    logic [15:0] words[$], expw[$];
    int t_cmd, t_grant;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send(OP_RESET, 7, 0, 0);
    check(fea_reset == 12'h080 && tiom_reset == 0 && !fea_cmd_valid, "reset one FEA, not forwarded");
    send(OP_RESET, 13, 0, 0);
    check(fea_reset == 0 && tiom_reset == 2'b10, "reset one TIOM");
    send(OP_RESET, 15, 0, 0);
    check(fea_reset == '1, "reset all FEAs");
    send(OP_SYNC, 15, 0, 0);
    check(tiom_sync && fea_cmd_valid && fea_cmd.op == OP_SYNC, "sync to TIOMs and FEAs");
    send(OP_L1_ACCEPT, 15, 0, 8'h42);
    check(fea_cmd_valid && fea_cmd.op == OP_L1_ACCEPT && fea_cmd.data == 8'h42, "L1 accept forwarded");
    // two event reads back to back
    t_cmd = $time;
    send(OP_EVENT_READ, 15, 0, 0);
    send(OP_EVENT_READ, 15, 0, 0);
    check(fea_cmd_valid && fea_cmd.op == OP_EVENT_READ, "event read forwarded");
    wait (grant[0]); t_grant = $time;
    check((t_grant - t_cmd) / 10 == GD + 2, "grant delay");
    while (words.size() < 2 * (NF * 2 + 4 * 1 + 1) + 4 && busy || words.size() == 0) begin
      @(posedge clk); #1;
      if (dlink_valid) words.push_back(dlink_word);
      if (!busy && words.size() > 0) begin
        repeat (3) @(posedge clk); #1;
        if (!busy) break;
      end
    end
    for (int r = 0; r < 2; r++) begin
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < f % 3 + 1; i++)
          expw.push_back({4'(f), i == 0, i == f % 3, 2'b00, 8'(f * 16 + i)});
      expw.push_back({4'hF, 1'b0, 1'b1, 2'b00, 8'(r)});
    end
    check(words == expw, "D-LINK words of two read-out rounds");
    check(grants_seen.size() == 2 * NF, "each FEA granted once per round");
    for (int i = 0; i < grants_seen.size(); i++) check(grants_seen[i] == i % NF, "grant order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
