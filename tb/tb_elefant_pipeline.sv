// tb_elefant_pipeline: writes numbered random words and checks that the
// word at tail_addr is always the one written DEPTH samples earlier, and
// that random addresses read back what was written there.
module tb_elefant_pipeline;
  localparam int DEPTH = 179;
  localparam int AW = $clog2(DEPTH + 64);
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [63:0] din = 0, rd_data;
  logic [AW-1:0] tail_addr, rd_addr = 0;
  logic [63:0] hist [int];
  int checks = 0, failures = 0;

  elefant_pipeline #(.W(64), .DEPTH(DEPTH)) dut (.*);

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      din = {$urandom, $urandom};
      hist[n] = din;
      sample_en = (n % 2 == 0) || (n < 400);
      if (!sample_en) hist.delete(n);
      @(posedge clk);
      #1 sample_en = 0;
      if (hist.exists(n)) begin
        int written, key, cnt;
        written = hist.size();
        key = 0; cnt = 0;
        if (written > DEPTH) begin
          // the DEPTH-th most recent write before the latest one
          foreach (hist[k]) begin
            if (cnt == written - DEPTH) key = k;
            cnt++;
          end
          rd_addr = tail_addr;
          #1 check(rd_data == hist[key], "tail is DEPTH samples old");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
