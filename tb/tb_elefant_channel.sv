// tb_elefant_channel: random FADC codes and TDC hits, both hit definitions.
// The expected word is worked out from the input history: {1, vernier time}
// on a TDC hit, else {0, charge of the previous sample}; the FADC hit is a
// rise of that charge above the threshold over the charge two samples older.
module tb_elefant_channel;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [5:0] fadc_data = 0, tdc_time = 0, fadc_thresh = 6'd5;
  logic tdc_hit = 0, hit_mode = 0;
  logic [6:0] sample;
  logic hit;
  int checks = 0, failures = 0;

  elefant_channel dut (.*);

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
    int f1, f2, f3;   // charge of the previous 1, 2, 3 samples
    int exp_s, exp_h, n_tdc = 0, n_rise = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    f1 = 0; f2 = 0; f3 = 0;
    for (int k = 0; k < 600; k++) begin
      hit_mode  = (k >= 300);
      fadc_data = 6'($urandom_range(0, 63));
      tdc_hit   = ($urandom_range(0, 4) == 0);
      tdc_time  = 6'($urandom);
      sample_en = 1;
      @(posedge clk);
      #1 sample_en = 0;
      exp_s = tdc_hit ? (64 + tdc_time) : f1;
      exp_h = hit_mode ? (f1 > f3 + fadc_thresh) : tdc_hit;
      check(sample == 7'(exp_s), "sample word");
      check(hit == exp_h, "hit bit");
      if (hit && !hit_mode) n_tdc++;
      if (hit && hit_mode) n_rise++;
      f3 = f2; f2 = f1; f1 = fadc_data;
      repeat (3) @(posedge clk);
      #1;
      check(sample == 7'(exp_s), "word held between samples");
    end
    check(n_tdc > 0 && n_rise > 0, "both hit definitions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
