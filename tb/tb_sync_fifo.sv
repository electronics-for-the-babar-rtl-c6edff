// tb_sync_fifo: random pushes and pops against a queue model, including
// pushes into a full FIFO (ignored) and pops from an empty one (ignored).
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic full, empty;
  int checks = 0, failures = 0;

  sync_fifo #(.W(8), .DEPTH(D)) dut (.*);

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
    byte unsigned q[$];
    int n_full;
    n_full = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      push = ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      pop  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      din  = 8'($urandom);
      #1;
      check(full == (q.size() == D), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) check(dout == q[0], "head data");
      n_full += full;
      @(posedge clk);
      if (push && q.size() < D) begin
        if (pop && q.size() > 0) void'(q.pop_front());
        q.push_back(din);
      end else if (pop && q.size() > 0) void'(q.pop_front());
      #1;
    end
    check(n_full > 0, "FIFO filled up at least once");
    clear = 1; @(posedge clk); #1 clear = 0; q.delete();
    check(empty, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
