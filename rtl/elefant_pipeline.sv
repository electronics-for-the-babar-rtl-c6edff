// elefant_pipeline: the Level-1 latency pipeline ("DRAM" of the ELEFANT).
//
// One word per sample holds all 8 channels (W bits). Samples are written
// into a circular memory at sample_en; the pipeline is DEPTH samples long,
// so tail_addr points at the oldest sample still inside the pipeline, the
// start of the 32-sample window a Level-1 accept copies out. The memory has
// 2**AW >= DEPTH + 64 words so the window stays intact while it is copied.
// The read port is asynchronous (rd_addr -> rd_data in the same cycle).
// The ~12 us latency (DEPTH = 179 samples at 14.875 MHz) follows the design;
// the circular organisation and memory size are choices.
module elefant_pipeline #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 179,
  parameter int unsigned AW    = $clog2(DEPTH + 64)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_en,
  input  logic [W-1:0]  din,
  output logic [AW-1:0] tail_addr,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk) begin
    if (sample_en) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         wptr <= '0;
    else if (sample_en) wptr <= wptr + AW'(1);
  end

  assign tail_addr = wptr - AW'(DEPTH);
  assign rd_data   = mem[rd_addr];

  initial assert (DEPTH + 64 <= 2**AW) else $error("pipeline memory too small");
endmodule
