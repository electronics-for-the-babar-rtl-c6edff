// rib_trigger_serializer: sends one trigger-tick snapshot of N_CH hit bits
// to the trigger I/O module on N_LINES serial lines at the 59.5 MHz clock.
//
// Each 269 ns tick has 16 clocks, so each line carries 16 bits per tick:
// line l sends bits l*16 .. l*16+15 of the snapshot, bit p in the clock
// after phase p (the snapshot is loaded at phase 0). Missing bits of a
// partly used last line are sent as 0. 128, 144 and 192 channels thus need
// 8, 9 and 12 lines, the 8-12 lines the design uses; the bit order and
// phase alignment are choices.
module rib_trigger_serializer #(
  parameter int unsigned N_CH    = 128,
  parameter int unsigned N_LINES = (N_CH + 15) / 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         phase,
  input  logic [N_CH-1:0]    hits,
  output logic [N_LINES-1:0] lines
);
  logic [N_LINES*16-1:0] snap, cur;

  assign cur = (phase == 4'd0) ? (N_LINES*16)'(hits) : snap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snap <= '0; lines <= '0;
    end else begin
      snap <= cur;
      for (int l = 0; l < int'(N_LINES); l++) lines[l] <= cur[l*16 + int'(phase)];
    end
  end

  initial assert (N_LINES * 16 >= N_CH) else $error("too few trigger lines");
endmodule
