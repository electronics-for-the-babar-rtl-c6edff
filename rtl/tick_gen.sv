// tick_gen: sample and trigger-tick timing from the 59.5 MHz system clock.
//
// A 4-bit phase counter runs through one 269 ns trigger tick (16 clocks).
// sample_en is high in the last clock of every group of 4 (the 14.875 MHz
// FADC sample rate) and trig_en in the last clock of the tick. A Sync
// command forces the phase back to 0 so that every board that receives the
// same sync pulse counts in step. The 1/4 and 1/16 ratios follow the design;
// marking the last clock of a period (rather than the first) is a choice.
module tick_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  output logic [3:0] phase,
  output logic       sample_en,
  output logic       trig_en
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (sync) phase <= '0;
    else           phase <= phase + 4'd1;
  end

  assign sample_en = (phase[1:0] == 2'd3);
  assign trig_en   = (phase == 4'd15);
endmodule
