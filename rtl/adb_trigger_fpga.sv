// adb_trigger_fpga: trigger-data down-sampling on the amplifier-digitizer
// board.
//
// The ELEFANTs present a hit bit per channel every 14.875 MHz sample; the
// trigger runs at 1/16 of the 59.5 MHz clock, i.e. 4 samples per tick. For
// each channel this block ORs the hit bits of the 4 samples of a tick and
// presents the result for the whole next tick (hits_out updates one clock
// after trig_en). Down-sampling 15 MHz to 3.7 MHz follows the design; using
// an OR over the tick is a choice.
module adb_trigger_fpga #(
  parameter int unsigned N_CH = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sample_en,
  input  logic            trig_en,
  input  logic [N_CH-1:0] hits_in,
  output logic [N_CH-1:0] hits_out
);
  logic [N_CH-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; hits_out <= '0;
    end else if (trig_en) begin
      hits_out <= acc | hits_in;
      acc      <= '0;
    end else if (sample_en) begin
      acc <= acc | hits_in;
    end
  end
endmodule
