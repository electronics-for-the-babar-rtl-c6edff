// elefant_channel: one channel of the ELEFANT sample path (FADC, TDC, MUX).
//
// Every sample (sample_en) the FADC code is delayed by one sample so that a
// TDC hit cannot overwrite the leading charge. If the discriminator fired in
// the sample, the merged 7-bit word is {1, vernier time}; otherwise it is
// {0, delayed charge}. The hit bit used for the hit-flag byte and the prompt
// trigger line is either that TDC flag (hit_mode = 0) or a rise of the
// charge above fadc_thresh relative to the value two samples earlier
// (hit_mode = 1). The rise is computed on the delayed, never-overwritten
// charge stream so it lines up with the merged word. Outputs are registered
// and change one clock after sample_en. The word format and both hit
// definitions follow the design; the comparison being strictly greater and
// the alignment with the delayed stream are choices.
module elefant_channel (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_en,
  input  logic [5:0] fadc_data,
  input  logic       tdc_hit,
  input  logic [5:0] tdc_time,
  input  logic       hit_mode,
  input  logic [5:0] fadc_thresh,
  output logic [6:0] sample,
  output logic       hit
);
  logic [5:0] q1, q2, q3;   // charge delayed by 1, 2, 3 samples
  logic       rise;

  // q1 is the value written this sample; compare with two samples before it
  always_comb rise = ({1'b0, q1} > ({1'b0, q3} + {1'b0, fadc_thresh}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; q3 <= '0;
      sample <= '0; hit <= 1'b0;
    end else if (sample_en) begin
      q1 <= fadc_data;
      q2 <= q1;
      q3 <= q2;
      sample <= tdc_hit ? {1'b1, tdc_time} : {1'b0, q1};
      hit    <= hit_mode ? rise : tdc_hit;
    end
  end
endmodule
