// adb: amplifier-digitizer board. N_ELEF ELEFANT chips (8 on the 64-channel
// inner board, 6 on the 48-channel boards) share an 8-bit data bus towards
// the readout interface board, which picks a chip with rd_chip and starts
// its readout with rd_start. The board's trigger FPGA collects the chips'
// per-sample hit lines and down-samples them to the trigger tick. The
// amplifier chips and the converters are analog and sit outside this model:
// the board takes their digital results per channel. Chip counts follow the
// design; the bus select and handshake are choices.
module adb
  import dch_pkg::*;
#(
  parameter int unsigned N_ELEF = 8,
  parameter int unsigned DEPTH  = PIPE_DEPTH,
  parameter int unsigned N_CH   = N_ELEF * 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,
  input  logic                 trig_en,
  input  logic [N_CH-1:0][5:0] fadc_data,
  input  logic [N_CH-1:0]      tdc_hit,
  input  logic [N_CH-1:0][5:0] tdc_time,
  input  logic                 hit_mode,
  input  logic [5:0]           fadc_thresh,
  input  logic                 l1_accept,
  input  logic [7:0]           l1_tag,
  input  logic                 clear,
  output logic [N_CH-1:0]      trig_out,
  output logic [N_ELEF-1:0]    avail,
  output logic                 dropped,
  input  logic [3:0]           rd_chip,
  input  logic                 rd_start,
  output logic [7:0]           dout,
  output logic                 dvalid,
  output logic                 dlast,
  input  logic                 dready
);
  logic [N_CH-1:0]        hits;
  logic [N_ELEF-1:0]      drop_v, valid_v, last_v;
  logic [N_ELEF-1:0][7:0] dout_v;

  for (genvar e = 0; e < N_ELEF; e++) begin : g_elef
    elefant #(.N_CH(8), .DEPTH(DEPTH)) u_elef (
      .clk, .rst_n, .sample_en,
      .fadc_data(fadc_data[e*8 +: 8]), .tdc_hit(tdc_hit[e*8 +: 8]),
      .tdc_time(tdc_time[e*8 +: 8]),
      .hit_mode, .fadc_thresh, .l1_accept, .l1_tag, .clear,
      .trig_hits(hits[e*8 +: 8]), .avail(avail[e]), .dropped(drop_v[e]),
      .rd_start(rd_start && (rd_chip == 4'(e))), .rd_busy(), .copy_busy(),
      .dout(dout_v[e]), .dvalid(valid_v[e]), .dlast(last_v[e]),
      .dready(dready && (rd_chip == 4'(e)))
    );
  end

  assign dropped = |drop_v;

  // the external bus: only the selected chip drives it
  always_comb begin
    dout = '0; dvalid = 1'b0; dlast = 1'b0;
    for (int e = 0; e < int'(N_ELEF); e++) begin
      if (rd_chip == 4'(e)) begin
        dout = dout_v[e]; dvalid = valid_v[e]; dlast = last_v[e];
      end
    end
  end

  adb_trigger_fpga #(.N_CH(N_CH)) u_fpga (
    .clk, .rst_n, .sample_en, .trig_en, .hits_in(hits), .hits_out(trig_out)
  );
endmodule
