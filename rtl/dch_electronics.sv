// dch_electronics: chamber-mounted readout electronics of the drift chamber:
// N_QUAD = 4 quadrants of the rear endplate, 16 wedges, 48 front end
// assemblies, 7424 electronics channels (of which 7104 carry wires),
// 4 DIOMs with their command and data links and 8 TIOMs driving 24 trigger
// links. Each quadrant is independent (dch_quadrant); they share only the
// 59.5 MHz system clock. Ports are per quadrant: the C-LINK command words
// in, the D-LINK data words out, 6 trigger-link frames out, and on the
// analog side the per-channel FADC/TDC results in and per-FEA DAC codes and
// calibration controls out.
module dch_electronics
  import dch_pkg::*;
#(
  parameter int unsigned N_QUAD      = 4,
  parameter int unsigned DEPTH       = PIPE_DEPTH,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned GRANT_DELAY = 64
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [N_QUAD-1:0]                        clink_valid,
  input  cmd_t [N_QUAD-1:0]                        clink_word,
  output logic [N_QUAD-1:0]                        dlink_valid,
  output logic [N_QUAD-1:0][15:0]                  dlink_word,
  output logic [N_QUAD-1:0][1:0][2:0][19:0]        glink_word,
  output logic [N_QUAD-1:0][1:0]                   glink_first,
  input  logic [N_QUAD-1:0][3:0][CH_WEDGE-1:0][5:0] fadc_data,
  input  logic [N_QUAD-1:0][3:0][CH_WEDGE-1:0]      tdc_hit,
  input  logic [N_QUAD-1:0][3:0][CH_WEDGE-1:0][5:0] tdc_time,
  output logic [N_QUAD-1:0][11:0][4:0][7:0]        dac,
  output logic [N_QUAD-1:0][11:0][3:0]             cal_select,
  output logic [N_QUAD-1:0][11:0]                  cal_strobe,
  output logic [N_QUAD-1:0][11:0]                  dropped
);
  for (genvar q = 0; q < N_QUAD; q++) begin : g_quad
    dch_quadrant #(.DEPTH(DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .GRANT_DELAY(GRANT_DELAY)) u_quad (
      .clk, .rst_n,
      .clink_valid(clink_valid[q]), .clink_word(clink_word[q]),
      .dlink_valid(dlink_valid[q]), .dlink_word(dlink_word[q]),
      .glink_word(glink_word[q]), .glink_first(glink_first[q]),
      .fadc_data(fadc_data[q]), .tdc_hit(tdc_hit[q]), .tdc_time(tdc_time[q]),
      .dac(dac[q]), .cal_select(cal_select[q]), .cal_strobe(cal_strobe[q]),
      .dropped(dropped[q])
    );
  end
endmodule
