// fea: front end assembly, one of three flavours per wedge.
//   KIND 0 (inner,  superlayers 1-4):  2 boards x 8 ELEFANTs = 128 channels
//   KIND 1 (middle, superlayers 5-7):  3 boards x 6 ELEFANTs = 144 channels
//   KIND 2 (outer,  superlayers 8-10): 4 boards x 6 ELEFANTs = 192 channels
// The readout interface board (rib) drives the boards' timing, Level-1
// accepts and readout, takes their data into its FIFOs and their trigger
// bits onto 8, 9 or 12 serial lines. Board and chip counts follow the
// design. Per-channel FADC/TDC results enter from the analog side; DAC
// codes and calibration controls leave towards it.
module fea
  import dch_pkg::*;
#(
  parameter int unsigned KIND       = 0,
  parameter logic [3:0]  FEA_ID     = 4'd0,
  parameter int unsigned DEPTH      = PIPE_DEPTH,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned N_ADB      = (KIND == 0) ? 2 : (KIND == 1) ? 3 : 4,
  parameter int unsigned N_ELEF     = (KIND == 0) ? 8 : 6,
  parameter int unsigned N_CH       = N_ADB * N_ELEF * 8,
  parameter int unsigned N_LINES    = (N_CH + 15) / 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soft_reset,
  input  logic                 cmd_valid,
  input  cmd_t                 cmd,
  input  logic                 grant,
  output logic [7:0]           tx_data,
  output logic                 tx_valid,
  output logic                 tx_last,
  input  logic                 tx_ready,
  input  logic [N_CH-1:0][5:0] fadc_data,
  input  logic [N_CH-1:0]      tdc_hit,
  input  logic [N_CH-1:0][5:0] tdc_time,
  output logic [N_LINES-1:0]   trig_lines,
  output logic [4:0][7:0]      dac,        // thresh, cal, ladder top/mid/bottom
  output logic [3:0]           cal_select,
  output logic                 cal_strobe,
  output logic                 dropped
);
  localparam int unsigned BCH = N_ELEF * 8;   // channels per board

  logic [3:0] phase;
  logic       sample_en, trig_en, hit_mode, l1_accept, clear;
  logic [5:0] fadc_thresh;
  logic [7:0] l1_tag;
  logic [N_ADB-1:0][N_ELEF-1:0] avail;
  logic [N_ADB-1:0][3:0] rd_chip;
  logic [N_ADB-1:0]      rd_start, bus_valid, bus_last, bus_ready, drop_v;
  logic [N_ADB-1:0][7:0] bus_data;
  logic [N_CH-1:0]       trig_hits;

  for (genvar b = 0; b < N_ADB; b++) begin : g_adb
    adb #(.N_ELEF(N_ELEF), .DEPTH(DEPTH)) u_adb (
      .clk, .rst_n, .sample_en, .trig_en,
      .fadc_data(fadc_data[b*BCH +: BCH]), .tdc_hit(tdc_hit[b*BCH +: BCH]),
      .tdc_time(tdc_time[b*BCH +: BCH]),
      .hit_mode, .fadc_thresh, .l1_accept, .l1_tag, .clear,
      .trig_out(trig_hits[b*BCH +: BCH]), .avail(avail[b]), .dropped(drop_v[b]),
      .rd_chip(rd_chip[b]), .rd_start(rd_start[b]),
      .dout(bus_data[b]), .dvalid(bus_valid[b]), .dlast(bus_last[b]), .dready(bus_ready[b])
    );
  end

  assign dropped = |drop_v;

  rib #(.N_ADB(N_ADB), .N_ELEF(N_ELEF), .FEA_ID(FEA_ID), .FIFO_DEPTH(FIFO_DEPTH)) u_rib (
    .clk, .rst_n, .soft_reset, .cmd_valid, .cmd, .grant,
    .tx_data, .tx_valid, .tx_last, .tx_ready,
    .phase, .sample_en, .trig_en, .hit_mode, .fadc_thresh, .l1_accept, .l1_tag, .clear,
    .avail, .rd_chip, .rd_start, .bus_data, .bus_valid, .bus_last, .bus_ready,
    .trig_hits, .trig_lines,
    .dac_thresh(dac[0]), .dac_cal(dac[1]), .dac_ladder_top(dac[2]),
    .dac_ladder_mid(dac[3]), .dac_ladder_bot(dac[4]),
    .cal_select, .cal_strobe
  );
endmodule
