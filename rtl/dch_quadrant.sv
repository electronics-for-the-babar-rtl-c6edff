// dch_quadrant: the electronics of one quadrant of the rear endplate:
// four 1/16 wedges, each with an inner, a middle and an outer front end
// assembly (464 channels, 29 trigger lines per wedge), one data I/O module
// and two trigger I/O modules. FEA number f = 3 x wedge + flavour answers to
// command address f. Within a wedge, channels 0-127 belong to the inner
// FEA, 128-271 to the middle and 272-463 to the outer one; trigger lines
// 0-7, 8-16 and 17-28 likewise. TIOM t takes wedges 2t and 2t+1 (wedge 2t
// on its lines 0-28). The grouping follows the design; the numbering is a
// choice.
module dch_quadrant
  import dch_pkg::*;
#(
  parameter int unsigned DEPTH       = PIPE_DEPTH,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned GRANT_DELAY = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clink_valid,
  input  cmd_t                         clink_word,
  output logic                         dlink_valid,
  output logic [15:0]                  dlink_word,
  output logic [1:0][2:0][19:0]        glink_word,
  output logic [1:0]                   glink_first,
  input  logic [3:0][CH_WEDGE-1:0][5:0] fadc_data,
  input  logic [3:0][CH_WEDGE-1:0]      tdc_hit,
  input  logic [3:0][CH_WEDGE-1:0][5:0] tdc_time,
  output logic [11:0][4:0][7:0]        dac,
  output logic [11:0][3:0]             cal_select,
  output logic [11:0]                  cal_strobe,
  output logic [11:0]                  dropped
);
  localparam int unsigned CH_BASE [3]  = '{0, CH_INNER, CH_INNER + CH_MIDDLE};
  localparam int unsigned CH_NUM  [3]  = '{CH_INNER, CH_MIDDLE, CH_OUTER};
  localparam int unsigned LN_BASE [3]  = '{0, 8, 17};
  localparam int unsigned LN_NUM  [3]  = '{8, 9, 12};

  logic        cmd_valid;
  cmd_t        cmd;
  logic [11:0] fea_reset, grant, f_valid, f_last, f_ready;
  logic [11:0][7:0] f_data;
  logic        tiom_sync;
  logic [1:0]  tiom_reset;
  logic [3:0][LINES_WEDGE-1:0] wlines;

  diom #(.N_FEA(12), .GRANT_DELAY(GRANT_DELAY)) u_diom (
    .clk, .rst_n, .clink_valid, .clink_word,
    .fea_cmd_valid(cmd_valid), .fea_cmd(cmd), .fea_reset, .tiom_sync, .tiom_reset,
    .grant, .fea_data(f_data), .fea_valid(f_valid), .fea_last(f_last), .fea_ready(f_ready),
    .dlink_valid, .dlink_word, .busy()
  );

  for (genvar w = 0; w < 4; w++) begin : g_wedge
    for (genvar k = 0; k < 3; k++) begin : g_fea
      localparam int unsigned F = w * 3 + k;
      fea #(.KIND(k), .FEA_ID(4'(F)), .DEPTH(DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_fea (
        .clk, .rst_n, .soft_reset(fea_reset[F]), .cmd_valid, .cmd, .grant(grant[F]),
        .tx_data(f_data[F]), .tx_valid(f_valid[F]), .tx_last(f_last[F]), .tx_ready(f_ready[F]),
        .fadc_data(fadc_data[w][CH_BASE[k] +: CH_NUM[k]]),
        .tdc_hit(tdc_hit[w][CH_BASE[k] +: CH_NUM[k]]),
        .tdc_time(tdc_time[w][CH_BASE[k] +: CH_NUM[k]]),
        .trig_lines(wlines[w][LN_BASE[k] +: LN_NUM[k]]),
        .dac(dac[F]), .cal_select(cal_select[F]), .cal_strobe(cal_strobe[F]),
        .dropped(dropped[F])
      );
    end
  end

  for (genvar t = 0; t < 2; t++) begin : g_tiom
    tiom #(.N_IN(2 * LINES_WEDGE), .N_LINKS(3), .LINK_W(20)) u_tiom (
      .clk, .rst_n, .sync(tiom_sync), .soft_reset(tiom_reset[t]),
      .lines_in({wlines[2*t+1], wlines[2*t]}),
      .link_word(glink_word[t]), .link_first(glink_first[t])
    );
  end
endmodule
