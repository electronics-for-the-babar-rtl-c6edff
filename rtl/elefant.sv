// elefant: digital core of the 8-channel ELEFANT TDC/FADC chip.
//
// Per channel the FADC code and the TDC vernier result (hit flag and 6-bit
// time within the 67 ns sample) arrive once per sample; the mixed-signal
// converters themselves are outside this model. Eight elefant_channel
// slices merge them into 7-bit words and hit bits; the words of all
// channels go into the Level-1 pipeline (~12 us). A Level-1 accept copies
// the 32 samples at the pipeline's end into one of four event buffers,
// with trigger time, tag and hit-flag byte. The hit bits also leave the
// chip every sample on the 8 trigger lines (trig_hits). Readout is started
// with rd_start and streams bytes on the 8-bit bus with a valid/ready
// handshake (see elefant_readout). Timing: trig_hits and the pipeline input
// change one clock after sample_en; the event data of a sample taken at
// time t is the data of the accept arriving DEPTH samples later.
module elefant
  import dch_pkg::*;
#(
  parameter int unsigned N_CH  = 8,
  parameter int unsigned DEPTH = PIPE_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,
  input  logic [N_CH-1:0][5:0] fadc_data,
  input  logic [N_CH-1:0]      tdc_hit,
  input  logic [N_CH-1:0][5:0] tdc_time,
  input  logic                 hit_mode,
  input  logic [5:0]           fadc_thresh,
  input  logic                 l1_accept,
  input  logic [7:0]           l1_tag,
  input  logic                 clear,
  output logic [N_CH-1:0]      trig_hits,
  output logic                 avail,
  output logic                 dropped,
  output logic                 copy_busy,
  input  logic                 rd_start,
  output logic                 rd_busy,
  output logic [7:0]           dout,
  output logic                 dvalid,
  output logic                 dlast,
  input  logic                 dready
);
  localparam int unsigned AW = $clog2(DEPTH + 64);

  logic [N_CH-1:0][6:0] smp;
  logic [N_CH*8-1:0]    pipe_in, pipe_out;
  logic [AW-1:0]        tail_addr, pipe_addr;
  anc_t                 anc;
  logic [4:0]           rd_sample;
  logic [$clog2(N_CH)-1:0] rd_ch;
  logic [6:0]           rd_data;
  logic                 release_buf;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    elefant_channel u_ch (
      .clk, .rst_n, .sample_en,
      .fadc_data(fadc_data[c]), .tdc_hit(tdc_hit[c]), .tdc_time(tdc_time[c]),
      .hit_mode, .fadc_thresh,
      .sample(smp[c]), .hit(trig_hits[c])
    );
    assign pipe_in[c*8 +: 8] = {trig_hits[c], smp[c]};
  end

  elefant_pipeline #(.W(N_CH*8), .DEPTH(DEPTH), .AW(AW)) u_pipe (
    .clk, .rst_n, .sample_en, .din(pipe_in),
    .tail_addr, .rd_addr(pipe_addr), .rd_data(pipe_out)
  );

  elefant_event_buffers #(.N_CH(N_CH), .N_BUF(N_EVBUF), .AW(AW)) u_buf (
    .clk, .rst_n, .sample_en, .l1_accept, .l1_tag, .clear,
    .tail_addr, .pipe_addr, .pipe_data(pipe_out),
    .avail, .anc, .rd_sample, .rd_ch, .rd_data, .release_buf,
    .busy(copy_busy), .dropped
  );

  elefant_readout #(.N_CH(N_CH)) u_rd (
    .clk, .rst_n, .start(rd_start), .avail, .anc,
    .rd_sample, .rd_ch, .rd_data, .release_buf,
    .busy(rd_busy), .dout, .dvalid, .dlast, .dready
  );
endmodule
