// elefant_event_buffers: Level-1 transfer and the 4 event buffers of the
// ELEFANT ("SRAM" for samples, "SRAM2" for ancillary data).
//
// A Level-1 accept (l1_accept, with its 8-bit trigger tag) starts a copy of
// the 32 samples at the end of the pipeline: base = tail_addr at the time of
// the accept, one 8-channel sample per clock for 32 clocks. The copy drops
// each channel's hit bit but ORs it into the hit-flag byte. At the end the
// ancillary record {trigger time, tag, hit flags} is written next to the
// samples and the buffer becomes readable. Buffers are used round robin by
// a write and a read pointer; the reader sees the oldest full buffer
// (avail, anc, rd_sample/rd_ch -> rd_data, asynchronous) and frees it with
// release. clear empties all buffers (Clear Readout). An accept that finds
// all buffers full, or a copy in progress, is dropped and reported on
// dropped. The trigger time is an 8-bit count of samples since reset.
// Four buffers, 32 samples, time/tag/hit flags follow the design; the copy
// timing, the drop rule and the widths of time and tag are choices.
module elefant_event_buffers
  import dch_pkg::*;
#(
  parameter int unsigned N_CH  = 8,
  parameter int unsigned N_BUF = 4,
  parameter int unsigned AW    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sample_en,
  input  logic            l1_accept,
  input  logic [7:0]      l1_tag,
  input  logic            clear,
  // pipeline side
  input  logic [AW-1:0]   tail_addr,
  output logic [AW-1:0]   pipe_addr,
  input  logic [N_CH*8-1:0] pipe_data,
  // reader side
  output logic            avail,
  output anc_t            anc,
  input  logic [4:0]      rd_sample,
  input  logic [$clog2(N_CH)-1:0] rd_ch,
  output logic [6:0]      rd_data,
  input  logic            release_buf,
  // status
  output logic            busy,
  output logic            dropped
);
  localparam int unsigned BW = $clog2(N_BUF);

  logic [N_CH*7-1:0] sram  [N_BUF*EV_SAMPLES];
  anc_t              sram2 [N_BUF];

  logic [BW-1:0]   wbuf, rbuf;
  logic [BW:0]     count;
  logic [4:0]      idx;
  logic [AW-1:0]   base;
  logic [7:0]      tag_q, time_q, sample_cnt;
  logic [N_CH-1:0] hit_acc, hit_now;
  logic [N_CH*7-1:0] word_now;
  logic            accept, finish;

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      hit_now[c]            = pipe_data[c*8+7];
      word_now[c*7 +: 7]    = pipe_data[c*8 +: 7];
    end
  end

  assign pipe_addr = base + AW'(idx);
  assign accept    = l1_accept && !busy && (count < (BW+1)'(N_BUF));
  assign dropped   = l1_accept && !accept;
  assign finish    = busy && (idx == 5'd31);
  assign avail     = (count != '0);
  assign anc       = sram2[rbuf];
  assign rd_data   = sram[{rbuf, rd_sample}][rd_ch*7 +: 7];

  always_ff @(posedge clk) begin
    if (busy) sram[{wbuf, idx}] <= word_now;
    if (finish) sram2[wbuf] <= '{trig_time: time_q, tag: tag_q, hit_flags: hit_acc | hit_now};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf <= '0; rbuf <= '0; count <= '0; idx <= '0; busy <= 1'b0;
      base <= '0; tag_q <= '0; time_q <= '0; sample_cnt <= '0; hit_acc <= '0;
    end else begin
      if (sample_en) sample_cnt <= sample_cnt + 8'd1;
      if (clear) begin
        wbuf <= '0; rbuf <= '0; count <= '0; busy <= 1'b0; idx <= '0;
      end else begin
        if (accept) begin
          busy    <= 1'b1;
          base    <= tail_addr;
          idx     <= '0;
          tag_q   <= l1_tag;
          time_q  <= sample_cnt;
          hit_acc <= '0;
        end else if (busy) begin
          idx     <= idx + 5'd1;
          hit_acc <= hit_acc | hit_now;
          if (finish) begin
            busy <= 1'b0;
            wbuf <= wbuf + BW'(1);
          end
        end
        if (release_buf && avail) rbuf <= rbuf + BW'(1);
        count <= count + (BW+1)'(finish) - (BW+1)'(release_buf && avail);
      end
    end
  end

  initial assert (N_BUF == 2**BW) else $error("N_BUF must be a power of two");
endmodule
