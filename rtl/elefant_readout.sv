// elefant_readout: event readout on the ELEFANT's 8-bit external data bus.
//
// On start (with an event available) the output mux first selects the
// ancillary record (input B): trigger time, trigger tag and hit-flag byte.
// It then switches to the event buffer (input A) and sends the 32 samples
// of each channel whose hit flag is set, lowest channel first, as
// {0, 7-bit sample}. Channels without a hit are skipped (sparse readout).
// The last byte is marked with dlast; afterwards the buffer is released.
// Bytes move on a valid/ready handshake, one per clock at most, so an
// event takes 3 + 32 x (hit channels) clocks when never stalled. Mux
// inputs, byte width and sparse readout follow the design; the byte order
// and the handshake are choices.
module elefant_readout
  import dch_pkg::*;
#(
  parameter int unsigned N_CH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    avail,
  input  anc_t                    anc,
  output logic [4:0]              rd_sample,
  output logic [$clog2(N_CH)-1:0] rd_ch,
  input  logic [6:0]              rd_data,
  output logic                    release_buf,
  output logic                    busy,
  output logic [7:0]              dout,
  output logic                    dvalid,
  output logic                    dlast,
  input  logic                    dready
);
  localparam int unsigned CW = $clog2(N_CH);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_e;

  state_e       state;
  logic [1:0]   hdr_i;
  logic [CW-1:0] ch;
  logic [4:0]   smp;
  logic         out_sel_b;     // 1: ancillary (mux B), 0: samples (mux A)
  logic         nxt_found, first_found;
  logic [CW-1:0] nxt_ch, first_ch;

  // next channel with a hit flag above the current one
  always_comb begin
    nxt_found = 1'b0; nxt_ch = '0;
    first_found = 1'b0; first_ch = '0;
    for (int c = N_CH - 1; c >= 0; c--) begin
      if (anc.hit_flags[c] && (c > int'(ch))) begin
        nxt_found = 1'b1; nxt_ch = CW'(c);
      end
      if (anc.hit_flags[c]) begin
        first_found = 1'b1; first_ch = CW'(c);
      end
    end
  end

  assign out_sel_b = (state == S_HDR);
  assign busy      = (state != S_IDLE);
  assign dvalid    = busy;
  assign rd_sample = smp;
  assign rd_ch     = ch;

  always_comb begin
    if (out_sel_b) begin
      unique case (hdr_i)
        2'd0:    dout = anc.trig_time;
        2'd1:    dout = anc.tag;
        default: dout = anc.hit_flags;
      endcase
    end else begin
      dout = {1'b0, rd_data};
    end
  end

  always_comb begin
    dlast = 1'b0;
    if (state == S_HDR  && hdr_i == 2'd2 && !first_found) dlast = 1'b1;
    if (state == S_DATA && smp == 5'd31 && !nxt_found)    dlast = 1'b1;
  end

  assign release_buf = dvalid && dready && dlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; hdr_i <= '0; ch <= '0; smp <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && avail) begin
          state <= S_HDR; hdr_i <= '0;
        end
        S_HDR: if (dready) begin
          hdr_i <= hdr_i + 2'd1;
          if (hdr_i == 2'd2) begin
            if (first_found) begin
              state <= S_DATA; ch <= first_ch; smp <= '0;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_DATA: if (dready) begin
          smp <= smp + 5'd1;
          if (smp == 5'd31) begin
            if (nxt_found) ch <= nxt_ch;
            else           state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
