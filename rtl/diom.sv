// diom: data I/O module, one per quadrant.
//
// Command frames from the ROM arrive on the C-LINK receiver's parallel port
// (clink_valid, clink_word = dch_pkg::cmd_t). The DIOM decodes them:
//   RESET       pulses fea_reset of the addressed FEA (0..11, 15 = all) or
//               tiom_reset (address 12, 13; 14 = both) and is not forwarded;
//   SYNC        is forwarded to the FEAs and also drives tiom_sync;
//   EVENT_READ  is forwarded and queues a read-out round;
//   CFG_READ    is forwarded and queues a round so the reply can be sent;
//   others      are forwarded unchanged (one clock later).
// A read-out round waits GRANT_DELAY clocks, then grants the FEAs one after
// the other with a one-clock grant pulse and copies each FEA's bytes to the
// D-LINK as 16-bit words {fea[3:0], first, last, 2'b00, byte}; after the
// last FEA it appends {4'hF, 0, 1, 2'b00, round count}. The D-LINK takes a
// word every clock. Decoding, delayed grant and multiplexing follow the
// design; the word formats, the address map and the delay value are choices.
// Environmental monitoring (MCU, ADC, CANBus) is not part of this logic.
module diom
  import dch_pkg::*;
#(
  parameter int unsigned N_FEA       = 12,
  parameter int unsigned GRANT_DELAY = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clink_valid,
  input  cmd_t                  clink_word,
  output logic                  fea_cmd_valid,
  output cmd_t                  fea_cmd,
  output logic [N_FEA-1:0]      fea_reset,
  output logic                  tiom_sync,
  output logic [1:0]            tiom_reset,
  output logic [N_FEA-1:0]      grant,
  input  logic [N_FEA-1:0][7:0] fea_data,
  input  logic [N_FEA-1:0]      fea_valid,
  input  logic [N_FEA-1:0]      fea_last,
  output logic [N_FEA-1:0]      fea_ready,
  output logic                  dlink_valid,
  output logic [15:0]           dlink_word,
  output logic                  busy
);
  localparam int unsigned FW = $clog2(N_FEA);
  typedef enum logic [1:0] {G_IDLE, G_WAIT, G_XFER, G_TRAIL} gstate_e;

  gstate_e       gstate;
  logic [7:0]    pending, rounds;
  logic [15:0]   dcount;
  logic [FW-1:0] cur;
  logic          first, is_reset, queue_round, round_done;
  logic          sel_valid, sel_last;
  logic [7:0]    sel_data;

  assign is_reset    = clink_valid && (clink_word.op == OP_RESET);
  assign queue_round = clink_valid && (clink_word.op == OP_EVENT_READ || clink_word.op == OP_CFG_READ);
  assign round_done  = (gstate == G_TRAIL);

  // command forwarding and reset / sync distribution
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fea_cmd_valid <= 1'b0; fea_cmd <= '0; fea_reset <= '0;
      tiom_sync <= 1'b0; tiom_reset <= '0;
    end else begin
      fea_cmd_valid <= clink_valid && !is_reset && (clink_word.op != OP_NOP);
      fea_cmd       <= clink_word;
      tiom_sync     <= clink_valid && (clink_word.op == OP_SYNC);
      fea_reset     <= '0;
      tiom_reset    <= '0;
      if (is_reset) begin
        if (clink_word.fea == FEA_BROADCAST) fea_reset <= '1;
        else if (clink_word.fea < 4'(N_FEA)) fea_reset[clink_word.fea[FW-1:0]] <= 1'b1;
        else if (clink_word.fea == 4'd12) tiom_reset <= 2'b01;
        else if (clink_word.fea == 4'd13) tiom_reset <= 2'b10;
        else if (clink_word.fea == 4'd14) tiom_reset <= 2'b11;
      end
    end
  end

  // the granted FEA's byte stream
  always_comb begin
    sel_valid = 1'b0; sel_last = 1'b0; sel_data = '0; fea_ready = '0;
    for (int f = 0; f < int'(N_FEA); f++) begin
      if (gstate == G_XFER && cur == FW'(f)) begin
        sel_valid = fea_valid[f]; sel_last = fea_last[f]; sel_data = fea_data[f];
        fea_ready[f] = 1'b1;
      end
    end
  end

  assign busy = (gstate != G_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gstate <= G_IDLE; pending <= '0; rounds <= '0; dcount <= '0; cur <= '0;
      first <= 1'b1; grant <= '0; dlink_valid <= 1'b0; dlink_word <= '0;
    end else begin
      pending     <= pending + 8'(queue_round) - 8'(round_done);
      grant       <= '0;
      dlink_valid <= 1'b0;
      unique case (gstate)
        G_IDLE: if (pending != '0) begin
          gstate <= G_WAIT; dcount <= 16'(GRANT_DELAY);
        end
        G_WAIT: if (dcount == '0) begin
          gstate <= G_XFER; cur <= '0; first <= 1'b1; grant[0] <= 1'b1;
        end else begin
          dcount <= dcount - 16'd1;
        end
        G_XFER: if (sel_valid) begin
          dlink_valid <= 1'b1;
          dlink_word  <= {4'(cur), first, sel_last, 2'b00, sel_data};
          first       <= sel_last;
          if (sel_last) begin
            if (cur == FW'(N_FEA - 1)) gstate <= G_TRAIL;
            else begin
              cur <= cur + FW'(1);
              grant[cur + FW'(1)] <= 1'b1;
            end
          end
        end
        G_TRAIL: begin
          dlink_valid <= 1'b1;
          dlink_word  <= {4'hF, 1'b0, 1'b1, 2'b00, rounds};
          rounds      <= rounds + 8'd1;
          gstate      <= G_IDLE;
        end
        default: gstate <= G_IDLE;
      endcase
    end
  end

  initial assert (N_FEA <= 12) else $error("at most 12 FEAs per DIOM");
endmodule
