// rib: readout interface board of a front end assembly.
//
// Commands arrive from the data I/O module as 20-bit frames (dch_pkg::cmd_t)
// and are acted on when addressed to FEA_ID or to all FEAs (address 15):
//   CFG_WRITE / CFG_READ  write or read one of 8 configuration registers
//                         (DAC codes, hit mode, FADC rise threshold, ...);
//                         a read queues two bytes {0xC, addr}, value;
//   EVENT_READ            every board is read out in parallel, chip by chip,
//                         into its local FIFO (stalling while it is full);
//   CLEAR                 Clear Readout: empties the ELEFANT event buffers;
//   SYNC                  re-aligns the sample / trigger-tick phase;
//   L1_ACCEPT             forwards the Level-1 accept and tag to the chips;
//   CAL_STROBE            pulses the amplifier calibration strobe.
// A one-clock grant from the DIOM starts transmission of one packet on the
// byte interface (tx_*, valid/ready): queued read replies, then (if an
// event was requested) board 0's FIFO until that board is finished and
// drained, then board 1 and so on, then a trailer byte
// {event included, 3'b000, FEA_ID} marked tx_last. The RIB also serialises
// the boards' trigger data onto N_LINES lines (see rib_trigger_serializer).
// The command set, the grant, the parallel FIFO readout and the trigger
// serialisation follow the design; frame format, register map, packet
// format and FIFO depths are choices. soft_reset (the DIOM's Reset) returns
// the board logic to its reset state.
module rib
  import dch_pkg::*;
#(
  parameter int unsigned N_ADB      = 2,
  parameter int unsigned N_ELEF     = 8,
  parameter logic [3:0]  FEA_ID     = 4'd0,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned N_CH       = N_ADB * N_ELEF * 8,
  parameter int unsigned N_LINES    = (N_CH + 15) / 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  soft_reset,
  // command side (from the DIOM)
  input  logic                  cmd_valid,
  input  cmd_t                  cmd,
  input  logic                  grant,
  output logic [7:0]            tx_data,
  output logic                  tx_valid,
  output logic                  tx_last,
  input  logic                  tx_ready,
  // timing and controls to the boards
  output logic [3:0]            phase,
  output logic                  sample_en,
  output logic                  trig_en,
  output logic                  hit_mode,
  output logic [5:0]            fadc_thresh,
  output logic                  l1_accept,
  output logic [7:0]            l1_tag,
  output logic                  clear,
  // board readout buses
  input  logic [N_ADB-1:0][N_ELEF-1:0] avail,
  output logic [N_ADB-1:0][3:0] rd_chip,
  output logic [N_ADB-1:0]      rd_start,
  input  logic [N_ADB-1:0][7:0] bus_data,
  input  logic [N_ADB-1:0]      bus_valid,
  input  logic [N_ADB-1:0]      bus_last,
  output logic [N_ADB-1:0]      bus_ready,
  // trigger data
  input  logic [N_CH-1:0]       trig_hits,
  output logic [N_LINES-1:0]    trig_lines,
  // analog settings (to DACs and amplifier calibration)
  output logic [7:0]            dac_thresh,
  output logic [7:0]            dac_cal,
  output logic [7:0]            dac_ladder_top,
  output logic [7:0]            dac_ladder_mid,
  output logic [7:0]            dac_ladder_bot,
  output logic [3:0]            cal_select,
  output logic                  cal_strobe
);
  logic       srst_n;
  logic       mine;
  logic       sync;
  logic [7:0] regs [N_REGS];

  assign srst_n = rst_n;   // asynchronous reset; soft_reset acts synchronously
  assign mine   = cmd_valid && ((cmd.fea == FEA_ID) || (cmd.fea == FEA_BROADCAST));
  assign sync   = mine && (cmd.op == OP_SYNC);

  tick_gen u_tick (.clk, .rst_n, .sync, .phase, .sample_en, .trig_en);

  // ---------------- configuration registers and command pulses ----------
  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      for (int r = 0; r < int'(N_REGS); r++) regs[r] <= '0;
      l1_accept <= 1'b0; l1_tag <= '0; clear <= 1'b0; cal_strobe <= 1'b0;
    end else if (soft_reset) begin
      for (int r = 0; r < int'(N_REGS); r++) regs[r] <= '0;
      l1_accept <= 1'b0; clear <= 1'b1; cal_strobe <= 1'b0;
    end else begin
      l1_accept  <= mine && (cmd.op == OP_L1_ACCEPT);
      clear      <= mine && (cmd.op == OP_CLEAR);
      cal_strobe <= mine && (cmd.op == OP_CAL_STROBE);
      if (mine && cmd.op == OP_L1_ACCEPT) l1_tag <= cmd.data;
      if (mine && cmd.op == OP_CFG_WRITE && cmd.addr < 4'(N_REGS)) regs[cmd.addr[2:0]] <= cmd.data;
    end
  end

  assign dac_thresh     = regs[3'(REG_DISC_THRESH)];
  assign dac_cal        = regs[3'(REG_CAL_CHARGE)];
  assign dac_ladder_top = regs[3'(REG_LADDER_TOP)];
  assign dac_ladder_mid = regs[3'(REG_LADDER_MID)];
  assign dac_ladder_bot = regs[3'(REG_LADDER_BOT)];
  assign hit_mode       = regs[3'(REG_HIT_MODE)][0];
  assign fadc_thresh    = regs[3'(REG_FADC_THRESH)][5:0];
  assign cal_select     = regs[3'(REG_CAL_SELECT)][3:0];

  // ---------------- configuration read replies --------------------------
  logic       rsp_push, rsp_pop, rsp_empty, rsp_full;
  logic [7:0] rsp_dout;
  logic [7:0] rsp_din;
  logic       rsp_second;   // second byte of a reply still to be queued
  logic [7:0] rsp_value;

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      rsp_second <= 1'b0; rsp_value <= '0;
    end else if (soft_reset) begin
      rsp_second <= 1'b0;
    end else if (rsp_second) begin
      rsp_second <= 1'b0;
    end else if (mine && cmd.op == OP_CFG_READ) begin
      rsp_second <= 1'b1;
      rsp_value  <= (cmd.addr < 4'(N_REGS)) ? regs[cmd.addr[2:0]] : 8'h00;
    end
  end

  assign rsp_push = rsp_second || (mine && cmd.op == OP_CFG_READ && !rsp_second);
  assign rsp_din  = rsp_second ? rsp_value : {4'hC, cmd.addr};

  sync_fifo #(.W(8), .DEPTH(16)) u_rsp (
    .clk, .rst_n, .clear(soft_reset), .push(rsp_push), .din(rsp_din),
    .pop(rsp_pop), .dout(rsp_dout), .full(rsp_full), .empty(rsp_empty)
  );

  // ---------------- event readout from the boards into local FIFOs ------
  logic [7:0] ev_req;           // event reads requested and not yet sent
  logic       sweeping, swept;  // boards being read / all boards read
  logic [N_ADB-1:0] bdone, bstarted;
  logic [N_ADB-1:0][3:0] bchip;
  logic [N_ADB-1:0] f_push, f_pop, f_full, f_empty;
  logic [N_ADB-1:0][7:0] f_dout;
  logic       pkt_done;         // transmitter finished a packet with an event

  for (genvar b = 0; b < N_ADB; b++) begin : g_board
    assign rd_chip[b]   = bchip[b];
    assign bus_ready[b] = !f_full[b] && bstarted[b];
    assign f_push[b]    = bus_valid[b] && bus_ready[b];
    assign rd_start[b]  = sweeping && !bdone[b] && !bstarted[b] && avail[b][bchip[b]];

    sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clear(soft_reset), .push(f_push[b]), .din(bus_data[b]),
      .pop(f_pop[b]), .dout(f_dout[b]), .full(f_full[b]), .empty(f_empty[b])
    );

    always_ff @(posedge clk or negedge srst_n) begin
      if (!srst_n) begin
        bdone[b] <= 1'b0; bstarted[b] <= 1'b0; bchip[b] <= '0;
      end else if (soft_reset || pkt_done) begin
        bdone[b] <= 1'b0; bstarted[b] <= 1'b0; bchip[b] <= '0;
      end else if (sweeping && !bdone[b]) begin
        if (!bstarted[b]) begin
          if (avail[b][bchip[b]]) bstarted[b] <= 1'b1;
          else if (bchip[b] == 4'(N_ELEF - 1)) bdone[b] <= 1'b1;   // chip without event: skip
          else bchip[b] <= bchip[b] + 4'd1;
        end else if (f_push[b] && bus_last[b]) begin
          bstarted[b] <= 1'b0;
          if (bchip[b] == 4'(N_ELEF - 1)) bdone[b] <= 1'b1;
          else bchip[b] <= bchip[b] + 4'd1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      ev_req <= '0; sweeping <= 1'b0; swept <= 1'b0;
    end else if (soft_reset) begin
      ev_req <= '0; sweeping <= 1'b0; swept <= 1'b0;
    end else begin
      ev_req <= ev_req + 8'(mine && cmd.op == OP_EVENT_READ) - 8'(pkt_done);
      if (pkt_done) begin
        sweeping <= 1'b0; swept <= 1'b0;
      end else if (!sweeping && !swept && ev_req != '0) begin
        sweeping <= 1'b1;
      end else if (sweeping && (&bdone)) begin
        sweeping <= 1'b0; swept <= 1'b1;
      end
    end
  end

  // ---------------- transmitter to the DIOM ------------------------------
  typedef enum logic [1:0] {T_IDLE, T_RSP, T_BOARD, T_TRAIL} tstate_e;
  tstate_e     tstate;
  logic [3:0]  tboard;
  logic        with_event;
  logic        board_finished;

  assign board_finished = f_empty[tboard[$clog2(N_ADB+1)-1:0]] && bdone[tboard[$clog2(N_ADB+1)-1:0]];

  always_comb begin
    tx_valid = 1'b0; tx_data = '0; tx_last = 1'b0;
    rsp_pop = 1'b0; f_pop = '0;
    unique case (tstate)
      T_RSP: begin
        tx_valid = !rsp_empty; tx_data = rsp_dout; rsp_pop = tx_ready;
      end
      T_BOARD: begin
        for (int b = 0; b < int'(N_ADB); b++) begin
          if (tboard == 4'(b)) begin
            tx_valid = !f_empty[b]; tx_data = f_dout[b]; f_pop[b] = tx_ready;
          end
        end
      end
      T_TRAIL: begin
        tx_valid = 1'b1; tx_last = 1'b1; tx_data = {with_event, 3'b000, FEA_ID};
      end
      default: ;
    endcase
  end

  assign pkt_done = (tstate == T_TRAIL) && tx_ready && with_event;

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      tstate <= T_IDLE; tboard <= '0; with_event <= 1'b0;
    end else if (soft_reset) begin
      tstate <= T_IDLE; tboard <= '0; with_event <= 1'b0;
    end else begin
      unique case (tstate)
        T_IDLE: if (grant) begin
          tstate     <= T_RSP;
          tboard     <= '0;
          with_event <= (ev_req != '0);
        end
        T_RSP: if (rsp_empty) tstate <= with_event ? T_BOARD : T_TRAIL;
        T_BOARD: if (board_finished) begin
          if (tboard == 4'(N_ADB - 1)) tstate <= T_TRAIL;
          else tboard <= tboard + 4'd1;
        end
        T_TRAIL: if (tx_ready) tstate <= T_IDLE;
        default: tstate <= T_IDLE;
      endcase
    end
  end

  rib_trigger_serializer #(.N_CH(N_CH), .N_LINES(N_LINES)) u_ser (
    .clk, .rst_n, .phase, .hits(trig_hits), .lines(trig_lines)
  );

  initial assert (N_ADB <= 4 && N_ELEF <= 16) else $error("unsupported board count");
endmodule
