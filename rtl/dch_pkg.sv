// dch_pkg: constants and types shared by the drift chamber readout logic.
//
// Clocking: everything runs on the 59.5 MHz system clock. The ELEFANT
// samples once every 4 clocks (14.875 MHz, the "15 MHz" FADC clock) and the
// trigger snapshot is taken once every 16 clocks (3.72 MHz, a 269 ns tick).
// Those ratios follow the design; the command-word layout, opcodes and
// register map below are this implementation's own choice.
package dch_pkg;

  localparam int unsigned SAMPLE_DIV = 4;   // clocks per FADC sample
  localparam int unsigned TICK_DIV   = 16;  // clocks per trigger tick
  localparam int unsigned EV_SAMPLES = 32;  // samples per triggered event
  localparam int unsigned N_EVBUF    = 4;   // event buffers per ELEFANT
  localparam int unsigned PIPE_DEPTH = 179; // ~12 us at 14.875 MHz

  // Channel counts of the three FEA flavours (boards x ELEFANTs x 8)
  localparam int unsigned CH_INNER  = 128;  // 2 boards of 64
  localparam int unsigned CH_MIDDLE = 144;  // 3 boards of 48
  localparam int unsigned CH_OUTER  = 192;  // 4 boards of 48
  localparam int unsigned CH_WEDGE  = CH_INNER + CH_MIDDLE + CH_OUTER;   // 464
  localparam int unsigned LINES_WEDGE = (CH_INNER + 15) / 16 + (CH_MIDDLE + 15) / 16
                                      + (CH_OUTER + 15) / 16;          // 29

  // Command frame, 20 bits: {opcode, fea address, register, data}
  typedef enum logic [3:0] {
    OP_NOP        = 4'h0,
    OP_CFG_WRITE  = 4'h1,
    OP_CFG_READ   = 4'h2,
    OP_EVENT_READ = 4'h3,
    OP_CLEAR      = 4'h4,
    OP_SYNC       = 4'h5,
    OP_L1_ACCEPT  = 4'h6,
    OP_CAL_STROBE = 4'h7,
    OP_RESET      = 4'h8
  } opcode_e;

  localparam logic [3:0] FEA_BROADCAST = 4'hF;

  typedef struct packed {
    opcode_e    op;
    logic [3:0] fea;
    logic [3:0] addr;
    logic [7:0] data;
  } cmd_t;

  // RIB configuration registers
  typedef enum logic [3:0] {
    REG_DISC_THRESH = 4'd0,  // discriminator threshold DAC
    REG_CAL_CHARGE  = 4'd1,  // calibration charge DAC
    REG_LADDER_TOP  = 4'd2,  // FADC ladder taps
    REG_LADDER_MID  = 4'd3,
    REG_LADDER_BOT  = 4'd4,
    REG_HIT_MODE    = 4'd5,  // bit 0: 0 = TDC hit, 1 = FADC rise
    REG_FADC_THRESH = 4'd6,  // FADC rise threshold (6 bits)
    REG_CAL_SELECT  = 4'd7   // amplifier channels taking calibration charge
  } reg_e;

  localparam int unsigned N_REGS = 8;

  // Ancillary record stored with each event
  typedef struct packed {
    logic [7:0] trig_time;
    logic [7:0] tag;
    logic [7:0] hit_flags;
  } anc_t;

endpackage
