// tiom: trigger I/O module, serving two wedges.
//
// Each front end assembly sends its trigger snapshot on serial lines, 16
// bits per line per 269 ns tick (see rib_trigger_serializer); two wedges
// give N_IN = 2 x 29 = 58 lines, 928 bits per tick. The TIOM deserialises
// all lines, and once per tick latches the complete snapshot together with
// a 32-bit tick counter into a 960-bit payload: exactly what 3 links of
// 20-bit G-LINK frames carry in 16 clocks. Link L sends payload bits
// (L*16 + k)*20 .. +19 as its frame k; link_first marks frame 0. Line l,
// bit b of the snapshot sits at payload bit l*16 + b; the counter fills
// the top 32 bits. A snapshot leaves on the links one tick after it was
// received. Two wedges per TIOM and three links follow the design; the
// frame layout and the use of the 32 spare bits are choices. The G-LINK
// serialisers and fibre transmitters are outside this logic.
module tiom #(
  parameter int unsigned N_IN    = 58,
  parameter int unsigned N_LINKS = 3,
  parameter int unsigned LINK_W  = 20
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           sync,
  input  logic                           soft_reset,
  input  logic [N_IN-1:0]                lines_in,
  output logic [N_LINKS-1:0][LINK_W-1:0] link_word,
  output logic                           link_first
);
  localparam int unsigned DATA_BITS = N_IN * 16;
  localparam int unsigned PAY_BITS  = N_LINKS * 16 * LINK_W;

  logic [3:0]             phase;
  logic [3:0]             bitpos;
  logic [N_IN-1:0][15:0]  shreg;
  logic [PAY_BITS-1:0]    frame_q;
  logic [31:0]            tick_cnt;
  logic                   s_en, t_en;
  logic [N_IN-1:0][15:0]  complete;

  tick_gen u_tick (.clk, .rst_n, .sync, .phase, .sample_en(s_en), .trig_en(t_en));

  assign bitpos = phase - 4'd1;   // the line carries the bit sent one clock earlier

  always_comb begin
    for (int l = 0; l < int'(N_IN); l++) begin
      complete[l]     = shreg[l];
      complete[l][15] = lines_in[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0; frame_q <= '0; tick_cnt <= '0; link_word <= '0; link_first <= 1'b0;
    end else if (soft_reset) begin
      shreg <= '0; frame_q <= '0; tick_cnt <= '0; link_word <= '0; link_first <= 1'b0;
    end else begin
      for (int l = 0; l < int'(N_IN); l++) shreg[l][bitpos] <= lines_in[l];
      if (phase == 4'd0) begin
        frame_q  <= {tick_cnt, (PAY_BITS - 32)'(complete)};
        tick_cnt <= tick_cnt + 32'd1;
      end
      for (int k = 0; k < int'(N_LINKS); k++)
        link_word[k] <= frame_q[(k*16 + int'(bitpos))*LINK_W +: LINK_W];
      link_first <= (bitpos == 4'd0);
    end
  end

  initial assert (DATA_BITS + 32 <= PAY_BITS) else $error("links too narrow for the trigger data");
endmodule
