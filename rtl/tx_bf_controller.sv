// Transmit beamformer controller.
//
// Programs the external octal transmit beamformer chip with one delay and one
// pulse pattern per channel, reads the settings back to verify them, and fires
// the transmit. The chip starts a 17-bit delay counter (2 ns steps) on each
// channel at the rising edge of TX_EN and sends out the channel's pulse
// pattern (8 pulses by default, up to 64) when the counter reaches the
// programmed delay; this block only loads and checks those settings and drives
// TX_EN.
//
// Serial interface (four wires: s_clk, s_data, s_le, s_rd). Every transaction
// is one 92-bit frame {rd, ch[2:0], delay[16:0], len[6:0], pattern[63:0]},
// MSB first. s_data changes while s_clk is low and is stable at the rising
// edge of s_clk; s_rd is sampled at the rising edge of s_clk. After the last
// bit, s_le is high for one s_clk period and ends the frame.
//   write (start_prog): rd = 0, the whole frame on s_data, for channels 0..7;
//                       prog_done pulses for one cycle at the end.
//   read (start_verify): rd = 1 and ch on s_data, then zeros; the chip returns
//                       {delay, len, pattern} of channel ch on s_rd during bits
//                       4..91. Each returned word is compared with cfg[ch];
//                       verify_err is set (until the next start_verify) on any
//                       difference, and verify_done pulses at the end.
// One s_clk half period is SCLK_HALF clock cycles, so either pass takes
// NCH*(TX_FRAME_W+1)*2*SCLK_HALF cycles. s_rd is sampled without a
// synchronizer: s_clk is generated here, so the readback is source-synchronous
// and the chip's output is stable for the whole low half before the edge.
// That the chip's settings can be written and read back over a four-wire
// serial interface follows the design description; the frame layout, bit
// order and timing are this design's choices, as the chip's register map is
// not part of that description.
//
// Firing (fire pulse while idle): tx_en is held high for TXEN_CYCLES cycles.
// Requests that arrive while busy are ignored. busy is high while programming,
// verifying or firing.
module tx_bf_controller
  import bf_pkg::*;
#(
  parameter int unsigned SCLK_HALF   = 2,  // clock cycles per s_clk half period
  parameter int unsigned TXEN_CYCLES = 4   // length of the TX_EN pulse in clock cycles
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_prog,
  input  logic       start_verify,
  input  tx_ch_cfg_t cfg [NCH],
  input  logic       fire,
  output logic       s_clk,
  output logic       s_data,
  output logic       s_le,
  input  logic       s_rd,
  output logic       tx_en,
  output logic       busy,
  output logic       prog_done,
  output logic       verify_done,
  output logic       verify_err
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LATCH, S_FIRE} state_t;

  localparam int unsigned DIV_W  = $clog2(SCLK_HALF + 1);
  localparam int unsigned BIT_W  = $clog2(TX_FRAME_W + 1);
  localparam int unsigned FIRE_W = $clog2(TXEN_CYCLES + 1);

  state_t                 state;
  logic                   rd_mode;   // current pass is a readback pass
  logic [DIV_W-1:0]       div_cnt;
  logic                   half;      // 0: s_clk low half, 1: s_clk high half
  logic [BIT_W-1:0]       bit_cnt;
  logic [CH_ADDR_W-1:0]   ch;
  logic [TX_FRAME_W-1:0]  shreg;
  logic [TX_CFG_W-1:0]    rd_sh;
  logic [FIRE_W-1:0]      fire_cnt;
  logic                   tick;      // end of a half period

  assign tick = (div_cnt == DIV_W'(SCLK_HALF - 1));

  function automatic logic [TX_FRAME_W-1:0] frame_of(input logic rd,
                                                     input logic [CH_ADDR_W-1:0] c,
                                                     input tx_ch_cfg_t cc);
    tx_frame_t f;
    f.rd      = rd;
    f.ch      = c;
    f.delay   = rd ? '0 : cc.delay;
    f.len     = rd ? '0 : cc.len;
    f.pattern = rd ? '0 : cc.pattern;
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rd_mode     <= 1'b0;
      div_cnt     <= '0;
      half        <= 1'b0;
      bit_cnt     <= '0;
      ch          <= '0;
      shreg       <= '0;
      rd_sh       <= '0;
      fire_cnt    <= '0;
      prog_done   <= 1'b0;
      verify_done <= 1'b0;
      verify_err  <= 1'b0;
    end else begin
      prog_done   <= 1'b0;
      verify_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          div_cnt <= '0;
          half    <= 1'b0;
          if (start_prog || start_verify) begin
            rd_mode <= !start_prog;
            if (!start_prog) verify_err <= 1'b0;
            ch      <= '0;
            bit_cnt <= '0;
            shreg   <= frame_of(!start_prog, '0, cfg[0]);
            state   <= S_SHIFT;
          end else if (fire) begin
            fire_cnt <= '0;
            state    <= S_FIRE;
          end
        end
        S_SHIFT: begin
          div_cnt <= tick ? '0 : div_cnt + 1'b1;
          if (tick) begin
            half <= ~half;
            if (!half) begin
              // s_clk rises: take the readback bit
              if (rd_mode && bit_cnt >= BIT_W'(TX_HDR_W)) rd_sh <= {rd_sh[TX_CFG_W-2:0], s_rd};
            end else begin
              // end of the high half: next bit
              shreg <= {shreg[TX_FRAME_W-2:0], 1'b0};
              if (bit_cnt == BIT_W'(TX_FRAME_W - 1)) begin
                bit_cnt <= '0;
                state   <= S_LATCH;
              end else begin
                bit_cnt <= bit_cnt + 1'b1;
              end
            end
          end
        end
        S_LATCH: begin
          div_cnt <= tick ? '0 : div_cnt + 1'b1;
          if (tick) begin
            half <= ~half;
            if (half) begin
              if (rd_mode && rd_sh != TX_CFG_W'(cfg[ch])) verify_err <= 1'b1;
              if (ch == CH_ADDR_W'(NCH - 1)) begin
                prog_done   <= !rd_mode;
                verify_done <= rd_mode;
                state       <= S_IDLE;
              end else begin
                ch    <= ch + 1'b1;
                shreg <= frame_of(rd_mode, ch + 1'b1, cfg[ch + 1'b1]);
                state <= S_SHIFT;
              end
            end
          end
        end
        S_FIRE: begin
          if (fire_cnt == FIRE_W'(TXEN_CYCLES - 1)) state <= S_IDLE;
          else fire_cnt <= fire_cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign s_clk  = (state == S_SHIFT) && half;
  assign s_data = (state == S_SHIFT) && shreg[TX_FRAME_W-1];
  assign s_le   = (state == S_LATCH);
  assign tx_en  = (state == S_FIRE);
  assign busy   = (state != S_IDLE);

endmodule
