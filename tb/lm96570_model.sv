// Behavioural model of the octal transmit beamformer chip, for testbenches.
//
// Serial side, in the frame format used by tx_bf_controller: bits are taken at
// the rising edge of s_clk; a rising edge of s_le ends the frame. A 92-bit
// frame with rd = 0 stores {delay, len, pattern} for channel ch. In a frame
// with rd = 1, the stored word of channel ch is returned on s_rd, MSB first,
// one bit per falling edge of s_clk after the 4-bit header.
// Transmit side: at a rising edge of tx_en (seen on pclk, one pclk = 2 ns),
// every channel counts pclk cycles up to its delay, then plays its pattern:
// pulse slot j (j = 0 .. len-1, pattern bit j) lasts PULSE_PERIOD pclk cycles;
// if the bit is 1, p is high for the first half of the slot and n for the
// second half. The slot length stands in for the chip's programmable pulse
// frequency.
module lm96570_model
  import bf_pkg::*;
#(
  parameter int PULSE_PERIOD = 142    // 284 ns, about 3.5 MHz
) (
  input  logic           pclk,
  input  logic           s_clk,
  input  logic           s_data,
  input  logic           s_le,
  output logic           s_rd,
  input  logic           tx_en,
  output logic [NCH-1:0] p,
  output logic [NCH-1:0] n
);

  tx_ch_cfg_t regs [NCH];
  logic [TX_FRAME_W-1:0] sh = '0;
  int   cnt = 0;
  logic [TX_HDR_W-1:0] hdr = '0;

  initial begin
    for (int c = 0; c < NCH; c++) regs[c] = '0;
    s_rd = 1'b0;
  end

  always @(posedge s_clk) begin
    sh = {sh[TX_FRAME_W-2:0], s_data};
    cnt++;
    if (cnt == TX_HDR_W) hdr = sh[TX_HDR_W-1:0];
  end

  always @(negedge s_clk) begin
    if (cnt >= TX_HDR_W && cnt < TX_FRAME_W && hdr[TX_HDR_W-1]) begin
      logic [TX_CFG_W-1:0] w;
      w    = regs[hdr[CH_ADDR_W-1:0]];
      s_rd = w[TX_CFG_W - 1 - (cnt - TX_HDR_W)];
    end else begin
      s_rd = 1'b0;
    end
  end

  always @(posedge s_le) begin
    tx_frame_t f;
    f = tx_frame_t'(sh);
    if (cnt == TX_FRAME_W && !f.rd) begin
      regs[f.ch].delay   = f.delay;
      regs[f.ch].len     = f.len;
      regs[f.ch].pattern = f.pattern;
    end
    cnt = 0;
  end

  // transmit
  logic tx_en_q = 1'b0;
  int   t = -1;              // pclk cycles since the last TX_EN rise, -1: idle
  always @(posedge pclk) begin
    if (tx_en && !tx_en_q) t = 0;
    else if (t >= 0 && t < 1000000) t++;
    tx_en_q = tx_en;
    for (int c = 0; c < NCH; c++) begin
      int ph, slot, in_slot;
      ph     = t - int'(regs[c].delay);
      slot   = (ph >= 0) ? ph / PULSE_PERIOD : -1;
      in_slot = (ph >= 0) ? ph % PULSE_PERIOD : 0;
      if (t >= 0 && ph >= 0 && slot < int'(regs[c].len) && slot < PAT_MAX && regs[c].pattern[slot]) begin
        p[c] = (in_slot < PULSE_PERIOD / 2);
        n[c] = (in_slot >= PULSE_PERIOD / 2);
      end else begin
        p[c] = 1'b0;
        n[c] = 1'b0;
      end
    end
  end

endmodule
