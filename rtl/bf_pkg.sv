// Shared constants and types of the 8-channel ultrasound beamformer.
//
// The channel count, the 12-bit ADC word, the 17-bit transmit delay, the
// 64-pulse maximum pattern length and the 64-element probe follow the
// design description. The 2-bit fractional receive delay, the 8-bit
// apodization weight and the serial frame layout are choices of this design.
// The 40 MHz sample clock is the design description's; the RTL only assumes one
// sample per clock cycle at most.
package bf_pkg;

  localparam int unsigned NCH          = 8;   // transmit and receive channels
  localparam int unsigned NUM_ELEMENTS = 64;  // elements of the linear probe
  localparam int unsigned NUM_APERTURES = NUM_ELEMENTS / NCH; // 8 groups of adjacent elements
  localparam int unsigned ADC_W        = 12;  // ADC sample width, two's complement
  localparam int unsigned TXD_W        = 17;  // transmit delay counter width (2 ns steps)
  localparam int unsigned PAT_MAX      = 64;  // longest pulse pattern, in pulses
  localparam int unsigned PAT_LEN_W    = 7;   // holds 1..64
  localparam int unsigned CH_ADDR_W    = 3;   // channel address in a serial frame
  localparam int unsigned FRAC_W       = 2;   // fractional receive delay bits (1/4 sample)
  localparam int unsigned APO_W        = 8;   // unsigned apodization weight, weight/256

  // One serial frame to the transmit beamformer chip, sent MSB first:
  // {read, channel address, delay, pattern length, pattern}. In a read frame
  // only the first 4 bits are meaningful on the data line; the chip returns
  // the channel's delay, length and pattern on the readback line instead.
  typedef struct packed {
    logic                 rd;
    logic [CH_ADDR_W-1:0] ch;
    logic [TXD_W-1:0]     delay;
    logic [PAT_LEN_W-1:0] len;
    logic [PAT_MAX-1:0]   pattern;
  } tx_frame_t;

  localparam int unsigned TX_FRAME_W = $bits(tx_frame_t); // 92 bits
  localparam int unsigned TX_HDR_W   = 1 + CH_ADDR_W;       // read flag and address

  // Per-channel transmit setting.
  typedef struct packed {
    logic [TXD_W-1:0]     delay;
    logic [PAT_LEN_W-1:0] len;
    logic [PAT_MAX-1:0]   pattern;
  } tx_ch_cfg_t;

  localparam int unsigned TX_CFG_W = $bits(tx_ch_cfg_t);   // 88 bits

endpackage
