// FPGA beamformer for an 8-channel, 64-element linear-array ultrasound system.
//
// Transmit: tx_bf_controller loads the per-channel delay and pulse pattern
// into the external octal transmit beamformer chip over its serial interface
// (tx_s_clk, tx_s_data, tx_s_le, readback on tx_s_rd) and raises tx_en to
// launch the pulses; start_verify, accepted while no frame is running, reads
// the settings back and flags any difference on verify_err. The
// chip drives the high-voltage pulsers, which pulser_en enables only while a
// frame is being scanned. Element selection: mux_sel is the
// shared select code of the high-voltage demultiplexers and multiplexers that
// connect the 8 channels to 8 adjacent elements of the 64. Receive: the 8
// ADC sample streams (12 bits, one sample per clock when adc_valid is high,
// 40 MSPS in the intended system) pass through rx_beamformer (delay,
// apodization, summation, Hilbert transform, envelope detection).
// scan_controller steps mux_sel over the 8 apertures and, for each, fires the
// transmit and opens a receive window of RX_SAMPLES samples.
//
// Output: env_valid marks one envelope sample of the current scan line
// (env_line) inside the receive window; env_first marks the first sample of a
// line. The envelope stream is meant for the host PC, which does scan
// conversion and display; the host link itself is outside this RTL.
// Configuration (tx_cfg, rx_delay, apod_w) is sampled continuously and must be
// held stable during a frame. The block structure follows the design
// description; the sequencing, the widths and the output format are this
// design's choices.
module us_beamformer_top
  import bf_pkg::*;
#(
  parameter int unsigned RX_SAMPLES    = 4096,
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned HILB_TAPS     = 31,
  parameter int unsigned SCLK_HALF     = 2,
  parameter int unsigned TXEN_CYCLES   = 4,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned DLY_W         = $clog2(DEPTH) + FRAC_W,
  parameter int unsigned ENV_W         = ADC_W + APO_W + $clog2(NCH) + 2,
  parameter int unsigned SEL_W         = $clog2(NUM_APERTURES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // control
  input  logic                    start_scan,
  input  logic                    start_verify,   // read back the transmit settings (while idle)
  output logic                    verify_done,
  output logic                    verify_err,
  output logic                    scan_busy,
  output logic                    frame_done,
  // configuration
  input  tx_ch_cfg_t              tx_cfg   [NCH],
  input  logic        [DLY_W-1:0] rx_delay [NCH],
  input  logic        [APO_W-1:0] apod_w   [NCH],
  // transmit beamformer chip
  output logic                    tx_s_clk,
  output logic                    tx_s_data,
  output logic                    tx_s_le,
  input  logic                    tx_s_rd,
  output logic                    tx_en,
  // high-voltage pulser enable (EN of the pulser chips)
  output logic                    pulser_en,
  // high-voltage element multiplexers
  output logic        [SEL_W-1:0] mux_sel,
  // receiver ADCs
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data [NCH],
  // envelope stream to the host
  output logic                    env_valid,
  output logic                    env_first,
  output logic        [SEL_W-1:0] env_line,
  output logic        [ENV_W-1:0] env_data
);

  localparam int unsigned TAG_W = 2 + SEL_W;   // {first, active, line}

  logic tx_start_prog, tx_fire, tx_prog_done, tx_busy;
  logic rx_active, rx_active_q;
  logic rx_valid;
  logic [TAG_W-1:0] in_tag, out_tag;

  tx_bf_controller #(.SCLK_HALF(SCLK_HALF), .TXEN_CYCLES(TXEN_CYCLES)) u_tx (
    .clk, .rst_n,
    .start_prog(tx_start_prog),
    .start_verify(start_verify & ~scan_busy),
    .cfg(tx_cfg),
    .fire(tx_fire),
    .s_clk(tx_s_clk), .s_data(tx_s_data), .s_le(tx_s_le), .s_rd(tx_s_rd),
    .tx_en, .busy(tx_busy), .prog_done(tx_prog_done),
    .verify_done, .verify_err
  );

  scan_controller #(
    .RX_SAMPLES(RX_SAMPLES), .SETTLE_CYCLES(SETTLE_CYCLES), .LINES(NUM_APERTURES)
  ) u_scan (
    .clk, .rst_n,
    .start(start_scan),
    .tx_prog_done,
    .tx_busy,
    .sample_tick(adc_valid),
    .tx_start_prog, .tx_fire,
    .mux_sel,
    .rx_active,
    .busy(scan_busy),
    .frame_done
  );

  // first sample of a window: rx_active rising on a valid sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rx_active_q <= 1'b0;
    else if (adc_valid) rx_active_q <= rx_active;
  end

  assign in_tag = {rx_active & ~rx_active_q, rx_active, mux_sel};

  rx_beamformer #(
    .DEPTH(DEPTH), .HILB_TAPS(HILB_TAPS), .TAG_W(TAG_W), .DLY_W(DLY_W), .ENV_W(ENV_W)
  ) u_rx (
    .clk, .rst_n,
    .in_valid(adc_valid), .din(adc_data), .in_tag,
    .delay(rx_delay), .weight(apod_w),
    .out_valid(rx_valid), .env(env_data), .out_tag
  );

  // the pulsers are enabled only while a frame is being scanned
  assign pulser_en = scan_busy;

  assign env_valid = rx_valid & out_tag[SEL_W];
  assign env_first = rx_valid & out_tag[SEL_W+1];
  assign env_line  = out_tag[SEL_W-1:0];

endmodule
