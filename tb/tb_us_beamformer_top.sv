// End-to-end testbench for us_beamformer_top at its default parameters: one
// full frame of 8 scan lines with 4096-sample receive windows.
//
// A serial receiver decodes the frames sent to the transmit beamformer chip and
// compares them with the configuration. An echo model stands in for the probe,
// the high-voltage switches and the ADCs: after each TX_EN it puts a
// Gaussian-windowed 3.5 MHz burst (40 MSPS sampling) on every channel, arriving
// at channel c 0.75*c^2 samples later than at channel 0, as from a point
// target in front of the aperture, with an amplitude that differs per line.
// The receive delays are set to undo that spread (quarter-sample steps, so the
// fractional interpolation is used). A model of the transmit beamformer chip
// takes the programmed settings and, on each TX_EN, produces the pulse
// patterns; the delay to each channel's first pulse and the pulse counts are
// checked against the configuration. After the frame, the settings are read
// back: cleanly, then with one setting changed, which must be flagged. Checked per line: 4096 envelope samples,
// one first-sample mark, the line number, the envelope peak at the expected
// depth and of the expected size, and a quiet envelope away from the echo.
// The mechanisms exercised are counted and each must occur: serial frames,
// TX_EN pulses, aperture switches, receive windows, ADC sample gaps, channels
// with a fractional delay, frame completion, transmit pulses, readback
// mismatch.
module tb_us_beamformer_top;
  import bf_pkg::*;

  localparam int unsigned RX_SAMPLES = 4096;     // default of the top
  localparam int unsigned DEPTH      = 256;
  localparam int unsigned DLY_W      = $clog2(DEPTH) + FRAC_W;
  localparam int unsigned ENV_W      = ADC_W + APO_W + $clog2(NCH) + 2;
  localparam int unsigned SEL_W      = $clog2(NUM_APERTURES);
  localparam real PI    = 3.14159265358979323846;
  localparam real F_REL = 3.5 / 40.0;            // burst frequency / sample rate
  localparam real SIGMA = 6.0;                   // burst width in samples

  logic clk = 1'b0, rst_n = 1'b0, pclk = 1'b0;
  logic start_scan = 1'b0, scan_busy, frame_done;
  logic start_verify = 1'b0, verify_done, verify_err;
  logic tx_s_rd;
  logic [NCH-1:0] pin, nin;
  tx_ch_cfg_t tx_cfg [NCH];
  logic        [DLY_W-1:0] rx_delay [NCH];
  logic        [APO_W-1:0] apod_w   [NCH];
  logic tx_s_clk, tx_s_data, tx_s_le, tx_en, pulser_en;
  logic [SEL_W-1:0] mux_sel;
  logic adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_data [NCH];
  logic env_valid, env_first;
  logic [SEL_W-1:0] env_line;
  logic [ENV_W-1:0] env_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;       // 10 time units per FPGA clock
  always #1 pclk = ~pclk;     // 2 time units: the chip's 2 ns delay step, read as 1 unit = 1 ns

  us_beamformer_top dut (.*);

  lm96570_model chip (.pclk, .s_clk(tx_s_clk), .s_data(tx_s_data), .s_le(tx_s_le), .s_rd(tx_s_rd),
                      .tx_en, .p(pin), .n(nin));

  // ---------------------------------------------------- transmit pulse check
  // per channel and fire: pclk cycles from the TX_EN rise to the first P pulse,
  // and the number of P and N pulses
  int pc_t = -1;
  int first_p [NCH], p_pulses [NCH], n_pulses [NCH];
  int tx_pulse_errors = 0, tx_pulses_total = 0;
  logic [NCH-1:0] pin_q = '0, nin_q = '0;
  logic tx_en_pq = 1'b0;
  task automatic close_fire();
    for (int c = 0; c < NCH; c++) begin
      int expect_n;
      expect_n = 0;
      for (int j = 0; j < int'(tx_cfg[c].len); j++) if (tx_cfg[c].pattern[j]) expect_n++;
      if (p_pulses[c] != expect_n || n_pulses[c] != expect_n) tx_pulse_errors++;
      // first pulse slot j0: P rises at delay + j0*period (+1 for sampling on pclk)
      for (int j = 0; j < int'(tx_cfg[c].len); j++)
        if (tx_cfg[c].pattern[j]) begin
          if (first_p[c] < int'(tx_cfg[c].delay) + j * 142 ||
              first_p[c] > int'(tx_cfg[c].delay) + j * 142 + 2) begin
            tx_pulse_errors++;
            $display("ch%0d first pulse after %0d steps, expected %0d", c, first_p[c],
                     int'(tx_cfg[c].delay) + j * 142);
          end
          break;
        end
    end
  endtask
  always @(posedge pclk) begin
    if (tx_en && !tx_en_pq) begin
      if (pc_t >= 0) close_fire();
      pc_t = 0;
      for (int c = 0; c < NCH; c++) begin first_p[c] = -1; p_pulses[c] = 0; n_pulses[c] = 0; end
    end else if (pc_t >= 0) pc_t++;
    tx_en_pq = tx_en;
    for (int c = 0; c < NCH; c++) begin
      if (pin[c] && !pin_q[c]) begin
        p_pulses[c]++;
        tx_pulses_total++;
        if (first_p[c] < 0) first_p[c] = pc_t;
      end
      if (nin[c] && !nin_q[c]) n_pulses[c]++;
    end
    pin_q = pin;
    nin_q = nin;
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- serial frames
  logic [TX_FRAME_W-1:0] rx_sh = '0;
  int rx_bits = 0, n_frames = 0, bad_frames = 0;
  logic s_clk_q = 1'b0, s_le_q = 1'b0;
  always @(posedge clk) begin
    s_clk_q <= tx_s_clk;
    s_le_q  <= tx_s_le;
    if (tx_s_clk && !s_clk_q) begin
      rx_sh   <= {rx_sh[TX_FRAME_W-2:0], tx_s_data};
      rx_bits <= rx_bits + 1;
    end
    if (tx_s_le && !s_le_q) begin
      tx_frame_t f;
      f = tx_frame_t'(rx_sh);
      if (rx_bits != TX_FRAME_W || f.ch != CH_ADDR_W'(n_frames % NCH)) bad_frames++;
      else if (!f.rd && (
          f.delay != tx_cfg[n_frames % NCH].delay || f.len != tx_cfg[n_frames % NCH].len ||
          f.pattern != tx_cfg[n_frames % NCH].pattern)) bad_frames++;
      n_frames++;
      rx_bits <= 0;
    end
  end

  // ------------------------------------------------------------ echo model
  int   tau_q [NCH];              // arrival offset per channel, quarter samples
  real  amp   [NUM_APERTURES];    // echo amplitude per line
  int   t0    [NUM_APERTURES];    // echo arrival at channel 0, samples after TX_EN
  int   k = 0;                    // ADC samples since the last TX_EN rise
  int   line = -1;
  int   n_fires = 0, n_gaps = 0, n_switches = 0;
  logic tx_en_q = 1'b0;
  logic [SEL_W-1:0] sel_q = '0;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (tx_en && !tx_en_q) begin
        n_fires++;
        checks++;
        if (!pulser_en) begin failures++; $display("TX_EN while the pulsers are disabled"); end
        line++;
        k = 0;
        checks++;
        if (int'(mux_sel) != line) begin failures++; $display("fire %0d with mux_sel %0d", line, mux_sel); end
      end
      if (mux_sel != sel_q) n_switches++;
      tx_en_q = tx_en;
      sel_q   = mux_sel;
      // about one cycle in 50 has no sample
      adc_valid = ($urandom_range(0, 49) != 0);
      if (!adc_valid && scan_busy) n_gaps++;
      for (int c = 0; c < NCH; c++) begin
        real v;
        v = 0.0;
        if (line >= 0 && line < NUM_APERTURES) begin
          real t;
          t = real'(k) - real'(t0[line]) - real'(tau_q[c]) / 4.0;
          if (t > -40.0 && t < 40.0)
            v = amp[line] * $exp(-(t * t) / (2.0 * SIGMA * SIGMA)) * $cos(2.0 * PI * F_REL * t);
        end
        adc_data[c] = ADC_W'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)) + $signed($urandom_range(0, 4)) - 2);
      end
      if (adc_valid) k++;
    end
  end

  // -------------------------------------------------------- envelope monitor
  int idx = 0, cur = -1, n_first = 0, n_env = 0, n_windows = 0;
  int samples_in_line [NUM_APERTURES];
  longint peak [NUM_APERTURES];
  int     peak_at [NUM_APERTURES];
  longint quiet [NUM_APERTURES];     // largest envelope far from the echo
  always @(posedge clk) begin
    if (env_first) begin
      n_first++;
      n_windows++;
      cur = int'(env_line);
      idx = 0;
      checks++;
      if (cur != n_windows - 1) begin failures++; $display("line %0d marked as %0d", n_windows - 1, cur); end
    end
    if (env_valid && cur >= 0) begin
      n_env++;
      samples_in_line[cur]++;
      checks++;
      if (int'(env_line) != cur) begin failures++; $display("env_line changed inside a line"); end
      if (longint'(env_data) > peak[cur]) begin peak[cur] = longint'(env_data); peak_at[cur] = idx; end
      if ((idx < t0[cur] - 100 || idx > t0[cur] + 150) && longint'(env_data) > quiet[cur])
        quiet[cur] = longint'(env_data);
      idx++;
    end
  end

  // ------------------------------------------------------------- stimulus
  initial begin
    int n_frac;
    n_frac = 0;
    for (int c = 0; c < NCH; c++) begin
      tx_cfg[c].delay   = TXD_W'(c * 500 + 7);
      tx_cfg[c].len     = (c == 3) ? PAT_LEN_W'(12) : PAT_LEN_W'(8);
      tx_cfg[c].pattern = (c == 5) ? {56'd0, 8'b1011_0100} : {$urandom, $urandom} | 64'd1;
      tau_q[c]          = 3 * c * c;
      rx_delay[c]       = DLY_W'(3 * (NCH - 1) * (NCH - 1) - tau_q[c]);
      apod_w[c]         = APO_W'(255);
      adc_data[c]       = '0;
      if (rx_delay[c][FRAC_W-1:0] != 0) n_frac++;
    end
    for (int l = 0; l < NUM_APERTURES; l++) begin
      amp[l] = 300.0 + 200.0 * real'(l);
      t0[l]  = 800 + 350 * l;
      peak[l] = 0;
      peak_at[l] = -1;
      quiet[l] = 0;
      samples_in_line[l] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    #2;
    start_scan = 1'b1;
    @(posedge clk);
    #2;
    start_scan = 1'b0;
    wait (frame_done);
    repeat (1000) @(posedge clk);
    close_fire();
    // readback: clean, then with one setting changed on this side
    n_readback_errors = 0;
    for (int r = 0; r < 2; r++) begin
      if (r == 1) tx_cfg[4].len = tx_cfg[4].len + 1'b1;
      @(posedge clk);
      #2;
      start_verify = 1'b1;
      @(posedge clk);
      #2;
      start_verify = 1'b0;
      wait (verify_done);
      @(posedge clk);
      #2;
      checks++;
      if (verify_err != (r == 1)) begin failures++; $display("readback %0d: verify_err %0b", r, verify_err); end
      if (verify_err) n_readback_errors++;
    end
    tx_cfg[4].len = tx_cfg[4].len - 1'b1;
    checks++; if (tx_pulse_errors != 0)  begin failures++; $display("%0d transmit pulse errors", tx_pulse_errors); end
    checks++; if (tx_pulses_total == 0)  begin failures++; $display("no transmit pulses"); end
    checks++; if (n_readback_errors == 0) begin failures++; $display("no readback mismatch seen"); end

    checks++; if (pulser_en)             begin failures++; $display("pulsers left enabled"); end
    checks++; if (n_frames != 3 * NCH)       begin failures++; $display("%0d serial frames", n_frames); end
    checks++; if (bad_frames != 0)       begin failures++; $display("%0d bad serial frames", bad_frames); end
    checks++; if (n_fires != NUM_APERTURES) begin failures++; $display("%0d TX_EN pulses", n_fires); end
    checks++; if (n_first != NUM_APERTURES) begin failures++; $display("%0d line starts", n_first); end
    for (int l = 0; l < NUM_APERTURES; l++) begin
      real expect_peak, ratio;
      int  expect_at;
      // all channels aligned: sum of 8 weighted bursts, scaled by 255
      expect_peak = amp[l] * 255.0 * real'(NCH);
      // aligned at channel 7's arrival; one sample of slack for where the
      // window opens relative to TX_EN
      expect_at = t0[l] + (3 * (NCH - 1) * (NCH - 1)) / 4;
      ratio = real'(peak[l]) / expect_peak;
      checks++;
      if (samples_in_line[l] != RX_SAMPLES) begin
        failures++; $display("line %0d: %0d samples", l, samples_in_line[l]);
      end
      checks++;
      if (peak_at[l] < expect_at - 3 || peak_at[l] > expect_at + 3) begin
        failures++; $display("line %0d: peak at %0d, expected near %0d", l, peak_at[l], expect_at);
      end
      checks++;
      if (ratio < 0.9 || ratio > 1.1) begin
        failures++; $display("line %0d: peak %0d, expected about %f", l, peak[l], expect_peak);
      end
      checks++;
      if (real'(quiet[l]) > 0.05 * expect_peak) begin
        failures++; $display("line %0d: envelope %0d away from the echo", l, quiet[l]);
      end
    end
    // mechanisms
    $display("transmit pulses %0d, readback mismatches %0d", tx_pulses_total, n_readback_errors);
    $display("serial frames %0d, TX_EN pulses %0d, aperture switches %0d, receive windows %0d, ADC gaps %0d, fractional-delay channels %0d, frames %0d",
             n_frames, n_fires, n_switches, n_windows, n_gaps, n_frac, frame_done_seen);
    checks++; if (n_switches == 0)     begin failures++; $display("no aperture switch"); end
    checks++; if (n_windows == 0)      begin failures++; $display("no receive window"); end
    checks++; if (n_gaps == 0)         begin failures++; $display("no ADC gap"); end
    checks++; if (n_frac == 0)         begin failures++; $display("no fractional delay"); end
    checks++; if (frame_done_seen != 1) begin failures++; $display("frame_done %0d", frame_done_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frame_done_seen = 0, n_readback_errors = 0;
  always @(posedge clk) if (frame_done) frame_done_seen++;

endmodule
