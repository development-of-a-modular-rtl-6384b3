// Self-checking testbench for tx_bf_controller. A serial receiver written here
// samples s_data on each rising edge of s_clk and takes a frame at each rising
// edge of s_le; a model of the transmit beamformer chip stores written frames
// and answers read frames on s_rd. Checked: 8 frames of exactly 92 bits, in
// channel order, each holding the channel's delay, length and pattern; the
// length of a pass (8 * 93 s_clk periods) and the one-cycle done pulses; that
// a fire request during programming is ignored; the TX_EN pulse length; that
// readback reports no error after programming, reports one when a setting no
// longer matches, and clears it on the next clean readback.
module tb_tx_bf_controller;
  import bf_pkg::*;

  localparam int unsigned SCLK_HALF   = 2;
  localparam int unsigned TXEN_CYCLES = 4;
  localparam int unsigned PASS_CYCLES = NCH * (TX_FRAME_W + 1) * 2 * SCLK_HALF;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_prog = 1'b0, start_verify = 1'b0, fire = 1'b0;
  tx_ch_cfg_t cfg [NCH];
  logic s_clk, s_data, s_le, s_rd, tx_en, busy, prog_done, verify_done, verify_err;
  logic [NCH-1:0] p, n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_bf_controller #(.SCLK_HALF(SCLK_HALF), .TXEN_CYCLES(TXEN_CYCLES)) dut (.*);

  lm96570_model chip (.pclk(clk), .s_clk, .s_data, .s_le, .s_rd, .tx_en, .p, .n);

  // serial receiver
  logic [TX_FRAME_W-1:0] rx_sh = '0;
  int   rx_bits = 0;
  tx_frame_t got [$];
  int        got_bits [$];
  logic s_clk_q = 1'b0, s_le_q = 1'b0;
  always @(posedge clk) begin
    s_clk_q <= s_clk;
    s_le_q  <= s_le;
    if (s_clk && !s_clk_q) begin
      rx_sh   <= {rx_sh[TX_FRAME_W-2:0], s_data};
      rx_bits <= rx_bits + 1;
    end
    if (s_le && !s_le_q) begin
      got.push_back(tx_frame_t'(rx_sh));
      got_bits.push_back(rx_bits);
      rx_bits <= 0;
    end
  end

  int busy_cycles = 0, done_pulses = 0, vdone_pulses = 0, txen_cycles = 0;
  always @(posedge clk) begin
    if (busy && !tx_en) busy_cycles++;
    if (prog_done) done_pulses++;
    if (verify_done) vdone_pulses++;
    if (tx_en) txen_cycles++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic sig);
    @(posedge clk);
    #1;
    sig = 1'b1;
    @(posedge clk);
    #1;
    sig = 1'b0;
  endtask

  // one pass; rd = 1 for a readback pass. Returns verify_err at the end.
  task automatic pass_and_check(input bit rd, output bit err);
    got.delete();
    got_bits.delete();
    busy_cycles  = 0;
    done_pulses  = 0;
    vdone_pulses = 0;
    txen_cycles  = 0;
    if (rd) pulse(start_verify); else pulse(start_prog);
    // try to fire in the middle of the pass
    repeat (100) @(posedge clk);
    pulse(fire);
    wait (!busy);
    repeat (5) @(posedge clk);
    err = verify_err;
    checks++;
    if (got.size() != NCH) begin failures++; $display("got %0d frames", got.size()); end
    checks++;
    if (busy_cycles != PASS_CYCLES) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", busy_cycles, PASS_CYCLES);
    end
    checks++;
    if (done_pulses != (rd ? 0 : 1) || vdone_pulses != (rd ? 1 : 0)) begin
      failures++; $display("done pulses %0d/%0d", done_pulses, vdone_pulses);
    end
    checks++;
    if (txen_cycles != 0) begin failures++; $display("TX_EN fired during a pass"); end
    for (int i = 0; i < got.size() && i < NCH; i++) begin
      checks++;
      if (got_bits[i] != TX_FRAME_W) begin failures++; $display("frame %0d has %0d bits", i, got_bits[i]); end
      checks++;
      if (got[i].rd != rd || got[i].ch != CH_ADDR_W'(i) ||
          (!rd && (got[i].delay != cfg[i].delay || got[i].len != cfg[i].len ||
                   got[i].pattern != cfg[i].pattern))) begin
        failures++;
        $display("frame %0d: rd %0d ch %0d delay %h len %0d pattern %h", i, got[i].rd, got[i].ch,
                 got[i].delay, got[i].len, got[i].pattern);
      end
    end
  endtask

  task automatic randomize_cfg();
    for (int c = 0; c < NCH; c++) begin
      cfg[c].delay   = TXD_W'($urandom);
      cfg[c].len     = (c == 0) ? PAT_LEN_W'(8) : (c == 1) ? PAT_LEN_W'(64) : PAT_LEN_W'($urandom_range(1, 64));
      cfg[c].pattern = {$urandom, $urandom};
    end
  endtask

  initial begin
    bit err;
    randomize_cfg();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    pass_and_check(1'b0, err);
    pass_and_check(1'b1, err);
    checks++;
    if (err) begin failures++; $display("readback error after programming"); end
    // a setting that no longer matches the chip
    cfg[5].pattern[17] = ~cfg[5].pattern[17];
    pass_and_check(1'b1, err);
    checks++;
    if (!err) begin failures++; $display("changed pattern not detected"); end
    cfg[5].pattern[17] = ~cfg[5].pattern[17];
    cfg[2].delay[0] = ~cfg[2].delay[0];
    pass_and_check(1'b1, err);
    checks++;
    if (!err) begin failures++; $display("changed delay not detected"); end
    // reprogram with new settings, then a clean readback clears the error
    randomize_cfg();
    pass_and_check(1'b0, err);
    pass_and_check(1'b1, err);
    checks++;
    if (err) begin failures++; $display("readback error after reprogramming"); end
    // fire while idle
    txen_cycles = 0;
    pulse(fire);
    repeat (20) @(posedge clk);
    checks++;
    if (txen_cycles != TXEN_CYCLES) begin failures++; $display("TX_EN high %0d cycles", txen_cycles); end
    checks++;
    if (busy) begin failures++; $display("busy after firing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
