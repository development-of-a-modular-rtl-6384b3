// Self-checking testbench for scan_controller. A stand-in for the transmit
// controller answers tx_start_prog with prog_done after a while and stays busy
// for some cycles after each fire. ADC samples arrive on roughly two cycles in
// three. Checked, for two frames: one programming request per frame, 8 lines
// with mux_sel 0..7 in order and stable during each line, one fire per line,
// only while the transmit controller is idle, after at least SETTLE_CYCLES,
// exactly RX_SAMPLES samples inside each receive window, one frame_done.
module tb_scan_controller;
  import bf_pkg::*;

  localparam int unsigned RX_SAMPLES    = 40;
  localparam int unsigned SETTLE_CYCLES = 6;
  localparam int unsigned LINES         = NUM_APERTURES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, tx_prog_done = 1'b0, tx_busy = 1'b0, sample_tick = 1'b0;
  logic tx_start_prog, tx_fire, rx_active, busy, frame_done;
  logic [$clog2(LINES)-1:0] mux_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_controller #(.RX_SAMPLES(RX_SAMPLES), .SETTLE_CYCLES(SETTLE_CYCLES)) dut (.*);

  // transmit controller stand-in
  int prog_timer = 0, fire_timer = 0, prog_reqs = 0;
  always @(posedge clk) begin
    tx_prog_done <= 1'b0;
    if (tx_start_prog && rst_n) begin prog_timer <= 30; prog_reqs++; end
    else if (prog_timer == 1) begin prog_timer <= 0; tx_prog_done <= 1'b1; end
    else if (prog_timer > 1) prog_timer <= prog_timer - 1;
    // busy through programming, and for 150 cycles after a fire (longer than the
    // receive window plus the settling wait, so the controller must wait for it)
    if (tx_fire) fire_timer <= 150;
    else if (fire_timer > 0) fire_timer <= fire_timer - 1;
    tx_busy <= (prog_timer > 0) || tx_start_prog || tx_fire || (fire_timer > 1);
    sample_tick <= ($urandom_range(0, 2) != 0);
  end

  // monitor
  int fires = 0, line_samples = 0, frames_done = 0, lines_seen = 0, idle_since_sel = 0;
  int waits = 0;
  int fire_busy = 0, fire_early = 0, bad_window = 0, bad_order = 0, sel_moved = 0;
  logic [$clog2(LINES)-1:0] sel_q = '0;
  logic active_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (mux_sel != sel_q) idle_since_sel = 0; else idle_since_sel++;
      if (rx_active && mux_sel != sel_q && active_q) sel_moved++;
      if (tx_fire) begin
        fires++;
        if (tx_busy) fire_busy++;
        if (idle_since_sel < SETTLE_CYCLES) fire_early++;
        if (int'(mux_sel) != lines_seen % LINES) bad_order++;
      end
      // settled, not receiving, transmit controller still busy: waiting
      if (busy && !rx_active && tx_busy && fires > 0 && idle_since_sel > SETTLE_CYCLES) waits++;
      if (rx_active && sample_tick) line_samples++;
      if (active_q && !rx_active) begin
        if (line_samples != RX_SAMPLES) bad_window++;
        line_samples = 0;
        lines_seen++;
      end
      if (frame_done) frames_done++;
      sel_q    = mux_sel;
      active_q = rx_active;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      @(posedge clk);
      #1;
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      wait (frame_done);
      @(posedge clk);
      #1;
      checks++;
      if (busy) begin failures++; $display("busy after frame_done"); end
    end
    repeat (10) @(posedge clk);
    checks++; if (prog_reqs != 2)         begin failures++; $display("prog requests %0d", prog_reqs); end
    checks++; if (fires != 2 * LINES)     begin failures++; $display("fires %0d", fires); end
    checks++; if (lines_seen != 2 * LINES) begin failures++; $display("lines %0d", lines_seen); end
    checks++; if (frames_done != 2)       begin failures++; $display("frame_done %0d", frames_done); end
    checks++; if (fire_busy != 0)         begin failures++; $display("fired while busy %0d", fire_busy); end
    checks++; if (fire_early != 0)        begin failures++; $display("fired before settling %0d", fire_early); end
    checks++; if (bad_window != 0)        begin failures++; $display("bad windows %0d", bad_window); end
    checks++; if (bad_order != 0)         begin failures++; $display("lines out of order %0d", bad_order); end
    checks++; if (waits == 0)             begin failures++; $display("never waited for the transmit controller"); end
    checks++; if (sel_moved != 0)         begin failures++; $display("mux_sel moved in a window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
