// Self-checking testbench for rx_delay_stage. Random 12-bit samples go in with
// gaps in in_valid; each channel gets its own delay (integer and fractional
// parts, including 0 and the largest allowed integer delay) and the delays are
// changed part-way through. The expected output is recomputed here from a
// history of the inputs: x[n-D] + floor((x[n-D-1]-x[n-D]) * f / 4).
module tb_rx_delay_stage;
  import bf_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int unsigned DLY_W = $clog2(DEPTH) + FRAC_W;
  localparam int          NS    = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0] din   [NCH];
  logic        [DLY_W-1:0] delay [NCH];
  logic signed [ADC_W-1:0] dout  [NCH];
  int checks = 0, failures = 0;

  int hist [NCH][NS];
  int n = 0;               // samples accepted so far
  int exp_y [NCH];
  logic exp_valid = 1'b0, exp_checked = 1'b0;

  always #5 clk = ~clk;

  rx_delay_stage #(.DEPTH(DEPTH)) dut (.*);

  function automatic int floor_div4(input int v);
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_delays(input bit second);
    for (int c = 0; c < NCH; c++) begin
      int d_int, d_frac;
      d_int  = second ? int'($urandom_range(0, DEPTH - 2)) : c * 13;
      d_frac = second ? int'($urandom_range(0, 3)) : c % 4;
      if (c == NCH - 1 && second) d_int = DEPTH - 2;
      if (c == 0) d_int = 0;
      delay[c] = DLY_W'(d_int * 4 + d_frac);
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) din[c] = '0;
    set_delays(1'b0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (n < NS) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== exp_valid) begin failures++; $display("valid mismatch n=%0d", n); end
      if (exp_valid && exp_checked)
        for (int c = 0; c < NCH; c++) begin
          checks++;
          if (int'(dout[c]) != exp_y[c]) begin
            failures++;
            if (failures < 10) $display("n=%0d ch%0d got %0d expected %0d", n, c, dout[c], exp_y[c]);
          end
        end
      if (n == NS / 2) set_delays(1'b1);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int c = 0; c < NCH; c++) din[c] = ADC_W'($urandom);
      exp_valid   = in_valid;
      exp_checked = 1'b0;
      if (in_valid) begin
        for (int c = 0; c < NCH; c++) begin
          int d, f, a, b;
          hist[c][n] = int'(din[c]);
          d = int'(delay[c]) / 4;
          f = int'(delay[c]) % 4;
          if (n - d - 1 >= 0) begin
            a = hist[c][n - d];
            b = hist[c][n - d - 1];
            exp_y[c] = a + floor_div4((b - a) * f);
          end
        end
        // compare only once every channel's history reaches back far enough
        exp_checked = (n >= DEPTH);
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
