// Self-checking testbench for rx_beamformer: the whole receive chain against a
// reference model written here from the chain's definition (interpolating
// delay, weighting, sum, 31-tap windowed Hilbert FIR with its taps derived
// here, exact integer magnitude). Random samples, delays and weights, with
// gaps in in_valid. Also checked: out_valid is in_valid delayed by exactly 5
// cycles, and the tag comes out with the envelope of the sample 15 samples
// back, matching the Hilbert filter's centre tap.
module tb_rx_beamformer;
  import bf_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int unsigned NTAPS = 31;
  localparam int unsigned M     = 15;
  localparam int unsigned TAG_W = 8;
  localparam int unsigned DLY_W = $clog2(DEPTH) + FRAC_W;
  localparam int unsigned ENV_W = ADC_W + APO_W + $clog2(NCH) + 2;
  localparam int          NS    = 2500;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0] din    [NCH];
  logic        [TAG_W-1:0] in_tag = '0, out_tag;
  logic        [DLY_W-1:0] delay  [NCH];
  logic        [APO_W-1:0] weight [NCH];
  logic        [ENV_W-1:0] env;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_beamformer #(.DEPTH(DEPTH), .HILB_TAPS(NTAPS), .TAG_W(TAG_W)) dut (.*);

  longint x [NCH][NS];
  longint s [NS];
  longint exp_env [NS];
  int     coef [NTAPS];
  int     n_in = 0, n_out = 0;
  logic [7:0] valid_hist = '0;

  function automatic longint floor_div(input longint v, input longint d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic longint isqrt(input longint p);
    longint r;
    r = longint'($sqrt(real'(p)));
    while ((r + 1) * (r + 1) <= p) r++;
    while (r * r > p) r--;
    return r;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency and output comparison
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      valid_hist = {valid_hist[6:0], in_valid_q};
      checks++;
      if (out_valid != valid_hist[4]) begin
        failures++;
        $display("out_valid %0b, in_valid 5 cycles earlier %0b", out_valid, valid_hist[4]);
      end
      if (out_valid) begin
        if (n_out >= DEPTH + NTAPS) begin
          checks++;
          if (longint'(env) != exp_env[n_out - M]) begin
            failures++;
            if (failures < 10) $display("sample %0d: env %0d expected %0d", n_out - M, env, exp_env[n_out - M]);
          end
          checks++;
          if (out_tag != TAG_W'(n_out - M)) begin
            failures++;
            if (failures < 10) $display("sample %0d: tag %0d", n_out - M, out_tag);
          end
        end
        n_out++;
      end
    end
  end

  logic in_valid_q = 1'b0;   // in_valid as it was at the last edge

  initial begin
    for (int i = 0; i < NTAPS; i++) begin
      int k;
      real h;
      k = i - int'(M);
      if (k % 2 == 0) coef[i] = 0;
      else begin
        h = (2.0 / (PI * real'(k))) * (0.54 + 0.46 * $cos(PI * real'(k) / real'(M))) * 2048.0;
        coef[i] = (h >= 0.0) ? int'($floor(h + 0.5)) : -int'($floor(-h + 0.5));
      end
    end
    for (int c = 0; c < NCH; c++) begin
      din[c]    = '0;
      delay[c]  = DLY_W'($urandom_range(0, 4 * 120 + 3));
      weight[c] = APO_W'($urandom_range(0, 255));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (n_in < NS) begin
      @(posedge clk);
      in_valid_q = in_valid;
      #2;
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        longint acc;
        s[n_in] = 0;
        for (int c = 0; c < NCH; c++) begin
          longint d, f, a, b, y;
          din[c] = ADC_W'($urandom);
          x[c][n_in] = longint'(din[c]);
          d = longint'(delay[c]) / 4;
          f = longint'(delay[c]) % 4;
          a = (n_in - d >= 0) ? x[c][n_in - d] : 0;
          b = (n_in - d - 1 >= 0) ? x[c][n_in - d - 1] : 0;
          y = a + floor_div((b - a) * f, 4);
          s[n_in] += y * longint'(weight[c]);
        end
        in_tag = TAG_W'(n_in);
        // envelope of sample n_in - M, available once sample n_in is in
        if (n_in >= int'(M)) begin
          acc = 0;
          for (int i = 0; i < NTAPS; i++)
            if (n_in - i >= 0) acc += longint'(coef[i]) * s[n_in - i];
          acc = floor_div(acc, 2048);
          exp_env[n_in - M] = isqrt(s[n_in - M] * s[n_in - M] + acc * acc);
        end
        n_in++;
      end
    end
    @(posedge clk);
    in_valid_q = in_valid;
    #2;
    in_valid = 1'b0;
    repeat (12) begin
      @(posedge clk);
      in_valid_q = in_valid;
    end
    checks++;
    if (n_out != NS) begin failures++; $display("%0d outputs for %0d inputs", n_out, NS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
