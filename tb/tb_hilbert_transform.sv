// Self-checking testbench for hilbert_transform.
//  1. Impulse: the Q output, read sample by sample, is the tap set. It must be
//     antisymmetric, zero on even offsets and within 1 of
//     2^11 * 2/(pi*k) * (0.54 + 0.46*cos(pi*k/15)), computed here.
//  2. Tone at fs/8 (inside the filter's pass band): I must equal the input
//     delayed by 15 samples exactly, and Q must be within 3 % of full scale of
//     the ideal A*sin(w*(n-15)) for x = A*cos(w*n).
// The latency from in_valid to out_valid (one cycle) is checked throughout.
module tb_hilbert_transform;
  localparam int unsigned IN_W  = 23;
  localparam int unsigned NTAPS = 31;
  localparam int unsigned M     = 15;
  localparam int unsigned Q_W   = IN_W + 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [IN_W-1:0] din = '0, i_out;
  logic signed [Q_W-1:0]  q_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hilbert_transform #(.IN_W(IN_W), .NTAPS(NTAPS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int resp [NTAPS];
  int hist [$];

  // push one sample; return I and Q produced for it
  task automatic push(input int x, output int i_o, output int q_o);
    din      = IN_W'(x);
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing"); end
    i_o = int'(i_out);
    q_o = int'(q_out);
    // idle cycle between samples: out_valid must drop
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
  endtask

  initial begin
    int io, qo;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    // impulse of 2^11: Q then shows the taps exactly
    for (int n = 0; n < NTAPS + 4; n++) begin
      push(n == 0 ? 2048 : 0, io, qo);
      if (n < NTAPS) resp[n] = qo;
    end
    for (int i = 0; i < NTAPS; i++) begin
      int k;
      real h, e;
      k = i - int'(M);
      if (k % 2 == 0) e = 0.0;
      else begin
        h = (2.0 / (PI * real'(k))) * (0.54 + 0.46 * $cos(PI * real'(k) / real'(M)));
        e = h * 2048.0;
      end
      checks++;
      if (fabs(real'(resp[i]) - e) > 1.0) begin
        failures++;
        $display("tap %0d: got %0d expected %f", i, resp[i], e);
      end
      checks++;
      if (resp[i] != -resp[NTAPS - 1 - i]) begin failures++; $display("tap %0d not antisymmetric", i); end
    end
    // tone
    for (int n = 0; n < 200; n++) begin
      int x;
      real w, qe;
      w = 2.0 * PI / 8.0;
      x = int'($rtoi(1000000.0 * $cos(w * real'(n))));
      hist.push_back(x);
      push(x, io, qo);
      if (n >= NTAPS) begin
        checks++;
        if (io != hist[n - M]) begin failures++; $display("I at n=%0d: %0d vs %0d", n, io, hist[n-M]); end
        qe = 1000000.0 * $sin(w * real'(n - int'(M)));
        checks++;
        if (fabs(real'(qo) - qe) > 30000.0) begin
          failures++;
          $display("Q at n=%0d: %0d vs %f", n, qo, qe);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
