// Self-checking testbench for envelope_detector: random and corner I/Q pairs;
// the magnitude is checked against floor(sqrt(I^2+Q^2)) found here by a
// floating-point estimate corrected with exact integer comparisons.
module tb_envelope_detector;
  localparam int unsigned W = 25;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0] i_in = '0, q_in = '0;
  logic        [W-1:0] env;
  int checks = 0, failures = 0;
  longint exp_env;
  logic   exp_valid = 1'b0;

  always #5 clk = ~clk;

  envelope_detector #(.W(W)) dut (.*);

  function automatic longint isqrt(input longint p);
    longint r;
    r = longint'($sqrt(real'(p)));
    while ((r + 1) * (r + 1) <= p) r++;
    while (r * r > p) r--;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ii, qq;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== exp_valid) begin failures++; $display("valid mismatch t=%0d", t); end
      if (exp_valid) begin
        checks++;
        if (longint'(env) != exp_env) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d expected %0d", t, env, exp_env);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      case (t % 10)
        0: begin i_in = {1'b1, {(W-1){1'b0}}}; q_in = {1'b1, {(W-1){1'b0}}}; end
        1: begin i_in = '0; q_in = '0; end
        2: begin i_in = W'($urandom_range(0, 100)); q_in = W'($urandom_range(0, 100)); end
        3: begin i_in = {1'b0, {(W-1){1'b1}}}; q_in = '0; end
        default: begin i_in = W'($urandom); q_in = W'($urandom); end
      endcase
      exp_valid = in_valid;
      ii = longint'(i_in);
      qq = longint'(q_in);
      if (in_valid) exp_env = isqrt(ii * ii + qq * qq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
