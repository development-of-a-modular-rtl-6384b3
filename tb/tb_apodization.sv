// Self-checking testbench for apodization: random samples and weights, with
// gaps in in_valid; each output is compared with the product computed here.
module tb_apodization;
  import bf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0]       din    [NCH];
  logic        [APO_W-1:0]       weight [NCH];
  logic signed [ADC_W+APO_W-1:0] dout   [NCH];
  int checks = 0, failures = 0;
  longint exp_q [NCH];
  logic   exp_valid = 1'b0;

  always #5 clk = ~clk;

  apodization dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin din[c] = '0; weight[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      #1;
      // check what the previous edge produced
      if (exp_valid) begin
        checks++;
        if (!out_valid) begin failures++; $display("missing out_valid at t=%0d", t); end
        for (int c = 0; c < NCH; c++) begin
          checks++;
          if (longint'(dout[c]) != exp_q[c]) begin
            failures++;
            if (failures < 10) $display("ch%0d: got %0d expected %0d", c, dout[c], exp_q[c]);
          end
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid at t=%0d", t); end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      for (int c = 0; c < NCH; c++) begin
        // include the extremes now and then
        din[c]    = (t % 97 == 0) ? -12'sd2048 : ADC_W'($urandom);
        weight[c] = (t % 89 == 0) ? 8'd255 : APO_W'($urandom);
      end
      exp_valid = in_valid;
      if (in_valid)
        for (int c = 0; c < NCH; c++) exp_q[c] = longint'(din[c]) * longint'(weight[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
