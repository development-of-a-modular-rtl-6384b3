// Self-checking testbench for summation: random full-scale inputs, each sum
// compared with one computed here, one cycle after the valid input.
module tb_summation;
  import bf_pkg::*;

  localparam int unsigned IN_W  = ADC_W + APO_W;
  localparam int unsigned OUT_W = IN_W + $clog2(NCH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [IN_W-1:0]  din [NCH];
  logic signed [OUT_W-1:0] dout;
  int checks = 0, failures = 0;
  longint exp_sum;
  logic   exp_valid = 1'b0;

  always #5 clk = ~clk;

  summation dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) din[c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== exp_valid) begin failures++; $display("valid mismatch t=%0d", t); end
      if (exp_valid) begin
        checks++;
        if (longint'(dout) != exp_sum) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d expected %0d", t, dout, exp_sum);
        end
      end
      in_valid = ($urandom_range(0, 4) != 0);
      for (int c = 0; c < NCH; c++) begin
        // all-maximum and all-minimum vectors test the width of the sum
        if (t % 50 == 7)       din[c] = {1'b0, {(IN_W-1){1'b1}}};
        else if (t % 50 == 8)  din[c] = {1'b1, {(IN_W-1){1'b0}}};
        else                   din[c] = IN_W'($urandom);
      end
      exp_valid = in_valid;
      if (in_valid) begin
        exp_sum = 0;
        for (int c = 0; c < NCH; c++) exp_sum += longint'(din[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
