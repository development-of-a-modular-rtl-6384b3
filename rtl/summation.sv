// Summation: adds the NCH apodized channels into one beamformed RF sample.
//
// The sum is kept at full width, IN_W + clog2(NCH) bits, so it cannot
// overflow. The design description names the summation block only; the
// single registered adder stage is this design's choice.
// Timing: out_valid follows in_valid by one cycle.
module summation
  import bf_pkg::*;
#(
  parameter int unsigned IN_W  = ADC_W + APO_W,
  parameter int unsigned OUT_W = IN_W + $clog2(NCH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din [NCH],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dout
);

  logic signed [OUT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int c = 0; c < NCH; c++) sum += OUT_W'(din[c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dout <= sum;
    end
  end

endmodule
