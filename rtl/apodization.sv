// Apodization: scales each channel's delayed sample by its weight.
//
// dout[c] = din[c] * weight[c], with weight an unsigned APO_W-bit number read
// as weight/2^APO_W (0 .. 255/256 with the default APO_W = 8). The product is
// kept at full width, IN_W+APO_W bits, and the scaling by 2^-APO_W is left to
// whoever reads it. The design description names the apodization block but
// not its weights or word widths; those are this design's choices.
// Timing: registered, out_valid follows in_valid by one cycle.
module apodization
  import bf_pkg::*;
#(
  parameter int unsigned IN_W  = ADC_W,
  parameter int unsigned OUT_W = IN_W + APO_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din    [NCH],
  input  logic        [APO_W-1:0] weight [NCH],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dout   [NCH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) dout[c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < NCH; c++)
          dout[c] <= OUT_W'(din[c] * signed'({1'b0, weight[c]}));
    end
  end

endmodule
