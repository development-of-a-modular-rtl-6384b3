// Receive delay stage for all NCH channels.
//
// Each channel writes its ADC samples into a circular buffer of DEPTH words
// and reads back the sample delay_int and delay_int+1 samples old. The two are
// blended by linear interpolation with the fractional part of the delay, so the
// delay resolution is 1/2^FRAC_W of a sample (6.25 ns at 40 MSPS with the
// default FRAC_W = 2). The design description samples just above the Nyquist
// rate and reaches the fine delay resolution by interpolation; linear
// interpolation, the fraction width and the buffer depth are choices of this
// design.
//
// Delay word per channel: {integer part, fractional part}, total d = D + f/2^FRAC_W
// samples, with 0 <= D <= DEPTH-2. Output for input sample x[n]:
//   y[n] = x[n-D] + ((x[n-D-1] - x[n-D]) * f) >>> FRAC_W
// (arithmetic shift, so the result rounds toward minus infinity).
// Timing: one input sample per cycle with in_valid high; out_valid follows
// in_valid by one cycle. The buffer is not reset: the first D+1 outputs after
// reset read samples that were never written.
module rx_delay_stage
  import bf_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DLY_W = $clog2(DEPTH) + FRAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] din   [NCH],
  input  logic        [DLY_W-1:0] delay [NCH],
  output logic                    out_valid,
  output logic signed [ADC_W-1:0] dout  [NCH]
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) wptr <= wptr + 1'b1;
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic signed [ADC_W-1:0] mem [DEPTH];
    logic        [AW-1:0]    d_int;
    logic        [FRAC_W-1:0] d_frac;
    logic signed [ADC_W-1:0] a, b;
    logic signed [ADC_W+FRAC_W+1:0] diff_f;
    logic signed [ADC_W-1:0] y;

    assign d_int  = delay[c][DLY_W-1:FRAC_W];
    assign d_frac = delay[c][FRAC_W-1:0];

    always_ff @(posedge clk) begin
      if (in_valid) mem[wptr] <= din[c];
    end

    // mem[wptr - k] holds x[n-k] for k >= 1; x[n] is still on din
    always_comb begin
      a      = (d_int == '0) ? din[c] : mem[AW'(wptr - d_int)];
      b      = mem[AW'(wptr - d_int - 1'b1)];
      diff_f = (ADC_W+FRAC_W+2)'(signed'({b[ADC_W-1], b}) - signed'({a[ADC_W-1], a}))
               * signed'({1'b0, d_frac});
      y      = ADC_W'(signed'({a[ADC_W-1], a}) + (ADC_W+1)'(diff_f >>> FRAC_W));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        dout[c] <= '0;
      else if (in_valid) dout[c] <= y;
    end
  end

endmodule
