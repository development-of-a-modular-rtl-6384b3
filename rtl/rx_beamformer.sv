// Receive beamformer: delay stage -> apodization -> summation -> Hilbert
// transform -> envelope detection, for NCH channels of ADC_W-bit samples.
//
// This chain of blocks is the one the design description gives; the word
// widths, the latencies and the tag are this design's choices. Word widths
// grow without rounding: 12-bit samples, 20-bit weighted samples, a 23-bit
// RF sum, a 25-bit quadrature output and a 25-bit envelope.
//
// A TAG_W-bit tag travels with each input sample and comes out with the
// envelope value computed for that sample (the top level uses it to mark the
// receive window and the scan line). The Hilbert filter reports the sample M
// positions back, so the tag is delayed by M samples as well.
// Timing: one sample per cycle when in_valid is high. out_valid follows
// in_valid by 5 cycles; the envelope and tag then belong to the input sample
// HILB_TAPS/2 valid samples earlier (plus the channel delays).
module rx_beamformer
  import bf_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned HILB_TAPS = 31,
  parameter int unsigned TAG_W     = 4,
  parameter int unsigned DLY_W     = $clog2(DEPTH) + FRAC_W,
  parameter int unsigned ENV_W     = ADC_W + APO_W + $clog2(NCH) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] din    [NCH],
  input  logic        [TAG_W-1:0] in_tag,
  input  logic        [DLY_W-1:0] delay  [NCH],
  input  logic        [APO_W-1:0] weight [NCH],
  output logic                    out_valid,
  output logic        [ENV_W-1:0] env,
  output logic        [TAG_W-1:0] out_tag
);

  localparam int unsigned APO_OUT_W = ADC_W + APO_W;
  localparam int unsigned SUM_W     = APO_OUT_W + $clog2(NCH);
  localparam int unsigned M         = (HILB_TAPS - 1) / 2;

  logic                        d_valid, a_valid, s_valid, h_valid;
  logic signed [ADC_W-1:0]     d_out [NCH];
  logic signed [APO_OUT_W-1:0] a_out [NCH];
  logic signed [SUM_W-1:0]     s_out;
  logic signed [SUM_W-1:0]     h_i;
  logic signed [ENV_W-1:0]     h_q;

  // Tag pipeline: three one-cycle stages, then M samples matching the Hilbert
  // centre tap, then one cycle each for the Hilbert and envelope registers.
  logic [TAG_W-1:0] tag_d, tag_a, tag_s, tag_h;
  logic [TAG_W-1:0] tag_line [M+1];

  rx_delay_stage #(.DEPTH(DEPTH), .DLY_W(DLY_W)) u_delay (
    .clk, .rst_n, .in_valid, .din, .delay,
    .out_valid(d_valid), .dout(d_out)
  );

  apodization #(.IN_W(ADC_W), .OUT_W(APO_OUT_W)) u_apod (
    .clk, .rst_n, .in_valid(d_valid), .din(d_out), .weight,
    .out_valid(a_valid), .dout(a_out)
  );

  summation #(.IN_W(APO_OUT_W), .OUT_W(SUM_W)) u_sum (
    .clk, .rst_n, .in_valid(a_valid), .din(a_out),
    .out_valid(s_valid), .dout(s_out)
  );

  hilbert_transform #(.IN_W(SUM_W), .NTAPS(HILB_TAPS), .Q_W(ENV_W)) u_hilb (
    .clk, .rst_n, .in_valid(s_valid), .din(s_out),
    .out_valid(h_valid), .i_out(h_i), .q_out(h_q)
  );

  envelope_detector #(.W(ENV_W)) u_env (
    .clk, .rst_n, .in_valid(h_valid), .i_in(ENV_W'(h_i)), .q_in(h_q),
    .out_valid, .env
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_d   <= '0;
      tag_a   <= '0;
      tag_s   <= '0;
      tag_h   <= '0;
      out_tag <= '0;
      for (int i = 0; i <= M; i++) tag_line[i] <= '0;
    end else begin
      if (in_valid) tag_d <= in_tag;
      if (d_valid)  tag_a <= tag_d;
      if (a_valid)  tag_s <= tag_a;
      if (s_valid) begin
        tag_line[0] <= tag_s;
        for (int i = 1; i <= M; i++) tag_line[i] <= tag_line[i-1];
      end
      // tag_line[M-1] is the tag of the sample that the Hilbert centre tap
      // holds once the current sample has been shifted in
      if (s_valid)  tag_h   <= (M == 0) ? tag_s : tag_line[M-1];
      if (h_valid)  out_tag <= tag_h;
    end
  end

endmodule
