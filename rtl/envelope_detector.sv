// Envelope detector: magnitude of the analytic signal, env = floor(sqrt(I^2 + Q^2)).
//
// The square root is the exact integer square root, found bit by bit from the
// most significant result bit down (restoring method, one trial subtraction
// per result bit). I and Q are signed W-bit numbers, so the magnitude is below
// 2^W and fits an unsigned W-bit output. The design description names the
// envelope detection block only; the exact magnitude (rather than an
// approximation) and the single-cycle square root are this design's choices.
// Timing: out_valid follows in_valid by one cycle.
module envelope_detector #(
  parameter int unsigned W = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic                out_valid,
  output logic        [W-1:0] env
);

  logic [2*W-1:0] power;
  logic [W-1:0]   root;

  always_comb begin
    logic [2*W+1:0] rem;
    logic [2*W+1:0] trial;
    power = (2*W)'(i_in * i_in) + (2*W)'(q_in * q_in);
    root  = '0;
    rem   = {2'b00, power};
    for (int b = W - 1; b >= 0; b--) begin
      // test whether (root + 2^b)^2 <= power, i.e. rem >= (2*root + 2^b) * 2^b
      trial = ((2*W+2)'(root) << (b + 1)) + ((2*W+2)'(1) << (2 * b));
      if (rem >= trial) begin
        rem     = rem - trial;
        root[b] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      env       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) env <= root;
    end
  end

endmodule
