// Hilbert transformer: turns the real beamformed RF line into an analytic
// signal (in-phase I, quadrature Q) for envelope detection.
//
// Q is an odd-length FIR with antisymmetric taps. With M = (NTAPS-1)/2 and
// k = i - M for tap i, the ideal Hilbert impulse response 2/(pi*k) for odd k
// (0 for even k) is multiplied by a Hamming window 0.54 + 0.46*cos(pi*k/M)
// and rounded to COEF_W-bit signed integers scaled by 2^(COEF_W-1):
//   c[i] = round(2^(COEF_W-1) * (2/(pi*k)) * (0.54 + 0.46*cos(pi*k/M)))
// The taps are computed at elaboration, not stored in a table.
//   Q[n] = (sum_i c[i] * x[n-i]) >>> (COEF_W-1)
//   I[n] = x[n-M]   (the centre tap, so I and Q are aligned)
// The design description names a Hilbert transform block; the FIR form, the
// window, the tap count and the coefficient width are this design's choices.
// Timing: one sample per cycle when in_valid is high; out_valid follows
// in_valid by one cycle; the outputs describe the input M samples back.
module hilbert_transform #(
  parameter int unsigned IN_W   = 23,
  parameter int unsigned NTAPS  = 31,     // odd
  parameter int unsigned COEF_W = 12,
  parameter int unsigned Q_W    = IN_W + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] din,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] i_out,
  output logic signed [Q_W-1:0]  q_out
);

  localparam int unsigned M     = (NTAPS - 1) / 2;
  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(NTAPS);

  typedef logic signed [COEF_W-1:0] coef_t;

  function automatic coef_t coef(input int i);
    int  k;
    real h;
    real pi;
    pi = 3.14159265358979323846;
    k = i - int'(M);
    if (k % 2 == 0) return '0;
    h = (2.0 / (pi * real'(k))) * (0.54 + 0.46 * $cos(pi * real'(k) / real'(M)));
    return coef_t'($rtoi(h * real'(2 ** (COEF_W - 1)) + (h >= 0.0 ? 0.5 : -0.5)));
  endfunction

  typedef coef_t coef_arr_t [NTAPS];

  function automatic coef_arr_t all_coefs();
    coef_arr_t c;
    for (int i = 0; i < NTAPS; i++) c[i] = coef(i);
    return c;
  endfunction

  localparam coef_arr_t COEF = all_coefs();

  logic signed [IN_W-1:0]  taps [NTAPS-1];   // x[n-1] .. x[n-NTAPS+1]
  logic signed [IN_W-1:0]  win  [NTAPS];     // x[n]   .. x[n-NTAPS+1]
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    win[0] = din;
    for (int i = 1; i < NTAPS; i++) win[i] = taps[i-1];
    acc = '0;
    for (int i = 0; i < NTAPS; i++) acc += ACC_W'(win[i] * COEF[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS - 1; i++) taps[i] <= '0;
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < NTAPS - 1; i++) taps[i] <= win[i];
        i_out <= win[M];
        q_out <= Q_W'(acc >>> (COEF_W - 1));
      end
    end
  end

endmodule
