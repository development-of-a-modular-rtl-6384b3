// Scan controller: sequences one B-mode frame over the linear probe.
//
// The 8 transmit/receive channels reach the 64-element probe through 1-of-8
// high-voltage demultiplexers (transmit) and 8-to-1 multiplexers (receive)
// that share one select code, so that 8 adjacent elements are active at a
// time. This block steps that select code over the NUM_APERTURES groups of
// adjacent elements, one scan line per group:
//   1. on start: pulse tx_start_prog and wait for tx_prog_done (the transmit
//      delays and patterns are loaded once per frame, since the focusing
//      delays are the same for every aperture position);
//   2. per line: drive mux_sel = line, wait SETTLE_CYCLES for the switches,
//      wait until the transmit controller is idle, pulse tx_fire, then hold rx_active for RX_SAMPLES ADC samples
//      (counted on sample_tick), starting with the sample of the fire cycle;
//   3. after the last line pulse frame_done.
// The shared select code and the 8-of-64 grouping follow the design
// description; the non-overlapping groups (elements 8*sel .. 8*sel+7), the
// settling wait, the window length and loading the transmit settings once per
// frame are this design's choices. mux_sel is registered and stable during a
// line.
module scan_controller
  import bf_pkg::*;
#(
  parameter int unsigned RX_SAMPLES    = 4096,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned LINES         = NUM_APERTURES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         tx_prog_done,
  input  logic                         tx_busy,
  input  logic                         sample_tick,
  output logic                         tx_start_prog,
  output logic                         tx_fire,
  output logic [$clog2(LINES)-1:0]     mux_sel,
  output logic                         rx_active,
  output logic                         busy,
  output logic                         frame_done
);

  typedef enum logic [2:0] {S_IDLE, S_PROG, S_SETTLE, S_FIRE, S_RECV} state_t;

  localparam int unsigned CNT_W = $clog2(((RX_SAMPLES > SETTLE_CYCLES) ? RX_SAMPLES
                                                                      : SETTLE_CYCLES) + 1);

  state_t             state;
  logic [CNT_W-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cnt           <= '0;
      mux_sel       <= '0;
      tx_start_prog <= 1'b0;
      frame_done    <= 1'b0;
    end else begin
      tx_start_prog <= 1'b0;
      frame_done    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tx_start_prog <= 1'b1;
          mux_sel       <= '0;
          state         <= S_PROG;
        end
        S_PROG: if (tx_prog_done) begin
          cnt   <= '0;
          state <= S_SETTLE;
        end
        S_SETTLE: begin
          if (cnt == CNT_W'(SETTLE_CYCLES)) begin
            if (!tx_busy) begin
              cnt   <= '0;
              state <= S_FIRE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_FIRE, S_RECV: begin
          state <= S_RECV;
          if (sample_tick) begin
            if (cnt == CNT_W'(RX_SAMPLES - 1)) begin
              cnt <= '0;
              if (mux_sel == ($clog2(LINES))'(LINES - 1)) begin
                frame_done <= 1'b1;
                state      <= S_IDLE;
              end else begin
                mux_sel <= mux_sel + 1'b1;
                state   <= S_SETTLE;
              end
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign tx_fire   = (state == S_FIRE);
  assign rx_active = (state == S_FIRE) || (state == S_RECV);
  assign busy      = (state != S_IDLE);

endmodule
