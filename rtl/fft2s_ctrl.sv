// Controller: frame timing and switch modes of the two-stream FFT processor.
//
// After a one-cycle `start` pulse, stream X1 delivers one sample per cycle,
// sample index x1_phase = 0..N-1 repeating. Stream X2 runs the same way but
// starts N/2 cycles later, as in the paper's schedule, so the even half of
// one stream and the odd half of the other always share a window of N/2
// cycles. SW1 sees the registered outputs of the input units, so its mode is
// taken from the phase one cycle earlier: SWAP while those outputs belong to
// the first N/2 phases of X1's frame, NORMAL during the second N/2 (as the
// paper specifies). SW2 follows the data: it is in SWAP mode while the DIF
// FFT delivers data of stream X2 (tag 1), NORMAL while it delivers X1. With
// equal DIF and DIT latencies this also toggles every N/2 cycles, lagging SW1
// by the latency of the half-size FFTs (the paper has the two switches in
// opposite modes at every moment); an assertion checks that the DIT FFT then
// always carries the other stream. The paper says only that the control
// signals are supplied from outside the data path; generating them here is
// this design's choice.
module fft2s_ctrl
  import fft2s_pkg::*;
#(
  parameter int N = 16,
  localparam int PW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          dif_valid,   // DIF FFT output valid
  input  logic          dif_tag,     // stream of the DIF FFT output
  input  logic          dit_valid,
  input  logic          dit_tag,
  output logic          x1_valid,
  output logic [PW-1:0] x1_phase,
  output logic          x2_valid,
  output logic [PW-1:0] x2_phase,
  output sw_mode_e      sw1_mode,
  output sw_mode_e      sw2_mode
);
  logic          running, x2_on;
  logic [PW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      x2_on    <= 1'b0;
      cnt      <= '0;
      sw1_mode <= SW_SWAP;
    end else begin
      if (start) begin
        running <= 1'b1;
        x2_on   <= 1'b0;
        cnt     <= '0;
      end else if (running) begin
        cnt <= cnt + 1'b1;  // wraps at N (power of two)
        if (cnt == PW'(N / 2 - 1)) x2_on <= 1'b1;
      end
      sw1_mode <= (cnt < PW'(N / 2)) ? SW_SWAP : SW_NORMAL;
    end
  end

  assign x1_valid = running;
  assign x1_phase = cnt;
  assign x2_valid = running && x2_on;
  assign x2_phase = cnt - PW'(N / 2);
  assign sw2_mode = dif_tag ? SW_SWAP : SW_NORMAL;

  // The two N/2-point FFTs must always hold different streams.
  a_sw2_streams: assert property (@(posedge clk) disable iff (!rst_n)
    (dif_valid && dit_valid) |-> (dif_tag != dit_tag));
endmodule
