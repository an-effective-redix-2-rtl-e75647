// Levels L1 / M1: input delay commutator with reordering registers.
//
// Takes one stream, one complex sample per cycle in natural order, with its
// sample index `phase` (0..N-1) from the controller, and separates even and
// odd samples:
//  * even samples: x(2m) of the first half-frame are held; when x(2m+N/2)
//    arrives it leaves together with x(2m) as the pair (e(m), e(m+N/4)) that
//    the first DIF butterfly needs, at phases N/2, N/2+2, ... N-2 (one pair
//    every second cycle, second half of the frame).
//  * odd samples o(i) = x(2i+1) are held and leave during the first half of
//    the next frame, one pair every second cycle, as (o(q), o(q+N/4)) with
//    q = bit-reverse of the pair index over log2(N/4) bits: the first N/4 and
//    the next N/4 odd samples are bit-reversed separately and sent in
//    parallel, which is the input order of the DIT FFT.
// Storage: N/2 data registers ("slots"), the paper's count of scheduling
// registers. At every moment exactly N/2 samples wait, because each sample
// that arrives is written into the slot that the sample just sent out left
// free: in the first half of a frame an odd pair leaves every second cycle
// and its two slots take the next even and odd sample; in the second half an
// even sample leaves every second cycle and its slot takes the next odd
// sample. Small tables of slot numbers record where each waiting sample is
// (for odd samples one table per frame parity, since one frame's table is
// read while the next is written).
// Outputs are registered (one cycle after the sample that completes a pair).
// The paper does the odd-sample bit reversal with these scheduling
// registers, as here, but builds it from shift registers and multiplexers;
// the addressed slots with slot tables are this design's choice.
module fft2s_in_dc #(
  parameter int N   = 16,
  parameter int W   = 21,
  parameter bit TAG = 1'b0,   // stream number carried with the data
  localparam int PW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [PW-1:0]       phase,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  output logic                out_valid,
  output logic                out_tag,
  output logic                out_odd,   // 1: odd-sample pair, 0: even-sample pair
  output logic signed [W-1:0] out_re [2],
  output logic signed [W-1:0] out_im [2]
);
  localparam int Q  = N / 4;
  localparam int QB = $clog2(Q);
  localparam int SB = PW - 1;            // slot number width, N/2 slots

  logic signed [W-1:0] s_re [N/2];       // the N/2 scheduling registers
  logic signed [W-1:0] s_im [N/2];
  logic [SB-1:0]       loc_odd  [2][N/2]; // slot of odd sample i, per frame parity
  logic [SB-1:0]       loc_even [Q];      // slot of even sample m of this frame
  logic [SB-1:0]       free_slot;         // slot freed in the previous cycle
  logic                bank;              // parity of the frame being received
  logic                have_prev;         // a complete frame of odd samples is held

  assign out_tag = TAG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank      <= 1'b0;
      have_prev <= 1'b0;
      free_slot <= '0;
      out_valid <= 1'b0;
      out_odd   <= 1'b0;
      out_re    <= '{default: '0};
      out_im    <= '{default: '0};
      s_re      <= '{default: '0};
      s_im      <= '{default: '0};
      loc_even  <= '{default: '0};
      // before the first frame every slot counts as free: identity map
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < N / 2; i++) loc_odd[b][i] <= SB'(i);
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (phase[0]) begin
          // odd sample: into the slot freed one cycle ago
          s_re[free_slot] <= x_re;
          s_im[free_slot] <= x_im;
          loc_odd[bank][phase[PW-1:1]] <= free_slot;
          if (phase == PW'(N - 1)) begin
            bank      <= ~bank;
            have_prev <= 1'b1;
          end
        end else if (phase < PW'(N / 2)) begin
          // first half: send the odd pair (o(q), o(q+N/4)) of the previous
          // frame; its slots take this even sample and the next odd one
          logic [SB-1:0] q, a, b;
          q = SB'(fft2s_pkg::bitrev(int'(phase[QB:1]), QB));
          a = loc_odd[~bank][q];
          b = loc_odd[~bank][SB'(Q) + q];
          out_valid <= have_prev;
          out_odd   <= 1'b1;
          out_re[0] <= s_re[a];  out_im[0] <= s_im[a];
          out_re[1] <= s_re[b];  out_im[1] <= s_im[b];
          s_re[a]   <= x_re;
          s_im[a]   <= x_im;
          loc_even[phase[QB:1]] <= a;
          free_slot <= b;
        end else begin
          // second half: x(2m+N/2) completes the pair with the held x(2m),
          // whose slot takes the next odd sample
          logic [SB-1:0] c;
          c = loc_even[phase[QB:1]];
          out_valid <= 1'b1;
          out_odd   <= 1'b0;
          out_re[0] <= s_re[c];  out_im[0] <= s_im[c];
          out_re[1] <= x_re;     out_im[1] <= x_im;
          free_slot <= c;
        end
      end
    end
  end
endmodule
