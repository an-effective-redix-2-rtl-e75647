// Delay commutator between two butterfly stages of a two-path MDC FFT.
//
// The two input lanes a and b each carry a sequence in blocks of 2*D steps.
// For every block it emits first the D pairs (a(r), a(r+D)) and then the D
// pairs (b(r), b(r+D)), r = 0..D-1: the 2x2 block transpose that brings the
// two operands of the next butterfly stage onto the two lanes at the same
// step. Structure: lane b passes a D-step delay line, then a 2x2 switch that
// swaps during the second half of each input block, then the upper output
// passes a second D-step delay line: 2D registers per lane pair, the usual
// count of an MDC commutator. With the delays in this place the blocks keep
// their order (a-group before b-group). Output latency is D valid steps. All
// shifting is gated by in_valid, so the input may arrive in any cadence, but
// data only leave once D further steps have entered: the unit is meant for a
// continuous stream. A tag bit (which data stream the sample belongs to) is
// delayed along with the data. The paper names the delay commutators of
// the MDC FFT; the placement of the delays is this design's choice.
module fft2s_commutator #(
  parameter int W = 21,
  parameter int D = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_tag,
  input  logic signed [W-1:0] in_re  [2],
  input  logic signed [W-1:0] in_im  [2],
  output logic                out_valid,
  output logic                out_tag,
  output logic signed [W-1:0] out_re [2],
  output logic signed [W-1:0] out_im [2]
);
  localparam int CW = $clog2(2 * D) + 1;

  logic signed [W-1:0] yb_re [D];   // lane b delayed, before the switch
  logic signed [W-1:0] yb_im [D];
  logic signed [W-1:0] yt_re [D];   // upper switch output delayed
  logic signed [W-1:0] yt_im [D];
  logic                td    [D];
  logic [CW-1:0]       phase;       // input step modulo 2D
  logic [CW-1:0]       filled;      // steps seen, saturating at D
  logic                swap;
  logic signed [W-1:0] o1_re, o1_im, o2_re, o2_im;

  always_comb begin
    swap = (phase >= CW'(D));
    if (swap) begin
      o1_re = yb_re[D-1];  o1_im = yb_im[D-1];
      o2_re = in_re[0];    o2_im = in_im[0];
    end else begin
      o1_re = in_re[0];    o1_im = in_im[0];
      o2_re = yb_re[D-1];  o2_im = yb_im[D-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      filled    <= '0;
      out_valid <= 1'b0;
      out_tag   <= 1'b0;
      out_re    <= '{default: '0};
      out_im    <= '{default: '0};
      yb_re     <= '{default: '0};
      yb_im     <= '{default: '0};
      yt_re     <= '{default: '0};
      yt_im     <= '{default: '0};
      td        <= '{default: 1'b0};
    end else begin
      out_valid <= in_valid && (filled == CW'(D));
      if (in_valid) begin
        phase <= (phase == CW'(2 * D - 1)) ? '0 : phase + 1'b1;
        if (filled != CW'(D)) filled <= filled + 1'b1;
        out_re[0] <= yt_re[D-1];  out_im[0] <= yt_im[D-1];
        out_re[1] <= o2_re;       out_im[1] <= o2_im;
        out_tag   <= td[D-1];
        yb_re[0] <= in_re[1];  yb_im[0] <= in_im[1];
        yt_re[0] <= o1_re;     yt_im[0] <= o1_im;
        td[0]    <= in_tag;
        for (int i = 1; i < D; i++) begin
          yb_re[i] <= yb_re[i-1];  yb_im[i] <= yb_im[i-1];
          yt_re[i] <= yt_re[i-1];  yt_im[i] <= yt_im[i-1];
          td[i]    <= td[i-1];
        end
      end
    end
  end
endmodule
