// Levels L3 / M3: reordering registers in front of the last butterfly.
//
// The unit sees one two-lane path from SW2. While `in_even` is set the path
// carries the DIF FFT output of this unit's stream: N/4 pairs whose step p
// holds (E(k), E(k+N/4)) with k = bit-reverse of p over log2(N/4) bits. They
// are written into N/4 pair registers in arrival order. In the next window
// the same path carries the DIT FFT output of the same stream, (O(k),
// O(k+N/4)) in natural order k = 0..N/4-1; for each such pair the registers
// are read at the bit-reversed address, so E(k) and E(k+N/4) leave in natural
// order together with O(k), O(k+N/4) and the index k. Output is registered.
// As in the paper, the registers that hold the even half until the odd half
// arrives are the ones that undo its bit-reversed order (N/4-point reversal,
// done for both halves in parallel). They are addressed directly here rather
// than built as the paper's shift-register and multiplexer chain.
module fft2s_out_rsr #(
  parameter int N  = 16,
  parameter int W  = 21,
  localparam int QB = $clog2(N / 4)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_even,
  input  logic signed [W-1:0] in_re [2],
  input  logic signed [W-1:0] in_im [2],
  output logic                out_valid,
  output logic [QB-1:0]       out_k,
  output logic signed [W-1:0] e_re [2],   // E(k), E(k+N/4)
  output logic signed [W-1:0] e_im [2],
  output logic signed [W-1:0] o_re [2],   // O(k), O(k+N/4)
  output logic signed [W-1:0] o_im [2]
);
  logic signed [W-1:0] r_re [N/4][2];
  logic signed [W-1:0] r_im [N/4][2];
  logic [QB-1:0]       wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
      r_re      <= '{default: '0};
      r_im      <= '{default: '0};
      e_re      <= '{default: '0};
      e_im      <= '{default: '0};
      o_re      <= '{default: '0};
      o_im      <= '{default: '0};
    end else begin
      out_valid <= in_valid && !in_even;
      if (in_valid && in_even) begin
        r_re[wp] <= in_re;
        r_im[wp] <= in_im;
        wp       <= wp + 1'b1;   // wraps at N/4
      end else if (in_valid) begin
        logic [QB-1:0] a;
        a     = QB'(fft2s_pkg::bitrev(int'(rp), QB));
        e_re  <= r_re[a];
        e_im  <= r_im[a];
        o_re  <= in_re;
        o_im  <= in_im;
        out_k <= rp;
        rp    <= rp + 1'b1;
      end
    end
  end
endmodule
