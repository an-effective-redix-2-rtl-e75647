// Complex multiplier by a twiddle factor: p = a * w.
//
// Four real products and two sums, then a rounding shift by TWW-2 bits, which
// removes the scaling of the twiddle (1.0 = 2^(TWW-2)). The result keeps the
// width W of the data; the surrounding design leaves enough guard bits that it
// cannot overflow. Purely combinational.
module fft2s_cmul #(
  parameter int W   = 21,
  parameter int TWW = 16
) (
  input  logic signed [W-1:0]   a_re,
  input  logic signed [W-1:0]   a_im,
  input  logic signed [TWW-1:0] w_re,
  input  logic signed [TWW-1:0] w_im,
  output logic signed [W-1:0]   p_re,
  output logic signed [W-1:0]   p_im
);
  localparam int PW = W + TWW + 1;
  localparam int SH = TWW - 2;

  logic signed [PW-1:0] sum_re, sum_im;
  logic signed [PW-1:0] half;

  always_comb begin
    half   = PW'(1) <<< (SH - 1);
    sum_re = PW'(a_re) * PW'(w_re) - PW'(a_im) * PW'(w_im) + half;
    sum_im = PW'(a_re) * PW'(w_im) + PW'(a_im) * PW'(w_re) + half;
    p_re   = W'(sum_re >>> SH);
    p_im   = W'(sum_im >>> SH);
  end
endmodule
