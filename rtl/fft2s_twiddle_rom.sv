// Twiddle-factor table: W_N^idx = exp(-j*2*pi*idx/N) for idx = 0 .. N/2-1.
//
// The table is a constant, computed at elaboration from the cosine and sine
// of the angle, so it holds for any power-of-two N. Read is combinational.
// Format: signed TWW bits, 1.0 = 2^(TWW-2) (this design's choice).
module fft2s_twiddle_rom #(
  parameter int N   = 16,
  parameter int TWW = 16,
  localparam int AW = (N > 2) ? $clog2(N / 2) : 1
) (
  input  logic [AW-1:0]         idx,
  output logic signed [TWW-1:0] w_re,
  output logic signed [TWW-1:0] w_im
);
  localparam int ONE = 1 << (TWW - 2);

  logic signed [TWW-1:0] tab_re [N/2];
  logic signed [TWW-1:0] tab_im [N/2];

  for (genvar i = 0; i < N / 2; i++) begin : g_tab
    localparam int VRE = fft2s_pkg::tw_re(i, N, ONE);
    localparam int VIM = fft2s_pkg::tw_im(i, N, ONE);
    assign tab_re[i] = TWW'(VRE);
    assign tab_im[i] = TWW'(VIM);
  end

  assign w_re = tab_re[idx];
  assign w_im = tab_im[idx];
endmodule
