// One radix-2 butterfly stage of a two-path MDC FFT of size M.
//
// Each valid step brings the two butterfly operands on the two lanes. A step
// counter (modulo M/2) gives the position inside the transform, from which the
// twiddle index follows:
//   DIF (decimation in frequency), stage s: operands x(m), x(m+L/2) of a
//     sub-transform of size L = M/2^s, m = step mod L/2;
//     outputs a+b and (a-b)*W_L^m.
//   DIT (decimation in time), stage s: operands at distance 2^s of the
//     bit-reversed array, j = step mod 2^s; outputs a+b*W, a-b*W with
//     W = W_(2^(s+1))^j.
// One register stage; the tag bit travels with the data.
module fft2s_r2_stage #(
  parameter int W     = 21,
  parameter int TWW   = 16,
  parameter int M     = 8,
  parameter bit DIF   = 1'b1,
  parameter int STAGE = 0
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
  localparam int S  = $clog2(M);
  localparam int TW = (M > 2) ? $clog2(M / 2) : 1;  // twiddle index width
  localparam int CW = TW + 1;

  logic [CW-1:0]         step;
  logic [TW-1:0]         tw_idx;
  logic signed [TWW-1:0] w_re, w_im;
  logic signed [W-1:0]   m_in_re, m_in_im, m_re, m_im;
  logic signed [W-1:0]   d_re, d_im;

  always_comb begin
    int unsigned m;
    if (DIF) begin
      m      = int'(step) % ((M >> (STAGE + 1)) > 0 ? (M >> (STAGE + 1)) : 1);
      tw_idx = TW'(m << STAGE);
    end else begin
      m      = int'(step) % (1 << STAGE);
      tw_idx = TW'(m << (S - 1 - STAGE));
    end
  end

  fft2s_twiddle_rom #(.N(M), .TWW(TWW)) u_rom (.idx(tw_idx), .w_re(w_re), .w_im(w_im));

  // DIF multiplies the difference, DIT multiplies the lower operand.
  always_comb begin
    d_re = in_re[0] - in_re[1];
    d_im = in_im[0] - in_im[1];
    if (DIF) begin
      m_in_re = d_re;      m_in_im = d_im;
    end else begin
      m_in_re = in_re[1];  m_in_im = in_im[1];
    end
  end

  fft2s_cmul #(.W(W), .TWW(TWW)) u_mul (
    .a_re(m_in_re), .a_im(m_in_im), .w_re(w_re), .w_im(w_im), .p_re(m_re), .p_im(m_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= '0;
      out_valid <= 1'b0;
      out_tag   <= 1'b0;
      out_re    <= '{default: '0};
      out_im    <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        step    <= (step == CW'(M / 2 - 1)) ? '0 : step + 1'b1;
        out_tag <= in_tag;
        if (DIF) begin
          out_re[0] <= in_re[0] + in_re[1];  out_im[0] <= in_im[0] + in_im[1];
          out_re[1] <= m_re;                 out_im[1] <= m_im;
        end else begin
          out_re[0] <= in_re[0] + m_re;      out_im[0] <= in_im[0] + m_im;
          out_re[1] <= in_re[0] - m_re;      out_im[1] <= in_im[0] - m_im;
        end
      end
    end
  end
endmodule
