// BF2: two-parallel radix-2 butterfly of the last stage.
//
// Combines the even-sample transform E and the odd-sample transform O of one
// stream into the N-point result, two butterflies per step:
//   X(k)       = E(k)       + W_N^k       O(k)
//   X(k+N/2)   = E(k)       - W_N^k       O(k)
//   X(k+N/4)   = E(k+N/4)   + W_N^(k+N/4) O(k+N/4)
//   X(k+3N/4)  = E(k+N/4)   - W_N^(k+N/4) O(k+N/4)
// With k counting 0..N/4-1 the four outputs y[0..3] = X(k), X(k+N/4),
// X(k+N/2), X(k+3N/4) are each in natural order. One register stage; the
// index k is passed along. The paper describes the two-parallel butterfly
// and natural-order output; the twiddle multiplication in front of it and the
// lane assignment of the four results are this design's.
module fft2s_bf2 #(
  parameter int N   = 16,
  parameter int W   = 21,
  parameter int TWW = 16,
  localparam int QB = $clog2(N / 4)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [QB-1:0]       in_k,
  input  logic signed [W-1:0] e_re [2],
  input  logic signed [W-1:0] e_im [2],
  input  logic signed [W-1:0] o_re [2],
  input  logic signed [W-1:0] o_im [2],
  output logic                out_valid,
  output logic [QB-1:0]       out_k,
  output logic signed [W-1:0] y_re [4],
  output logic signed [W-1:0] y_im [4]
);
  localparam int AW = $clog2(N / 2);

  logic [AW-1:0]         idx [2];
  logic signed [TWW-1:0] w_re [2], w_im [2];
  logic signed [W-1:0]   t_re [2], t_im [2];

  assign idx[0] = AW'(in_k);
  assign idx[1] = AW'(in_k) + AW'(N / 4);

  for (genvar i = 0; i < 2; i++) begin : g_bf
    fft2s_twiddle_rom #(.N(N), .TWW(TWW)) u_rom (.idx(idx[i]), .w_re(w_re[i]), .w_im(w_im[i]));
    fft2s_cmul #(.W(W), .TWW(TWW)) u_mul (
      .a_re(o_re[i]), .a_im(o_im[i]), .w_re(w_re[i]), .w_im(w_im[i]), .p_re(t_re[i]), .p_im(t_im[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      y_re      <= '{default: '0};
      y_im      <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_k   <= in_k;
        y_re[0] <= e_re[0] + t_re[0];  y_im[0] <= e_im[0] + t_im[0];
        y_re[1] <= e_re[1] + t_re[1];  y_im[1] <= e_im[1] + t_im[1];
        y_re[2] <= e_re[0] - t_re[0];  y_im[2] <= e_im[0] - t_im[0];
        y_re[3] <= e_re[1] - t_re[1];  y_im[3] <= e_im[1] - t_im[1];
      end
    end
  end
endmodule
