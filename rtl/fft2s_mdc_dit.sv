// Level M2: M-point radix-2 DIT FFT, two-path multipath delay commutator.
//
// Input: one pair per valid step, (o(q), o(q+M/2)) with q = bit-reverse of the
// step index p over log2(M)-1 bits: the odd samples of one N-point frame
// (M = N/2) in bit-reversed order, as the input reorder registers deliver
// them. log2(M) butterfly stages; before stage s >= 1 a delay commutator with
// D = 2^(s-1) brings operands 2^s apart onto the two lanes. Output: step k
// carries (O(k), O(k+M/2)), k = 0..M/2-1, natural order. The latency equals
// that of the DIF FFT of the same size, which keeps the two halves of a frame
// exactly N/2 cycles apart. The paper fixes the algorithm (N/2-point DIT
// FFT on bit-reversed input, MDC structure); the stage details are this
// design's.
module fft2s_mdc_dit #(
  parameter int W   = 21,
  parameter int TWW = 16,
  parameter int M   = 8
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
  localparam int S = $clog2(M);

  // node s: output of stage s-1 (node 0: input); node S: output
  logic                v   [S+1];
  logic                t   [S+1];
  logic signed [W-1:0] dre [S+1][2];
  logic signed [W-1:0] dim [S+1][2];

  assign v[0] = in_valid;
  assign t[0] = in_tag;
  assign dre[0] = in_re;
  assign dim[0] = in_im;

  for (genvar s = 0; s < S; s++) begin : g_stage
    logic                cv, ct;
    logic signed [W-1:0] cre [2];
    logic signed [W-1:0] cim [2];

    if (s > 0) begin : g_comm
      fft2s_commutator #(.W(W), .D(1 << (s - 1))) u_dc (
        .clk, .rst_n, .in_valid(v[s]), .in_tag(t[s]), .in_re(dre[s]), .in_im(dim[s]),
        .out_valid(cv), .out_tag(ct), .out_re(cre), .out_im(cim)
      );
    end else begin : g_first
      assign cv  = v[s];
      assign ct  = t[s];
      assign cre = dre[s];
      assign cim = dim[s];
    end

    fft2s_r2_stage #(.W(W), .TWW(TWW), .M(M), .DIF(1'b0), .STAGE(s)) u_bf (
      .clk, .rst_n, .in_valid(cv), .in_tag(ct), .in_re(cre), .in_im(cim),
      .out_valid(v[s+1]), .out_tag(t[s+1]), .out_re(dre[s+1]), .out_im(dim[s+1])
    );
  end

  assign out_valid = v[S];
  assign out_tag   = t[S];
  assign out_re    = dre[S];
  assign out_im    = dim[S];
endmodule
