// Level L2: M-point radix-2 DIF FFT, two-path multipath delay commutator.
//
// Input: one pair per valid step, (x(m), x(m+M/2)) for m = 0..M/2-1, the
// even samples of one N-point frame (M = N/2). log2(M) butterfly stages,
// each followed (except the last) by a delay commutator with D = M/4, M/8 ..
// 1. Output: step p carries (X(k), X(k+M/2)) with k = bit-reverse of p over
// log2(M)-1 bits, that is the transform in bit-reversed order, which the
// output reorder registers undo. Latency: log2(M) register stages plus M/2-1
// commutator steps; frames are processed back to back. The paper fixes the
// algorithm (N/2-point DIF FFT, MDC structure); stage and commutator details
// are this design's.
module fft2s_mdc_dif #(
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

  // node s: input of butterfly stage s; node S: output
  logic                v   [S+1];
  logic                t   [S+1];
  logic signed [W-1:0] dre [S+1][2];
  logic signed [W-1:0] dim [S+1][2];

  assign v[0] = in_valid;
  assign t[0] = in_tag;
  assign dre[0] = in_re;
  assign dim[0] = in_im;

  for (genvar s = 0; s < S; s++) begin : g_stage
    logic                bv, bt;
    logic signed [W-1:0] bre [2];
    logic signed [W-1:0] bim [2];

    fft2s_r2_stage #(.W(W), .TWW(TWW), .M(M), .DIF(1'b1), .STAGE(s)) u_bf (
      .clk, .rst_n, .in_valid(v[s]), .in_tag(t[s]), .in_re(dre[s]), .in_im(dim[s]),
      .out_valid(bv), .out_tag(bt), .out_re(bre), .out_im(bim)
    );

    if (s < S - 1) begin : g_comm
      fft2s_commutator #(.W(W), .D(M >> (s + 2))) u_dc (
        .clk, .rst_n, .in_valid(bv), .in_tag(bt), .in_re(bre), .in_im(bim),
        .out_valid(v[s+1]), .out_tag(t[s+1]), .out_re(dre[s+1]), .out_im(dim[s+1])
      );
    end else begin : g_last
      assign v[s+1]   = bv;
      assign t[s+1]   = bt;
      assign dre[s+1] = bre;
      assign dim[s+1] = bim;
    end
  end

  assign out_valid = v[S];
  assign out_tag   = t[S];
  assign out_re    = dre[S];
  assign out_im    = dim[S];
endmodule
