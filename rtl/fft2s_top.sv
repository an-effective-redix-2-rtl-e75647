// Two-stream N-point FFT processor with natural-order outputs.
//
// Two independent complex streams X1 and X2 each deliver one sample per cycle
// in natural order; X2 starts N/2 cycles after X1. Each N-point transform is
// computed as an N/2-point DIF FFT of the even samples and an N/2-point DIT FFT
// of the odd samples, combined by one stage of radix-2 butterflies:
//   L1 / M1  input units of X1 / X2 (fft2s_in_dc): split even and odd samples,
//            bit-reverse the odd ones with their scheduling registers
//   SW1      sends even data to the DIF FFT and odd data to the DIT FFT; it
//            swaps the two paths every N/2 cycles
//   L2       N/2-point DIF MDC FFT, shared by the even halves of both streams
//   M2       N/2-point DIT MDC FFT, shared by the odd halves of both streams
//   SW2      returns each stream's data to its own last stage
//   L3 / M3  reorder registers (fft2s_out_rsr) and two-parallel butterfly
//            (fft2s_bf2) for X1 / X2
// The even half of a frame reaches L2 one window (N/2 cycles) before its odd
// half reaches M2; the L3/M3 registers keep it for that window and undo its
// bit-reversed order on the way out, so no separate bit-reversal buffer is
// needed. Outputs: each stream gives, during one window of every N cycles, one
// step every second cycle carrying X(k), X(k+N/4), X(k+N/2), X(k+3N/4) for
// k = 0..N/4-1. A one-cycle `start` pulse begins the operation; X1 sample 0
// must be on x1_* in the next cycle and X2 sample 0 N/2 cycles after that.
// Streams are continuous: a frame leaves once the following frame has entered.
// Data are signed; inputs DW bits, everything inside and the outputs
// W = DW + log2(N) + 1 bits, so no stage can overflow and no scaling is done.
// The organisation, switch schedule and reordering follow the paper; word
// lengths, the interface and the output lane arrangement are this design's.
module fft2s_top
  import fft2s_pkg::*;
#(
  parameter int N   = 16,
  parameter int DW  = 16,
  parameter int TWW = 16,
  localparam int W  = DW + $clog2(N) + 1,
  localparam int PW = $clog2(N),
  localparam int QB = $clog2(N / 4)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] x1_re,
  input  logic signed [DW-1:0] x1_im,
  input  logic signed [DW-1:0] x2_re,
  input  logic signed [DW-1:0] x2_im,
  output logic                 y1_valid,
  output logic [QB-1:0]        y1_k,
  output logic signed [W-1:0]  y1_re [4],
  output logic signed [W-1:0]  y1_im [4],
  output logic                 y2_valid,
  output logic [QB-1:0]        y2_k,
  output logic signed [W-1:0]  y2_re [4],
  output logic signed [W-1:0]  y2_im [4]
);
  // ---------------- control
  logic          x1_valid, x2_valid;
  logic [PW-1:0] x1_phase, x2_phase;
  sw_mode_e      sw1_mode, sw2_mode;

  // ---------------- L1 / M1 outputs (u1..u4 of SW1)
  logic                u1_valid [2], u1_tag [2], u1_odd [2];
  logic signed [W-1:0] u1_re [4], u1_im [4];
  // ---------------- SW1 outputs (v1,v2 -> L2, v3,v4 -> M2)
  logic                v1_valid [2], v1_tag [2];
  logic signed [W-1:0] v1_re [4], v1_im [4];
  // ---------------- L2 / M2 outputs (u1..u4 of SW2)
  logic                u2_valid [2], u2_tag [2];
  logic signed [W-1:0] u2_re [4], u2_im [4];
  // ---------------- SW2 outputs (v1,v2 -> L3, v3,v4 -> M3)
  logic                v2_valid [2], v2_tag [2];
  logic signed [W-1:0] v2_re [4], v2_im [4];

  fft2s_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start,
    .dif_valid(u2_valid[0]), .dif_tag(u2_tag[0]),
    .dit_valid(u2_valid[1]), .dit_tag(u2_tag[1]),
    .x1_valid, .x1_phase, .x2_valid, .x2_phase, .sw1_mode, .sw2_mode
  );

  // ---------------- level 1
  logic signed [W-1:0] l1_re [2], l1_im [2], m1_re [2], m1_im [2];

  fft2s_in_dc #(.N(N), .W(W), .TAG(1'b0)) u_l1 (
    .clk, .rst_n, .in_valid(x1_valid), .phase(x1_phase),
    .x_re(W'(x1_re)), .x_im(W'(x1_im)),
    .out_valid(u1_valid[0]), .out_tag(u1_tag[0]), .out_odd(u1_odd[0]),
    .out_re(l1_re), .out_im(l1_im)
  );

  fft2s_in_dc #(.N(N), .W(W), .TAG(1'b1)) u_m1 (
    .clk, .rst_n, .in_valid(x2_valid), .phase(x2_phase),
    .x_re(W'(x2_re)), .x_im(W'(x2_im)),
    .out_valid(u1_valid[1]), .out_tag(u1_tag[1]), .out_odd(u1_odd[1]),
    .out_re(m1_re), .out_im(m1_im)
  );

  assign u1_re = '{l1_re[0], l1_re[1], m1_re[0], m1_re[1]};
  assign u1_im = '{l1_im[0], l1_im[1], m1_im[0], m1_im[1]};

  fft2s_switch #(.W(W)) u_sw1 (
    .mode(sw1_mode), .u_valid(u1_valid), .u_tag(u1_tag), .u_re(u1_re), .u_im(u1_im),
    .v_valid(v1_valid), .v_tag(v1_tag), .v_re(v1_re), .v_im(v1_im)
  );

  // ---------------- level 2
  logic signed [W-1:0] dif_re [2], dif_im [2], dit_re [2], dit_im [2];
  logic signed [W-1:0] l2i_re [2], l2i_im [2], m2i_re [2], m2i_im [2];

  assign l2i_re = '{v1_re[0], v1_re[1]};
  assign l2i_im = '{v1_im[0], v1_im[1]};
  assign m2i_re = '{v1_re[2], v1_re[3]};
  assign m2i_im = '{v1_im[2], v1_im[3]};

  fft2s_mdc_dif #(.W(W), .TWW(TWW), .M(N / 2)) u_l2 (
    .clk, .rst_n, .in_valid(v1_valid[0]), .in_tag(v1_tag[0]), .in_re(l2i_re), .in_im(l2i_im),
    .out_valid(u2_valid[0]), .out_tag(u2_tag[0]), .out_re(dif_re), .out_im(dif_im)
  );

  fft2s_mdc_dit #(.W(W), .TWW(TWW), .M(N / 2)) u_m2 (
    .clk, .rst_n, .in_valid(v1_valid[1]), .in_tag(v1_tag[1]), .in_re(m2i_re), .in_im(m2i_im),
    .out_valid(u2_valid[1]), .out_tag(u2_tag[1]), .out_re(dit_re), .out_im(dit_im)
  );

  assign u2_re = '{dif_re[0], dif_re[1], dit_re[0], dit_re[1]};
  assign u2_im = '{dif_im[0], dif_im[1], dit_im[0], dit_im[1]};

  fft2s_switch #(.W(W)) u_sw2 (
    .mode(sw2_mode), .u_valid(u2_valid), .u_tag(u2_tag), .u_re(u2_re), .u_im(u2_im),
    .v_valid(v2_valid), .v_tag(v2_tag), .v_re(v2_re), .v_im(v2_im)
  );

  // ---------------- level 3: L3 takes v1,v2 (stream X1), M3 takes v3,v4 (X2)
  logic signed [W-1:0] l3i_re [2], l3i_im [2], m3i_re [2], m3i_im [2];
  logic                l3_v, m3_v;
  logic [QB-1:0]       l3_k, m3_k;
  logic signed [W-1:0] l3e_re [2], l3e_im [2], l3o_re [2], l3o_im [2];
  logic signed [W-1:0] m3e_re [2], m3e_im [2], m3o_re [2], m3o_im [2];

  assign l3i_re = '{v2_re[0], v2_re[1]};
  assign l3i_im = '{v2_im[0], v2_im[1]};
  assign m3i_re = '{v2_re[2], v2_re[3]};
  assign m3i_im = '{v2_im[2], v2_im[3]};

  // X1 even data arrive at L3 in NORMAL mode (from L2), odd data in SWAP
  // mode (from M2); M3 the other way round.
  fft2s_out_rsr #(.N(N), .W(W)) u_l3_rsr (
    .clk, .rst_n, .in_valid(v2_valid[0]), .in_even(sw2_mode == SW_NORMAL),
    .in_re(l3i_re), .in_im(l3i_im),
    .out_valid(l3_v), .out_k(l3_k), .e_re(l3e_re), .e_im(l3e_im), .o_re(l3o_re), .o_im(l3o_im)
  );

  fft2s_out_rsr #(.N(N), .W(W)) u_m3_rsr (
    .clk, .rst_n, .in_valid(v2_valid[1]), .in_even(sw2_mode == SW_SWAP),
    .in_re(m3i_re), .in_im(m3i_im),
    .out_valid(m3_v), .out_k(m3_k), .e_re(m3e_re), .e_im(m3e_im), .o_re(m3o_re), .o_im(m3o_im)
  );

  fft2s_bf2 #(.N(N), .W(W), .TWW(TWW)) u_l3_bf2 (
    .clk, .rst_n, .in_valid(l3_v), .in_k(l3_k), .e_re(l3e_re), .e_im(l3e_im),
    .o_re(l3o_re), .o_im(l3o_im), .out_valid(y1_valid), .out_k(y1_k), .y_re(y1_re), .y_im(y1_im)
  );

  fft2s_bf2 #(.N(N), .W(W), .TWW(TWW)) u_m3_bf2 (
    .clk, .rst_n, .in_valid(m3_v), .in_k(m3_k), .e_re(m3e_re), .e_im(m3e_im),
    .o_re(m3o_re), .o_im(m3o_im), .out_valid(y2_valid), .out_k(y2_k), .y_re(y2_re), .y_im(y2_im)
  );

  // SW1 must always send even data to the DIF FFT and odd data to the DIT FFT,
  // and SW2 must return every stream to its own last stage.
  a_sw1_even_to_dif: assert property (@(posedge clk) disable iff (!rst_n)
    (u1_valid[0] && sw1_mode == SW_NORMAL) |-> !u1_odd[0]);
  a_sw1_odd_to_dit: assert property (@(posedge clk) disable iff (!rst_n)
    (u1_valid[0] && sw1_mode == SW_SWAP) |-> u1_odd[0]);
  a_sw2_l3_stream: assert property (@(posedge clk) disable iff (!rst_n)
    v2_valid[0] |-> (v2_tag[0] == 1'b0));
  a_sw2_m3_stream: assert property (@(posedge clk) disable iff (!rst_n)
    v2_valid[1] |-> (v2_tag[1] == 1'b1));
endmodule
