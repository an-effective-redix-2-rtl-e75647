// End-to-end testbench of the two-stream FFT processor at its default size.
//
// Streams X1 and X2 each carry FR frames of random complex samples, X2 N/2
// cycles behind X1 as the processor expects, followed by zero frames that push
// the last data frame out. Every output step is checked against a direct DFT
// of its frame computed in real arithmetic: the four values, the index k
// (natural order 0..N/4-1) and the stream it appears on. It also checks the
// timing (latency from start, one frame per stream every N cycles, X2 output
// N/2 cycles after X1 output) and counts the mechanisms of the design: SW1 and
// SW2 in NORMAL and in SWAP mode, mode changes every N/2 cycles, the output
// reorder registers storing even data and reading them back in bit-reversed
// order, and the input units sending bit-reversed odd data.
module tb_fft2s_top;
  import fft2s_pkg::*;

  localparam int N   = 16;
  localparam int DW  = 16;
  localparam int W   = DW + $clog2(N) + 1;
  localparam int QB  = $clog2(N / 4);
  localparam int FR  = 8;           // data frames per stream
  localparam int FT  = FR + 3;      // frames sent, including zero frames
  localparam real TOL = 96.0;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [DW-1:0] x1_re = 0, x1_im = 0, x2_re = 0, x2_im = 0;
  logic y1_valid, y2_valid;
  logic [QB-1:0] y1_k, y2_k;
  logic signed [W-1:0] y1_re [4], y1_im [4], y2_re [4], y2_im [4];

  fft2s_top dut (.*);

  int checks = 0, failures = 0;
  int xr [2][FT][N], xi [2][FT][N];
  int cnt_out [2] = '{0, 0};
  longint cyc = 0, t_start = 0;
  longint t_frame [2][FT];
  int n_sw1 [2] = '{0, 0}, n_sw2 [2] = '{0, 0};
  int n_sw1_chg = 0, n_sw2_chg = 0;
  int n_rsr_wr = 0, n_rsr_perm = 0, n_in_odd_perm = 0;
  sw_mode_e last_sw1 = SW_SWAP, last_sw2 = SW_NORMAL;

  always #5 clk = ~clk;

  function automatic void dft(input int s, input int f, input int k, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      real a;
      a  = -2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
      re += real'(xr[s][f][n]) * $cos(a) - real'(xi[s][f][n]) * $sin(a);
      im += real'(xr[s][f][n]) * $sin(a) + real'(xi[s][f][n]) * $cos(a);
    end
  endfunction

  task automatic check_step(input int s, input logic [QB-1:0] k,
                            input logic signed [W-1:0] re [4], input logic signed [W-1:0] im [4]);
    int f, kk;
    f  = cnt_out[s] / (N / 4);
    kk = cnt_out[s] % (N / 4);
    if (kk == 0 && f < FT) t_frame[s][f] = cyc;
    checks++;
    if (int'(k) != kk) begin
      failures++;
      $display("stream %0d frame %0d: index %0d, expected %0d", s + 1, f, k, kk);
    end
    if (f < FR)
      for (int l = 0; l < 4; l++) begin
        real er, ei;
        dft(s, f, kk + l * N / 4, er, ei);
        checks++;
        if ((real'(re[l]) - er > TOL) || (er - real'(re[l]) > TOL) ||
            (real'(im[l]) - ei > TOL) || (ei - real'(im[l]) > TOL)) begin
          failures++;
          $display("stream %0d frame %0d X(%0d): got (%0d,%0d) expected (%.1f,%.1f)",
                   s + 1, f, kk + l * N / 4, re[l], im[l], er, ei);
        end
      end
    cnt_out[s]++;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (y1_valid) check_step(0, y1_k, y1_re, y1_im);
      if (y2_valid) check_step(1, y2_k, y2_re, y2_im);
      // mechanisms
      if (dut.u1_valid[0] || dut.u1_valid[1]) begin
        n_sw1[dut.sw1_mode]++;
        if (dut.sw1_mode != last_sw1) n_sw1_chg++;
        last_sw1 = dut.sw1_mode;
      end
      if (dut.u2_valid[0] && dut.u2_valid[1]) begin
        n_sw2[dut.sw2_mode]++;
        if (dut.sw2_mode != last_sw2) n_sw2_chg++;
        last_sw2 = dut.sw2_mode;
      end
      if (dut.v2_valid[0] && dut.sw2_mode == SW_NORMAL) n_rsr_wr++;
      if (dut.v2_valid[0] && dut.sw2_mode == SW_SWAP &&
          bitrev(int'(dut.u_l3_rsr.rp), QB) != int'(dut.u_l3_rsr.rp)) n_rsr_perm++;
      if (dut.u_l1.out_valid && dut.u_l1.out_odd && dut.u_l1.out_re[0] != W'(xr[0][0][1]))
        n_in_odd_perm++;
    end
  end

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int f = 0; f < FT; f++)
        for (int n = 0; n < N; n++) begin
          xr[s][f][n] = (f < FR) ? int'($urandom_range(65535)) - 32768 : 0;
          xi[s][f][n] = (f < FR) ? int'($urandom_range(65535)) - 32768 : 0;
        end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    start <= 1;
    t_start = cyc;
    @(posedge clk);
    start <= 0;
    for (int c = 0; c < FT * N + N / 2; c++) begin
      int f1, f2;
      f1 = c / N;
      f2 = (c - N / 2) / N;
      if (f1 < FT) begin
        x1_re <= DW'(xr[0][f1][c % N]);  x1_im <= DW'(xi[0][f1][c % N]);
      end else begin
        x1_re <= 0;  x1_im <= 0;
      end
      if (c >= N / 2 && f2 < FT) begin
        x2_re <= DW'(xr[1][f2][(c - N / 2) % N]);  x2_im <= DW'(xi[1][f2][(c - N / 2) % N]);
      end else begin
        x2_re <= 0;  x2_im <= 0;
      end
      @(posedge clk);
    end
    repeat (4) @(posedge clk);

    // every data frame of both streams came out, in order
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (cnt_out[s] < FR * N / 4) begin
        failures++;
        $display("stream %0d: only %0d output steps", s + 1, cnt_out[s]);
      end
    end
    // throughput: one N-point frame per stream every N cycles;
    // X2 results exactly N/2 cycles after the X1 results of the same frame
    for (int f = 1; f < FR; f++)
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (t_frame[s][f] - t_frame[s][f-1] != longint'(N)) begin
          failures++;
          $display("stream %0d frame %0d started %0d cycles after the previous one",
                   s + 1, f, t_frame[s][f] - t_frame[s][f-1]);
        end
      end
    for (int f = 0; f < FR; f++) begin
      checks++;
      if (t_frame[1][f] - t_frame[0][f] != longint'(N) / 2) begin
        failures++;
        $display("frame %0d: X2 output %0d cycles after X1 output", f, t_frame[1][f] - t_frame[0][f]);
      end
    end
    $display("latency: first X1 sample to first X1 result: %0d cycles", t_frame[0][0] - t_start);
    checks++;
    if (t_frame[0][0] - t_start != 3 * N / 2 + 2 * $clog2(N)) begin
      failures++;
      $display("latency differs from 3N/2 + 2log2(N) = %0d", 3 * N / 2 + 2 * $clog2(N));
    end

    $display("mechanisms:");
    expect_count("SW1 steps in NORMAL mode", n_sw1[SW_NORMAL]);
    expect_count("SW1 steps in SWAP mode", n_sw1[SW_SWAP]);
    expect_count("SW1 mode changes", n_sw1_chg);
    expect_count("SW2 steps in NORMAL mode", n_sw2[SW_NORMAL]);
    expect_count("SW2 steps in SWAP mode", n_sw2[SW_SWAP]);
    expect_count("SW2 mode changes", n_sw2_chg);
    expect_count("L3 reorder register writes", n_rsr_wr);
    expect_count("L3 reads at a bit-reversed address", n_rsr_perm);
    expect_count("L1 odd pairs sent", n_in_odd_perm);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
