// Testbench of the input unit (levels L1/M1).
//
// Sends FR frames of random samples, one per cycle with its phase, and checks
// every output cycle against the expected schedule worked out from the
// samples sent: in the second half of a frame, at each even phase n, the pair
// (x(n-N/2), x(n)) marked even; in the first half of the next frame, at each
// even phase n = 2p, the odd pair (x(2q+1), x(2(q+N/4)+1)) of the previous
// frame with q = bit-reverse(p); nothing valid at other cycles.
module tb_fft2s_in_dc;
  localparam int N  = 16;
  localparam int W  = 14;
  localparam int PW = $clog2(N);
  localparam int FR = 5;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PW-1:0] phase = 0;
  logic signed [W-1:0] x_re = 0, x_im = 0;
  logic out_valid, out_tag, out_odd;
  logic signed [W-1:0] out_re [2], out_im [2];
  int checks = 0, failures = 0;
  int xr [FR][N], xi [FR][N];
  int n_even = 0, n_odd = 0;

  fft2s_in_dc #(.N(N), .W(W), .TAG(1'b1)) dut (.*);

  always #5 clk = ~clk;

  function automatic int br(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  task automatic expect_pair(input int ar, ai, br_, bi, input bit odd);
    checks++;
    if (!out_valid || out_odd != odd || out_tag != 1'b1 ||
        out_re[0] != W'(ar) || out_im[0] != W'(ai) || out_re[1] != W'(br_) || out_im[1] != W'(bi)) begin
      failures++;
      $display("pair mismatch: valid %0b odd %0b got (%0d,%0d) (%0d,%0d) expected (%0d,%0d) (%0d,%0d)",
               out_valid, out_odd, out_re[0], out_im[0], out_re[1], out_im[1], ar, ai, br_, bi);
    end
  endtask

  initial begin
    for (int f = 0; f < FR; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = int'($urandom_range(8191)) - 4096;
        xi[f][n] = int'($urandom_range(8191)) - 4096;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < FR * N + N / 2; c++) begin
      int f, n;
      f = c / N;
      n = c % N;
      in_valid <= 1;
      phase    <= PW'(n);
      x_re     <= (f < FR) ? W'(xr[f][n]) : '0;
      x_im     <= (f < FR) ? W'(xi[f][n]) : '0;
      @(posedge clk);
      #1;
      // output of the sample just taken
      if (n % 2 == 0 && n >= N / 2 && f < FR) begin
        expect_pair(xr[f][n - N/2], xi[f][n - N/2], xr[f][n], xi[f][n], 1'b0);
        n_even++;
      end else if (n % 2 == 0 && n < N / 2 && f >= 1) begin
        int q;
        q = br(n / 2, $clog2(N / 4));
        expect_pair(xr[f-1][2*q+1], xi[f-1][2*q+1], xr[f-1][2*(q+N/4)+1], xi[f-1][2*(q+N/4)+1], 1'b1);
        n_odd++;
      end else begin
        checks++;
        if (out_valid) begin
          failures++;
          $display("unexpected output at frame %0d phase %0d", f, n);
        end
      end
    end
    checks++;
    if (n_even != FR * N / 4 || n_odd != FR * N / 4) begin
      failures++;
      $display("pair counts %0d %0d", n_even, n_odd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
