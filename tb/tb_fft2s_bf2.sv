// Testbench of the two-parallel last-stage butterfly BF2.
//
// Applies random E(k), E(k+N/4), O(k), O(k+N/4) and index k and compares the
// four outputs, one cycle later, with E +/- W_N^k O computed in real
// arithmetic (tolerance covers the 16-bit twiddles and rounding).
module tb_fft2s_bf2;
  localparam int N   = 16;
  localparam int W   = 21;
  localparam int TWW = 16;
  localparam int QB  = $clog2(N / 4);
  localparam real TOL = 4.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [QB-1:0] in_k = 0, out_k;
  logic signed [W-1:0] e_re [2], e_im [2], o_re [2], o_im [2];
  logic out_valid;
  logic signed [W-1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;

  fft2s_bf2 #(.N(N), .W(W), .TWW(TWW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    e_re = '{default: '0}; e_im = '{default: '0};
    o_re = '{default: '0}; o_im = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int it = 0; it < 200; it++) begin
      int er [2], ei [2], orr [2], oi [2], k;
      k = it % (N / 4);
      for (int i = 0; i < 2; i++) begin
        er[i]  = int'($urandom_range(200000)) - 100000;  ei[i] = int'($urandom_range(200000)) - 100000;
        orr[i] = int'($urandom_range(200000)) - 100000;  oi[i] = int'($urandom_range(200000)) - 100000;
        e_re[i] <= W'(er[i]);   e_im[i] <= W'(ei[i]);
        o_re[i] <= W'(orr[i]);  o_im[i] <= W'(oi[i]);
      end
      in_k <= QB'(k);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid || int'(out_k) != k) begin
        failures++;
        $display("valid/index wrong");
      end
      for (int l = 0; l < 4; l++) begin
        int i, kk;
        real a, tr, ti, xr, xi;
        i  = l % 2;                  // which butterfly
        kk = k + i * N / 4;          // twiddle exponent
        a  = -2.0 * 3.14159265358979323846 * real'(kk) / real'(N);
        tr = real'(orr[i]) * $cos(a) - real'(oi[i]) * $sin(a);
        ti = real'(orr[i]) * $sin(a) + real'(oi[i]) * $cos(a);
        xr = (l < 2) ? real'(er[i]) + tr : real'(er[i]) - tr;
        xi = (l < 2) ? real'(ei[i]) + ti : real'(ei[i]) - ti;
        checks++;
        if ((real'(y_re[l]) - xr > TOL) || (xr - real'(y_re[l]) > TOL) ||
            (real'(y_im[l]) - xi > TOL) || (xi - real'(y_im[l]) > TOL)) begin
          failures++;
          $display("k %0d lane %0d: got (%0d,%0d) expected (%.1f,%.1f)", k, l, y_re[l], y_im[l], xr, xi);
        end
      end
      @(posedge clk);
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
