// Testbench of the M-point DIF MDC FFT (level L2).
//
// Feeds FR frames of random complex samples as pairs (x(m), x(m+M/2)), one
// pair every second cycle as in the full processor, then zero frames to push
// the last frame out. Every output pair is mapped back through the expected
// bit-reversed order and compared with a direct DFT computed in real
// arithmetic. Also checks the stream tag, the output cadence and the latency.
module tb_fft2s_mdc_dif;
  localparam int W   = 21;
  localparam int TWW = 16;
  localparam int M   = 8;
  localparam int S   = $clog2(M);
  localparam int FR  = 6;             // frames with data
  localparam int FT  = FR + 2;        // frames sent, including zero frames
  localparam real TOL = 48.0;
  localparam int LAT = 2 * S - 2 + M; // cycles from the edge that applies the first input to the one that shows the first output

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_tag = 0;
  logic signed [W-1:0] in_re [2], in_im [2];
  logic out_valid, out_tag;
  logic signed [W-1:0] out_re [2], out_im [2];

  int checks = 0, failures = 0;
  int xr [FT][M], xi [FT][M];
  int ocount = 0;
  longint cyc = 0, t_first_in = -1, t_first_out = -1, t_last_out = -1;

  fft2s_mdc_dif #(.W(W), .TWW(TWW), .M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void dft(input int f, input int k, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < M; n++) begin
      real a;
      a  = -2.0 * 3.14159265358979323846 * real'(n * k) / real'(M);
      re += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
      im += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
    end
  endfunction

  function automatic int unsigned br(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  task automatic check_val(input int f, input int k, input logic signed [W-1:0] re,
                           input logic signed [W-1:0] im);
    real er, ei;
    dft(f, k, er, ei);
    checks++;
    if ((real'(re) - er > TOL) || (er - real'(re) > TOL) ||
        (real'(im) - ei > TOL) || (ei - real'(im) > TOL)) begin
      failures++;
      $display("MISMATCH frame %0d X(%0d): got (%0d,%0d) expected (%.1f,%.1f)", f, k, re, im, er, ei);
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, p, k;
      f = ocount / (M / 2);
      p = ocount % (M / 2);
      if (t_first_out < 0) t_first_out = cyc;
      if (t_last_out >= 0) begin
        checks++;
        if (cyc - t_last_out != 2) begin
          failures++;
          $display("cadence: output gap %0d cycles", cyc - t_last_out);
        end
      end
      t_last_out = cyc;
      if (f < FR) begin
        k = int'(br(p, S - 1));
        check_val(f, k, out_re[0], out_im[0]);
        check_val(f, k + M / 2, out_re[1], out_im[1]);
        checks++;
        if (out_tag != f[0]) begin
          failures++;
          $display("tag of frame %0d wrong", f);
        end
      end
      ocount++;
    end
  end

  initial begin
    for (int f = 0; f < FT; f++)
      for (int n = 0; n < M; n++) begin
        xr[f][n] = (f < FR) ? int'($urandom_range(65535)) - 32768 : 0;
        xi[f][n] = (f < FR) ? int'($urandom_range(65535)) - 32768 : 0;
      end
    in_re = '{default: '0};
    in_im = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FT; f++)
      for (int p = 0; p < M / 2; p++) begin
        @(posedge clk);
        if (t_first_in < 0) t_first_in = cyc;
        in_valid <= 1;
        in_tag   <= f[0];
        in_re[0] <= W'(xr[f][p]);        in_im[0] <= W'(xi[f][p]);
        in_re[1] <= W'(xr[f][p + M/2]);  in_im[1] <= W'(xi[f][p + M/2]);
        @(posedge clk);
        in_valid <= 0;
      end
    repeat (4) @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != longint'(LAT)) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_first_out - t_first_in, LAT);
    end
    checks++;
    if (ocount < FR * M / 2) begin
      failures++;
      $display("only %0d output steps", ocount);
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
