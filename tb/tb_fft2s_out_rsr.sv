// Testbench of the output reorder registers (levels L3/M3).
//
// For each of FR frames it sends the N/4 even pairs in DIF output order
// (step p carries E(q), E(q+N/4), q = bit-reverse(p)), one every second cycle,
// then the N/4 odd pairs O(k), O(k+N/4) in natural order. Each output must
// carry index k, E(k), E(k+N/4) from the stored frame and the odd pair just
// sent, one cycle after it.
module tb_fft2s_out_rsr;
  localparam int N  = 32;
  localparam int W  = 16;
  localparam int Q  = N / 4;
  localparam int QB = $clog2(Q);
  localparam int FR = 4;

  logic clk = 0, rst_n = 0, in_valid = 0, in_even = 0;
  logic signed [W-1:0] in_re [2], in_im [2];
  logic out_valid;
  logic [QB-1:0] out_k;
  logic signed [W-1:0] e_re [2], e_im [2], o_re [2], o_im [2];
  int checks = 0, failures = 0;
  int er [N/2], ei [N/2], orr [N/2], oi [N/2];

  fft2s_out_rsr #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int br(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  initial begin
    in_re = '{default: '0};
    in_im = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FR; f++) begin
      for (int i = 0; i < N / 2; i++) begin
        er[i] = int'($urandom_range(65535)) - 32768;  ei[i] = int'($urandom_range(65535)) - 32768;
        orr[i] = int'($urandom_range(65535)) - 32768; oi[i] = int'($urandom_range(65535)) - 32768;
      end
      for (int p = 0; p < Q; p++) begin
        int q;
        q = br(p, QB);
        in_valid <= 1;  in_even <= 1;
        in_re[0] <= W'(er[q]);      in_im[0] <= W'(ei[q]);
        in_re[1] <= W'(er[q + Q]);  in_im[1] <= W'(ei[q + Q]);
        @(posedge clk);
        in_valid <= 0;
        @(posedge clk);
        checks++;
        if (out_valid) begin
          failures++;
          $display("output while storing even data");
        end
      end
      for (int k = 0; k < Q; k++) begin
        in_valid <= 1;  in_even <= 0;
        in_re[0] <= W'(orr[k]);      in_im[0] <= W'(oi[k]);
        in_re[1] <= W'(orr[k + Q]);  in_im[1] <= W'(oi[k + Q]);
        @(posedge clk);
        in_valid <= 0;
        #1;
        checks++;
        if (!out_valid || int'(out_k) != k ||
            e_re[0] != W'(er[k]) || e_im[0] != W'(ei[k]) ||
            e_re[1] != W'(er[k + Q]) || e_im[1] != W'(ei[k + Q]) ||
            o_re[0] != W'(orr[k]) || o_im[0] != W'(oi[k]) ||
            o_re[1] != W'(orr[k + Q]) || o_im[1] != W'(oi[k + Q])) begin
          failures++;
          $display("frame %0d k %0d: valid %0b k %0d E (%0d,%0d) expected (%0d,%0d)",
                   f, k, out_valid, out_k, e_re[0], e_re[1], er[k], er[k + Q]);
        end
        @(posedge clk);
      end
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
