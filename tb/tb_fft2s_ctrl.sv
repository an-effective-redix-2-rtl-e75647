// Testbench of the controller.
//
// After a start pulse, checks for several frames that X1's phase counts
// 0..N-1 from the next cycle, that X2 becomes valid exactly N/2 cycles later
// with its phase N/2 behind, and that SW1 (which acts on data registered one
// cycle after the phase) is in SWAP mode for the first N/2 phases of a frame
// and NORMAL for the rest, so that it changes every N/2 cycles. SW2 must
// follow the stream tag of the DIF output.
module tb_fft2s_ctrl;
  import fft2s_pkg::*;
  localparam int N  = 16;
  localparam int PW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  logic dif_valid = 0, dif_tag = 0, dit_valid = 0, dit_tag = 1;
  logic x1_valid, x2_valid;
  logic [PW-1:0] x1_phase, x2_phase;
  sw_mode_e sw1_mode, sw2_mode;
  int checks = 0, failures = 0;
  int prev_phase;
  int sw1_changes = 0;

  fft2s_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    sw_mode_e last_sw1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 expect_true(!x1_valid && !x2_valid, "nothing valid before start");
    start <= 1;
    @(posedge clk);
    start <= 0;
    prev_phase = -1;
    last_sw1 = SW_SWAP;
    for (int c = 0; c < 5 * N; c++) begin
      #1;
      expect_true(x1_valid, "X1 valid after start");
      expect_true(int'(x1_phase) == c % N, $sformatf("X1 phase %0d at cycle %0d", x1_phase, c));
      expect_true(x2_valid == (c >= N / 2), $sformatf("X2 valid at cycle %0d", c));
      if (c >= N / 2)
        expect_true(int'(x2_phase) == (c - N / 2) % N, "X2 phase");
      if (c > 0) begin
        expect_true(sw1_mode == (((c - 1) % N < N / 2) ? SW_SWAP : SW_NORMAL),
                    $sformatf("SW1 mode at cycle %0d", c));
        if (sw1_mode != last_sw1) sw1_changes++;
        last_sw1 = sw1_mode;
      end
      dif_tag = 1'(c / (N / 2));
      #1;
      expect_true(sw2_mode == (dif_tag ? SW_SWAP : SW_NORMAL), "SW2 follows the DIF stream tag");
      @(posedge clk);
    end
    expect_true(sw1_changes >= 8, "SW1 changes mode every N/2 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
