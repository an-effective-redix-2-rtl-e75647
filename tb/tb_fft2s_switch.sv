// Testbench of the 4-lane switch SW1/SW2.
//
// Applies random lane values, valid and tag bits in both modes and compares
// every output with the lane mapping of each mode, written out independently:
// NORMAL u1..u4 -> v1..v4, SWAP u1..u4 -> v3,v4,v1,v2.
module tb_fft2s_switch;
  import fft2s_pkg::*;
  localparam int W = 12;

  sw_mode_e mode;
  logic u_valid [2], u_tag [2], v_valid [2], v_tag [2];
  logic signed [W-1:0] u_re [4], u_im [4], v_re [4], v_im [4];
  int checks = 0, failures = 0;

  fft2s_switch #(.W(W)) dut (.*);

  initial begin
    for (int it = 0; it < 200; it++) begin
      int src;
      mode = (it % 2) ? SW_SWAP : SW_NORMAL;
      for (int i = 0; i < 2; i++) begin
        u_valid[i] = 1'($urandom);
        u_tag[i]   = 1'($urandom);
      end
      for (int i = 0; i < 4; i++) begin
        u_re[i] = W'($urandom);
        u_im[i] = W'($urandom);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        src = (mode == SW_SWAP) ? (i + 2) % 4 : i;
        checks++;
        if (v_re[i] !== u_re[src] || v_im[i] !== u_im[src]) begin
          failures++;
          $display("mode %s: v%0d does not carry u%0d", mode.name(), i + 1, src + 1);
        end
      end
      for (int i = 0; i < 2; i++) begin
        src = (mode == SW_SWAP) ? 1 - i : i;
        checks++;
        if (v_valid[i] !== u_valid[src] || v_tag[i] !== u_tag[src]) begin
          failures++;
          $display("mode %s: valid/tag of path %0d wrong", mode.name(), i);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
