// SW1 / SW2: 4-lane data-path switch between two pairs of two-lane paths.
//
// Inputs u1..u4 are two 2-lane paths (u1,u2 from the upper unit, u3,u4 from
// the lower one). In NORMAL mode u1,u2,u3,u4 go to v1,v2,v3,v4; in SWAP mode
// they go to v3,v4,v1,v2, so each path crosses to the other unit. A valid bit
// travels with each path. Combinational; the mode comes from the controller.
// The two modes and their lane mapping are as the paper defines them.
module fft2s_switch
  import fft2s_pkg::*;
#(
  parameter int W = 21
) (
  input  sw_mode_e            mode,
  input  logic                u_valid [2],  // [0]: u1,u2   [1]: u3,u4
  input  logic                u_tag   [2],
  input  logic signed [W-1:0] u_re    [4],
  input  logic signed [W-1:0] u_im    [4],
  output logic                v_valid [2],  // [0]: v1,v2   [1]: v3,v4
  output logic                v_tag   [2],
  output logic signed [W-1:0] v_re    [4],
  output logic signed [W-1:0] v_im    [4]
);
  always_comb begin
    if (mode == SW_SWAP) begin
      v_valid[0] = u_valid[1];  v_valid[1] = u_valid[0];
      v_tag[0]   = u_tag[1];    v_tag[1]   = u_tag[0];
      v_re[0] = u_re[2];  v_re[1] = u_re[3];  v_re[2] = u_re[0];  v_re[3] = u_re[1];
      v_im[0] = u_im[2];  v_im[1] = u_im[3];  v_im[2] = u_im[0];  v_im[3] = u_im[1];
    end else begin
      v_valid = u_valid;
      v_tag   = u_tag;
      v_re    = u_re;
      v_im    = u_im;
    end
  end
endmodule
