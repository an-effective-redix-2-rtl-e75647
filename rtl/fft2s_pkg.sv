// Shared definitions of the two-stream FFT processor.
//
// The processor computes N-point FFTs of two independent complex streams at
// once. Every N-point transform is split into an N/2-point DIF FFT of the even
// samples and an N/2-point DIT FFT of the odd samples, followed by one stage
// of radix-2 butterflies. This package holds what the modules share: the mode
// type of the two data-path switches, a bit-reversal helper, and the constant
// functions that give the fixed-point twiddle factors W_n^k = exp(-j*2*pi*k/n).
// Twiddles are signed TWW-bit numbers with 1.0 = 2^(TWW-2); this format is a
// choice of this design, the paper gives no word lengths.
package fft2s_pkg;

  // Mode of the 4-lane switches SW1 and SW2.
  // NORMAL: u1,u2,u3,u4 -> v1,v2,v3,v4. SWAP: u1,u2,u3,u4 -> v3,v4,v1,v2.
  typedef enum logic {
    SW_NORMAL = 1'b0,
    SW_SWAP   = 1'b1
  } sw_mode_e;

  localparam real PI = 3.14159265358979323846;

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  // Round a real to the nearest integer, halves away from zero.
  function automatic int rnd(real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  // Real and imaginary part of W_n^k scaled by `one`.
  function automatic int tw_re(int k, int n, int one);
    return rnd($cos(2.0 * PI * real'(k) / real'(n)) * real'(one));
  endfunction

  function automatic int tw_im(int k, int n, int one);
    return rnd(-$sin(2.0 * PI * real'(k) / real'(n)) * real'(one));
  endfunction

endpackage
