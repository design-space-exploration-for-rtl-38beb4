// fs_pkg: constants and helpers shared by the BPSK/QPSK burst frequency
// synchronizer.
//
// FFT_N is the transform length (1024 points) and therefore also the longest
// burst the synchronizer accepts. PHASE_W is the width of all phase words,
// counted in turns: one FFT bin after M-th power modulation removal is
// 1/(FFT_N*M) of the sample rate, so with M up to 4 a 12-bit phase word
// (1/4096 turn) represents every estimated frequency exactly.
package fs_pkg;

  localparam int unsigned FFT_N   = 1024;
  localparam int unsigned LOG2N   = $clog2(FFT_N);
  localparam int unsigned PHASE_W = LOG2N + 2;
  localparam int unsigned TRIG_W  = 16;  // width of sine/cosine words

  // Modulation format; the modulation index M is 2 or 4.
  typedef enum logic {
    MOD_BPSK = 1'b0,
    MOD_QPSK = 1'b1
  } mod_e;

  // Reverse the lowest n bits of v (bits above n are dropped).
  function automatic logic [15:0] bitrev(input logic [15:0] v, input int n);
    logic [15:0] r;
    r = '0;
    for (int b = 0; b < 16; b++)
      if (b < n) r[b] = v[n-1-b];
    return r;
  endfunction

endpackage
