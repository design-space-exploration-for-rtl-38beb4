// tb_freq_sync: end-to-end test of the frequency synchronizer at its default
// parameters (1024-point FFT, 12-bit input, 8-bit datapath, K = 1).
//
// Bursts of random QPSK or BPSK symbols, one sample per symbol, are given a
// carrier frequency offset, a random phase and mild Gaussian noise. For each
// burst the testbench checks
//   - the estimated bin against round(f*N*M) (+-1 for offsets between bins),
//     or, for a window that excludes the true offset, that it lies inside the
//     window;
//   - that the corrected output has no residual frequency beyond the FFT's
//     resolution: the phase of out(l)*conj(symbol(l)) stays within
//     0.3 rad + l*2*pi*|b - round(b)|/(N*M) of its value at l = 0;
//   - the number of output samples, the last flag, and the cycle count from
//     the first accepted sample to the last output (<= 2N + L + 60, plus
//     any cycles the source itself stalled).
// Mechanisms counted (each must occur): QPSK and BPSK bursts, zero padding
// (L < N), a full-length burst (L = N), truncation of an over-long burst, an
// input stall (in_valid gaps), a window that limits the search, a window
// that contains the offset, and a reduced quantization.
module tb_freq_sync;
  import fs_pkg::*;
  localparam int N = 1024, LOG2N = 10, IN_W = 12, Q_W = 8;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  mod_e cfg_mode = MOD_QPSK;
  logic [3:0] cfg_qbits = 4'd8;
  logic cfg_agc_freeze = 0;
  logic signed [LOG2N-1:0] cfg_win_lo = -512, cfg_win_hi = 511;
  logic in_valid = 0, in_ready, in_last = 0;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic est_valid;
  logic signed [LOG2N-1:0] est_bin;
  logic [2*(Q_W+LOG2N+3)-1:0] est_pow;
  logic out_valid, out_last;
  logic [15:0] agc_gain;
  logic signed [Q_W:0] out_i, out_q;

  freq_sync dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_qpsk = 0, n_bpsk = 0, n_pad = 0, n_full = 0, n_trunc = 0, n_stall = 0;
  int n_winlim = 0, n_winhold = 0, n_qbits = 0;

  real sym_ph[N];
  int  nout, got_est;
  int  est_seen;
  real ph0, ph_tol;
  int  phase_bad, stall_cycles;
  bit  last_ok;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (est_valid) begin got_est++; est_seen = int'(est_bin); end
    if (out_valid) begin
      real zr, zi, ph, d;
      zr = real'(out_i) * $cos(sym_ph[nout]) + real'(out_q) * $sin(sym_ph[nout]);
      zi = real'(out_q) * $cos(sym_ph[nout]) - real'(out_i) * $sin(sym_ph[nout]);
      ph = $atan2(zi, zr);
      if (nout == 0) ph0 = ph;
      d = ph - ph0;
      while (d > PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      // allowed drift: 0.3 rad plus what the estimate's residual error gives
      if (d > 0.3 + ph_tol * nout || d < -0.3 - ph_tol * nout) phase_bad++;
      if (out_last != 1'b0) last_ok = 1;
      nout++;
    end
  end

  function automatic real gauss(input real sigma);
    real s;
    s = 0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(10000)) / 10000.0;
    return sigma * (s - 6.0);
  endfunction

  // Send one burst and check it. f is the offset in cycles per sample.
  // drive_len > L drives that many samples without in_last (truncation).
  task automatic burst(input string name, input mod_e mode, input int L, input real f,
                       input int wlo, input int whi, input int qbits, input bit gaps,
                       input int drive_len, input bit win_excludes);
    int m, sent, accepted, eff_l;
    real phi, amp, b_real;
    longint t0, t1;
    m = (mode == MOD_QPSK) ? 4 : 2;
    cfg_mode = mode; cfg_win_lo = LOG2N'(wlo); cfg_win_hi = LOG2N'(whi); cfg_qbits = 4'(qbits);
    amp = 1400.0;
    phi = 2.0 * PI * real'($urandom_range(999)) / 1000.0;
    for (int l = 0; l < N; l++)
      sym_ph[l] = (mode == MOD_QPSK) ? PI / 4.0 + PI / 2.0 * $urandom_range(3) : PI * $urandom_range(1);
    nout = 0; got_est = 0; phase_bad = 0; last_ok = 0; stall_cycles = 0;
    b_real = f * N * m;
    // residual frequency after correction, in radians per sample
    ph_tol = 2.0 * PI * ((b_real - real'(int'(b_real))) < 0 ? -(b_real - real'(int'(b_real))) : (b_real - real'(int'(b_real)))) / real'(N * m);
    while (!in_ready) @(posedge clk);
    accepted = 0;
    sent = 0;
    t0 = $time;
    while (accepted < drive_len && !(sent > 0 && !in_ready)) begin
      real a;
      a = sym_ph[sent] + 2.0 * PI * f * sent + phi;
      in_valid <= 1;
      in_last  <= (sent == drive_len - 1) && drive_len <= N;
      in_i <= IN_W'(int'(amp * $cos(a) + gauss(50.0)));
      in_q <= IN_W'(int'(amp * $sin(a) + gauss(50.0)));
      @(posedge clk);
      if (in_ready) begin accepted++; sent++; end
      if (gaps && sent % 40 == 13) begin in_valid <= 0; repeat (2) @(posedge clk); stall_cycles += 2; end
    end
    in_valid <= 0; in_last <= 0;
    eff_l = (drive_len > N) ? N : drive_len;
    while (!(nout == eff_l && got_est == 1)) begin
      @(posedge clk);
      if (($time - t0) / 10 > 4 * N + 4 * L) break;
    end
    t1 = $time;
    @(posedge clk);
    checks++;
    if (got_est != 1) begin failures++; $display("%s: %0d estimates", name, got_est); end
    checks++;
    if (win_excludes) begin
      if (est_seen < wlo || est_seen > whi) begin
        failures++; $display("%s: estimate %0d outside window", name, est_seen);
      end
    end else if (est_seen - b_real > 1.0 || b_real - est_seen > 1.0) begin
      failures++;
      $display("%s: estimated bin %0d, true %f", name, est_seen, b_real);
    end
    checks++;
    if (nout != eff_l) begin failures++; $display("%s: %0d outputs, expected %0d", name, nout, eff_l); end
    checks++;
    if (!last_ok) begin failures++; $display("%s: no out_last", name); end
    if (!win_excludes) begin
      checks++;
      if (phase_bad != 0) begin failures++; $display("%s: %0d samples with residual phase drift", name, phase_bad); end
    end
    checks++;
    if ((t1 - t0) / 10 > longint'(2 * N) + longint'(eff_l) + 60 + longint'(stall_cycles)) begin
      failures++; $display("%s: took %0d cycles", name, (t1 - t0) / 10);
    end
    $display("%s: L=%0d est_bin=%0d (f*N*M=%0.2f) cycles=%0d", name, eff_l, est_seen, b_real, (t1 - t0) / 10);
    if (mode == MOD_QPSK) n_qpsk++; else n_bpsk++;
    if (eff_l < N) n_pad++; else n_full++;
    if (drive_len > N) n_trunc++;
    if (gaps) n_stall++;
    if (win_excludes) n_winlim++;
    else if (whi - wlo < N - 1) n_winhold++;
    if (qbits < Q_W) n_qbits++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    //     name          mode      L     f          wlo   whi  q  gaps drive excl
    burst("qpsk50",     MOD_QPSK,  50,  0.012,     -512, 511, 8, 0,  50,   0);
    burst("qpsk150",    MOD_QPSK, 150,  37.0/4096, -512, 511, 8, 0, 150,   0);
    burst("bpsk300",    MOD_BPSK, 300, -0.02,      -512, 511, 8, 0, 300,   0);
    burst("qpsk1024",   MOD_QPSK, 1024, 0.05,      -512, 511, 8, 1, 1024,  0);
    burst("trunc",      MOD_QPSK, 1024, -0.03,     -512, 511, 8, 0, 1100,  0);
    burst("window_out", MOD_QPSK, 300, 0.08,       -100, 100, 8, 0, 300,   1);
    burst("window_in",  MOD_QPSK, 300, 0.012,        40,  60, 8, 0, 300,   0);
    burst("qbits6",     MOD_BPSK, 200, 0.1,        -512, 511, 6, 1, 200,   0);
    need("qpsk", n_qpsk);
    need("bpsk", n_bpsk);
    need("zero_padding", n_pad);
    need("full_length", n_full);
    need("truncation", n_trunc);
    need("input_stall", n_stall);
    need("window_limits", n_winlim);
    need("window_holds", n_winhold);
    need("reduced_quantization", n_qbits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
