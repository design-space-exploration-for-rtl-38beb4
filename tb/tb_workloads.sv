// tb_workloads: runs the synchronizer on the operating points for which the
// estimator is meant to be judged, with four copies side by side that differ
// only in the magnitude exponent K of the modulation removal (K = 0, 1, 2
// and 4 = M, the plain fourth power). All copies see the same bursts.
//
// Sets of bursts (random symbols, random phase, AWGN at a given Es/N0):
//   A  QPSK, 1.2 % offset, burst lengths 50, 150 and 300, at 10 dB and 3 dB
//   B  BPSK, 1.2 % offset, 50 symbols, at 8 dB and 0 dB
//   C  QPSK, 50 symbols, 1.2 % offset at 1 dB: full band against a +-2 %
//      window (bins -82..82)
//   D  QPSK, 300 symbols, 20 dB: offset exactly on a bin (49/4096) and
//      exactly between two bins (49.5/4096)
// An estimate counts as correct when its residual error turns the phase by
// less than 1/16 turn over the burst: |b_est - f*N*M| <= N*M/(16*L) bins.
// Checked: at the high SNR points every copy is right on all bursts but at
// most one; with
// the window the K = 1 copy is never worse than without; on-bin offsets are
// hit exactly; between-bin offsets land on one of the two neighbours. The
// correct-estimate counts of all copies are printed for the low SNR points.
module tb_workloads;
  import fs_pkg::*;
  localparam int N = 1024, LOG2N = 10, IN_W = 12, Q_W = 8, ND = 4, NB = 12;
  localparam real PI = 3.141592653589793;
  localparam int KS[ND] = '{0, 1, 2, 4};

  logic clk = 0, rst_n = 0;
  mod_e cfg_mode = MOD_QPSK;
  logic [3:0] cfg_qbits = 4'd8;
  logic signed [LOG2N-1:0] cfg_win_lo = -512, cfg_win_hi = 511;
  logic in_valid = 0, in_last = 0;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic in_ready [ND];
  logic est_valid [ND], out_valid [ND], out_last [ND];
  logic signed [LOG2N-1:0] est_bin [ND];
  logic signed [Q_W:0] out_i [ND], out_q [ND];

  for (genvar d = 0; d < ND; d++) begin : g_dut
    freq_sync #(.K(KS[d])) dut (
      .clk, .rst_n, .cfg_mode, .cfg_qbits, .cfg_agc_freeze(1'b0),
      .cfg_win_lo, .cfg_win_hi,
      .in_valid, .in_ready(in_ready[d]), .in_last, .in_i, .in_q,
      .est_valid(est_valid[d]), .est_bin(est_bin[d]), .est_pow(), .agc_gain(),
      .out_valid(out_valid[d]), .out_last(out_last[d]), .out_i(out_i[d]), .out_q(out_q[d])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int est [ND];
  int got [ND];
  int done_cnt [ND];
  int win_out = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar d = 0; d < ND; d++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (est_valid[d]) begin est[d] = int'(est_bin[d]); got[d]++; end
      if (out_valid[d] && out_last[d]) done_cnt[d]++;
    end
  end

  function automatic real gauss(input real sigma);
    real s;
    s = 0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(10000)) / 10000.0;
    return sigma * (s - 6.0);
  endfunction

  // 12-bit converter: round and saturate
  function automatic logic signed [IN_W-1:0] adc(input real x);
    int v;
    v = int'(x);
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return IN_W'(v);
  endfunction

  // One burst through all copies; returns the estimates in est[].
  task automatic burst(input mod_e mode, input int L, input real f, input real esn0_db);
    real amp, sigma, phi;
    int base [ND];
    amp   = 700.0;
    sigma = amp / $sqrt(2.0 * (10.0 ** (esn0_db / 10.0)));
    phi   = 2.0 * PI * real'($urandom_range(999)) / 1000.0;
    cfg_mode = mode;
    foreach (base[d]) base[d] = done_cnt[d];
    while (!in_ready[0]) @(posedge clk);
    for (int l = 0; l < L; l++) begin
      real a, sym;
      sym = (mode == MOD_QPSK) ? PI / 4.0 + PI / 2.0 * $urandom_range(3) : PI * $urandom_range(1);
      a = sym + 2.0 * PI * f * l + phi;
      in_valid <= 1; in_last <= (l == L - 1);
      in_i <= adc(amp * $cos(a) + gauss(sigma));
      in_q <= adc(amp * $sin(a) + gauss(sigma));
      @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
    for (int d = 0; d < ND; d++)
      while (done_cnt[d] == base[d]) @(posedge clk);
  endtask

  // Runs NB bursts and counts, per copy, the estimates within one bin.
  task automatic point(input string name, input mod_e mode, input int L, input real f,
                       input real esn0_db, output int ok [ND]);
    real b, tol;
    int m;
    m = (mode == MOD_QPSK) ? 4 : 2;
    b = f * N * m;
    tol = real'(N * m) / (16.0 * L);
    foreach (ok[d]) ok[d] = 0;
    for (int n = 0; n < NB; n++) begin
      burst(mode, L, f, esn0_db);
      for (int d = 0; d < ND; d++)
        if (est[d] < int'(cfg_win_lo) || est[d] > int'(cfg_win_hi)) win_out++;
      for (int d = 0; d < ND; d++)
        if (real'(est[d]) - b <= tol && b - real'(est[d]) <= tol) ok[d]++;
    end
    $display("%-28s correct of %0d:  K=0 %2d  K=1 %2d  K=2 %2d  K=4 %2d", name, NB, ok[0], ok[1], ok[2], ok[3]);
  endtask

  task automatic all_right(input string name, input int ok [ND]);
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (ok[d] < NB - 1) begin failures++; $display("%s: K=%0d missed %0d bursts", name, KS[d], NB - ok[d]); end
    end
  endtask

  initial begin
    int ok [ND], ok_full [ND], ok_win [ND];
    static int lens [3] = '{50, 150, 300};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // A: QPSK burst lengths
    foreach (lens[i]) begin
      point($sformatf("A QPSK L=%0d 10dB", lens[i]), MOD_QPSK, lens[i], 0.012, 10.0, ok);
      all_right("A", ok);
      point($sformatf("A QPSK L=%0d 3dB", lens[i]), MOD_QPSK, lens[i], 0.012, 3.0, ok);
    end
    // B: BPSK
    point("B BPSK L=50 8dB", MOD_BPSK, 50, 0.012, 8.0, ok);
    all_right("B", ok);
    point("B BPSK L=50 0dB", MOD_BPSK, 50, 0.012, 0.0, ok);
    // C: windowing at low SNR
    point("C QPSK L=50 1dB full band", MOD_QPSK, 50, 0.012, 1.0, ok_full);
    cfg_win_lo = -82; cfg_win_hi = 82;
    point("C QPSK L=50 1dB +-2% window", MOD_QPSK, 50, 0.012, 1.0, ok_win);
    cfg_win_lo = -512; cfg_win_hi = 511;
    checks++;
    if (win_out != 0) begin failures++; $display("C: %0d estimates outside the window", win_out); end
    // D: on-bin and between-bin offsets
    for (int n = 0; n < NB; n++) begin
      burst(MOD_QPSK, 300, 49.0 / 4096.0, 20.0);
      checks++;
      if (est[1] != 49) begin failures++; $display("D on-bin: estimate %0d", est[1]); end
      burst(MOD_QPSK, 300, 49.5 / 4096.0, 20.0);
      checks++;
      if (est[1] != 49 && est[1] != 50) begin failures++; $display("D between bins: estimate %0d", est[1]); end
    end
    $display("D: on-bin and between-bin offsets checked on %0d bursts each", NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
