// tb_spectral_peak: feeds frames of random bins, in the bit-reversed order an
// FFT delivers them, and compares the reported peak with a search done in the
// testbench, for the full band and for several windows (including one that
// excludes the global maximum and a one-bin window). Also checks that bins
// before in_sof are ignored, and that done_o comes two cycles after the last
// bin.
module tb_spectral_peak;
  import fs_pkg::*;
  localparam int N = 1024, LOG2N = 10, DW = 21;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, done_o;
  logic [LOG2N-1:0] in_bin = 0;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic signed [LOG2N-1:0] win_lo_i = 0, win_hi_i = 0, peak_bin_o;
  logic [2*DW-1:0] peak_pow_o;
  int checks = 0, failures = 0;
  int re_v[N], im_v[N];
  longint t_last, t_done;

  spectral_peak #(.N(N), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && done_o) t_done = $time;

  task automatic frame(input int lo, input int hi, input int big_bin);
    longint best;
    int bb;
    bit any;
    for (int k = 0; k < N; k++) begin
      re_v[k] = int'($urandom_range(2000)) - 1000;
      im_v[k] = int'($urandom_range(2000)) - 1000;
    end
    // a dominant bin, possibly outside the window
    re_v[big_bin] = 900000; im_v[big_bin] = -300000;
    any = 0; best = 0; bb = 0;
    for (int s = -N / 2; s < N / 2; s++) begin
      int k;
      longint p;
      k = (s + N) % N;
      p = longint'(re_v[k]) * re_v[k] + longint'(im_v[k]) * im_v[k];
      if (s >= lo && s <= hi && (!any || p > best)) begin any = 1; best = p; bb = s; end
    end
    // the order in which bins are checked by the DUT is bit-reversed; ties
    // are practically impossible with these random powers
    win_lo_i <= LOG2N'(lo); win_hi_i <= LOG2N'(hi);
    // some junk bins before the frame starts
    for (int j = 0; j < 5; j++) begin
      in_valid <= 1; in_sof <= 0; in_bin <= LOG2N'(big_bin); in_re <= '1; in_im <= 2000000;
      @(posedge clk);
    end
    for (int j = 0; j < N; j++) begin
      int k;
      k = int'(bitrev(16'(j), LOG2N));
      in_valid <= 1; in_sof <= (j == 0); in_bin <= LOG2N'(k);
      in_re <= DW'(re_v[k]); in_im <= DW'(im_v[k]);
      @(posedge clk);
      if (j == N - 1) t_last = $time;
    end
    in_valid <= 0; in_sof <= 0;
    repeat (4) @(posedge clk);
    checks += 3;
    if (peak_bin_o != LOG2N'(bb)) begin
      failures++;
      $display("window [%0d,%0d]: got bin %0d exp %0d", lo, hi, peak_bin_o, bb);
    end
    if (peak_pow_o != (2*DW)'(best)) begin
      failures++;
      $display("window [%0d,%0d]: got power %0d exp %0d", lo, hi, peak_pow_o, best);
    end
    if ((t_done - t_last) / 10 != 2) begin
      failures++;
      $display("done latency %0d", (t_done - t_last) / 10);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    frame(-512, 511, 17);      // full band
    frame(-512, 511, 1000);    // negative-frequency peak (bin -24)
    frame(-100, 100, 300);     // dominant bin outside the window
    frame(-30, -10, 1004);     // window holds the dominant bin -20
    frame(5, 5, 17);           // one-bin window
    frame(0, 511, 700);        // half band, dominant in the other half
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
