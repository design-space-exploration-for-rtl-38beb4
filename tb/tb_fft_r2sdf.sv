// tb_fft_r2sdf: the 1024-point pipelined FFT at its default size.
// Frame 1: random full-scale samples; frame 2: a complex tone in bin 77 with
// in_valid gaps inside the frame; frame 3: a burst of 50 samples padded with
// zeros. Every output bin is compared with a DFT computed in real arithmetic
// (tolerance 12 LSB plus 2e-4 of the frame's absolute sum, which covers the
// rounding of the 16-bit twiddles). Checks that all N bins of each frame
// arrive exactly once and the latency N-1+LOG2N samples from in_sof to
// out_sof when the input is continuous.
module tb_fft_r2sdf;
  localparam int N = 1024, LOG2N = 10, IN_W = 10, DW = IN_W + LOG2N + 1;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, out_valid, out_sof;
  logic signed [IN_W-1:0] in_re = 0, in_im = 0;
  logic [LOG2N-1:0] out_bin;
  logic signed [DW-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  real xr[N], xi[N], Xr[N], Xi[N], ct[N], st[N];
  int seen[N];
  int nout, frame_no, nin_since_sof;
  real tol;
  bit collecting;
  longint lat_samples;

  fft_r2sdf #(.N(N), .IN_W(IN_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dft();
    real s;
    s = 0;
    for (int n = 0; n < N; n++) s += (xr[n] < 0 ? -xr[n] : xr[n]) + (xi[n] < 0 ? -xi[n] : xi[n]);
    tol = 12.0 + 2.0e-4 * s;
    for (int k = 0; k < N; k++) begin
      Xr[k] = 0; Xi[k] = 0;
      for (int n = 0; n < N; n++) begin
        int e;
        e = (k * n) % N;
        Xr[k] += xr[n] * ct[e] + xi[n] * st[e];
        Xi[k] += xi[n] * ct[e] - xr[n] * st[e];
      end
    end
  endtask

  always @(posedge clk) if (rst_n && in_valid) nin_since_sof = in_sof ? 1 : nin_since_sof + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_sof) begin
      collecting = 1;
      nout = 0;
      lat_samples = longint'(nin_since_sof);
      foreach (seen[k]) seen[k] = 0;
    end
    if (collecting) begin
      checks++;
      seen[out_bin]++;
      if (real'(out_re) - Xr[out_bin] > tol || Xr[out_bin] - real'(out_re) > tol ||
          real'(out_im) - Xi[out_bin] > tol || Xi[out_bin] - real'(out_im) > tol) begin
        failures++;
        if (failures < 10) $display("frame %0d bin %0d got %0d,%0d exp %f,%f", frame_no, out_bin, out_re, out_im, Xr[out_bin], Xi[out_bin]);
      end
      nout++;
      if (nout == N) collecting = 0;
    end
  end

  task automatic send_frame(input bit gaps);
    for (int n = 0; n < N; n++) begin
      in_valid <= 1; in_sof <= (n == 0);
      in_re <= IN_W'(int'(xr[n])); in_im <= IN_W'(int'(xi[n]));
      @(posedge clk);
      if (gaps && n % 100 == 7) begin in_valid <= 0; in_sof <= 0; repeat (3) @(posedge clk); end
    end
    // flush with zeros until the whole spectrum has left
    in_sof <= 0; in_re <= 0; in_im <= 0;
    while (collecting || nout != N) @(posedge clk);
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    foreach (seen[k]) if (seen[k] != 1) begin failures++; $display("bin %0d seen %0d times", k, seen[k]); break; end
  endtask

  initial begin
    for (int e = 0; e < N; e++) begin
      ct[e] = $cos(2.0 * 3.141592653589793 * e / N);
      st[e] = $sin(2.0 * 3.141592653589793 * e / N);
    end
    collecting = 0; nout = 0; nin_since_sof = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // frame 1: random
    frame_no = 1;
    for (int n = 0; n < N; n++) begin
      xr[n] = real'(int'($urandom_range(1022)) - 511);
      xi[n] = real'(int'($urandom_range(1022)) - 511);
    end
    dft();
    nout = N + 1;
    send_frame(0);
    checks++;
    if (lat_samples != longint'(N) + longint'(LOG2N)) begin
      failures++;
      $display("latency %0d samples", lat_samples - 1);
    end
    // frame 2: tone in bin 77, with gaps
    frame_no = 2;
    for (int n = 0; n < N; n++) begin
      xr[n] = real'(int'(400.0 * ct[(77 * n) % N]));
      xi[n] = real'(int'(400.0 * st[(77 * n) % N]));
    end
    dft();
    nout = N + 1;
    send_frame(1);
    // frame 3: 50-sample burst, zero padded
    frame_no = 3;
    for (int n = 0; n < N; n++) begin
      xr[n] = (n < 50) ? real'(int'($urandom_range(1022)) - 511) : 0.0;
      xi[n] = (n < 50) ? real'(int'($urandom_range(1022)) - 511) : 0.0;
    end
    dft();
    nout = N + 1;
    send_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
