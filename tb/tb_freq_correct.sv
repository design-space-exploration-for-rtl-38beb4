// tb_freq_correct: rotates bursts of random samples with several phase steps
// and compares every output with r(l)*exp(-j*2*pi*inc*l/4096) computed in
// real arithmetic (tolerance 1.5 LSB). Also checks the 2-cycle latency, the
// last flag, and that start_i restarts the phase at zero.
module tb_freq_correct;
  localparam int IN_W = 8, PH_W = 12, OUT_W = 9, L = 300;
  logic clk = 0, rst_n = 0;
  logic start_i = 0, in_valid = 0, in_last = 0, out_valid, out_last;
  logic [PH_W-1:0] inc_i = 0;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic signed [OUT_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  int si[L], sq[L];
  int cur_inc, nout;
  longint t_in0, t_out0;

  freq_correct #(.IN_W(IN_W), .PH_W(PH_W), .OUT_W(OUT_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real a, ri, rq;
    if (nout == 0) t_out0 = $time;
    a  = -2.0 * 3.141592653589793 * real'((cur_inc * nout) % 4096) / 4096.0;
    ri = si[nout] * $cos(a) - sq[nout] * $sin(a);
    rq = si[nout] * $sin(a) + sq[nout] * $cos(a);
    checks += 3;
    if (real'(out_i) - ri > 1.5 || ri - real'(out_i) > 1.5 ||
        real'(out_q) - rq > 1.5 || rq - real'(out_q) > 1.5) begin
      failures++;
      if (failures < 10) $display("inc=%0d l=%0d got %0d,%0d exp %f,%f", cur_inc, nout, out_i, out_q, ri, rq);
    end
    if (out_last != (nout == L - 1)) failures++;
    if (nout == 0 && (t_out0 - t_in0) / 10 - 1 != 2) begin
      failures++;
      $display("latency %0d", (t_out0 - t_in0) / 10 - 1);
    end
    nout++;
  end

  initial begin
    static int incs[5] = '{0, 1, 37, 4095, 2048};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (incs[k]) begin
      cur_inc = incs[k];
      nout = 0;
      start_i <= 1; inc_i <= PH_W'(cur_inc);
      @(posedge clk);
      start_i <= 0;
      for (int l = 0; l < L; l++) begin
        si[l] = int'($urandom_range(254)) - 127;
        sq[l] = int'($urandom_range(254)) - 127;
      end
      for (int l = 0; l < L; l++) begin
        if (l == 0) t_in0 = $time;
        in_valid <= 1; in_last <= (l == L - 1);
        in_i <= IN_W'(si[l]); in_q <= IN_W'(sq[l]);
        @(posedge clk);
        if (l % 50 == 49) begin in_valid <= 0; @(posedge clk); end
      end
      in_valid <= 0; in_last <= 0;
      repeat (5) @(posedge clk);
      checks++;
      if (nout != L) begin failures++; $display("count %0d", nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
