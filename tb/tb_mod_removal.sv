// tb_mod_removal: random samples in both modes (M = 2 and M = 4) through the
// modulation removal with K = 1. Each output is compared with
// G*|r| * exp(j*M*arg r) (G = CORDIC gain 1.64676) from real arithmetic.
// Also checks that QPSK symbols with a common phase map to one point, the
// latency (ITER+4 cycles) and the last flag.
module tb_mod_removal;
  import fs_pkg::*;
  localparam int IN_W = 8, ITER = 12, LAT = ITER + 4, NS = 1500;
  logic clk = 0, rst_n = 0;
  mod_e mode_i = MOD_QPSK;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic signed [IN_W+1:0] out_i, out_q;
  int checks = 0, failures = 0;
  int xs[NS], ys[NS];
  int nout;
  longint t_in0, t_out0;

  mod_removal #(.IN_W(IN_W), .K(1), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real m, a, ri, rq, tol;
    int mm;
    if (nout == 0) t_out0 = $time;
    mm = (mode_i == MOD_QPSK) ? 4 : 2;
    m  = 1.646760258 * $sqrt(real'(xs[nout] * xs[nout] + ys[nout] * ys[nout]));
    a  = mm * $atan2(real'(ys[nout]), real'(xs[nout]));
    ri = m * $cos(a);
    rq = m * $sin(a);
    // angle quantisation (1/4096 turn, times M) plus magnitude rounding
    tol = 2.0 + m * 2.0 * 3.1416 * mm * 1.5 / 4096.0;
    checks += 2;
    if (real'(out_i) - ri > tol || ri - real'(out_i) > tol ||
        real'(out_q) - rq > tol || rq - real'(out_q) > tol) begin
      failures++;
      if (failures < 10) $display("M=%0d r=%0d,%0d got %0d,%0d exp %f,%f", mm, xs[nout], ys[nout], out_i, out_q, ri, rq);
    end
    if (out_last != (nout == NS - 1)) failures++;
    if (nout == 0) begin
      checks++;
      if ((t_out0 - t_in0) / 10 - 1 != longint'(LAT)) begin
        failures++;
        $display("latency %0d", (t_out0 - t_in0) / 10 - 1);
      end
    end
    nout++;
  end

  task automatic run(input mod_e m, input bit psk);
    mode_i = m;
    nout = 0;
    for (int i = 0; i < NS; i++) begin
      if (psk) begin
        // QPSK constellation rotated by a common 20 degrees, amplitude 90
        real ph;
        ph = 0.349 + 1.5707963 * $urandom_range(3) + 0.7853982;
        xs[i] = int'(90.0 * $cos(ph));
        ys[i] = int'(90.0 * $sin(ph));
      end else begin
        xs[i] = int'($urandom_range(254)) - 127;
        ys[i] = int'($urandom_range(254)) - 127;
      end
    end
    for (int i = 0; i < NS; i++) begin
      if (i == 0) t_in0 = $time;
      in_valid <= 1; in_last <= (i == NS - 1);
      in_i <= IN_W'(xs[i]); in_q <= IN_W'(ys[i]);
      @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("count %0d", nout); end
  endtask

  // QPSK symbols with a common phase: all outputs must be nearly equal
  int psk_i_min = 1000, psk_i_max = -1000;
  always @(posedge clk) if (rst_n && out_valid && xs[0] * xs[0] + ys[0] * ys[0] > 7000 && xs[1] * xs[1] + ys[1] * ys[1] > 7000 && mode_i == MOD_QPSK) begin
    if (int'(out_i) < psk_i_min) psk_i_min = int'(out_i);
    if (int'(out_i) > psk_i_max) psk_i_max = int'(out_i);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(MOD_QPSK, 0);
    run(MOD_BPSK, 0);
    psk_i_min = 1000; psk_i_max = -1000;
    run(MOD_QPSK, 1);
    checks++;
    if (psk_i_max - psk_i_min > 6) begin
      failures++;
      $display("QPSK modulation not removed: spread %0d..%0d", psk_i_min, psk_i_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
