// tb_cordic_vec: random complex inputs through the pipelined vectoring
// CORDIC; magnitude is compared with G*|r| (G = 1.64676) and the angle with
// atan2(y,x) in turns, both from real arithmetic. Also checks the latency
// (ITER+2 cycles), the one-per-cycle throughput and the tag path.
module tb_cordic_vec;
  localparam int IN_W = 8, PW = 12, ITER = 12, LAT = ITER + 2, NS = 2000;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_tag = 0, out_valid, out_tag;
  logic signed [IN_W-1:0] in_x = 0, in_y = 0;
  logic [IN_W:0] out_mag;
  logic [PW-1:0] out_angle;
  int checks = 0, failures = 0;
  int xs[NS], ys[NS];
  longint first_in = -1, first_out = -1;
  int nout = 0;

  cordic_vec #(.IN_W(IN_W), .PHASE_W(PW), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) begin
      xs[i] = int'($urandom_range(254)) - 127;
      ys[i] = int'($urandom_range(254)) - 127;
      if (i < 4) begin xs[i] = (i == 0) ? -100 : (i == 1 ? 0 : 5); ys[i] = (i == 2) ? -127 : (i == 3 ? 0 : 50); end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      in_valid <= 1; in_x <= IN_W'(xs[i]); in_y <= IN_W'(ys[i]); in_tag <= (i % 7 == 3);
      if (i == 0) first_in = $time;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("count %0d", nout); end
    checks++;
    if ((first_out - first_in) / 10 - 1 != longint'(LAT)) begin failures++; $display("latency %0d", (first_out - first_in) / 10 - 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real m, a, da;
    if (first_out < 0) first_out = $time;
    m = 1.646760258 * $sqrt(real'(xs[nout] * xs[nout] + ys[nout] * ys[nout]));
    a = $atan2(real'(ys[nout]), real'(xs[nout])) / (2.0 * 3.141592653589793) * 4096.0;
    if (a < 0) a += 4096.0;
    da = real'(out_angle) - a;
    if (da > 2048.0) da -= 4096.0;
    if (da < -2048.0) da += 4096.0;
    checks += 3;
    if (real'(out_mag) - m > 2.0 || m - real'(out_mag) > 2.0) begin
      failures++;
      if (failures < 10) $display("mag %0d,%0d got %0d exp %f", xs[nout], ys[nout], out_mag, m);
    end
    if (xs[nout] != 0 || ys[nout] != 0) begin
      if (da > 2.5 || da < -2.5) begin
        failures++;
        if (failures < 10) $display("ang %0d,%0d got %0d exp %f", xs[nout], ys[nout], out_angle, a);
      end
    end
    if (out_tag != (nout % 7 == 3)) failures++;
    nout++;
  end
endmodule
