// tb_agc: drives constant-envelope (QPSK-like) signals of several levels and
// checks that the loop settles the output envelope |I|+|Q| near TARGET, that
// the gain stays put when frozen, that the output equals the input times the
// gain re-quantized (checked sample by sample against a model), and that a
// reduced quantization clears the low bits.
module tb_agc;
  localparam int IN_W = 12, OUT_W = 8, GF = 12;
  logic clk = 0, rst_n = 0;
  logic freeze_i = 0, in_valid = 0, in_last = 0, out_valid, out_last;
  logic [3:0] q_bits_i = 4'd8;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic signed [OUT_W-1:0] out_i, out_q;
  logic [15:0] gain_o;
  int checks = 0, failures = 0;
  int exp_i, exp_q;
  bit exp_v = 0;

  agc #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(input int x, input int g, input int qb);
    longint p;
    int v, m;
    p = (longint'(x) * g + (longint'(1) << (GF + IN_W - OUT_W - 1))) >>> (GF + IN_W - OUT_W);
    v = (p > 127) ? 127 : (p < -127) ? -127 : int'(p);
    m = 1 << (OUT_W - qb);
    return (v >= 0) ? (v / m) * m : -(((-v) + m - 1) / m) * m;
  endfunction

  // sample-by-sample model check (model uses the gain before the update)
  always @(posedge clk) if (rst_n) begin
    if (exp_v) begin
      checks++;
      if (!out_valid || out_i != OUT_W'(exp_i) || out_q != OUT_W'(exp_q)) begin
        failures++;
        if (failures < 10) $display("got %0d,%0d exp %0d,%0d", out_i, out_q, exp_i, exp_q);
      end
    end
    exp_v = in_valid;
    if (in_valid) begin
      exp_i = model(int'(in_i), int'(gain_o), int'(q_bits_i));
      exp_q = model(int'(in_q), int'(gain_o), int'(q_bits_i));
    end
  end

  task automatic drive(input int amp, input int n);
    for (int k = 0; k < n; k++) begin
      int s;
      s = $urandom_range(3);
      in_valid <= 1;
      in_i <= IN_W'((s[0]) ? amp : -amp);
      in_q <= IN_W'((s[1]) ? amp : -amp);
      @(posedge clk);
    end
    in_valid <= 0;
    @(posedge clk);
  endtask

  task automatic check_settled(input int amp);
    int env;
    env = (out_i < 0 ? -int'(out_i) : int'(out_i)) + (out_q < 0 ? -int'(out_q) : int'(out_q));
    checks++;
    if (env < 120 || env > 136) begin
      failures++;
      $display("amp %0d: envelope %0d, gain %0d", amp, env, gain_o);
    end
  endtask

  initial begin
    int g0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    drive(1000, 400); check_settled(1000);   // needs gain ~1
    drive(200, 600);  check_settled(200);    // needs gain ~5
    drive(1800, 600); check_settled(1800);   // needs gain ~0.57
    freeze_i = 1;
    g0 = int'(gain_o);
    drive(300, 100);
    checks++;
    if (int'(gain_o) != g0) begin failures++; $display("gain moved while frozen"); end
    freeze_i = 0;
    q_bits_i = 4'd5;
    drive(1800, 50);
    checks++;
    if (out_i[2:0] != 0 || out_q[2:0] != 0) begin failures++; $display("5-bit output %0d,%0d", out_i, out_q); end
    q_bits_i = 4'd8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
