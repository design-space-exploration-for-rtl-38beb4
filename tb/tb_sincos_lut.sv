// tb_sincos_lut: checks the sine/cosine table against real-valued cos/sin for
// every phase word (all four quadrants), to within one LSB.
module tb_sincos_lut;
  localparam int PW = 12, OW = 16;
  logic [PW-1:0] ph;
  logic signed [OW-1:0] c, s;
  int checks = 0, failures = 0;

  sincos_lut #(.PHASE_W(PW), .OUT_W(OW)) dut (.phase_i(ph), .cos_o(c), .sin_o(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, amp, rc, rs;
    amp = 32767.0;
    for (int p = 0; p < (1 << PW); p++) begin
      ph = PW'(p);
      #1;
      a  = 2.0 * 3.141592653589793 * p / (1 << PW);
      rc = amp * $cos(a);
      rs = amp * $sin(a);
      checks += 2;
      if ((real'(c) - rc) > 1.0 || (rc - real'(c)) > 1.0) begin
        failures++;
        if (failures < 10) $display("cos mismatch p=%0d got %0d exp %f", p, c, rc);
      end
      if ((real'(s) - rs) > 1.0 || (rs - real'(s)) > 1.0) begin
        failures++;
        if (failures < 10) $display("sin mismatch p=%0d got %0d exp %f", p, s, rs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
