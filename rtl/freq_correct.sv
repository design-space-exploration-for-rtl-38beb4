// freq_correct: frequency correction by complex rotation.
//
// Each sample r(l) of a burst is multiplied by exp(-j*2*pi*f*l), the phasor
// coming from a phase accumulator and a sine/cosine table. The phase step
// inc_i is the estimated offset in units of 2^-PHASE_W of the sample rate;
// start_i clears the accumulator so that the first sample of the burst is
// not rotated (no phase correction is attempted, only frequency).
//
// Interface: start_i (one cycle, with inc_i) before the burst, then a valid/
// last stream in and out, no back-pressure. inc_i is sampled at start_i.
// Timing: one sample per cycle, latency 2 cycles.
//
// The document specifies the table plus complex multiplications; the phase
// accumulator, rounding and widths are this design's choices.
module freq_correct
  import fs_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned PH_W  = fs_pkg::PHASE_W,
  parameter int unsigned OUT_W = IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_i,
  input  logic [PH_W-1:0]         inc_i,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  localparam int unsigned PW = IN_W + TRIG_W + 1;

  logic [PH_W-1:0] acc, inc;
  logic signed [TRIG_W-1:0] c, s;

  // rotate by -acc*2*pi: cos(acc), -sin(acc)
  sincos_lut #(.PHASE_W(PH_W), .OUT_W(TRIG_W)) u_scl (
    .phase_i(acc), .cos_o(c), .sin_o(s)
  );

  logic                     a_valid, a_last;
  logic signed [IN_W-1:0]   a_i, a_q;
  logic signed [TRIG_W-1:0] a_c, a_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      inc     <= '0;
      a_valid <= 1'b0;
      a_last  <= 1'b0;
      a_i     <= '0;
      a_q     <= '0;
      a_c     <= '0;
      a_s     <= '0;
    end else begin
      a_valid <= in_valid;
      a_last  <= in_last;
      if (start_i) begin
        acc <= '0;
        inc <= inc_i;
      end else if (in_valid) begin
        acc <= acc + inc;
        a_i <= in_i;
        a_q <= in_q;
        a_c <= c;
        a_s <= s;
      end
    end
  end

  // (i + jq) * (c - js)
  logic signed [PW-1:0] p_i, p_q;
  assign p_i = PW'(a_i) * PW'(a_c) + PW'(a_q) * PW'(a_s);
  assign p_q = PW'(a_q) * PW'(a_c) - PW'(a_i) * PW'(a_s);

  function automatic logic signed [OUT_W-1:0] rnd(input logic signed [PW-1:0] p);
    logic signed [PW-1:0] r;
    r = (p + (PW'(1) <<< (TRIG_W - 2))) >>> (TRIG_W - 1);
    return OUT_W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= a_valid;
      out_last  <= a_last;
      if (a_valid) begin
        out_i <= rnd(p_i);
        out_q <= rnd(p_q);
      end
    end
  end

endmodule
