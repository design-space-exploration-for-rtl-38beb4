// mod_removal: non-data-aided modulation removal for BPSK/QPSK,
//   r~ = |r|^K * exp(j*M*arg(r)),  M = 2 (BPSK) or 4 (QPSK).
//
// Raising the phase to the M-th power removes the PSK modulation and leaves a
// tone at M times the carrier frequency offset. Taking the magnitude to a
// smaller power K than M (K = 1 is the design point) keeps the noise
// enhancement of the plain r^M much lower. Structure, as in the document's
// alternative 1: a CORDIC yields |r| and arg(r); arg(r) is multiplied by M
// (a shift, modulo one turn); a sine/cosine table turns M*arg(r) back into a
// unit phasor; the phasor is scaled by |r|^K with two multipliers. K = 0, 2
// and 3 give the alternatives 0, 2c and 3 with the same structure (K-1 extra
// multipliers form the power of |r|).
//
// Interface: a valid/tag stream in, the same stream out; no back-pressure.
// mode_i selects BPSK or QPSK and may change between bursts.
// Timing: one sample per cycle, latency = ITER+4 cycles (CORDIC + table
// stage + multiplier stage).
//
// Output scaling (the magnitude carries the uncompensated CORDIC gain; for
// K > 1 it is renormalised by 2^-(MAG_W-1) per extra power and saturated) is
// this design's own choice; the estimate depends only on the position of
// the spectral peak.
module mod_removal
  import fs_pkg::*;
#(
  parameter int unsigned IN_W    = 8,
  parameter int unsigned K       = 1,
  parameter int unsigned PH_W    = fs_pkg::PHASE_W,
  parameter int unsigned ITER    = 12,
  parameter int unsigned OUT_W   = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  mod_e                    mode_i,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  localparam int unsigned MAG_W  = IN_W + 1;
  localparam int unsigned KE     = (K == 0) ? 1 : K;
  localparam int unsigned PK_W   = KE * MAG_W;
  localparam int unsigned SHIFT  = TRIG_W - 1 + ((K == 0) ? 0 : (K - 1) * (MAG_W - 1));
  localparam int unsigned PROD_W = PK_W + 1 + TRIG_W;

  // ---- CORDIC: |r| and arg(r) ------------------------------------------------
  logic               c_valid, c_last;
  logic [MAG_W-1:0]   c_mag;
  logic [PH_W-1:0] c_ang;

  cordic_vec #(.IN_W(IN_W), .PHASE_W(PH_W), .ITER(ITER)) u_cordic (
    .clk, .rst_n,
    .in_valid, .in_tag(in_last), .in_x(in_i), .in_y(in_q),
    .out_valid(c_valid), .out_tag(c_last), .out_mag(c_mag), .out_angle(c_ang)
  );

  // ---- M*arg(r) and table look-up, |r|^K --------------------------------------
  logic [PH_W-1:0]        m_ang;
  logic signed [TRIG_W-1:0]  t_cos, t_sin;
  logic [PK_W-1:0]           pk;

  assign m_ang = (mode_i == MOD_QPSK) ? (c_ang << 2) : (c_ang << 1);

  sincos_lut #(.PHASE_W(PH_W), .OUT_W(TRIG_W)) u_scl (
    .phase_i(m_ang), .cos_o(t_cos), .sin_o(t_sin)
  );

  always_comb begin
    if (K == 0) pk = PK_W'(1) << (MAG_W - 1);
    else begin
      pk = PK_W'(c_mag);
      for (int unsigned j = 1; j < KE; j++) pk = PK_W'(pk * PK_W'(c_mag));
    end
  end

  logic                     a_valid, a_last;
  logic signed [TRIG_W-1:0] a_cos, a_sin;
  logic [PK_W-1:0]          a_pk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_last  <= 1'b0;
      a_cos   <= '0;
      a_sin   <= '0;
      a_pk    <= '0;
    end else begin
      a_valid <= c_valid;
      a_last  <= c_last;
      a_cos   <= t_cos;
      a_sin   <= t_sin;
      a_pk    <= pk;
    end
  end

  // ---- scale the phasor by |r|^K (two multipliers) ---------------------------
  function automatic logic signed [OUT_W-1:0] scale_sat(input logic signed [PROD_W-1:0] p);
    logic signed [PROD_W-1:0] s;
    s = (p + (PROD_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (s > PROD_W'((1 << (OUT_W - 1)) - 1))       return OUT_W'((1 << (OUT_W - 1)) - 1);
    else if (s < -PROD_W'((1 << (OUT_W - 1)) - 1)) return OUT_W'(-((1 << (OUT_W - 1)) - 1));
    else                                           return OUT_W'(s);
  endfunction

  logic signed [PROD_W-1:0] p_i, p_q;
  assign p_i = $signed({1'b0, a_pk}) * a_cos;
  assign p_q = $signed({1'b0, a_pk}) * a_sin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= a_valid;
      out_last  <= a_last;
      out_i     <= scale_sat(p_i);
      out_q     <= scale_sat(p_q);
    end
  end

endmodule
