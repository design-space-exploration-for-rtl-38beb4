// fft_sdf_stage: one radix-2 single-path delay-feedback (R2SDF) stage of a
// decimation-in-frequency FFT.
//
// Stage STAGE of an N-point FFT works on blocks of 2D samples, D = N/2^(STAGE+1).
// In the first half of a block the input is written into a D-deep delay line
// while the delay line's old content (the differences of the previous block)
// leaves the stage, multiplied by the twiddle factor W_N^(n*2^STAGE). In the
// second half the stage forms the butterfly with the delayed sample a and the
// input b: a+b leaves the stage at once, a-b goes into the delay line.
//
// Interface: a valid stream with a start-of-frame flag; the stage advances
// only on in_valid. A frame of N samples must be followed by enough further
// samples (zeros) to push it out. out_sof marks the first sample of the
// stage's output frame, D valid samples after in_sof (plus one register).
// Timing: one sample per cycle, output registered. All words are DW bits;
// the caller sizes DW so that the butterflies cannot overflow.
module fft_sdf_stage #(
  parameter int unsigned N     = 1024,
  parameter int unsigned STAGE = 0,
  parameter int unsigned DW    = 21,
  parameter int unsigned TW_W  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);

  localparam int unsigned LOG2N = $clog2(N);
  localparam int unsigned D     = N >> (STAGE + 1);
  localparam int unsigned LOG2D = $clog2(D);
  localparam int unsigned PW    = (D > 1) ? LOG2D : 1;
  localparam int unsigned PRODW = DW + TW_W + 1;

  logic signed [DW-1:0] dl_re [D];
  logic signed [DW-1:0] dl_im [D];

  logic [LOG2N-1:0] cnt, pos;
  logic             half, sof_pend;
  logic [PW-1:0]    ptr;
  logic [LOG2N-1:0] tw_exp;

  always_comb begin
    pos  = in_sof ? '0 : cnt;
    half = pos[LOG2D];
    ptr  = (D > 1) ? PW'(pos) : '0;
    // twiddle W_N^e = exp(-j*2*pi*e/N), e = n*2^STAGE
    tw_exp = LOG2N'(ptr) << STAGE;
  end

  logic signed [TW_W-1:0] tw_c, tw_s;
  sincos_lut #(.PHASE_W(LOG2N), .OUT_W(TW_W)) u_tw (
    .phase_i(tw_exp), .cos_o(tw_c), .sin_o(tw_s)
  );

  logic signed [DW-1:0]    a_re, a_im;
  logic signed [PRODW-1:0] m_re, m_im;
  logic signed [DW-1:0]    mr_re, mr_im;

  always_comb begin
    a_re = dl_re[ptr];
    a_im = dl_im[ptr];
    // (a_re + j a_im) * (c - j s)
    m_re  = PRODW'(a_re) * PRODW'(tw_c) + PRODW'(a_im) * PRODW'(tw_s);
    m_im  = PRODW'(a_im) * PRODW'(tw_c) - PRODW'(a_re) * PRODW'(tw_s);
    mr_re = DW'((m_re + (PRODW'(1) <<< (TW_W - 2))) >>> (TW_W - 1));
    mr_im = DW'((m_im + (PRODW'(1) <<< (TW_W - 2))) >>> (TW_W - 1));
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (!half) begin
        dl_re[ptr] <= in_re;
        dl_im[ptr] <= in_im;
      end else begin
        dl_re[ptr] <= a_re - in_re;
        dl_im[ptr] <= a_im - in_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      sof_pend  <= 1'b0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= 1'b0;
      if (in_valid) begin
        cnt <= pos + 1'b1;
        if (in_sof) sof_pend <= 1'b1;
        if (half && ptr == '0 && (sof_pend || in_sof) && pos == LOG2N'(D)) begin
          out_sof  <= 1'b1;
          sof_pend <= 1'b0;
        end
        if (half) begin
          out_re <= a_re + in_re;
          out_im <= a_im + in_im;
        end else begin
          out_re <= mr_re;
          out_im <= mr_im;
        end
      end
    end
  end

endmodule
