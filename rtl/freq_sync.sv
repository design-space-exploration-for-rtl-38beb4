// freq_sync: non-data-aided frequency synchronization of BPSK/QPSK bursts.
//
// A burst of up to N (1024) symbols, one sample per symbol, arrives without
// any training sequence. Its carrier frequency offset f is estimated from the
// burst itself and removed:
//   1. agc          fits the 12-bit samples to the Q_W-bit datapath;
//   2. burst_buffer stores the burst;
//   3. mod_removal  forms |r|^K * exp(j*M*arg r), a tone at M*f;
//   4. fft_r2sdf    transforms the burst, zero-padded to N points;
//   5. spectral_peak finds the strongest bin b inside the frequency window;
//      the estimate is f = b / (N*M) of the sample rate;
//   6. freq_correct reads the burst back from the buffer and rotates sample l
//      by exp(-j*2*pi*f*l).
// The phase step handed to freq_correct is b*(4/M) in units of 1/(4N) turn,
// so every estimate is represented exactly.
//
// Control: one burst at a time. in_ready is high while a burst may be
// delivered; a burst ends with in_last or after N samples. The burst's tone
// samples are fed to the FFT as they come (gaps in in_valid are allowed), the
// frame is completed with zeros, and zeros keep the FFT running until its
// spectrum has been searched. Then est_valid pulses with est_bin, and the
// corrected burst leaves on out_valid/out_last at one sample per cycle.
// A burst of L samples occupies the unit for about 2N + L + 40 cycles.
// cfg_* inputs must be stable while a burst is being processed.
//
// Following the document: the chain of Fig. 1 (modulation removal, 1024-point
// FFT, windowed spectral maximum search, correction with a sine/cosine table
// and complex multipliers), K = 1 with a CORDIC and two multipliers, bursts
// up to 1024 symbols, BPSK and QPSK, all window sizes. This design's own
// choices: the controller, the buffering of one burst at a time, the stream
// interfaces and all word widths.
module freq_sync
  import fs_pkg::*;
#(
  parameter int unsigned N    = fs_pkg::FFT_N,
  parameter int unsigned IN_W = 12,
  parameter int unsigned Q_W  = 8,
  parameter int unsigned K    = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  mod_e                          cfg_mode,
  input  logic [$clog2(Q_W+1)-1:0]      cfg_qbits,
  input  logic                          cfg_agc_freeze,
  input  logic signed [$clog2(N)-1:0]   cfg_win_lo,
  input  logic signed [$clog2(N)-1:0]   cfg_win_hi,
  // burst input
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic                          in_last,
  input  logic signed [IN_W-1:0]        in_i,
  input  logic signed [IN_W-1:0]        in_q,
  output logic [15:0]                   agc_gain,   // current AGC gain, 4.12 fixed point
  // frequency estimate
  output logic                          est_valid,
  output logic signed [$clog2(N)-1:0]   est_bin,
  output logic [2*(Q_W+$clog2(N)+3)-1:0] est_pow,
  // corrected burst
  output logic                          out_valid,
  output logic                          out_last,
  output logic signed [Q_W:0]           out_i,
  output logic signed [Q_W:0]           out_q
);

  localparam int unsigned LN   = $clog2(N);
  localparam int unsigned PH_W = LN + 2;
  localparam int unsigned MR_W = Q_W + 2;
  localparam int unsigned DW   = MR_W + LN + 1;

  typedef enum logic [2:0] {
    S_COLLECT, S_DRAIN, S_PAD, S_FLUSH, S_CORR, S_OUT
  } state_e;

  state_e state;
  logic [LN-1:0] icnt, wcnt, fcnt, rcnt, blast;

  // ---- AGC ----------------------------------------------------------------
  logic                   in_fire, in_end;
  logic                   g_valid, g_last;
  logic signed [Q_W-1:0]  g_i, g_q;

  assign in_ready = (state == S_COLLECT);
  assign in_fire  = in_valid && in_ready;
  assign in_end   = in_last || (icnt == LN'(N - 1));

  agc #(.IN_W(IN_W), .OUT_W(Q_W)) u_agc (
    .clk, .rst_n,
    .freeze_i(cfg_agc_freeze), .q_bits_i(cfg_qbits),
    .in_valid(in_fire), .in_last(in_fire && in_end), .in_i, .in_q,
    .out_valid(g_valid), .out_last(g_last), .out_i(g_i), .out_q(g_q),
    .gain_o(agc_gain)
  );

  // ---- burst buffer ---------------------------------------------------------
  logic             rd_en, rd_valid, rd_last;
  logic [2*Q_W-1:0] rd_data;

  burst_buffer #(.DEPTH(N), .W(2 * Q_W)) u_buf (
    .clk,
    .wr_en(g_valid), .wr_addr(wcnt), .wr_data({g_i, g_q}),
    .rd_en, .rd_addr(rcnt), .rd_data
  );

  // ---- modulation removal ---------------------------------------------------
  logic                   m_valid, m_last;
  logic signed [MR_W-1:0] m_i, m_q;

  mod_removal #(.IN_W(Q_W), .K(K), .PH_W(PH_W), .OUT_W(MR_W)) u_mr (
    .clk, .rst_n, .mode_i(cfg_mode),
    .in_valid(g_valid), .in_last(g_last), .in_i(g_i), .in_q(g_q),
    .out_valid(m_valid), .out_last(m_last), .out_i(m_i), .out_q(m_q)
  );

  // ---- FFT input multiplexer --------------------------------------------------
  logic                   f_valid, f_sof;
  logic signed [MR_W-1:0] f_re, f_im;

  always_comb begin
    f_valid = 1'b0;
    f_re    = '0;
    f_im    = '0;
    unique case (state)
      S_COLLECT, S_DRAIN: begin
        f_valid = m_valid;
        f_re    = m_i;
        f_im    = m_q;
      end
      S_PAD, S_FLUSH: f_valid = 1'b1;
      default: ;
    endcase
    f_sof = f_valid && (state == S_COLLECT || state == S_DRAIN) && (fcnt == '0);
  end

  logic                 x_valid, x_sof;
  logic [LN-1:0]        x_bin;
  logic signed [DW-1:0] x_re, x_im;

  fft_r2sdf #(.N(N), .IN_W(MR_W), .DW(DW)) u_fft (
    .clk, .rst_n,
    .in_valid(f_valid), .in_sof(f_sof), .in_re(f_re), .in_im(f_im),
    .out_valid(x_valid), .out_sof(x_sof), .out_bin(x_bin), .out_re(x_re), .out_im(x_im)
  );

  // ---- spectral analysis ------------------------------------------------------
  logic                  sp_done;
  logic signed [LN-1:0]  sp_bin;
  logic [2*DW-1:0]       sp_pow;

  spectral_peak #(.N(N), .DW(DW)) u_sp (
    .clk, .rst_n,
    .in_valid(x_valid), .in_sof(x_sof), .in_bin(x_bin), .in_re(x_re), .in_im(x_im),
    .win_lo_i(cfg_win_lo), .win_hi_i(cfg_win_hi),
    .done_o(sp_done), .peak_bin_o(sp_bin), .peak_pow_o(sp_pow)
  );

  // ---- frequency correction ---------------------------------------------------
  logic            fc_start;
  logic [PH_W-1:0] fc_inc;

  // f = b/(N*M) = b*(4/M)/(4N)
  assign fc_inc   = (cfg_mode == MOD_QPSK) ? PH_W'(sp_bin) : (PH_W'(sp_bin) << 1);
  assign fc_start = (state == S_FLUSH) && sp_done;

  freq_correct #(.IN_W(Q_W), .PH_W(PH_W), .OUT_W(Q_W + 1)) u_fc (
    .clk, .rst_n,
    .start_i(fc_start), .inc_i(fc_inc),
    .in_valid(rd_valid), .in_last(rd_last),
    .in_i(rd_data[2*Q_W-1 -: Q_W]), .in_q(rd_data[Q_W-1:0]),
    .out_valid, .out_last, .out_i, .out_q
  );

  assign rd_en     = (state == S_CORR);
  assign est_valid = fc_start;
  assign est_bin   = sp_bin;
  assign est_pow   = sp_pow;

  // ---- controller -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_COLLECT;
      icnt     <= '0;
      wcnt     <= '0;
      fcnt     <= '0;
      rcnt     <= '0;
      blast    <= '0;
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      rd_last  <= rd_en && (rcnt == blast);
      if (in_fire) icnt <= icnt + 1'b1;
      if (g_valid) begin
        wcnt <= wcnt + 1'b1;
        if (g_last) blast <= wcnt;
      end
      if (f_valid && state != S_FLUSH) fcnt <= fcnt + 1'b1;

      unique case (state)
        S_COLLECT: if (in_fire && in_end) state <= S_DRAIN;
        S_DRAIN:   if (m_valid && m_last)
                     state <= (fcnt == LN'(N - 1)) ? S_FLUSH : S_PAD;
        S_PAD:     if (fcnt == LN'(N - 1)) state <= S_FLUSH;
        S_FLUSH:   if (sp_done) begin
                     state <= S_CORR;
                     rcnt  <= '0;
                   end
        S_CORR: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == blast) state <= S_OUT;
        end
        S_OUT: if (out_valid && out_last) begin
          state <= S_COLLECT;
          icnt  <= '0;
          wcnt  <= '0;
          fcnt  <= '0;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  // ---- protocol checks --------------------------------------------------------
  // A burst never holds more samples than the FFT has points.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_fire |-> state == S_COLLECT);
  // The estimate is taken only once a frame has been completed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   sp_done |-> state == S_FLUSH);

endmodule
