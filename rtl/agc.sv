// agc: automatic gain control with selectable output quantization.
//
// The 12-bit samples of the channel are multiplied by an adaptive gain and
// re-quantized to the synchronizer's word width OUT_W. The gain (unsigned,
// GAIN_FRAC fraction bits, starts at 1.0) follows a first-order loop that
// drives the envelope estimate |I|+|Q| of the output towards TARGET:
//   gain += (TARGET - (|I|+|Q|)) >>> MU_SHIFT   (after every sample).
// Gain 1.0 maps the input's full scale onto the output's full scale.
// q_bits_i (1..OUT_W) selects the effective quantization: the output keeps
// q_bits_i significant bits, the lower OUT_W-q_bits_i bits are cleared
// (truncation), so a narrower quantization can be studied without changing
// the datapath width.
//
// Interface: valid/last stream in and out, no back-pressure; freeze_i holds
// the gain. Timing: one sample per cycle, latency 1 cycle.
//
// The document gives only the AGC's purpose (fit the 12-bit channel samples
// to the selectable quantization of the frequency synchronizer); the loop,
// its envelope measure, step size and truncation are this design's choices.
module agc #(
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = 8,
  parameter int unsigned GAIN_W    = 16,
  parameter int unsigned GAIN_FRAC = 12,
  parameter int unsigned MU_SHIFT  = 0,
  parameter int unsigned TARGET    = 1 << (OUT_W - 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        freeze_i,
  input  logic [$clog2(OUT_W+1)-1:0]  q_bits_i,
  input  logic                        in_valid,
  input  logic                        in_last,
  input  logic signed [IN_W-1:0]      in_i,
  input  logic signed [IN_W-1:0]      in_q,
  output logic                        out_valid,
  output logic                        out_last,
  output logic signed [OUT_W-1:0]     out_i,
  output logic signed [OUT_W-1:0]     out_q,
  output logic [GAIN_W-1:0]           gain_o
);

  localparam int unsigned PW    = IN_W + GAIN_W + 1;
  localparam int unsigned SHIFT = GAIN_FRAC + IN_W - OUT_W;
  localparam int unsigned EW    = OUT_W + 3;
  localparam logic signed [OUT_W-1:0] MAXV = OUT_W'((1 << (OUT_W - 1)) - 1);

  logic [GAIN_W-1:0] gain;
  assign gain_o = gain;

  function automatic logic signed [OUT_W-1:0] requant(
      input logic signed [IN_W-1:0] x, input logic [GAIN_W-1:0] g,
      input logic [$clog2(OUT_W+1)-1:0] qb);
    logic signed [PW-1:0] p;
    logic signed [OUT_W-1:0] v;
    logic [OUT_W-1:0] mask;
    p = PW'(x) * $signed({1'b0, g});
    p = (p + (PW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (p > PW'(MAXV))       v = MAXV;
    else if (p < -PW'(MAXV)) v = -MAXV;
    else                     v = OUT_W'(p);
    mask = (int'(qb) >= int'(OUT_W)) ? '1 : ~((OUT_W'(1) << (int'(OUT_W) - int'(qb))) - 1'b1);
    return v & mask;
  endfunction

  logic signed [OUT_W-1:0] n_i, n_q;
  assign n_i = requant(in_i, gain, q_bits_i);
  assign n_q = requant(in_q, gain, q_bits_i);

  // envelope of the (unmasked) output and the gain update
  logic signed [EW-1:0] env, err;
  logic signed [GAIN_W+1:0] g_next;
  always_comb begin
    env    = ((n_i < 0) ? -EW'(n_i) : EW'(n_i)) + ((n_q < 0) ? -EW'(n_q) : EW'(n_q));
    err    = EW'(TARGET) - env;
    g_next = $signed({2'b00, gain}) + (GAIN_W+2)'(err >>> MU_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain      <= GAIN_W'(1) << GAIN_FRAC;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_last;
      if (in_valid) begin
        out_i <= n_i;
        out_q <= n_q;
        if (!freeze_i) begin
          if (g_next < 1)                              gain <= GAIN_W'(1);
          else if (g_next > (GAIN_W+2)'((1 << GAIN_W) - 1)) gain <= '1;
          else                                         gain <= GAIN_W'(g_next);
        end
      end
    end
  end

endmodule
