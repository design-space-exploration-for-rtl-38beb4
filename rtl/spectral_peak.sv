// spectral_peak: spectral analysis with frequency windowing.
//
// Searches the N bins of one FFT frame for the largest power
// |X|^2 = re^2 + im^2, considering only bins inside the window
// win_lo_i <= bin <= win_hi_i, where bin is the signed bin number
// (-N/2 .. N/2-1). A window narrower than the full band excludes noise
// peaks outside the range in which the frequency offset is known to lie; the
// full band is win_lo_i = -N/2, win_hi_i = N/2-1. On equal powers the bin
// seen first wins. If no bin lies in the window, bin 0 is reported.
//
// Interface: the FFT output stream (valid, start-of-frame, natural bin number,
// re, im). After the frame's N-th bin, done_o pulses for one cycle with
// peak_bin_o and peak_pow_o valid (they hold until the next frame ends).
// Timing: one bin per cycle; done_o two cycles after the last bin.
//
// The document specifies a limited maximum absolute value search with
// multipliers and comparators; the power (instead of the magnitude) as the
// compared quantity and the signed window bounds are this design's choices.
module spectral_peak #(
  parameter int unsigned N  = 1024,
  parameter int unsigned DW = 21
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic                         in_sof,
  input  logic [$clog2(N)-1:0]         in_bin,
  input  logic signed [DW-1:0]         in_re,
  input  logic signed [DW-1:0]         in_im,
  input  logic signed [$clog2(N)-1:0]  win_lo_i,
  input  logic signed [$clog2(N)-1:0]  win_hi_i,
  output logic                         done_o,
  output logic signed [$clog2(N)-1:0]  peak_bin_o,
  output logic [2*DW-1:0]              peak_pow_o
);

  localparam int unsigned LOG2N = $clog2(N);

  // Stage 1: power and window test.
  logic                     p_valid, p_last, p_inwin;
  logic signed [LOG2N-1:0]  p_bin;
  logic [2*DW-1:0]          p_pow;
  logic [LOG2N-1:0]         cnt, pos;
  logic                     active;

  assign pos = in_sof ? '0 : cnt;

  localparam int unsigned SQW = 2 * DW;
  logic signed [SQW-1:0] sq_re, sq_im;
  assign sq_re = SQW'(in_re) * SQW'(in_re);
  assign sq_im = SQW'(in_im) * SQW'(in_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      active  <= 1'b0;
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      p_inwin <= 1'b0;
      p_bin   <= '0;
      p_pow   <= '0;
    end else begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      if (in_valid && (active || in_sof)) begin
        cnt     <= pos + 1'b1;
        active  <= (pos != LOG2N'(N - 1));
        p_valid <= 1'b1;
        p_last  <= (pos == LOG2N'(N - 1));
        p_bin   <= $signed(in_bin);
        p_inwin <= ($signed(in_bin) >= win_lo_i) && ($signed(in_bin) <= win_hi_i);
        p_pow   <= unsigned'(sq_re) + unsigned'(sq_im);
      end
    end
  end

  // Stage 2: running maximum.
  logic                    best_any;
  logic signed [LOG2N-1:0] best_bin;
  logic [2*DW-1:0]         best_pow;
  logic                    take;

  assign take = p_valid && p_inwin && (!best_any || p_pow > best_pow);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_any   <= 1'b0;
      best_bin   <= '0;
      best_pow   <= '0;
      done_o     <= 1'b0;
      peak_bin_o <= '0;
      peak_pow_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (p_last) begin
        // close the frame, including the last bin
        done_o     <= 1'b1;
        peak_bin_o <= take ? p_bin : best_bin;
        peak_pow_o <= take ? p_pow : best_pow;
        best_any   <= 1'b0;
        best_bin   <= '0;
        best_pow   <= '0;
      end else if (take) begin
        best_any <= 1'b1;
        best_bin <= p_bin;
        best_pow <= p_pow;
      end
    end
  end

endmodule
