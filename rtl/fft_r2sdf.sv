// fft_r2sdf: N-point pipelined FFT (radix-2 single-path delay feedback,
// decimation in frequency), one complex sample per clock.
//
// LOG2N fft_sdf_stage instances are chained; stage s holds a delay line of
// N/2^(s+1) words, N-1 words in all. The spectrum leaves in bit-reversed
// order; out_bin gives each output's natural bin number (0..N-1; bins at or
// above N/2 are negative frequencies). No scaling is applied: the internal
// width DW = IN_W + LOG2N + 1 holds the largest possible bin, so the
// transform is exact up to the rounding of the twiddle products.
//
// Interface: in_sof marks the first of N frame samples; after the frame the
// caller keeps in_valid high (zeros) until the frame has left. out_sof marks
// output bin index 0 (natural bin 0), and the N outputs that follow on
// out_valid are the frame's spectrum.
// Timing: throughput one sample per cycle; the first bin appears N-1+LOG2N
// valid input samples after in_sof.
//
// The document uses a vendor FFT core with one sample per cycle throughput;
// this architecture is this design's own choice of a core with that rate.
module fft_r2sdf #(
  parameter int unsigned N    = 1024,
  parameter int unsigned IN_W = 10,
  parameter int unsigned TW_W = 16,
  parameter int unsigned DW   = IN_W + $clog2(N) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic                    out_sof,
  output logic [$clog2(N)-1:0]    out_bin,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im
);

  localparam int unsigned LOG2N = $clog2(N);

  logic                 v  [LOG2N+1];
  logic                 sf [LOG2N+1];
  logic signed [DW-1:0] re [LOG2N+1];
  logic signed [DW-1:0] im [LOG2N+1];

  assign v[0]  = in_valid;
  assign sf[0] = in_sof;
  assign re[0] = DW'(in_re);
  assign im[0] = DW'(in_im);

  for (genvar s = 0; s < int'(LOG2N); s++) begin : g_stage
    fft_sdf_stage #(.N(N), .STAGE(s), .DW(DW), .TW_W(TW_W)) u_stage (
      .clk, .rst_n,
      .in_valid(v[s]), .in_sof(sf[s]), .in_re(re[s]), .in_im(im[s]),
      .out_valid(v[s+1]), .out_sof(sf[s+1]), .out_re(re[s+1]), .out_im(im[s+1])
    );
  end

  // Output index counter: position in the bit-reversed output frame.
  logic [LOG2N-1:0] ocnt, opos;
  assign opos = sf[LOG2N] ? '0 : ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ocnt <= '0;
    else if (v[LOG2N]) ocnt <= opos + 1'b1;
  end

  always_comb begin
    out_valid = v[LOG2N];
    out_sof   = sf[LOG2N];
    out_re    = re[LOG2N];
    out_im    = im[LOG2N];
    out_bin   = LOG2N'(fs_pkg::bitrev(16'(opos), LOG2N));
  end

endmodule
