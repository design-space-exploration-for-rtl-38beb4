// sincos_lut: sine/cosine look-up table (SCL).
//
// Maps a phase word p, in units of 2^-PHASE_W turn, to
//   cos_o = round(A*cos(2*pi*p/2^PHASE_W)),  sin_o = round(A*sin(...)),
// with A = 2^(OUT_W-1)-1. Only a quarter wave is stored (2^(PHASE_W-2)+1
// entries); the other quadrants follow by symmetry, as is usual for such
// tables. The quarter-wave table is computed at elaboration time by a
// constant function (Taylor series), so no data file is needed.
//
// Timing: purely combinational; callers register the result. The document
// names the table and what it is used for (rotating samples in modulation
// removal and frequency correction); the quarter-wave layout and the widths
// are this design's own choice.
module sincos_lut #(
  parameter int unsigned PHASE_W = 12,
  parameter int unsigned OUT_W   = 16
) (
  input  logic [PHASE_W-1:0]       phase_i,
  output logic signed [OUT_W-1:0]  cos_o,
  output logic signed [OUT_W-1:0]  sin_o
);

  localparam int unsigned QN = 1 << (PHASE_W - 2);  // points per quadrant

  typedef logic [OUT_W-1:0] tab_t [QN+1];

  function automatic tab_t make_table();
    tab_t t;
    real  x, s, term, amp;
    amp = real'((64'd1 << (OUT_W - 1)) - 1);
    for (int i = 0; i <= int'(QN); i++) begin
      x    = 1.5707963267948966 * real'(i) / real'(QN);
      s    = 0.0;
      term = x;
      for (int k = 1; k < 14; k++) begin
        s    = s + term;
        term = -term * x * x / real'((2 * k) * (2 * k + 1));
      end
      t[i] = OUT_W'(longint'(s * amp));  // the cast rounds to nearest
    end
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  logic [1:0]          quad;
  logic [PHASE_W-3:0]  idx;
  logic [PHASE_W-2:0]  idx_c;  // QN - idx, 1..QN
  logic signed [OUT_W-1:0] s_fwd, s_rev;

  always_comb begin
    quad  = phase_i[PHASE_W-1 -: 2];
    idx   = phase_i[PHASE_W-3:0];
    idx_c = (PHASE_W-1)'(QN) - {1'b0, idx};
    s_fwd = TAB[{1'b0, idx}];
    s_rev = TAB[idx_c];
    unique case (quad)
      2'd0: begin sin_o =  s_fwd; cos_o =  s_rev; end
      2'd1: begin sin_o =  s_rev; cos_o = -s_fwd; end
      2'd2: begin sin_o = -s_fwd; cos_o = -s_rev; end
      default: begin sin_o = -s_rev; cos_o =  s_fwd; end
    endcase
  end

endmodule
