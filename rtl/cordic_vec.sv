// cordic_vec: pipelined vectoring CORDIC, cartesian to polar.
//
// For a complex input r = x + jy it delivers the magnitude (scaled by the
// CORDIC gain G = 1.6468) and the angle arg(r), the angle in units of
// 2^-PHASE_W turn (0 .. 2^PHASE_W-1 covers one full turn). An input in the
// left half plane is first turned by half a turn, then ITER micro-rotations
// by +-atan(2^-i) drive y to zero; the angle of each micro-rotation is
// accumulated in a word with ZG extra fraction bits. The atan table is
// computed at elaboration by a constant function.
//
// Timing: fully pipelined, one sample per cycle, latency ITER+2 cycles from
// in_valid to out_valid. A one-bit tag (for example an end-of-burst flag)
// travels with each sample.
//
// The document calls for a CORDIC core that delivers |r| and arg(r) and takes
// it from a vendor library; this implementation, its widths and its number of
// iterations are this design's own. The CORDIC gain is not compensated: it
// scales every sample of a burst alike, which does not move the spectral peak.
module cordic_vec #(
  parameter int unsigned IN_W    = 8,
  parameter int unsigned PHASE_W = 12,
  parameter int unsigned ITER    = 12,
  parameter int unsigned GUARD   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_tag,
  input  logic signed [IN_W-1:0]    in_x,
  input  logic signed [IN_W-1:0]    in_y,
  output logic                      out_valid,
  output logic                      out_tag,
  output logic [IN_W:0]             out_mag,    // G*|r|, unsigned
  output logic [PHASE_W-1:0]        out_angle   // arg(r) in turns
);

  localparam int unsigned XW = IN_W + 2 + GUARD;   // |G*r| < 2.33*2^(IN_W-1)
  localparam int unsigned ZG = 4;
  localparam int unsigned ZW = PHASE_W + ZG;

  typedef logic [ZW-1:0] atan_t [ITER];

  // atan(2^-i) / (2*pi), scaled to 2^ZW per turn.
  function automatic atan_t make_atan();
    atan_t t;
    real v, p, a;
    for (int i = 0; i < int'(ITER); i++) begin
      if (i == 0) a = 0.125;  // atan(1) = 1/8 turn
      else begin
        v = 1.0 / real'(64'd1 << i);
        a = 0.0;
        p = v;
        for (int n = 0; n < 30; n++) begin
          a = a + ((n % 2 == 0) ? p : -p) / real'(2 * n + 1);
          p = p * v * v;
        end
        a = a / 6.283185307179586;
      end
      t[i] = ZW'(longint'(a * real'(64'd1 << ZW)));  // the cast rounds to nearest
    end
    return t;
  endfunction

  localparam atan_t ATAN = make_atan();

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic        [ZW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];
  logic                 ts [ITER+1];

  // Stage 0: fold the left half plane onto the right one.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      ts[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (in_x < 0) begin
        xs[0] <= -(XW'(in_x) <<< GUARD);
        ys[0] <= -(XW'(in_y) <<< GUARD);
        zs[0] <= ZW'(1) << (ZW - 1);  // half a turn
      end else begin
        xs[0] <= XW'(in_x) <<< GUARD;
        ys[0] <= XW'(in_y) <<< GUARD;
        zs[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < int'(ITER); i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        ts[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (ys[i] >= 0) begin   // rotate clockwise
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN[i];
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN[i];
        end
      end
    end
  end

  // Output stage: drop guard bits, round the angle.
  logic [ZW-1:0] z_rnd;
  logic [XW-1:0] x_rnd;
  assign z_rnd = zs[ITER] + ZW'(1 << (ZG - 1));
  assign x_rnd = xs[ITER] + XW'(1 << (GUARD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= 1'b0;
      out_mag   <= '0;
      out_angle <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_tag   <= ts[ITER];
      out_mag   <= x_rnd[GUARD +: IN_W+1];
      out_angle <= z_rnd[ZG +: PHASE_W];
    end
  end

endmodule
