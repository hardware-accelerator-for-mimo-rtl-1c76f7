// qam_slicer: programmable slicer for one axis (real or imaginary part).
//
// Picks the constellation level nearest to c, the interference-cancelled
// value c_{i+1}, scaled by the diagonal entry R_ii.  The decision thresholds
// of an eta-ary QAM axis lie at (-(sqrt(eta)-2) + 2j) * R_ii; because the
// constellation is symmetric the slicer folds c into the positive half-axis,
// compares |c| with 2R_ii, 4R_ii and 6R_ii, and restores the sign afterwards,
// so only shifts, one add and three comparators are needed.  The modulation
// format MF limits the largest magnitude, which reconfigures the slicer from
// one cycle to the next with no extra latency.
//
// Interface: purely combinational.
//   c      signed CW-bit value to quantize
//   rii    R_ii, signed DW-bit, expected positive
//   mf     modulation format
//   q      sign-magnitude component (see mimo_pkg)
// A value exactly on a threshold goes to the smaller magnitude; c = 0 goes to
// +1.  The tie rule is this design's choice.
module qam_slicer
  import mimo_pkg::*;
(
  input  logic signed [CW-1:0] c,
  input  logic signed [DW-1:0] rii,
  input  mf_e                  mf,
  output comp_t                q
);

  logic [CW-1:0] mag, r2, r4, r6;
  logic [1:0]    m, mmax;

  always_comb begin
    mag  = abs_c(c);
    r2   = CW'(rii) << 1;
    r4   = CW'(rii) << 2;
    r6   = r4 + r2;
    mmax = mf_maxmag(mf);
    if (mag > r6)      m = 2'd3;
    else if (mag > r4) m = 2'd2;
    else if (mag > r2) m = 2'd1;
    else               m = 2'd0;
    if (m > mmax) m = mmax;
    q = {c[CW-1], m};
  end

endmodule
