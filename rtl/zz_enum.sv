// zz_enum: simplified (zig-zag) enumeration order of one constellation axis.
//
// Lists the sqrt(eta) levels of one axis in the order of their distance from
// a point c on that axis, R_ii-scaled: first the nearest level, then its
// neighbour on the side of c, then alternately further out on either side,
// skipping levels that fall off the end of the axis.  The top level of the
// soft detector applies it to the real axis to order the constellation
// columns and to the imaginary axis to order the points inside a column,
// which visits the 64 children of the root in roughly ascending distance
// without any sorting.  The pattern is the one a pair of up/down counters
// would produce; here it is computed in one step from the nearest level and
// the direction.
//
// Interface: combinational.  `order[k]` is the k-th level visited (k from 0),
// sign-magnitude coded; entries beyond sqrt(eta)-1 repeat the last level.
module zz_enum
  import mimo_pkg::*;
(
  input  logic signed [CW-1:0] c,
  input  logic signed [DW-1:0] rii,
  input  mf_e                  mf,
  output comp_t                order [8]
);

  comp_t                q;
  logic signed [CW-1:0] qv;

  qam_slicer u_near (.c(c), .rii(rii), .mf(mf), .q(q));

  always_comb begin
    int half, nlev, p0, dir, n, p;
    half = 1 << (mf_axis_bits(mf) - 1);
    nlev = 2 * half;
    // level index 0..nlev-1, from the most negative level up
    p0   = q[2] ? (half - 1 - int'(q[1:0])) : (half + int'(q[1:0]));
    qv   = CW'(mul_comp(rii, q));
    dir  = (c >= qv) ? 1 : -1;
    for (int k = 0; k < 8; k++) order[k] = '0;
    n = 0;
    for (int t = 0; t < 15; t++) begin
      // offsets 0, +dir, -dir, +2dir, -2dir, ...
      p = p0 + (((t + 1) / 2) * ((t % 2 == 1) ? dir : -dir));
      if (p >= 0 && p < nlev && n < 8) begin
        order[n] = (p < half) ? {1'b1, 2'(half - 1 - p)} : {1'b0, 2'(p - half)};
        n++;
      end
    end
    for (int k = 1; k < 8; k++)
      if (k >= nlev) order[k] = order[k-1];
  end

endmodule
