// mcu: metric computation unit, the node processor of one tree level.
//
// The node at level i extends a partial path s_{i+1..4} by one symbol:
//   c_{i+1} = y_i - sum_{j>i} R_ij * s_j            (interference cancellation)
//   s_i     = nearest QAM point to c_{i+1}/R_ii     (levels 3..1, "best child")
//           = the symbol supplied with the path     (level 4, enumerated above)
//   d_i     = d_{i+1} + |Re e_i| + |Im e_i|,  e_i = c_{i+1} - R_ii * s_i
// R_ij * s_j is built by shift and add (mimo_pkg::cmul_*); the l1 norm stands
// in for the squared Euclidean norm so no multiplier is needed.  The same
// module is used at every level; LEVEL only selects which operands are
// present, as the level-1 node reduces to the others by dropping terms.
//
// Configuration travels with the data: instr.mf reconfigures the slicer and
// instr.na (antennas - 1) switches the node off for a smaller n x n system,
// where the problem occupies levels 4 .. 5-n and the levels below pass the
// path through unchanged.  A new configuration therefore costs no cycles.
//
// Node pruning: the new partial distance is compared with `radius`; a path
// that exceeds it leaves with live = 0.  A path that arrives with live = 0 is
// not computed: only its control flags move on and the datapath register
// keeps its value, which is how clock gating of a pruned node is modelled.
// The hard detector ties radius to all ones.
//
// Interface and timing: `row` holds y_i and R_i,* for the vector symbol whose
// path is at the input in the same cycle.  One register stage: a path at
// path_i in cycle t appears at path_o in cycle t+1.
module mcu
  import mimo_pkg::*;
#(
  parameter int unsigned LEVEL = 1   // tree level i, 1 (leaf) .. 4 (root children)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  path_t         path_i,
  input  row_t          row,
  input  logic [MW-1:0] radius,
  output path_t         path_o,
  output logic [MW-1:0] d_comb       // d_i of the path at the input, before the register
);

  logic                 active;
  logic signed [CW-1:0] c_re, c_im, e_re, e_im;
  comp_t                q_re, q_im;
  sym_t                 s_i;
  path_t                nxt;

  qam_slicer u_slice_re (.c(c_re), .rii(row.r[LEVEL].re), .mf(path_i.instr.mf), .q(q_re));
  qam_slicer u_slice_im (.c(c_im), .rii(row.r[LEVEL].re), .mf(path_i.instr.mf), .q(q_im));

  always_comb begin
    active = (LEVEL + 32'(path_i.instr.na)) >= 4;
    c_re = CW'(row.y.re);
    c_im = CW'(row.y.im);
    for (int j = LEVEL + 1; j <= NT; j++) begin
      c_re = c_re - cmul_re(row.r[j], path_i.s[j]);
      c_im = c_im - cmul_im(row.r[j], path_i.s[j]);
    end
    if (LEVEL == NT) s_i = path_i.s[NT];
    else             s_i = '{re: q_re, im: q_im};
    e_re = c_re - CW'(mul_comp(row.r[LEVEL].re, s_i.re));
    e_im = c_im - CW'(mul_comp(row.r[LEVEL].re, s_i.im));

    nxt = path_i;
    if (active) begin
      nxt.s[LEVEL] = s_i;
      nxt.d = sat_add(path_i.d, sat_add(MW'(abs_c(e_re)), MW'(abs_c(e_im))));
    end else begin
      nxt.s[LEVEL] = '0;
    end
    d_comb = nxt.d;
    nxt.live = path_i.live && (nxt.d <= radius);
  end

  // Control flags always advance; the datapath part only for live paths.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      path_o <= '0;
    end else begin
      path_o.valid <= path_i.valid;
      path_o.last  <= path_i.last;
      path_o.tag   <= path_i.tag;
      path_o.np    <= path_i.np;
      path_o.pi    <= path_i.pi;
      path_o.instr <= path_i.instr;
      path_o.live  <= path_i.valid && nxt.live;
      if (path_i.valid && path_i.live) begin
        path_o.s <= nxt.s;
        path_o.d <= nxt.d;
      end
    end
  end

endmodule
