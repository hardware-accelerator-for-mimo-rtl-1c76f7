// bitmetric_proc: bit-metric processor (metric management unit) of the soft
// detectors.
//
// Turns the stream of complete paths leaving the node array into the two
// terms of the max-log LLR of every bit: the best distance d_a = d^best with
// the label bits a_ij of the best path, and for every bit (i, j) the distance
// c_ij of the best path seen so far whose bit (i, j) is the complement of
// a_ij.  For an incoming path b with distance d_b:
//   * the bits to touch are those where a_ij and b_ij differ (XOR, "bit
//     manager");
//   * if d_a > d_b the incoming path becomes the new best: every touched c_ij
//     takes the old d_a, then a := b and d_a := d_b;
//   * otherwise every touched c_ij takes d_b if d_b < c_ij (cmp1 picks the
//     candidate, the per-bit compare/select filters it).
// The first path of a vector symbol (NS) initialises a := b, d_a := d_b and
// every c_ij to "infinite"; a bit whose c_ij is still infinite at the end had
// no counter-hypothesis and is clipped by the LLR processor.  Equal distances
// are treated like d_a < d_b (design choice).
//
// Permutation: with PERMUTED = 1 the processor serves the layered (LORD)
// detector, whose paths come from a column-permuted channel; `pi` (0..3) says
// which antenna sits at tree level 4 and the de-permutation pi^-1 maps the
// level symbols back to antenna order before the bit comparison.  Level 4
// holds antenna 4-pi and the other antennas follow in cyclic order (the
// cyclic order is this design's choice).  With PERMUTED = 0 levels are
// antennas.
//
// Interface and timing: one path per clock at path_i (pruned paths, live = 0,
// are skipped; NS and last act on them too).  When the path marked `last`
// has been absorbed, out_valid pulses one clock later with the final a, c and
// d_a for the LLR processor.  cur_d / cur_tag / cur_ok give the running best
// distance, the tag of the symbol it belongs to and whether a live path has
// been seen yet; the node array derives its pruning radius from them.
module bitmetric_proc
  import mimo_pkg::*;
#(
  parameter bit PERMUTED = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  path_t                    path_i,
  input  logic [1:0]               pi,        // permutation of this path (PERMUTED = 1)
  output logic                     out_valid,
  output logic [NT:1][BPS-1:0]     out_a,
  output logic [NT:1][BPS-1:0][MW-1:0] out_c,
  output logic [MW-1:0]            out_da,
  output mf_e                      out_mf,
  output logic [MW-1:0]            cur_d,
  output logic                     cur_tag,
  output logic                     cur_ok
);

  logic [NT:1][BPS-1:0]         a_q, a_n, b;
  logic [NT:1][BPS-1:0][MW-1:0] c_q, c_n;
  logic [MW-1:0]                da_q, da_n;
  logic                         ok_q, ok_n;

  // pi^-1 and labelling of the incoming path
  always_comb begin
    for (int ant = 1; ant <= NT; ant++) begin
      int lvl;
      lvl = ant;
      if (PERMUTED) lvl = ((ant - 1 + int'(pi)) % NT) + 1;
      b[ant] = sym_label(path_i.s[lvl], path_i.instr.mf);
    end
  end

  always_comb begin
    logic new_best;
    a_n  = a_q;
    c_n  = c_q;
    da_n = da_q;
    ok_n = ok_q;
    new_best = !ok_q || (da_q > path_i.d);
    if (path_i.valid && path_i.instr.ns) begin
      a_n  = b;
      da_n = path_i.live ? path_i.d : MET_INF;
      ok_n = path_i.live;
      c_n  = '1;
    end else if (path_i.valid && path_i.live) begin
      for (int i = 1; i <= NT; i++)
        for (int j = 0; j < BPS; j++)
          if (a_q[i][j] != b[i][j]) begin
            if (new_best)                 c_n[i][j] = da_q;
            else if (path_i.d < c_q[i][j]) c_n[i][j] = path_i.d;
          end
      if (new_best) begin
        a_n  = b;
        da_n = path_i.d;
        ok_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      c_q       <= '1;
      da_q      <= MET_INF;
      ok_q      <= 1'b0;
      cur_tag   <= 1'b0;
      out_valid <= 1'b0;
      out_a     <= '0;
      out_c     <= '1;
      out_da    <= '0;
      out_mf    <= MF_QPSK;
    end else begin
      a_q       <= a_n;
      c_q       <= c_n;
      da_q      <= da_n;
      ok_q      <= ok_n;
      if (path_i.valid) cur_tag <= path_i.tag;
      out_valid <= path_i.valid && path_i.last;
      if (path_i.valid && path_i.last) begin
        out_a  <= a_n;
        out_c  <= c_n;
        out_da <= da_n;
        out_mf <= path_i.instr.mf;
      end
    end
  end

  assign cur_d  = da_q;
  assign cur_ok = ok_q;

endmodule
