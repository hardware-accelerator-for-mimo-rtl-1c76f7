// soft_detector: low-complexity systolic soft-output MIMO detector (4x4,
// 64-QAM).
//
// Produces max-log LLRs for the 24 bits of a 4x4 64-QAM vector symbol from
// the same fixed-complexity tree as the hard detector: all 64 children of the
// root are expanded, each by its best child down to the leaves, and instead
// of keeping only the best leaf the bit-metric processor keeps, for every
// bit, the best leaf with the opposite bit value.  A bit for which none of the
// 64 paths offers the opposite value gets the clipping value, and every LLR is
// clipped to +/-CLIP.
//
// Structure: node_ctrl (zig-zag ordered top-level candidates, one per clock)
// -> mcu level 4 .. level 1 (one register stage each) -> bitmetric_proc (MMU)
// -> llr_proc (LCU, serial, 24 clocks per symbol).
//
// Node pruning: the radius of a node is d_a + CLIP, d_a being the MMU's
// current best distance for the same vector symbol; while the MMU has not
// seen a path of that symbol yet (compared through the per-symbol tag) the
// radius is all ones.  A partial distance above the radius marks the path
// pruned and the nodes below do not compute it (their datapath registers are
// not clocked), which saves energy without changing any LLR: a pruned leaf
// would be more than CLIP above the final best distance and so could only
// yield a clipped LLR.  The level-4 node is always evaluated, since the
// zig-zag order is only roughly ascending.
//
// `pruned` flags, per level and clock, a path that the node of that level
// has just pruned; it serves to monitor the saving.
//
// Timing: a vector symbol is accepted every 64 clocks (in_ready pattern of
// node_ctrl); its 24 LLRs leave on 24 consecutive clocks, the first 70 clock
// edges after the edge that accepted it (64 candidates, 4 node stages, 1 MMU
// register, 1 LCU load).  Throughput is 24 LLRs per 64 clocks.
module soft_detector
  import mimo_pkg::*;
#(
  parameter int unsigned LW   = 8,
  parameter int unsigned CLIP = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  row_t [NT:1]          in_rows,
  output logic                 endbit,
  output logic                 llr_valid,
  output logic signed [LW-1:0] llr,
  output logic [2:0]           llr_ant,
  output logic [2:0]           llr_bit,
  output logic                 llr_last,
  output logic [NT:1]          pruned     // a path was pruned at this level (activity monitor)
);

  row_t [NT:1]   buf_rows;
  path_t [NT:0]  p;
  row_t [NT:1]   row_reg;
  row_t [NT:1]   row_use;
  logic [MW-1:0] radius [NT:1];
  logic [MW-1:0] d_unused [NT:1];

  logic                         bm_valid;
  logic [NT:1][BPS-1:0]         bm_a;
  logic [NT:1][BPS-1:0][MW-1:0] bm_c;
  logic [MW-1:0]                bm_da, cur_d;
  mf_e                          bm_mf;
  logic                         cur_tag, cur_ok;

  node_ctrl #(.ZIGZAG(1'b1)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_rows,
    .in_mf(MF_64QAM), .in_na(2'd3),
    .path_o(p[NT]), .rows(buf_rows), .endbit
  );

  for (genvar l = NT; l >= 1; l--) begin : g_level
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                           row_reg[l] <= '0;
      else if (p[l].valid && p[l].instr.ns) row_reg[l] <= buf_rows[l];
    end
    assign row_use[l] = (l == NT || p[l].instr.ns) ? buf_rows[l] : row_reg[l];

    // ns / tag steer the radius to all ones for a symbol the MMU has not
    // started yet.
    assign radius[l] = (l == NT) ? MET_INF :
                       (cur_ok && cur_tag == p[l].tag && !p[l].instr.ns) ?
                         sat_add(cur_d, MW'(CLIP)) : MET_INF;

    mcu #(.LEVEL(l)) u_mcu (
      .clk, .rst_n,
      .path_i (p[l]),
      .row    (row_use[l]),
      .radius (radius[l]),
      .path_o (p[l-1]),
      .d_comb (d_unused[l])
    );
  end

  // A path is pruned at level l when it enters live and leaves marked dead.
  for (genvar l = NT; l >= 1; l--) begin : g_pruned
    assign pruned[l] = p[l-1].valid && p[l].live && !p[l-1].live;
  end

  bitmetric_proc #(.PERMUTED(1'b0)) u_mmu (
    .clk, .rst_n, .path_i(p[0]), .pi(2'd0),
    .out_valid(bm_valid), .out_a(bm_a), .out_c(bm_c), .out_da(bm_da), .out_mf(bm_mf),
    .cur_d, .cur_tag, .cur_ok
  );

  llr_proc #(.LW(LW), .CLIP(CLIP)) u_lcu (
    .clk, .rst_n, .ld(bm_valid), .a(bm_a), .c(bm_c), .da(bm_da), .mf(bm_mf),
    .llr_valid, .llr, .llr_ant, .llr_bit, .llr_last
  );

endmodule
