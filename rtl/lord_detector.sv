// lord_detector: on-the-fly configurable soft-output MIMO detector (4x4,
// QPSK / 16-QAM / 64-QAM) based on layered orthogonal lattice detection with
// metric recycling.
//
// For every vector symbol the node array evaluates four sets of eta paths,
// one per column permutation of the channel (lord_ctrl): all eta candidates
// of the top-level antenna of that permutation, each extended by its best
// child down the tree.  The bit-metric processor treats the 4*eta paths of
// the four sets as one group (metric recycling: a bit's best counter-
// hypothesis may come from any set); its pi^-1 stage maps tree levels back to
// antennas using the permutation number that travels with each path.  The
// serial LLR processor then emits 4*log2(eta) LLRs, max-log, positive meaning
// bit 1.  No clipping is applied by default (CLIP = largest finite distance),
// so LW = MW + 1 holds any LLR; a bit with no counter-hypothesis gets +/-CLIP.
//
// Structure: lord_ctrl -> mcu level 4 .. 1 -> bitmetric_proc (PERMUTED) ->
// llr_proc.  Each level loads its row register (y_hat_i, R_i,* of the current
// permutation) when a path with NP reaches it.  MF, NS, NP and pi travel with
// the path, so the modulation changes from one symbol to the next without a
// lost cycle; the only stall is lord_ctrl's guard of the serial LLR processor
// (QPSK right after 64-QAM).
//
// Timing: 4*eta clocks per vector symbol (16, 64, 256); the first LLR comes
// 4*eta + 6 clock edges after the edge that accepted the symbol (4*eta paths,
// 4 node stages, MMU register, LLR load) and the rest on the following
// clocks.  Throughput log2(eta)/eta bits per clock.
module lord_detector
  import mimo_pkg::*;
#(
  parameter int unsigned LW   = MW + 1,
  parameter int unsigned CLIP = (1 << MW) - 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  row_t [3:0][NT:1]     in_rows,     // in_rows[k]: system of permutation k
  input  mf_e                  in_mf,
  output logic                 endbit,
  output logic                 stall,
  output logic                 llr_valid,
  output logic signed [LW-1:0] llr,
  output logic [2:0]           llr_ant,
  output logic [2:0]           llr_bit,
  output logic                 llr_last
);

  row_t [3:0][NT:1] buf_rows;
  path_t [NT:0]     p;
  row_t [NT:1]      row_reg;
  row_t [NT:1]      row_use;
  logic [MW-1:0]    d_unused [NT:1];

  logic                         bm_valid;
  logic [NT:1][BPS-1:0]         bm_a;
  logic [NT:1][BPS-1:0][MW-1:0] bm_c;
  logic [MW-1:0]                bm_da, cur_d;
  mf_e                          bm_mf;
  logic                         cur_tag, cur_ok;

  lord_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_rows, .in_mf,
    .path_o(p[NT]), .rows(buf_rows), .endbit, .stall
  );

  for (genvar l = NT; l >= 1; l--) begin : g_level
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                   row_reg[l] <= '0;
      else if (p[l].valid && p[l].np) row_reg[l] <= buf_rows[p[l].pi][l];
    end
    assign row_use[l] = (l == NT || p[l].np) ? buf_rows[p[l].pi][l] : row_reg[l];

    mcu #(.LEVEL(l)) u_mcu (
      .clk, .rst_n,
      .path_i (p[l]),
      .row    (row_use[l]),
      .radius (MET_INF),
      .path_o (p[l-1]),
      .d_comb (d_unused[l])
    );
  end

  bitmetric_proc #(.PERMUTED(1'b1)) u_mmu (
    .clk, .rst_n, .path_i(p[0]), .pi(p[0].pi),
    .out_valid(bm_valid), .out_a(bm_a), .out_c(bm_c), .out_da(bm_da), .out_mf(bm_mf),
    .cur_d, .cur_tag, .cur_ok
  );

  llr_proc #(.LW(LW), .CLIP(CLIP)) u_lcu (
    .clk, .rst_n, .ld(bm_valid), .a(bm_a), .c(bm_c), .da(bm_da), .mf(bm_mf),
    .llr_valid, .llr, .llr_ant, .llr_bit, .llr_last
  );

endmodule
