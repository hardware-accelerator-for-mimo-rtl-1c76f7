// hard_detector: run-time configurable hard-output MIMO detector.
//
// Detects a spatially multiplexed vector symbol s from y_hat = Q^H y and the
// upper triangular R of the channel's QR decomposition with the fixed
// complexity (COSIC / fixed-throughput sphere decoder) tree search: every one
// of the eta children of the root is evaluated at level 4, each of them is
// extended by its single best child at levels 3, 2 and 1, and the find-minimum
// unit keeps the complete path with the smallest distance.
//
// Structure (a systolic-like linear array):
//   node_ctrl  -- buffers the vector symbol, issues one top-level candidate
//                 per clock, generates NS/last/endbit
//   mcu L4..L1 -- one node per tree level, one register stage each
//   fmu        -- compare/select over the eta paths of one symbol
// Each level has a dedicated row register (y_hat_i, R_i,*) that is loaded
// when the NS flag of a new symbol reaches it, so a level can already work on
// the next symbol while the levels below finish the previous one.  Everything
// a node needs to reconfigure (instr = {MF, NS, NA}) travels with the path,
// so switching between QPSK, 16-QAM and 64-QAM or between 2x2, 3x3 and 4x4
// costs no cycle.
//
// Smaller systems: an n x n problem is loaded into levels 4 .. 5-n (rows 4 ..
// 5-n of `in_rows`); the levels below pass the path through and report the
// symbol 0 (design choice, the detector reports unused antennas as 0).
//
// Timing: a symbol occupies the array input for eta cycles (4, 16, 64), so the
// throughput is n*log2(eta)/eta bits per clock.  est_valid is set by the
// (eta + 4)-th clock edge after the edge that accepted the symbol (4 node
// stages, eta-1 further candidates, 1 for the FMU register).
module hard_detector
  import mimo_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  row_t [NT:1]   in_rows,
  input  mf_e           in_mf,
  input  logic [1:0]    in_na,
  output logic          endbit,
  output logic          est_valid,
  output sym_t [NT:1]   est_s,
  output logic [MW-1:0] est_d,
  output mf_e           est_mf
);

  row_t [NT:1]  buf_rows;
  path_t [NT:0] p;           // p[4]: into level 4 ... p[0]: out of level 1
  row_t [NT:1]  row_reg;
  row_t [NT:1]  row_use;
  logic [MW-1:0] d_unused [NT:1];

  node_ctrl #(.ZIGZAG(1'b0)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_rows, .in_mf, .in_na,
    .path_o(p[NT]), .rows(buf_rows), .endbit
  );

  for (genvar l = NT; l >= 1; l--) begin : g_level
    // Dedicated row register of level l, refreshed on NS.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                               row_reg[l] <= '0;
      else if (p[l].valid && p[l].instr.ns)     row_reg[l] <= buf_rows[l];
    end
    assign row_use[l] = (l == NT || p[l].instr.ns) ? buf_rows[l] : row_reg[l];

    mcu #(.LEVEL(l)) u_mcu (
      .clk, .rst_n,
      .path_i (p[l]),
      .row    (row_use[l]),
      .radius (MET_INF),
      .path_o (p[l-1]),
      .d_comb (d_unused[l])
    );
  end

  fmu u_fmu (
    .clk, .rst_n, .path_i(p[0]),
    .est_valid, .est_s, .est_d, .est_mf
  );

endmodule
