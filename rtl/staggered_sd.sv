// staggered_sd: staggered sphere decoder (hard output, 4x4, QPSK / 16-QAM /
// 64-QAM) running the fixed-complexity tree search with radius reduction and
// pruning.
//
// One node unit per tree level works in a staggered schedule: in every clock
// mcu4_enum issues the next child of the root in ascending order of partial
// distance, while the units of levels 3, 2 and 1 extend the children issued
// one, two and three clocks earlier by their best child.  Every unit checks
// the sphere constraint against the current radius (a path whose partial
// distance exceeds it is pruned and not computed further), and every leaf
// that arrives may shrink the radius: radius = distance of the best leaf so
// far, updated each clock.  Because the root's children come in ascending
// order, the first child above the radius ends the search (no later child can
// do better); so does running out of children.  Once the last issued path has
// left the array the best leaf is the estimate.  The result equals the best
// of the eta fixed-complexity paths, but the run time depends on the channel
// and noise: between 1 and eta top-level nodes are visited.
//
// Interface: in_valid/in_ready; a symbol is accepted only when the decoder is
// idle (one symbol at a time).  est_valid pulses with est_s/est_d, est_nodes
// (top-level nodes issued) and est_cycles (clocks from acceptance to the
// estimate).  Timing: with n top-level nodes issued, est_valid is registered
// n + 6 clock edges after the accepting edge (1 start, n issue clocks, 1 stop
// decision, 3 drain, 1 output register); the next symbol may be accepted in
// the clock after est_valid.
//
// Reset is asynchronous, active low.  The radius starts at all ones for
// every symbol (no initial radius).  The l1 norm is used throughout.
module staggered_sd
  import mimo_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  row_t [NT:1]   in_rows,
  input  mf_e           in_mf,
  output logic          est_valid,
  output sym_t [NT:1]   est_s,
  output logic [MW-1:0] est_d,
  output logic [6:0]    est_nodes,
  output logic [8:0]    est_cycles
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_DRAIN} state_e;

  state_e        state;
  row_t [NT:1]   rows;
  mf_e           mf;
  logic [6:0]    nodes;
  logic [8:0]    cycles;
  logic [MW-1:0] radius;
  sym_t [NT:1]   best_s;

  logic          cand_valid, issue;
  sym_t          cand_s;
  logic [MW-1:0] cand_d;
  path_t [NT:0]  p;
  logic [MW-1:0] d_unused [NT:1];
  logic          array_busy;

  assign in_ready = (state == S_IDLE);

  mcu4_enum u_enum (
    .clk, .rst_n,
    .start (state == S_START),
    .adv   (issue),
    .y4    (rows[NT].y),
    .r44   (rows[NT].r[NT].re),
    .mf,
    .cand_valid, .cand_s, .cand_d
  );

  // Sphere check at the root: ascending order, so the first failure stops it.
  assign issue = (state == S_RUN) && cand_valid && (cand_d <= radius);

  always_comb begin
    p[NT]          = '0;
    p[NT].valid    = issue;
    p[NT].live     = issue;
    p[NT].instr.mf = mf;
    p[NT].instr.na = 2'd3;
    p[NT].instr.ns = issue && (nodes == '0);
    p[NT].s[NT]    = cand_s;
  end

  for (genvar l = NT; l >= 1; l--) begin : g_level
    mcu #(.LEVEL(l)) u_mcu (
      .clk, .rst_n,
      .path_i (p[l]),
      .row    (rows[l]),
      .radius (radius),
      .path_o (p[l-1]),
      .d_comb (d_unused[l])
    );
  end

  assign array_busy = p[3].valid || p[2].valid || p[1].valid || p[0].valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rows       <= '0;
      mf         <= MF_QPSK;
      nodes      <= '0;
      cycles     <= '0;
      radius     <= MET_INF;
      best_s     <= '0;
      est_valid  <= 1'b0;
      est_s      <= '0;
      est_d      <= '0;
      est_nodes  <= '0;
      est_cycles <= '0;
    end else begin
      est_valid <= 1'b0;
      if (state != S_IDLE) cycles <= cycles + 9'd1;
      // radius update from the leaf level
      if (p[0].valid && p[0].live && p[0].d < radius) begin
        radius <= p[0].d;
        best_s <= p[0].s;
      end
      case (state)
        S_IDLE: if (in_valid) begin
          rows   <= in_rows;
          mf     <= in_mf;
          nodes  <= '0;
          cycles <= 9'd1;
          radius <= MET_INF;
          state  <= S_START;
        end
        S_START: state <= S_RUN;
        S_RUN: begin
          if (issue) nodes <= nodes + 7'd1;
          else       state <= S_DRAIN;
        end
        default: if (!array_busy) begin   // S_DRAIN: last paths have left
          est_valid  <= 1'b1;
          est_s      <= best_s;
          est_d      <= radius;
          est_nodes  <= nodes;
          est_cycles <= cycles;
          state      <= S_IDLE;
        end
      endcase
    end
  end

endmodule
