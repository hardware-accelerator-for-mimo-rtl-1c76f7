// fmu: find-minimum unit of the hard detector.
//
// Receives the complete paths leaving the level-1 node, one per clock, and
// keeps the one with the smallest Euclidean distance (l1 norm) as the
// intermediate estimate.  The first path of a vector symbol (NS set) replaces
// the intermediate estimate outright instead of being compared with it, so the
// estimates of consecutive symbols never mix; the compare/select loop is the
// only feedback path in the hard detector.  When the path marked `last`
// arrives, the winner is presented as the final estimate s_hat.  On equal
// distances the earlier path is kept (design choice).
//
// Interface and timing: path_i is sampled every clock; est_valid pulses for one
// cycle, one clock after the last path of a symbol was at path_i, with the
// symbols est_s[4:1], their distance est_d and the symbol's modulation format.
module fmu
  import mimo_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  path_t         path_i,
  output logic          est_valid,
  output sym_t [NT:1]   est_s,
  output logic [MW-1:0] est_d,
  output mf_e           est_mf
);

  sym_t [NT:1]   best_s;
  logic [MW-1:0] best_d;
  sym_t [NT:1]   sel_s;
  logic [MW-1:0] sel_d;

  // Compare/select, with NS forcing the new path through (mux M4).
  always_comb begin
    if (path_i.instr.ns || (path_i.d < best_d)) begin
      sel_s = path_i.s;
      sel_d = path_i.d;
    end else begin
      sel_s = best_s;
      sel_d = best_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_s    <= '0;
      best_d    <= MET_INF;
      est_valid <= 1'b0;
      est_s     <= '0;
      est_d     <= '0;
      est_mf    <= MF_QPSK;
    end else begin
      est_valid <= path_i.valid && path_i.last;
      if (path_i.valid) begin
        best_s <= sel_s;
        best_d <= sel_d;
        if (path_i.last) begin
          est_s  <= sel_s;
          est_d  <= sel_d;
          est_mf <= path_i.instr.mf;
        end
      end
    end
  end

endmodule
