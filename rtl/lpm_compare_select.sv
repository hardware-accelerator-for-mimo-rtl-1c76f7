// lpm_compare_select: N-operand minimum by longest-prefix-matching bit
// elimination.
//
// Instead of a tree of two-operand comparators, all contenders are examined
// together one bit column at a time, starting at the most significant bit:
// in a column where at least one remaining contender has a 0, every contender
// with a 1 is eliminated (it is certainly larger); a column where all agree
// eliminates nobody.  After the least significant column the survivors all
// hold the minimum; the lowest-numbered survivor wins (design choice for
// ties).  The source describes the circuit for finding a maximum; the minimum
// used by the sphere decoder is the same elimination with the bit values
// inverted.
//
// Interface: combinational.  `en` marks the operands taking part; `any` is
// low when none does (then win is zero and idx/min are don't-care zeros).
module lpm_compare_select #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 22
) (
  input  logic [N-1:0][W-1:0]     val,
  input  logic [N-1:0]            en,
  output logic [N-1:0]            win,      // one-hot winner
  output logic [$clog2(N)-1:0]    idx,
  output logic [W-1:0]            min,
  output logic                    any
);

  always_comb begin
    logic [N-1:0] alive, zeros;
    alive = en;
    for (int b = W - 1; b >= 0; b--) begin
      for (int k = 0; k < N; k++) zeros[k] = alive[k] && !val[k][b];
      if (zeros != '0) alive = zeros;
    end
    win = '0;
    idx = '0;
    min = '0;
    for (int k = N - 1; k >= 0; k--)
      if (alive[k]) begin
        win = N'(1) << k;
        idx = $clog2(N)'(k);
        min = val[k];
      end
    any = (en != '0);
  end

endmodule
