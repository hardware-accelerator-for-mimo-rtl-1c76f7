// node_ctrl: control unit and top-level enumerator of a node array.
//
// Accepts one vector symbol at a time (its triangular rows y_hat_i, R_i,*
// together with the modulation format MF and the antenna count NA), keeps it
// in a local buffer and issues its eta top-level candidates s_4, one per
// clock, into the level-4 node.  The first candidate carries NS (new symbol),
// the last one `last`; `endbit` is high in the cycle the last candidate is
// issued, so with a steady input it pulses once every eta cycles (4, 16 or 64
// cycles for QPSK, 16-QAM, 64-QAM).  The next vector symbol is accepted in
// that same cycle, so candidates of consecutive symbols follow each other with
// no gap even when the modulation changes.
//
// Candidate order: with ZIGZAG = 0 the constellation is walked column by
// column in a fixed order (every candidate is evaluated anyway).  With
// ZIGZAG = 1 the columns and the points inside a column follow the zig-zag
// order of zz_enum around y_hat_4/R_44, so that good candidates come first
// and the radius used for pruning shrinks early.
//
// Interface: in_valid/in_ready handshake; a symbol is taken in a cycle where
// both are high.  `rows` gives the buffered rows of the symbol being issued;
// they stay stable for at least eta >= 4 cycles after its first candidate,
// long enough for the lower levels to pick them up when NS reaches them.
module node_ctrl
  import mimo_pkg::*;
#(
  parameter bit ZIGZAG = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  row_t [NT:1] in_rows,
  input  mf_e         in_mf,
  input  logic [1:0]  in_na,
  output path_t       path_o,     // candidate for the level-4 node
  output row_t [NT:1] rows,       // buffered rows of the symbol being issued
  output logic        endbit
);

  logic        busy, tag;
  logic [5:0]  cnt;
  mf_e         mf;
  logic [1:0]  na;
  comp_t       col_ord [8];
  comp_t       row_ord [8];
  comp_t       zz_re [8];
  comp_t       zz_im [8];
  logic        is_last, accept;

  zz_enum u_zz_re (.c(CW'(rows[NT].y.re)), .rii(rows[NT].r[NT].re), .mf(mf), .order(zz_re));
  zz_enum u_zz_im (.c(CW'(rows[NT].y.im)), .rii(rows[NT].r[NT].re), .mf(mf), .order(zz_im));

  // Fixed order: level index 0..L-1 from the most negative level.
  always_comb begin
    int half;
    half = 1 << (mf_axis_bits(mf) - 1);
    for (int k = 0; k < 8; k++) begin
      comp_t fixed;
      fixed = (k < half) ? {1'b1, 2'(half - 1 - k)} : {1'b0, 2'(k - half)};
      col_ord[k] = ZIGZAG ? zz_re[k] : fixed;
      row_ord[k] = ZIGZAG ? zz_im[k] : fixed;
    end
  end

  assign is_last  = busy && (cnt == mf_last(mf));
  assign in_ready = !busy || is_last;
  assign accept   = in_valid && in_ready;
  assign endbit   = is_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      tag  <= 1'b0;
      mf   <= MF_QPSK;
      na   <= 2'd3;
      rows <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      cnt  <= '0;
      tag  <= ~tag;
      mf   <= in_mf;
      na   <= in_na;
      rows <= in_rows;
    end else if (busy) begin
      if (is_last) busy <= 1'b0;
      cnt <= cnt + 6'd1;
    end
  end

  always_comb begin
    int unsigned ab;
    logic [2:0]  ci, ri;
    ab = mf_axis_bits(mf);
    ci = 3'(cnt >> ab);
    ri = 3'(cnt & ((6'd1 << ab) - 6'd1));
    path_o            = '0;
    path_o.valid      = busy;
    path_o.live       = busy;
    path_o.last       = is_last;
    path_o.tag        = tag;
    path_o.instr.mf   = mf;
    path_o.instr.ns   = busy && (cnt == 6'd0);
    path_o.instr.na   = na;
    path_o.s[NT]      = '{re: col_ord[ci], im: row_ord[ri]};
    path_o.d          = '0;
  end

endmodule
