// lord_ctrl: control unit and top-level enumerator of the LORD soft detector.
//
// A vector symbol for layered orthogonal lattice detection comes as four
// triangular systems, one per column permutation of the channel (four QR
// decompositions): in permutation pi the tree level lvl holds antenna ant
// with lvl = ((ant - 1 + pi) mod 4) + 1, so antenna 4 - pi sits at the top
// level (permutation 0 is the natural order, permutation 1 puts s_3 on top,
// and so on).  The unit buffers the four systems and issues, one per clock,
// the eta top-level candidates of permutation 0, then those of 1, 2 and 3:
// 4*eta paths per vector symbol, column by column from the most negative
// level.  The first path of the symbol carries NS, the first of each
// permutation NP, every path its permutation number pi; the last one `last`,
// and `endbit` is high in the cycle it is issued.
//
// Stall: the serial LLR processor needs 4*log2(eta) clocks per symbol, while
// a symbol spends 4*eta clocks in the array.  Only a QPSK symbol that follows
// a 64-QAM one could overrun it (16 < 24).  The document avoids this by
// ordering the symbols by modulation; this unit instead holds in_ready low
// until elapsed + 4*eta_new >= 4*log2(eta_prev) clocks, elapsed counting from
// the last candidate of the previous symbol (design choice).  Every other
// sequence, including any switch upwards, runs back to back.
//
// Interface: in_valid/in_ready handshake; in_rows[k] is the system of
// permutation k.  `rows` gives the buffered systems of the symbol being
// issued; they stay valid for 4*eta >= 16 cycles after its first candidate.
module lord_ctrl
  import mimo_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  row_t [3:0][NT:1] in_rows,
  input  mf_e              in_mf,
  output path_t            path_o,
  output row_t [3:0][NT:1] rows,
  output logic             endbit,
  output logic             stall      // a waiting symbol is held back (LLR processor guard)
);

  logic       busy, tag;
  logic [7:0] cnt;
  logic [7:0] elapsed;
  mf_e        mf, prev_mf;
  logic       is_last, accept, guard_ok;

  function automatic logic [8:0] llr_count(mf_e f);   // 4 * log2(eta)
    return 9'(8 * mf_axis_bits(f));
  endfunction

  function automatic logic [8:0] path_count(mf_e f);  // 4 * eta
    return 9'(4 * (32'(mf_last(f)) + 1));
  endfunction

  assign is_last  = busy && (cnt == 8'(path_count(mf) - 9'd1));
  assign guard_ok = (9'(is_last ? 8'd0 : elapsed) + path_count(in_mf)) >= llr_count(busy ? mf : prev_mf);
  assign in_ready = (!busy || is_last) && guard_ok;
  assign accept   = in_valid && in_ready;
  assign endbit   = is_last;
  assign stall    = in_valid && (!busy || is_last) && !guard_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      tag     <= 1'b0;
      mf      <= MF_QPSK;
      prev_mf <= MF_QPSK;
      elapsed <= '1;
      rows    <= '0;
    end else begin
      if (is_last)              elapsed <= 8'd1;
      else if (elapsed != '1)   elapsed <= elapsed + 8'd1;
      if (accept) begin
        busy    <= 1'b1;
        cnt     <= '0;
        tag     <= ~tag;
        mf      <= in_mf;
        prev_mf <= busy ? mf : prev_mf;
        rows    <= in_rows;
      end else if (busy) begin
        if (is_last) begin
          busy    <= 1'b0;
          prev_mf <= mf;
        end
        cnt <= cnt + 8'd1;
      end
    end
  end

  always_comb begin
    int unsigned ab, half;
    logic [5:0]  k;
    logic [2:0]  ci, ri;
    ab   = mf_axis_bits(mf);
    half = 1 << (ab - 1);
    k    = 6'(cnt & ((8'd1 << (2 * ab)) - 8'd1));   // candidate within the permutation
    ci   = 3'(k >> ab);
    ri   = 3'(k & ((6'd1 << ab) - 6'd1));
    path_o          = '0;
    path_o.valid    = busy;
    path_o.live     = busy;
    path_o.last     = is_last;
    path_o.tag      = tag;
    path_o.np       = busy && (k == 6'd0);
    path_o.pi       = 2'(cnt >> (2 * ab));
    path_o.instr.mf = mf;
    path_o.instr.ns = busy && (cnt == 8'd0);
    path_o.instr.na = 2'd3;
    path_o.s[NT].re = (32'(ci) < half) ? {1'b1, 2'(half - 1 - 32'(ci))} : {1'b0, 2'(32'(ci) - half)};
    path_o.s[NT].im = (32'(ri) < half) ? {1'b1, 2'(half - 1 - 32'(ri))} : {1'b0, 2'(32'(ri) - half)};
  end

endmodule
