// llr_proc: serial LLR processor (LLR computation unit).
//
// Holds a copy of the bit-metric processor's result for one vector symbol:
// c_reg_ij (best distance with bit (i, j) complemented), a_ij (label bits of
// the best path) and d_a_reg (best distance), and reads them out one bit per
// clock through an address decoder driven by a small sequencer.  For every
// bit it forms the max-log LLR
//   L_ij = c_ij - d_a   if a_ij = 1,      L_ij = d_a - c_ij   if a_ij = 0,
// positive meaning "bit is 1", and clips the magnitude to CLIP; a bit with no
// counter-hypothesis (c_ij infinite) gets +/-CLIP.  The modulation format of
// the symbol sets how many bits are read: antennas i = 1..4, and for each the
// log2(eta) label bits, real-part bits first, most significant first.
//
// Interface and timing: `ld` copies the inputs (one cycle); the LLRs follow on
// the next 4*log2(eta) clocks, one per clock with llr_valid high, llr_ant
// (1..4) and llr_bit (0..log2(eta)-1) naming the bit, llr_last on the final
// one.  The processor is serial, so a new `ld` must not arrive while it is
// still reading out (checked by an assertion); the detector's schedule
// guarantees this.
module llr_proc
  import mimo_pkg::*;
#(
  parameter int unsigned   LW   = 8,     // LLR output width, signed
  parameter int unsigned   CLIP = 3      // LLR magnitude limit, in metric LSBs
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ld,
  input  logic [NT:1][BPS-1:0]         a,
  input  logic [NT:1][BPS-1:0][MW-1:0] c,
  input  logic [MW-1:0]                da,
  input  mf_e                          mf,
  output logic                         llr_valid,
  output logic signed [LW-1:0]         llr,
  output logic [2:0]                   llr_ant,
  output logic [2:0]                   llr_bit,
  output logic                         llr_last
);

  logic [NT:1][BPS-1:0]         a_reg;
  logic [NT:1][BPS-1:0][MW-1:0] c_reg;
  logic [MW-1:0]                da_reg;
  mf_e                          mf_reg;
  logic                         busy;
  logic [2:0]                   ant, bitn;

  // Address decoder: bit `bitn` of antenna `ant` in the stored 6-bit label
  // {re[2:0], im[2:0]} (both right-aligned).
  logic [2:0]    ab;
  logic [2:0]    pos;
  logic          a_bit;
  logic [MW-1:0] c_sel, diff, mag;
  logic          at_end;

  always_comb begin
    ab = 3'(mf_axis_bits(mf_reg));
    if (bitn < ab) pos = 3'd3 + (ab - 3'd1 - bitn);
    else           pos = (3'd2 * ab) - 3'd1 - bitn;
    a_bit = a_reg[ant][pos];
    c_sel = c_reg[ant][pos];
    diff  = c_sel - da_reg;
    mag   = (c_sel == MET_INF || diff > MW'(CLIP)) ? MW'(CLIP) : diff;
    at_end = (ant == 3'(NT)) && (bitn == (3'd2 * ab) - 3'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg     <= '0;
      c_reg     <= '1;
      da_reg    <= '0;
      mf_reg    <= MF_QPSK;
      busy      <= 1'b0;
      ant       <= 3'd1;
      bitn      <= '0;
      llr_valid <= 1'b0;
      llr       <= '0;
      llr_ant   <= '0;
      llr_bit   <= '0;
      llr_last  <= 1'b0;
    end else begin
      llr_valid <= busy;
      llr_last  <= busy && at_end;
      if (busy) begin
        llr     <= a_bit ? LW'(mag) : -LW'(mag);
        llr_ant <= ant;
        llr_bit <= bitn;
      end
      if (ld) begin
        a_reg  <= a;
        c_reg  <= c;
        da_reg <= da;
        mf_reg <= mf;
        busy   <= 1'b1;
        ant    <= 3'd1;
        bitn   <= '0;
      end else if (busy) begin
        if (at_end) busy <= 1'b0;
        if (bitn == (3'd2 * ab) - 3'd1) begin
          bitn <= '0;
          ant  <= ant + 3'd1;
        end else begin
          bitn <= bitn + 3'd1;
        end
      end
    end
  end

  // A new symbol must not overwrite one that is still being read out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(ld && busy && !at_end))
    else $error("llr_proc: load while reading out");

endmodule
