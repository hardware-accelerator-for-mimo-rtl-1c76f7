// mimo_pkg: types, constants and arithmetic helpers shared by the MIMO
// detector blocks.
//
// Number formats
//   * Channel and received-vector entries (y_hat = Q^H y and the upper
//     triangular R) are signed two's-complement fixed point, DW = 11 bits per
//     real/imaginary part, the word length the design was sized for.  The
//     diagonal R_ii is real and positive.
//   * A QAM component (real or imaginary part of a symbol) is 3-bit
//     sign-magnitude: bit 2 is the sign, bits 1:0 a magnitude index m, and the
//     value is +/-(2m+1), i.e. one of +/-1, +/-3, +/-5, +/-7.  A symbol is the
//     6-bit pair {re, im}.  QPSK uses m = 0 only, 16-QAM m = 0..1, 64-QAM
//     m = 0..3.
//   * Path metrics use the l1 norm |Re e| + |Im e| per level and are kept at
//     full precision in MW = 22 unsigned bits; all ones stands for "infinite".
//
// Products R_ij * s_j are formed with shifts and adds only, since the symbol
// components are small odd integers; no multiplier is used anywhere.
package mimo_pkg;

  localparam int unsigned NT = 4;          // transmit antennas = tree levels
  localparam int unsigned DW = 11;         // input word length (per re/im part)
  localparam int unsigned CW = DW + 6;     // width of c_{i+1} and of e_i
  localparam int unsigned MW = 22;         // path-metric word length
  localparam int unsigned BPS = 6;         // label bits per symbol, 64-QAM
  localparam logic [MW-1:0] MET_INF = '1;  // "infinite" metric

  // Modulation format code, MF[1:0]
  typedef enum logic [1:0] {
    MF_QPSK  = 2'b00,
    MF_16QAM = 2'b01,
    MF_64QAM = 2'b10
  } mf_e;

  typedef logic [2:0] comp_t;              // sign-magnitude QAM component

  typedef struct packed {
    comp_t re;
    comp_t im;
  } sym_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // One row of the triangular system as seen by the node of level i:
  // y_hat_i and R_i,1..R_i,4 (only R_i,i..R_i,4 are used; R_ii in .r[i].re).
  typedef struct packed {
    cplx_t            y;
    cplx_t [NT:1]     r;
  } row_t;

  // Control word travelling with every path, instr = {MF, NS, NA}.
  // NA = number of antennas - 1 (2'b01: 2x2, 2'b10: 3x3, 2'b11: 4x4).
  typedef struct packed {
    mf_e        mf;
    logic       ns;
    logic [1:0] na;
  } instr_t;

  // A candidate path flowing down the node array.
  typedef struct packed {
    logic            valid;   // a path occupies this pipeline slot
    logic            live;    // not pruned (always 1 in the hard detector)
    logic            last;    // last top-level node of this vector symbol
    logic            tag;     // toggles from one vector symbol to the next
    logic            np;      // first path of a new permutation (LORD)
    logic [1:0]      pi;      // permutation the path belongs to (LORD)
    instr_t          instr;
    sym_t [NT:1]     s;       // symbols decided so far (levels above)
    logic [MW-1:0]   d;       // partial Euclidean distance d_i (l1 norm)
  } path_t;

  // Largest magnitude index of the constellation.
  function automatic logic [1:0] mf_maxmag(mf_e mf);
    case (mf)
      MF_QPSK:  return 2'd0;
      MF_16QAM: return 2'd1;
      default:  return 2'd3;
    endcase
  endfunction

  // log2(sqrt(eta)): bits per real or imaginary component.
  function automatic int unsigned mf_axis_bits(mf_e mf);
    case (mf)
      MF_QPSK:  return 1;
      MF_16QAM: return 2;
      default:  return 3;
    endcase
  endfunction

  // eta - 1: index of the last top-level node of a vector symbol.
  function automatic logic [5:0] mf_last(mf_e mf);
    case (mf)
      MF_QPSK:  return 6'd3;
      MF_16QAM: return 6'd15;
      default:  return 6'd63;
    endcase
  endfunction

  // r * (+/-(2m+1)) by shift and add.
  function automatic logic signed [DW+3:0] mul_comp(logic signed [DW-1:0] r,
                                                     comp_t c);
    logic signed [DW+3:0] r1, t;
    r1 = (DW+4)'(r);
    t  = r1;
    if (c[0]) t = t + (r1 <<< 1);
    if (c[1]) t = t + (r1 <<< 2);
    return c[2] ? -t : t;
  endfunction

  // Real and imaginary parts of R * s, R = u + jv, s = a + jb:
  //   re = u*a - v*b,  im = u*b + v*a
  function automatic logic signed [CW-1:0] cmul_re(cplx_t r, sym_t s);
    return CW'(mul_comp(r.re, s.re)) - CW'(mul_comp(r.im, s.im));
  endfunction
  function automatic logic signed [CW-1:0] cmul_im(cplx_t r, sym_t s);
    return CW'(mul_comp(r.re, s.im)) + CW'(mul_comp(r.im, s.re));
  endfunction

  function automatic logic [CW-1:0] abs_c(logic signed [CW-1:0] v);
    return v[CW-1] ? CW'(-v) : CW'(v);
  endfunction

  // Metric addition that saturates at MET_INF.
  function automatic logic [MW-1:0] sat_add(logic [MW-1:0] a, logic [MW-1:0] b);
    logic [MW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[MW] ? MET_INF : s[MW-1:0];
  endfunction

  // Gray label of one component: the level index p = (v+7)/2 (v = -7..7 for
  // 64-QAM, scaled to the axis of the smaller constellations) is Gray coded,
  // most significant bit first.  Returned right-aligned in 3 bits.
  function automatic logic [2:0] comp_label(comp_t c, mf_e mf);
    logic [2:0] p;
    case (mf)
      MF_QPSK:  p = {2'b00, ~c[2]};
      MF_16QAM: p = c[2] ? {1'b0, 1'b0, ~c[0]} : {1'b0, 1'b1, c[0]};
      default:  p = c[2] ? {1'b0, ~c[1:0]}      : {1'b1, c[1:0]};
    endcase
    return p ^ (p >> 1);
  endfunction

  // Label of a whole symbol, 6 bits: {re label, im label}, each right-aligned
  // in 3 bits.  Bit j of the LLR output order is bit (5-j) of this word for
  // 64-QAM; see llr_proc for the order used with smaller constellations.
  function automatic logic [BPS-1:0] sym_label(sym_t s, mf_e mf);
    return {comp_label(s.re, mf), comp_label(s.im, mf)};
  endfunction

endpackage
