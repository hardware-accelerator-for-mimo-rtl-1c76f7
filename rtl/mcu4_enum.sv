// mcu4_enum: top-level node unit of the staggered sphere decoder, listing the
// children of the root in ascending order of their partial distance.
//
// The constellation is split into its sqrt(eta) columns (points sharing a
// real part).  Inside a column the order of the points by distance from
// c = y_hat_4 depends only on where Im(c) lies, and it is the same order for
// every column; zz_enum derives it (nearest imaginary level, then alternately
// outward, which is ascending for a one-dimensional lattice).  Each column k
// has a counter cntr_k pointing at its best point not yet issued (PC_k, the
// symbol frontier); a partial-distance unit per column computes that point's
// distance |Re(c) - R44 a_k| + |Im(c) - R44 b_k| (l1 norm), saturated to all
// ones once the column is exhausted (counter = sqrt(eta)); the LPM
// compare/select finds the smallest of these (the metric frontier).  That
// point is the next child in ascending order; `adv` advances its column's
// counter.
//
// Interface: `start` (one cycle) resets the counters for a new symbol whose
// y4/r44/mf are held stable at the inputs for as long as it is enumerated.
// The candidate (cand_valid, cand_s, cand_d) is combinational from the
// counters; `adv` consumes it at the next clock edge.  One child per clock.
module mcu4_enum
  import mimo_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 adv,
  input  cplx_t                y4,
  input  logic signed [DW-1:0] r44,
  input  mf_e                  mf,
  output logic                 cand_valid,
  output sym_t                 cand_s,
  output logic [MW-1:0]        cand_d
);

  logic [7:0][3:0]    cntr;
  comp_t              im_ord [8];
  logic [7:0][MW-1:0] pd;
  logic [7:0]         col_en;
  sym_t [7:0]         fs;
  logic [7:0]         win;
  logic [2:0]         kmin;
  logic [MW-1:0]      dmin;
  logic               any;

  zz_enum u_pc_order (.c(CW'(y4.im)), .rii(r44), .mf(mf), .order(im_ord));

  // PC_k and PDU per column
  always_comb begin
    int half, nlev;
    half = 1 << (mf_axis_bits(mf) - 1);
    nlev = 2 * half;
    for (int k = 0; k < 8; k++) begin
      logic signed [CW-1:0] er, ei;
      fs[k].re  = (k < half) ? {1'b1, 2'(half - 1 - k)} : {1'b0, 2'(k - half)};
      fs[k].im  = im_ord[cntr[k][2:0]];
      col_en[k] = (k < nlev) && (int'(cntr[k]) < nlev);
      er = CW'(y4.re) - CW'(mul_comp(r44, fs[k].re));
      ei = CW'(y4.im) - CW'(mul_comp(r44, fs[k].im));
      pd[k] = col_en[k] ? sat_add(MW'(abs_c(er)), MW'(abs_c(ei))) : MET_INF;
    end
  end

  lpm_compare_select #(.N(8), .W(MW)) u_cmpsel (
    .val(pd), .en(col_en), .win(win), .idx(kmin), .min(dmin), .any(any)
  );

  assign cand_valid = any;
  assign cand_s     = fs[kmin];
  assign cand_d     = dmin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cntr <= '0;
    end else if (start) begin
      cntr <= '0;
    end else if (adv && any) begin
      for (int k = 0; k < 8; k++)
        if (win[k]) cntr[k] <= cntr[k] + 4'd1;
    end
  end

endmodule
