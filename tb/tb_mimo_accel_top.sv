// tb_mimo_accel_top: end-to-end testbench of the accelerator top, at the
// default parameters (no parameter overrides on the top).
//
// Runs both detector cores at the same time.  The hard detector gets random
// vector symbols of every modulation format and antenna count, each compared
// with the integer reference model (best of the fixed-complexity paths), its
// latency (eta + 4 edges) and endbit checked.  The soft detector gets random
// 4x4 64-QAM symbols and every one of the 24 LLRs is compared with the
// clipped max-log value computed from all 64 paths, its first LLR 70 edges
// after acceptance.  Each mechanism of the design is counted and a failure is
// counted for one that never happened: modulation-format switch,
// antenna-count switch, back-to-back symbols (accepted on the edge the
// previous one finished), idle gaps, input stall (valid while not ready),
// node pruning, LLR clipping and bits with no counter-hypothesis.  The LORD
// detector gets random symbols of all three formats (four random triangular
// systems each, one per permutation) and every LLR is compared with the
// max-log value over the union of the four path sets; its format switches
// and the stall that protects its serial LLR processor are counted too.
// The staggered sphere decoder gets symbols with little and with heavy noise;
// its distance is compared with the best fixed-complexity path and its run
// time with the number of nodes it reports; both early termination and full
// searches must occur.  The multicore sphere decoder gets a stream of tones
// offered every clock; each result is matched by tone index against the best
// fixed-complexity path, and several cores must work at once with results
// returned out of order.
module tb_mimo_accel_top;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int HD_NSYM = 48;
  localparam int SD_NSYM = 20;
  localparam int CLIP    = 3;     // default of the top
  localparam int LW      = 8;
  localparam int LD_NSYM = 24;
  localparam int SP_NSYM = 45;
  localparam longint LD_CLIP = (longint'(1) << MW) - 2;   // default of the top

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b1;
  logic                 hd_in_valid = 1'b0, sd_in_valid = 1'b0;
  logic                 hd_in_ready, sd_in_ready;
  row_t [NT:1]          hd_in_rows, sd_in_rows;
  mf_e                  hd_in_mf;
  logic [1:0]           hd_in_na;
  logic                 hd_endbit, hd_est_valid, sd_endbit;
  sym_t [NT:1]          hd_est_s;
  logic [MW-1:0]        hd_est_d;
  mf_e                  hd_est_mf;
  logic                 sd_llr_valid, sd_llr_last;
  logic signed [LW-1:0] sd_llr;
  logic [2:0]           sd_llr_ant, sd_llr_bit;
  logic [NT:1]          sd_pruned;
  logic                 ld_in_valid = 1'b0, ld_in_ready;
  row_t [3:0][NT:1]     ld_in_rows;
  mf_e                  ld_in_mf;
  logic                 ld_endbit, ld_stall, ld_llr_valid, ld_llr_last;
  logic signed [MW:0]   ld_llr;
  logic [2:0]           ld_llr_ant, ld_llr_bit;
  logic                 sp_in_valid = 1'b0, sp_in_ready, sp_est_valid;
  row_t [NT:1]          sp_in_rows;
  mf_e                  sp_in_mf;
  sym_t [NT:1]          sp_est_s;
  logic [MW-1:0]        sp_est_d;
  logic [6:0]           sp_est_nodes;
  logic [8:0]           sp_est_cycles;
  logic                 mc_in_valid = 1'b0, mc_in_ready;
  row_t [NT:1]          mc_in_rows = '0;
  mf_e                  mc_in_mf = MF_QPSK;
  logic [8:0]           mc_in_tone = '0;
  logic [9:0]           mc_out_valid;
  logic [9:0][8:0]      mc_out_tone;
  sym_t [9:0][NT:1]     mc_out_s;
  logic [9:0][MW-1:0]   mc_out_d;
  localparam int MC_NT = 60;
  int mc_exp [MC_NT];
  int mc_seen [MC_NT];
  int mc_acc = 0, mc_out = 0, mc_last = -1, n_mc_ooo = 0, mc_par = 0;

  int checks = 0, failures = 0;
  int cycle = 0;
  bit hd_done = 0, sd_done = 0, ld_done = 0, sp_done = 0, mc_done = 0;

  // mechanism counters
  int n_mf_switch = 0, n_na_switch = 0, n_b2b = 0, n_gap = 0, n_stall = 0;
  int n_sp_early = 0, n_sp_full = 0;
  int n_ld_switch = 0, n_ld_stall = 0, n_ld_endbit = 0;
  int n_pruned = 0, n_clipped = 0, n_nocounter = 0, n_hd_endbit = 0, n_sd_endbit = 0;

  mimo_accel_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic row_t [NT:1] to_rows(prob_t p);
    row_t [NT:1] r;
    r = '0;
    for (int i = 1; i <= 4; i++) begin
      r[i].y.re = DW'(p.yre[i]);
      r[i].y.im = DW'(p.yim[i]);
      for (int j = i; j <= 4; j++) begin
        r[i].r[j].re = DW'(p.rre[i][j]);
        r[i].r[j].im = DW'(p.rim[i][j]);
      end
    end
    return r;
  endfunction

  // ---------------- hard detector ----------------
  typedef struct {
    int    t_acc;
    int    eta;
    int    mf;
    path_r exp;
  } hexp_t;
  hexp_t hq[$];

  function automatic path_r ref_detect(prob_t p, int mf, int n);
    path_r best, cand;
    int L;
    L = nlev(mf);
    best.d = -1;
    for (int a = 0; a < L; a++)
      for (int b = 0; b < L; b++) begin
        cand = extend(p, 2 * a - (L - 1), 2 * b - (L - 1), mf, n);
        if (best.d < 0 || cand.d < best.d) best = cand;
      end
    return best;
  endfunction

  initial begin
    int last_mf, last_n, t_free;
    last_mf = -1; last_n = -1; t_free = -1;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < HD_NSYM; k++) begin
      prob_t p;
      int mf, n;
      hexp_t e;
      mf = int'($urandom_range(0, 2));
      n  = int'($urandom_range(2, 4));
      p  = rand_prob(n, mf);
      if ($urandom_range(0, 3) == 0) begin
        n_gap++;
        repeat ($urandom_range(1, 6)) @(negedge clk);
      end
      hd_in_valid = 1'b1;
      hd_in_rows  = to_rows(p);
      hd_in_mf    = mf_e'(mf);
      hd_in_na    = 2'(n - 1);
      forever begin
        logic acc;
        acc = hd_in_ready;
        if (!acc) n_stall++;
        @(negedge clk);
        if (acc) break;
      end
      if (cycle == t_free) n_b2b++;
      e.t_acc = cycle;
      e.eta   = nlev(mf) * nlev(mf);
      e.mf    = mf;
      e.exp   = ref_detect(p, mf, n);
      t_free  = cycle + e.eta;
      hq.push_back(e);
      if (last_mf >= 0 && last_mf != mf) n_mf_switch++;
      if (last_n >= 0 && last_n != n) n_na_switch++;
      last_mf = mf; last_n = n;
      hd_in_valid = 1'b0;
    end
  end

  int n_est = 0;
  always @(negedge clk) begin
    if (hd_endbit) n_hd_endbit++;
    if (hd_est_valid) begin
      hexp_t e;
      n_est++;
      if (hq.size() == 0) begin
        failures++;
        $display("hard: unexpected estimate");
      end else begin
        e = hq.pop_front();
        checks++;
        if (hd_est_d != MW'(e.exp.d)) begin
          failures++;
          $display("hard %0d: metric %0d expected %0d", n_est, hd_est_d, e.exp.d);
        end
        for (int i = 1; i <= 4; i++) begin
          sym_t es;
          es.re = (e.exp.sre[i] == 0) ? 3'b0 : enc(e.exp.sre[i]);
          es.im = (e.exp.sim[i] == 0) ? 3'b0 : enc(e.exp.sim[i]);
          checks++;
          if (hd_est_s[i] !== es) begin
            failures++;
            $display("hard %0d level %0d: got %h expected %h", n_est, i, hd_est_s[i], es);
          end
        end
        checks++;
        if (int'(hd_est_mf) != e.mf) begin failures++; $display("hard %0d: wrong mf", n_est); end
        checks++;
        if (cycle - e.t_acc != e.eta + 4) begin
          failures++;
          $display("hard %0d: latency %0d expected %0d", n_est, cycle - e.t_acc, e.eta + 4);
        end
      end
      if (n_est == HD_NSYM) hd_done = 1;
    end
  end

  // ---------------- soft detector ----------------
  typedef struct {
    int t_acc;
    int L [5][6];
    int nocounter;
  } sexp_t;
  sexp_t sq[$];
  sexp_t scur;

  function automatic sexp_t ref_llr(prob_t p);
    sexp_t e;
    longint d0 [5][6];
    longint d1 [5][6];
    e.nocounter = 0;
    for (int i = 1; i <= 4; i++)
      for (int j = 0; j < 6; j++) begin d0[i][j] = -1; d1[i][j] = -1; end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        path_r r;
        r = extend(p, 2 * a - 7, 2 * b - 7, 2, 4);
        for (int i = 1; i <= 4; i++) begin
          logic [5:0] lab;
          lab = {glabel(r.sre[i], 2), glabel(r.sim[i], 2)};
          for (int j = 0; j < 6; j++) begin
            if (lab[5 - j]) begin
              if (d1[i][j] < 0 || r.d < d1[i][j]) d1[i][j] = r.d;
            end else begin
              if (d0[i][j] < 0 || r.d < d0[i][j]) d0[i][j] = r.d;
            end
          end
        end
      end
    for (int i = 1; i <= 4; i++)
      for (int j = 0; j < 6; j++) begin
        longint v;
        if (d0[i][j] < 0)      begin v = longint'(CLIP);  e.nocounter++; end
        else if (d1[i][j] < 0) begin v = -longint'(CLIP); e.nocounter++; end
        else                   v = d0[i][j] - d1[i][j];
        if (v > CLIP)  v = CLIP;
        if (v < -CLIP) v = -CLIP;
        e.L[i][j] = int'(v);
      end
    return e;
  endfunction

  initial begin
    #1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < SD_NSYM; k++) begin
      prob_t p;
      sexp_t e;
      p = rand_prob(4, 2);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
      sd_in_valid = 1'b1;
      sd_in_rows  = to_rows(p);
      forever begin
        logic acc;
        acc = sd_in_ready;
        if (!acc) n_stall++;
        @(negedge clk);
        if (acc) break;
      end
      e = ref_llr(p);
      e.t_acc = cycle;
      n_nocounter += e.nocounter;
      sq.push_back(e);
      sd_in_valid = 1'b0;
    end
  end

  int exp_ant = 1, exp_bit = 0, n_sym_out = 0;
  always @(negedge clk) begin
    if (sd_endbit) n_sd_endbit++;
    for (int l = 1; l <= NT; l++) if (sd_pruned[l]) n_pruned++;
    if (sd_llr_valid) begin
      if (exp_ant == 1 && exp_bit == 0) begin
        if (sq.size() == 0) begin
          failures++;
          $display("soft: unexpected LLR");
        end else begin
          scur = sq.pop_front();
          checks++;
          if (cycle - scur.t_acc != 70) begin
            failures++;
            $display("soft %0d: first LLR after %0d edges, expected 70", n_sym_out, cycle - scur.t_acc);
          end
        end
      end
      checks++;
      if (sd_llr_ant != 3'(exp_ant) || sd_llr_bit != 3'(exp_bit)) begin
        failures++;
        $display("soft: LLR order %0d/%0d expected %0d/%0d", sd_llr_ant, sd_llr_bit, exp_ant, exp_bit);
      end
      checks++;
      if (int'(sd_llr) != scur.L[exp_ant][exp_bit]) begin
        failures++;
        $display("soft %0d ant %0d bit %0d: llr %0d expected %0d",
                 n_sym_out, exp_ant, exp_bit, sd_llr, scur.L[exp_ant][exp_bit]);
      end
      if (sd_llr == LW'(CLIP) || sd_llr == -LW'(CLIP)) n_clipped++;
      checks++;
      if (sd_llr_last != (exp_ant == 4 && exp_bit == 5)) begin failures++; $display("soft: llr_last wrong"); end
      if (exp_bit == 5) begin
        exp_bit = 0;
        if (exp_ant == 4) begin exp_ant = 1; n_sym_out++; end
        else exp_ant++;
      end else exp_bit++;
      if (n_sym_out == SD_NSYM) sd_done = 1;
    end
  end


  // ---------------- LORD soft detector ----------------
  typedef struct {
    int     t_acc;
    int     mf;
    longint L [5][6];
  } lexp_t;
  lexp_t lq[$];
  lexp_t lcur;

  function automatic lexp_t ref_lord(prob_t pr [4], int mf);
    lexp_t  e;
    longint d0 [5][6];
    longint d1 [5][6];
    int     L, ab;
    L  = nlev(mf);
    ab = (mf == 0) ? 1 : (mf == 1) ? 2 : 3;
    for (int i = 1; i <= 4; i++)
      for (int j = 0; j < 6; j++) begin d0[i][j] = -1; d1[i][j] = -1; end
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < L; a++)
        for (int b = 0; b < L; b++) begin
          path_r r;
          r = extend(pr[k], 2 * a - (L - 1), 2 * b - (L - 1), mf, 4);
          for (int ant = 1; ant <= 4; ant++) begin
            int lvl;
            logic [2:0] lre, lim;
            lvl = ((ant - 1 + k) % 4) + 1;
            lre = glabel(r.sre[lvl], mf);
            lim = glabel(r.sim[lvl], mf);
            for (int j = 0; j < 2 * ab; j++) begin
              logic bv;
              bv = (j < ab) ? lre[ab - 1 - j] : lim[2 * ab - 1 - j];
              if (bv) begin
                if (d1[ant][j] < 0 || r.d < d1[ant][j]) d1[ant][j] = r.d;
              end else begin
                if (d0[ant][j] < 0 || r.d < d0[ant][j]) d0[ant][j] = r.d;
              end
            end
          end
        end
    for (int i = 1; i <= 4; i++)
      for (int j = 0; j < 2 * ab; j++) begin
        if (d0[i][j] < 0)      e.L[i][j] = LD_CLIP;
        else if (d1[i][j] < 0) e.L[i][j] = -LD_CLIP;
        else                   e.L[i][j] = d0[i][j] - d1[i][j];
      end
    e.mf = mf;
    return e;
  endfunction

  initial begin
    int last_mf;
    last_mf = -1;
    #1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < LD_NSYM; k++) begin
      prob_t pr [4];
      lexp_t e;
      int    mf;
      mf = int'($urandom_range(0, 2));
      if (k < 3) mf = (k == 0) ? 2 : (k == 1) ? 0 : 1;   // 64-QAM -> QPSK early
      for (int pi = 0; pi < 4; pi++) begin
        pr[pi] = rand_prob(4, mf);
        ld_in_rows[pi] = to_rows(pr[pi]);
      end
      if ($urandom_range(0, 4) == 0) repeat ($urandom_range(1, 12)) @(negedge clk);
      ld_in_valid = 1'b1;
      ld_in_mf    = mf_e'(mf);
      forever begin
        logic acc;
        acc = ld_in_ready;
        @(negedge clk);
        if (acc) break;
      end
      e = ref_lord(pr, mf);
      e.t_acc = cycle;
      lq.push_back(e);
      if (last_mf >= 0 && last_mf != mf) n_ld_switch++;
      last_mf = mf;
      ld_in_valid = 1'b0;
    end
  end

  int ld_ant = 1, ld_bit = 0, ld_nout = 0, ld_nbits = 2;
  always @(negedge clk) begin
    if (ld_endbit) n_ld_endbit++;
    if (ld_stall) n_ld_stall++;
    if (ld_llr_valid) begin
      if (ld_ant == 1 && ld_bit == 0) begin
        if (lq.size() == 0) begin
          failures++;
          $display("lord: unexpected LLR");
        end else begin
          lcur = lq.pop_front();
          ld_nbits = 2 * ((lcur.mf == 0) ? 1 : (lcur.mf == 1) ? 2 : 3);
          checks++;
          if (cycle - lcur.t_acc != 4 * nlev(lcur.mf) * nlev(lcur.mf) + 6) begin
            failures++;
            $display("lord %0d: first LLR after %0d edges", ld_nout, cycle - lcur.t_acc);
          end
        end
      end
      checks++;
      if (ld_llr_ant != 3'(ld_ant) || ld_llr_bit != 3'(ld_bit)) begin
        failures++;
        $display("lord: LLR order %0d/%0d expected %0d/%0d", ld_llr_ant, ld_llr_bit, ld_ant, ld_bit);
      end
      checks++;
      if (longint'(ld_llr) != lcur.L[ld_ant][ld_bit]) begin
        failures++;
        $display("lord %0d ant %0d bit %0d: llr %0d expected %0d", ld_nout, ld_ant, ld_bit,
                 ld_llr, lcur.L[ld_ant][ld_bit]);
      end
      checks++;
      if (ld_llr_last != (ld_ant == 4 && ld_bit == ld_nbits - 1)) begin failures++; $display("lord: llr_last wrong"); end
      if (ld_bit == ld_nbits - 1) begin
        ld_bit = 0;
        if (ld_ant == 4) begin ld_ant = 1; ld_nout++; end
        else ld_ant++;
      end else ld_bit++;
      if (ld_nout == LD_NSYM) ld_done = 1;
    end
  end


  // ---------------- staggered sphere decoder ----------------
  initial begin
    #1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < SP_NSYM; k++) begin
      prob_t p;
      int    mf, L, t_acc;
      path_r best;
      mf = k % 3;
      L  = nlev(mf);
      p  = rand_prob(4, mf);
      if (k % 2 == 1)
        for (int i = 1; i <= 4; i++) begin
          p.yre[i] = p.yre[i] + int'($urandom_range(0, 200)) - 100;
          p.yim[i] = p.yim[i] + int'($urandom_range(0, 200)) - 100;
          if (p.yre[i] > 1023) p.yre[i] = 1023;
          if (p.yre[i] < -1023) p.yre[i] = -1023;
          if (p.yim[i] > 1023) p.yim[i] = 1023;
          if (p.yim[i] < -1023) p.yim[i] = -1023;
        end
      best.d = -1;
      for (int a = 0; a < L; a++)
        for (int b = 0; b < L; b++) begin
          path_r c;
          c = extend(p, 2 * a - (L - 1), 2 * b - (L - 1), mf, 4);
          if (best.d < 0 || c.d < best.d) best = c;
        end
      sp_in_valid = 1'b1;
      sp_in_rows  = to_rows(p);
      sp_in_mf    = mf_e'(mf);
      forever begin
        logic acc;
        acc = sp_in_ready;
        @(negedge clk);
        if (acc) break;
      end
      sp_in_valid = 1'b0;
      t_acc = cycle;
      while (!sp_est_valid) @(negedge clk);
      checks++;
      if (sp_est_d != MW'(best.d)) begin failures++; $display("sphere %0d: d %0d expected %0d", k, sp_est_d, best.d); end
      checks++;
      if (cycle - t_acc != int'(sp_est_nodes) + 6) begin
        failures++; $display("sphere %0d: %0d edges for %0d nodes", k, cycle - t_acc, sp_est_nodes);
      end
      if (int'(sp_est_nodes) < L * L) n_sp_early++; else n_sp_full++;
    end
    sp_done = 1;
  end

  // ---------------- multicore sphere decoder ----------------
  initial begin
    #1;
    repeat (3) @(negedge clk);
    for (int t = 0; t < MC_NT; t++) begin
      prob_t p;
      int    mf, L;
      path_r best;
      mf = 1 + int'($urandom_range(0, 1));
      L  = nlev(mf);
      p  = rand_prob(4, mf);
      best.d = -1;
      for (int a = 0; a < L; a++)
        for (int b = 0; b < L; b++) begin
          path_r c;
          c = extend(p, 2 * a - (L - 1), 2 * b - (L - 1), mf, 4);
          if (best.d < 0 || c.d < best.d) best = c;
        end
      mc_exp[t]   = int'(best.d);
      mc_in_valid = 1'b1;
      mc_in_rows  = to_rows(p);
      mc_in_mf    = mf_e'(mf);
      mc_in_tone  = 9'(t);
      forever begin
        logic acc;
        acc = mc_in_ready;
        @(negedge clk);
        if (acc) break;
      end
      mc_acc++;
      mc_in_valid = 1'b0;
    end
    while (mc_out < MC_NT) @(negedge clk);
    mc_done = 1;
  end

  always @(negedge clk) begin
    if (mc_acc - mc_out > mc_par) mc_par = mc_acc - mc_out;
    for (int k = 0; k < 10; k++)
      if (mc_out_valid[k]) begin
        int t;
        t = int'(mc_out_tone[k]);
        checks++;
        if (t >= MC_NT || mc_seen[t] != 0) begin
          failures++; $display("multicore: tone %0d unexpected", t);
        end else begin
          mc_seen[t] = 1;
          checks++;
          if (mc_out_d[k] != MW'(mc_exp[t])) begin
            failures++; $display("multicore tone %0d: d %0d expected %0d", t, mc_out_d[k], mc_exp[t]);
          end
        end
        if (t < mc_last) n_mc_ooo++;
        mc_last = t;
        mc_out++;
      end
  end

  // ---------------- end of test ----------------
  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (hd_done && sd_done && ld_done && sp_done && mc_done);
    @(negedge clk);
    $display("mechanisms:");
    need("hard: modulation switches", n_mf_switch);
    need("hard: antenna-count switches", n_na_switch);
    need("hard: back-to-back symbols", n_b2b);
    need("hard: idle gaps", n_gap);
    need("input stalls", n_stall);
    need("soft: pruned paths", n_pruned);
    need("soft: clipped LLRs", n_clipped);
    need("soft: bits w/o counter-hyp.", n_nocounter);
    need("lord: modulation switches", n_ld_switch);
    need("lord: LLR-processor stalls", n_ld_stall);
    need("sphere: early terminations", n_sp_early);
    need("sphere: full searches", n_sp_full);
    need("multicore: results out of order", n_mc_ooo);
    need("multicore: cores busy at once", mc_par > 1 ? mc_par : 0);
    checks++;
    if (n_hd_endbit != HD_NSYM || n_sd_endbit != SD_NSYM || n_ld_endbit != LD_NSYM) begin
      failures++;
      $display("endbit pulses %0d/%0d for %0d/%0d symbols", n_hd_endbit, n_sd_endbit, HD_NSYM, SD_NSYM);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SD_NSYM * 90 + HD_NSYM * 80 + LD_NSYM * 300 + 400) @(posedge clk);
    failures++;
    $display("watchdog: hard %0d/%0d, soft %0d/%0d, lord %0d/%0d", n_est, HD_NSYM, n_sym_out, SD_NSYM,
             ld_nout, LD_NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
