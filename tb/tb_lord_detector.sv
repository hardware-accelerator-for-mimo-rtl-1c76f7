// tb_lord_detector: self-checking testbench of the configurable LORD soft
// detector.
//
// Sends vector symbols of random modulation format (QPSK, 16-QAM, 64-QAM),
// back to back and with gaps; each symbol consists of four random triangular
// systems, one per permutation.  The reference runs the fixed-complexity
// search on each system, maps tree levels back to antennas (level
// ((ant-1+pi) mod 4)+1 holds antenna ant), labels the 4*eta paths with Gray
// bits and forms every max-log LLR over the union of the four sets (metric
// recycling).  Checked: all 4*log2(eta) LLRs of every symbol, their order,
// the first LLR 4*eta+6 edges after acceptance, endbit once per symbol, and
// that format switches and the QPSK-after-64-QAM stall both happened.
module tb_lord_detector;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int     NSYM = 40;
  localparam int     LW   = MW + 1;
  localparam longint CLIP = (longint'(1) << MW) - 2;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b1;
  logic                 in_valid = 1'b0;
  logic                 in_ready;
  row_t [3:0][NT:1]     in_rows;
  mf_e                  in_mf;
  logic                 endbit, stall;
  logic                 llr_valid, llr_last;
  logic signed [LW-1:0] llr;
  logic [2:0]           llr_ant, llr_bit;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_switch = 0, n_stall = 0, n_endbit = 0, n_nocounter = 0;

  typedef struct {
    int     t_acc;
    int     mf;
    longint L [5][6];
  } exp_t;
  exp_t q[$];
  exp_t cur;

  lord_detector dut (.*);

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

  function automatic exp_t ref_llr(prob_t pr [4], int mf);
    exp_t   e;
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
        if (d0[i][j] < 0)      begin e.L[i][j] = CLIP;  n_nocounter++; end
        else if (d1[i][j] < 0) begin e.L[i][j] = -CLIP; n_nocounter++; end
        else                   e.L[i][j] = d0[i][j] - d1[i][j];
      end
    e.mf = mf;
    return e;
  endfunction

  initial begin
    int last_mf;
    last_mf = -1;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NSYM; k++) begin
      prob_t pr [4];
      exp_t  e;
      int    mf;
      mf = int'($urandom_range(0, 2));
      if (k == 1 || k == 2) mf = 2 - k;   // 64-QAM then QPSK early: exercises the stall
      if (k == 0) mf = 2;
      for (int pi = 0; pi < 4; pi++) begin
        pr[pi] = rand_prob(4, mf);
        in_rows[pi] = to_rows(pr[pi]);
      end
      if ($urandom_range(0, 4) == 0) repeat ($urandom_range(1, 12)) @(negedge clk);
      in_valid = 1'b1;
      in_mf    = mf_e'(mf);
      forever begin
        logic acc;
        acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      e = ref_llr(pr, mf);
      e.t_acc = cycle;
      q.push_back(e);
      if (last_mf >= 0 && last_mf != mf) n_switch++;
      last_mf = mf;
      in_valid = 1'b0;
    end
  end

  int exp_ant = 1, exp_bit = 0, n_sym_out = 0, nbits = 2;
  always @(negedge clk) begin
    if (endbit) n_endbit++;
    if (stall) n_stall++;
    if (llr_valid) begin
      if (exp_ant == 1 && exp_bit == 0) begin
        if (q.size() == 0) begin
          failures++;
          $display("unexpected LLR");
        end else begin
          cur = q.pop_front();
          nbits = 2 * ((cur.mf == 0) ? 1 : (cur.mf == 1) ? 2 : 3);
          checks++;
          if (cycle - cur.t_acc != 4 * nlev(cur.mf) * nlev(cur.mf) + 6) begin
            failures++;
            $display("symbol %0d: first LLR after %0d edges, expected %0d", n_sym_out,
                     cycle - cur.t_acc, 4 * nlev(cur.mf) * nlev(cur.mf) + 6);
          end
        end
      end
      checks++;
      if (llr_ant != 3'(exp_ant) || llr_bit != 3'(exp_bit)) begin
        failures++;
        $display("LLR order: got %0d/%0d expected %0d/%0d", llr_ant, llr_bit, exp_ant, exp_bit);
      end
      checks++;
      if (longint'(llr) != cur.L[exp_ant][exp_bit]) begin
        failures++;
        $display("symbol %0d (mf %0d) ant %0d bit %0d: llr %0d expected %0d",
                 n_sym_out, cur.mf, exp_ant, exp_bit, llr, cur.L[exp_ant][exp_bit]);
      end
      checks++;
      if (llr_last != (exp_ant == 4 && exp_bit == nbits - 1)) begin failures++; $display("llr_last wrong"); end
      if (exp_bit == nbits - 1) begin
        exp_bit = 0;
        if (exp_ant == 4) begin exp_ant = 1; n_sym_out++; end
        else exp_ant++;
      end else exp_bit++;
      if (n_sym_out == NSYM) begin
        checks++;
        if (n_endbit != NSYM) begin failures++; $display("endbit %0d times for %0d symbols", n_endbit, NSYM); end
        checks++;
        if (n_switch == 0) begin failures++; $display("no format switch"); end
        checks++;
        if (n_stall == 0) begin failures++; $display("no stall"); end
        $display("format switches %0d, stall cycles %0d, bits without counter-hypothesis %0d",
                 n_switch, n_stall, n_nocounter);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NSYM * 300 + 500) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d symbols", n_sym_out, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
