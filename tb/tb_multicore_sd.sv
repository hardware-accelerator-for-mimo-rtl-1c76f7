// tb_multicore_sd: self-checking testbench of the multicore sphere decoder.
//
// Streams one OFDM symbol of L = 500 random 4x4 tones (16-QAM and 64-QAM,
// half of them noisy) into the ten-core array at its default size, offering
// a new tone every clock.  Every estimate is matched by its tone index
// against the reference model's best fixed-complexity path (distance, and the
// symbols when that path is unique), and every tone must come back exactly
// once.  Also checked: several cores busy at once, results returned out of
// order, and the whole symbol finished within L * 71 / 10 clocks plus slack.
module tb_multicore_sd;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int M  = 10;
  localparam int TW = 9;
  localparam int L  = 500;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b1;
  logic                  in_valid = 1'b0;
  logic                  in_ready;
  row_t [NT:1]           in_rows = '0;
  mf_e                   in_mf = MF_QPSK;
  logic [TW-1:0]         in_tone = '0;
  logic [M-1:0]          out_valid;
  logic [M-1:0][TW-1:0]  out_tone;
  sym_t [M-1:0][NT:1]    out_s;
  logic [M-1:0][MW-1:0]  out_d;

  int checks = 0, failures = 0, cycle = 0;
  int exp_d [L];
  int nbest [L];
  sym_t [NT:1] exp_s [L];
  int seen [L];
  int n_acc = 0, n_out = 0, last_tone = -1, n_ooo = 0, max_par = 0, t_start = 0;

  multicore_sd dut (.*);
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

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t_start = cycle;
    for (int t = 0; t < L; t++) begin
      prob_t p;
      int    mf, nl;
      path_r best;
      mf = 1 + int'($urandom_range(0, 1));
      nl = nlev(mf);
      p  = rand_prob(4, mf);
      if ($urandom_range(0, 1) == 1)
        for (int i = 1; i <= 4; i++) begin
          p.yre[i] = p.yre[i] + int'($urandom_range(0, 200)) - 100;
          p.yim[i] = p.yim[i] + int'($urandom_range(0, 200)) - 100;
          if (p.yre[i] > 1023) p.yre[i] = 1023;
          if (p.yre[i] < -1023) p.yre[i] = -1023;
          if (p.yim[i] > 1023) p.yim[i] = 1023;
          if (p.yim[i] < -1023) p.yim[i] = -1023;
        end
      best.d = -1; nbest[t] = 0;
      for (int a = 0; a < nl; a++)
        for (int b = 0; b < nl; b++) begin
          path_r c;
          c = extend(p, 2 * a - (nl - 1), 2 * b - (nl - 1), mf, 4);
          if (best.d < 0 || c.d < best.d) begin best = c; nbest[t] = 1; end
          else if (c.d == best.d) nbest[t]++;
        end
      exp_d[t] = int'(best.d);
      for (int i = 1; i <= 4; i++) exp_s[t][i] = '{re: enc(best.sre[i]), im: enc(best.sim[i])};
      in_valid = 1'b1;
      in_rows  = to_rows(p);
      in_mf    = mf_e'(mf);
      in_tone  = TW'(t);
      forever begin
        logic acc;
        acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      n_acc++;
      in_valid = 1'b0;
    end
  end

  always @(negedge clk) begin
    if (n_acc - n_out > max_par) max_par = n_acc - n_out;
    for (int k = 0; k < M; k++)
      if (out_valid[k]) begin
        int t;
        t = int'(out_tone[k]);
        checks++;
        if (t >= L || seen[t] != 0) begin
          failures++; $display("core %0d: tone %0d unexpected", k, t);
        end else begin
          seen[t] = 1;
          checks++;
          if (out_d[k] != MW'(exp_d[t])) begin
            failures++; $display("tone %0d: d %0d expected %0d", t, out_d[k], exp_d[t]);
          end
          if (nbest[t] == 1) begin
            checks++;
            if (out_s[k] !== exp_s[t]) begin failures++; $display("tone %0d: wrong symbols", t); end
          end
        end
        if (t < last_tone) n_ooo++;
        last_tone = t;
        n_out++;
      end
    if (n_out == L) begin
      checks++;
      if (max_par < 2) begin failures++; $display("never more than one core busy"); end
      checks++;
      if (n_ooo == 0) begin failures++; $display("results never out of order"); end
      checks++;
      if (cycle - t_start > L * 71 / M + 100) begin
        failures++; $display("%0d tones took %0d clocks", L, cycle - t_start);
      end
      $display("%0d tones in %0d clocks on %0d cores, at most %0d busy, %0d out of order",
               L, cycle - t_start, M, max_par, n_ooo);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (L * 80 + 500) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d tones", n_out, L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
