// tb_staggered_sd: self-checking testbench of the staggered sphere decoder.
//
// Random 4x4 vector symbols of all three formats, some with little noise
// (the search stops early) and some with heavy noise (more of the tree is
// visited).  The estimate's distance must equal the best of the eta
// fixed-complexity paths of the reference model, its symbols must match when
// that best path is unique, the number of top-level nodes visited must lie in
// 1..eta, and est_valid must come est_nodes + 6 edges after acceptance, with
// est_cycles counting the same.  Early termination must occur.
module tb_staggered_sd;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int NSYM = 90;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          in_valid = 1'b0;
  logic          in_ready;
  row_t [NT:1]   in_rows;
  mf_e           in_mf;
  logic          est_valid;
  sym_t [NT:1]   est_s;
  logic [MW-1:0] est_d;
  logic [6:0]    est_nodes;
  logic [8:0]    est_cycles;

  int checks = 0, failures = 0, cycle = 0;
  int n_early = 0, n_full = 0, nodes_sum = 0, eta_sum = 0;

  staggered_sd dut (.*);
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
    for (int k = 0; k < NSYM; k++) begin
      prob_t p;
      int    mf, L, t_acc, nbest;
      path_r best;
      mf = k % 3;
      L  = nlev(mf);
      p  = rand_prob(4, mf);
      if (k % 2 == 1)   // heavy noise on every row
        for (int i = 1; i <= 4; i++) begin
          p.yre[i] = p.yre[i] + int'($urandom_range(0, 200)) - 100;
          p.yim[i] = p.yim[i] + int'($urandom_range(0, 200)) - 100;
          if (p.yre[i] > 1023) p.yre[i] = 1023;
          if (p.yre[i] < -1023) p.yre[i] = -1023;
          if (p.yim[i] > 1023) p.yim[i] = 1023;
          if (p.yim[i] < -1023) p.yim[i] = -1023;
        end
      best.d = -1; nbest = 0;
      for (int a = 0; a < L; a++)
        for (int b = 0; b < L; b++) begin
          path_r c;
          c = extend(p, 2 * a - (L - 1), 2 * b - (L - 1), mf, 4);
          if (best.d < 0 || c.d < best.d) begin best = c; nbest = 1; end
          else if (c.d == best.d) nbest++;
        end
      in_valid = 1'b1;
      in_rows  = to_rows(p);
      in_mf    = mf_e'(mf);
      forever begin
        logic acc;
        acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      in_valid = 1'b0;
      t_acc = cycle;
      while (!est_valid) @(negedge clk);
      checks++;
      if (est_d != MW'(best.d)) begin failures++; $display("symbol %0d: d %0d expected %0d", k, est_d, best.d); end
      if (nbest == 1)
        for (int i = 1; i <= 4; i++) begin
          checks++;
          if (est_s[i] !== '{re: enc(best.sre[i]), im: enc(best.sim[i])}) begin
            failures++; $display("symbol %0d level %0d: wrong symbol", k, i);
          end
        end
      checks++;
      if (est_nodes < 1 || int'(est_nodes) > L * L) begin failures++; $display("symbol %0d: %0d nodes", k, est_nodes); end
      checks++;
      if (cycle - t_acc != int'(est_nodes) + 6 || int'(est_cycles) != cycle - t_acc) begin
        failures++;
        $display("symbol %0d: estimate after %0d edges (est_cycles %0d), %0d nodes", k, cycle - t_acc, est_cycles, est_nodes);
      end
      if (int'(est_nodes) < L * L) n_early++; else n_full++;
      nodes_sum += int'(est_nodes); eta_sum += L * L;
    end
    checks++;
    if (n_early == 0) begin failures++; $display("early termination never happened"); end
    $display("early stops %0d, full searches %0d, top-level nodes %0d of %0d", n_early, n_full, nodes_sum, eta_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * 90 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
