// tb_bitmetric_proc: streams groups of random paths (NS on the first, `last`
// on the final one, some pruned, distances drawn from a small range so that
// ties occur) and checks the result against a direct max-log search over the
// group: d_a is the smallest distance of a live path, a_ij the label of the
// earliest such path, and c_ij the smallest distance among live paths whose
// bit (i, j) differs from a_ij (all ones if there is none).  The running best
// (cur_d) is checked after every path.
module tb_bitmetric_proc;
  import mimo_pkg::*;

  logic                         clk = 1'b0;
  logic                         rst_n = 1'b1;
  path_t                        path_i;
  logic                         out_valid;
  logic [NT:1][BPS-1:0]         out_a;
  logic [NT:1][BPS-1:0][MW-1:0] out_c;
  logic [MW-1:0]                out_da, cur_d;
  mf_e                          out_mf;
  logic                         cur_tag, cur_ok;
  int checks = 0, failures = 0;
  int n_inf = 0, n_replace = 0;

  bitmetric_proc #(.PERMUTED(1'b0)) dut (.clk, .rst_n, .path_i, .pi(2'd0), .out_valid, .out_a,
                                         .out_c, .out_da, .out_mf, .cur_d, .cur_tag, .cur_ok);
  always #5 clk = ~clk;

  localparam int NGRP = 150;

  function automatic comp_t rcomp(int m);
    return {1'($urandom), 2'($urandom_range(0, int'(mf_maxmag(mf_e'(m)))))};
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    path_i = '0;
    for (int g = 0; g < NGRP; g++) begin
      int n, m;
      logic [NT:1][BPS-1:0] lab [64];
      logic [MW-1:0] dd [64];
      logic          lv [64];
      logic [MW-1:0] best;
      int            bi;
      m = g % 3;
      n = int'($urandom_range(2, 64));
      best = MET_INF; bi = 0;
      for (int k = 0; k < n; k++) begin
        path_i = '0;
        path_i.valid = 1'b1;
        path_i.live = (k == 0) || ($urandom_range(0, 5) != 0);
        path_i.instr.ns = (k == 0);
        path_i.last = (k == n - 1);
        path_i.tag = g[0];
        path_i.instr.mf = mf_e'(m);
        for (int i = 1; i <= 4; i++) path_i.s[i] = '{re: rcomp(m), im: rcomp(m)};
        path_i.d = MW'($urandom_range(0, 60));
        for (int i = 1; i <= 4; i++) lab[k][i] = sym_label(path_i.s[i], mf_e'(m));
        dd[k] = path_i.d; lv[k] = path_i.live;
        if (path_i.live && path_i.d < best) begin
          if (k > 0) n_replace++;
          best = path_i.d; bi = k;
        end
        @(negedge clk);
        checks++;
        if (cur_d !== best || cur_tag !== g[0]) begin failures++; $display("running best %0d exp %0d", cur_d, best); end
      end
      path_i.valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      checks += 2;
      if (out_da !== best) begin failures++; $display("group %0d: d_a %0d exp %0d", g, out_da, best); end
      if (out_a !== {lab[bi]}) begin failures++; $display("group %0d: best bits differ", g); end
      for (int i = 1; i <= 4; i++)
        for (int j = 0; j < BPS; j++) begin
          logic [MW-1:0] e;
          e = MET_INF;
          for (int k = 0; k < n; k++)
            if (lv[k] && lab[k][i][j] != lab[bi][i][j] && dd[k] < e) e = dd[k];
          if (e == MET_INF) n_inf++;
          checks++;
          if (out_c[i][j] !== e) begin
            failures++; $display("group %0d c[%0d][%0d] = %0d exp %0d", g, i, j, out_c[i][j], e);
          end
        end
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    checks++;
    if (n_inf == 0 || n_replace == 0) begin failures++; $display("missing counter-hypothesis or best replacement not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NGRP * 70 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
