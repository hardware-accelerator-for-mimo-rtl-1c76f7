// tb_mcu: checks the node processor at levels 4, 3 and 1 against integer
// arithmetic: interference cancellation, best-child slicing, l1 metric
// accumulation, the antenna-count bypass, the radius check and the hold of
// the datapath register for pruned paths.  One register stage is expected.
module tb_mcu;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  path_t         pin [3];
  row_t          row [3];
  logic [MW-1:0] radius [3];
  path_t         pout [3];
  logic [MW-1:0] dc [3];
  int checks = 0, failures = 0;
  int n_pruned = 0, n_bypass = 0;

  mcu #(.LEVEL(4)) u4 (.clk, .rst_n, .path_i(pin[0]), .row(row[0]), .radius(radius[0]), .path_o(pout[0]), .d_comb(dc[0]));
  mcu #(.LEVEL(3)) u3 (.clk, .rst_n, .path_i(pin[1]), .row(row[1]), .radius(radius[1]), .path_o(pout[1]), .d_comb(dc[1]));
  mcu #(.LEVEL(1)) u1 (.clk, .rst_n, .path_i(pin[2]), .row(row[2]), .radius(radius[2]), .path_o(pout[2]), .d_comb(dc[2]));

  always #5 clk = ~clk;

  function automatic int lvl(int mf);
    int L;
    L = nlev(mf);
    return 2 * int'($urandom_range(0, L - 1)) - (L - 1);
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      int levels [3];
      int mf, na;
      int sre [5];
      int sim [5];
      int yre, yim, rr [5], ri [5];
      int expd [3];
      logic explive [3];
      int ere, eim, cre, cim, d0, qre, qim;
      path_t prev [3];
      levels = '{4, 3, 1};
      mf = int'($urandom_range(0, 2));
      na = int'($urandom_range(1, 3));
      @(negedge clk);
      for (int x = 0; x < 3; x++) prev[x] = pout[x];
      for (int x = 0; x < 3; x++) begin
        int L;
        L = levels[x];
        for (int j = 1; j <= 4; j++) begin sre[j] = lvl(mf); sim[j] = lvl(mf); end
        yre = int'($urandom_range(0, 1600)) - 800;
        yim = int'($urandom_range(0, 1600)) - 800;
        for (int j = 1; j <= 4; j++) begin
          rr[j] = int'($urandom_range(0, 200)) - 100;
          ri[j] = int'($urandom_range(0, 200)) - 100;
        end
        rr[L] = int'($urandom_range(1, 300)); ri[L] = 0;
        d0 = int'($urandom_range(0, 5000));
        pin[x] = '0;
        pin[x].valid = 1'b1;
        pin[x].live  = ($urandom_range(0, 7) != 0);
        pin[x].instr.mf = mf_e'(mf);
        pin[x].instr.na = 2'(na);
        for (int j = 1; j <= 4; j++) pin[x].s[j] = '{re: enc(sre[j]), im: enc(sim[j])};
        pin[x].d = MW'(d0);
        row[x] = '0;
        row[x].y = '{re: DW'(yre), im: DW'(yim)};
        for (int j = 1; j <= 4; j++) row[x].r[j] = '{re: DW'(rr[j]), im: DW'(ri[j])};
        cre = yre; cim = yim;
        for (int j = L + 1; j <= 4; j++) begin
          cre -= rr[j] * sre[j] - ri[j] * sim[j];
          cim -= rr[j] * sim[j] + ri[j] * sre[j];
        end
        if (L == 4) begin qre = sre[4]; qim = sim[4]; end
        else begin qre = near(cre, rr[L], mf); qim = near(cim, rr[L], mf); end
        ere = cre - rr[L] * qre;
        eim = cim - rr[L] * qim;
        if (L + na >= 4) expd[x] = d0 + iabs(ere) + iabs(eim);
        else begin expd[x] = d0; n_bypass++; end
        radius[x] = ($urandom_range(0, 1)) ? MET_INF : MW'(d0 + int'($urandom_range(0, 1500)));
        explive[x] = pin[x].live && (MW'(expd[x]) <= radius[x]);
        // expected symbol at this level after the register
        sre[L] = (L + na >= 4) ? qre : 0;
        sim[L] = (L + na >= 4) ? qim : 0;
        // check after the clock
        fork
          automatic int xx = x, ed = expd[x], er = sre[L], ei = sim[L], LL = L;
          automatic logic el = explive[x], wl = pin[x].live;
          automatic path_t pv = prev[x];
          begin
            @(negedge clk);
            checks++;
            if (pout[xx].live !== el) begin failures++; $display("L%0d live %b exp %b", LL, pout[xx].live, el); end
            if (!el && wl) n_pruned++;
            if (wl) begin
              checks += 2;
              if (pout[xx].d !== MW'(ed)) begin failures++; $display("L%0d d %0d exp %0d", LL, pout[xx].d, ed); end
              if (pout[xx].s[LL] !== ((er == 0) ? 6'b0 : {enc(er), enc(ei)})) begin
                failures++; $display("L%0d s %h exp %0d,%0d", LL, pout[xx].s[LL], er, ei);
              end
            end else begin
              checks++;
              if (pout[xx].d !== pv.d) begin failures++; $display("L%0d pruned path changed d", LL); end
            end
          end
        join_none
      end
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (n_pruned == 0 || n_bypass == 0) begin failures++; $display("pruning or bypass not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
