// tb_mcu4_enum: checks the ascending-order enumeration of the root's
// children.  For random y_hat_4, R_44 and modulation format the unit is
// started and advanced until it reports no candidate; every candidate's
// distance must equal |Re(y) - R44 a| + |Im(y) - R44 b| computed here, the
// distances must never decrease, and every constellation point must be
// issued exactly once (eta candidates, then cand_valid low).
module tb_mcu4_enum;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b1;
  logic                 start = 1'b0, adv = 1'b0;
  cplx_t                y4;
  logic signed [DW-1:0] r44;
  mf_e                  mf;
  logic                 cand_valid;
  sym_t                 cand_s;
  logic [MW-1:0]        cand_d;
  int checks = 0, failures = 0;

  mcu4_enum dut (.*);
  always #5 clk = ~clk;

  function automatic int lev(comp_t c);
    return c[2] ? -(2 * int'(c[1:0]) + 1) : (2 * int'(c[1:0]) + 1);
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int L, cnt, prev;
      bit seen [8][8];
      int m;
      m   = t % 3;
      mf  = mf_e'(m);
      L   = nlev(m);
      r44 = DW'($urandom_range(12, 90));
      y4.re = DW'(int'($urandom_range(0, 1600)) - 800);
      y4.im = DW'(int'($urandom_range(0, 1600)) - 800);
      if (t % 5 == 0) y4.im = DW'(int'(r44) * (2 * int'($urandom_range(0, 3)) - 3));  // exact ties
      for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) seen[a][b] = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      adv   = 1'b1;
      cnt = 0; prev = 0;
      while (cand_valid && cnt < 70) begin
        int a, b, d;
        a = lev(cand_s.re); b = lev(cand_s.im);
        d = iabs(int'(y4.re) - int'(r44) * a) + iabs(int'(y4.im) - int'(r44) * b);
        checks++;
        if (iabs(a) >= L || iabs(b) >= L || seen[(a + 7) / 2][(b + 7) / 2]) begin
          failures++; $display("t=%0d: point %0d,%0d out of range or repeated", t, a, b);
        end else seen[(a + 7) / 2][(b + 7) / 2] = 1;
        checks++;
        if (int'(cand_d) != d) begin failures++; $display("t=%0d: distance %0d expected %0d", t, cand_d, d); end
        checks++;
        if (d < prev) begin failures++; $display("t=%0d: order not ascending (%0d after %0d)", t, d, prev); end
        prev = d;
        cnt++;
        @(negedge clk);
      end
      adv = 1'b0;
      checks++;
      if (cnt != L * L) begin failures++; $display("t=%0d: %0d candidates for eta=%0d", t, cnt, L * L); end
      // half-way restart must reset the frontier
      if (t % 4 == 0) begin
        start = 1'b1; @(negedge clk); start = 1'b0; adv = 1'b1;
        repeat (2) @(negedge clk);
        adv = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * 90) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
