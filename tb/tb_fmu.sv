// tb_fmu: sends groups of paths (NS on the first, `last` on the final one,
// sometimes with idle clocks between paths) and checks that the estimate is
// the earliest path of minimum distance of its own group, one clock after the
// last path.
module tb_fmu;
  import mimo_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  path_t         path_i;
  logic          est_valid;
  sym_t [NT:1]   est_s;
  logic [MW-1:0] est_d;
  mf_e           est_mf;
  int checks = 0, failures = 0;
  int nexp = 0, ngot = 0;
  sym_t [NT:1]   exp_s [$];
  logic [MW-1:0] exp_d [$];

  fmu dut (.*);
  always #5 clk = ~clk;

  localparam int NGRP = 200;

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    path_i = '0;
    for (int g = 0; g < NGRP; g++) begin
      int n;
      sym_t [NT:1]   bs;
      logic [MW-1:0] bd;
      n = int'($urandom_range(1, 20));
      bd = MET_INF;
      for (int k = 0; k < n; k++) begin
        if ($urandom_range(0, 4) == 0) begin path_i.valid = 1'b0; @(negedge clk); end
        path_i = '0;
        path_i.valid = 1'b1;
        path_i.instr.ns = (k == 0);
        path_i.last = (k == n - 1);
        path_i.instr.mf = mf_e'(g % 3);
        path_i.s = {$urandom, $urandom};
        // few distinct distances so ties happen
        path_i.d = MW'($urandom_range(0, 40));
        if (k == 0 || path_i.d < bd) begin bd = path_i.d; bs = path_i.s; end
        @(negedge clk);
        checks++;
        if (est_valid !== (k == n - 1)) begin failures++; $display("est_valid wrong"); end
        if (k == n - 1) begin
          checks += 2;
          if (est_d !== bd) begin failures++; $display("group %0d: d %0d exp %0d", g, est_d, bd); end
          if (est_s !== bs) begin failures++; $display("group %0d: wrong symbols", g); end
          ngot++;
        end
      end
      path_i.valid = 1'b0;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NGRP * 30 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
