// tb_lpm_compare_select: checks the bit-elimination minimum against a plain
// loop over random operand sets (small value ranges so that ties and equal
// prefixes are frequent, plus full-range values and random enable masks).
module tb_lpm_compare_select;
  localparam int N = 8;
  localparam int W = 22;

  logic [N-1:0][W-1:0] val;
  logic [N-1:0]        en;
  logic [N-1:0]        win;
  logic [2:0]          idx;
  logic [W-1:0]        min;
  logic                any;
  int checks = 0, failures = 0;

  lpm_compare_select #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int          bi;
      logic [W-1:0] bv;
      for (int k = 0; k < N; k++)
        val[k] = (t % 2 == 0) ? W'($urandom_range(0, 15)) : W'($urandom);
      en = N'($urandom);
      if (t % 7 == 0) en = '1;
      #1;
      bi = -1; bv = '1;
      for (int k = 0; k < N; k++)
        if (en[k] && (bi < 0 || val[k] < bv)) begin bi = k; bv = val[k]; end
      checks++;
      if (any != (bi >= 0)) begin failures++; $display("any wrong"); end
      if (bi >= 0) begin
        checks++;
        if (idx != 3'(bi) || min != bv || win != (N'(1) << bi)) begin
          failures++;
          $display("t=%0d: idx %0d min %0d, expected %0d %0d", t, idx, min, bi, bv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
