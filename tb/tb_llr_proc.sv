// tb_llr_proc: loads random bit-metric results for all three modulation
// formats and checks the serial read-out: 4*log2(eta) LLRs on consecutive
// clocks starting one clock after the load, antenna-major, real-part bits
// first, sign from the best path's bit, magnitude c - d_a clipped to CLIP
// (infinite c gives the clip value).
module tb_llr_proc;
  import mimo_pkg::*;

  localparam int LW = 8;
  localparam int CLIP = 20;

  logic                         clk = 1'b0;
  logic                         rst_n = 1'b1;
  logic                         ld = 1'b0;
  logic [NT:1][BPS-1:0]         a;
  logic [NT:1][BPS-1:0][MW-1:0] c;
  logic [MW-1:0]                da;
  mf_e                          mf;
  logic                         llr_valid;
  logic signed [LW-1:0]         llr;
  logic [2:0]                   llr_ant, llr_bit;
  logic                         llr_last;
  int checks = 0, failures = 0;

  llr_proc #(.LW(LW), .CLIP(CLIP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 150; t++) begin
      int m, ab, nb;
      m = int'($urandom_range(0, 2));
      ab = m + 1; nb = 2 * ab;
      mf = mf_e'(m);
      da = MW'($urandom_range(0, 1000));
      a = '0;
      for (int i = 1; i <= 4; i++)
        for (int j = 0; j < BPS; j++) begin
          a[i][j] = 1'($urandom);
          c[i][j] = ($urandom_range(0, 5) == 0) ? MET_INF : da + MW'($urandom_range(0, 40));
        end
      ld = 1'b1;
      @(negedge clk);
      ld = 1'b0;
      for (int i = 1; i <= 4; i++)
        for (int j = 0; j < nb; j++) begin
          int pos, mag, e;
          pos = (j < ab) ? 3 + (ab - 1 - j) : (2 * ab - 1 - j);
          mag = (c[i][pos] == MET_INF) ? CLIP : int'(c[i][pos] - da);
          if (mag > CLIP) mag = CLIP;
          e = a[i][pos] ? mag : -mag;
          @(negedge clk);
          checks++;
          if (!llr_valid || int'(llr) != e || llr_ant != 3'(i) || llr_bit != 3'(j) ||
              llr_last != (i == 4 && j == nb - 1)) begin
            failures++;
            $display("mf %0d ant %0d bit %0d: llr %0d exp %0d (valid %b ant %0d bit %0d)",
                     m, i, j, llr, e, llr_valid, llr_ant, llr_bit);
          end
        end
      if ($urandom_range(0, 1) == 0) begin
        @(negedge clk);
        checks++;
        if (llr_valid) begin failures++; $display("llr_valid after the last bit"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150 * 30 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
