// tb_soft_detector: self-checking testbench of the low-complexity soft detector.
//
// Sends random 4x4 64-QAM vector symbols, back to back and with gaps, and
// compares each of the 24 LLRs with the max-log value the reference model
// derives from all 64 fixed-complexity paths (minimum distance over the paths
// with the bit at 0 minus minimum over the paths with the bit at 1, clipped).
// A large clipping value is used so the LLR magnitudes are really checked.
// Also checked: 24 LLRs per symbol in antenna/bit order, the first one 70
// clock edges after the accepting edge, and that node pruning happened.
module tb_soft_detector;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int NSYM = 24;
  localparam int LW   = 12;
  localparam int CLIP = 400;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b1;
  logic                 in_valid = 1'b0;
  logic                 in_ready;
  row_t [NT:1]          in_rows;
  logic                 endbit;
  logic                 llr_valid;
  logic signed [LW-1:0] llr;
  logic [2:0]           llr_ant, llr_bit;
  logic                 llr_last;
  logic [NT:1]          pruned;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_sym_out = 0, n_llr = 0, n_pruned = 0, n_clipped = 0;

  typedef struct {
    int t_acc;
    int L [5][6];
  } exp_t;
  exp_t q[$];
  exp_t cur;

  soft_detector #(.LW(LW), .CLIP(CLIP)) dut (.*);

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

  function automatic exp_t ref_llr(prob_t p);
    exp_t e;
    longint d0 [5][6];
    longint d1 [5][6];
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
        if (d0[i][j] < 0)      v = CLIP;
        else if (d1[i][j] < 0) v = -CLIP;
        else                   v = d0[i][j] - d1[i][j];
        if (v > CLIP)  v = CLIP;
        if (v < -CLIP) v = -CLIP;
        e.L[i][j] = int'(v);
      end
    return e;
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NSYM; k++) begin
      prob_t p;
      exp_t e;
      p = rand_prob(4, 2);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
      in_valid = 1'b1;
      in_rows  = to_rows(p);
      forever begin
        logic acc;
        acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      e = ref_llr(p);
      e.t_acc = cycle;
      q.push_back(e);
      in_valid = 1'b0;
    end
  end

  int exp_ant = 1, exp_bit = 0;

  always @(negedge clk) begin
    for (int l = 1; l <= NT; l++) if (pruned[l]) n_pruned++;
    if (llr_valid) begin
      if (exp_ant == 1 && exp_bit == 0) begin
        if (q.size() == 0) begin
          failures++;
          $display("unexpected LLR");
        end else begin
          cur = q.pop_front();
          checks++;
          if (cycle - cur.t_acc != 70) begin
            failures++;
            $display("symbol %0d: first LLR after %0d edges, expected 70", n_sym_out, cycle - cur.t_acc);
          end
        end
      end
      checks++;
      if (llr_ant != 3'(exp_ant) || llr_bit != 3'(exp_bit)) begin
        failures++;
        $display("LLR order: got %0d/%0d expected %0d/%0d", llr_ant, llr_bit, exp_ant, exp_bit);
      end
      checks++;
      if (int'(llr) != cur.L[exp_ant][exp_bit]) begin
        failures++;
        $display("symbol %0d ant %0d bit %0d: llr %0d expected %0d",
                 n_sym_out, exp_ant, exp_bit, llr, cur.L[exp_ant][exp_bit]);
      end
      if (llr == LW'(CLIP) || llr == -LW'(CLIP)) n_clipped++;
      checks++;
      if (llr_last != (exp_ant == 4 && exp_bit == 5)) begin
        failures++;
        $display("llr_last wrong");
      end
      n_llr++;
      if (exp_bit == 5) begin
        exp_bit = 0;
        if (exp_ant == 4) begin exp_ant = 1; n_sym_out++; end
        else exp_ant++;
      end else exp_bit++;
      if (n_sym_out == NSYM) begin
        checks++;
        if (n_pruned == 0) begin failures++; $display("no path was pruned"); end
        checks++;
        if (n_clipped == 0) begin failures++; $display("no LLR was clipped"); end
        $display("pruned paths: %0d, clipped LLRs: %0d of %0d", n_pruned, n_clipped, n_llr);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NSYM * 90 + 300) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d symbols", n_sym_out, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
