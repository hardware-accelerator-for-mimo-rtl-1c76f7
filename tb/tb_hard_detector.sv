// tb_hard_detector: self-checking testbench of the configurable hard detector.
//
// Feeds random vector symbols with random modulation format (QPSK, 16-QAM,
// 64-QAM) and antenna count (2x2, 3x3, 4x4), sometimes back to back and
// sometimes with idle cycles between them, and compares every estimate with
// the integer reference model of mimo_ref_pkg.  It also checks the timing:
// the estimate must be registered eta + 4 clock edges after the edge that
// accepted the symbol, and
// endbit must pulse once per symbol.
module tb_hard_detector;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int NSYM = 60;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          in_valid = 1'b0;
  logic          in_ready;
  row_t [NT:1]   in_rows;
  mf_e           in_mf;
  logic [1:0]    in_na;
  logic          endbit;
  logic          est_valid;
  sym_t [NT:1]   est_s;
  logic [MW-1:0] est_d;
  mf_e           est_mf;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_endbit = 0, n_est = 0;
  int mode_switches = 0;

  typedef struct {
    int     t_acc;
    int     eta;
    int     mf;
    path_r  exp;
  } exp_t;
  exp_t q[$];

  hard_detector dut (.*);

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

  function automatic path_r ref_detect(prob_t p, int mf, int n);
    path_r best, cand;
    int L;
    L = nlev(mf);
    best.d = -1;
    for (int a = 0; a < L; a++)
      for (int b = 0; b < L; b++) begin
        cand = extend(p, 2 * a - (L - 1), 2 * b - (L - 1), mf, n);
        if (best.d < 0 || cand.d < best.d) best = cand;
      end
    return best;
  endfunction

  // Driver
  initial begin
    int last_mf;
    last_mf = -1;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NSYM; k++) begin
      prob_t p;
      int mf, n;
      exp_t e;
      mf = int'($urandom_range(0, 2));
      n  = int'($urandom_range(2, 4));
      if (k < 3) begin mf = k; n = 4; end
      p  = rand_prob(n, mf);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(negedge clk);
      // drive and sample on the falling edge, away from the DUT's clock edge
      in_valid = 1'b1;
      in_rows  = to_rows(p);
      in_mf    = mf_e'(mf);
      in_na    = 2'(n - 1);
      forever begin
        logic acc;
        acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      e.t_acc = cycle;
      e.eta   = nlev(mf) * nlev(mf);
      e.mf    = mf;
      e.exp   = ref_detect(p, mf, n);
      q.push_back(e);
      if (last_mf >= 0 && last_mf != mf) mode_switches++;
      last_mf = mf;
      in_valid = 1'b0;
    end
  end

  // Checker
  always @(negedge clk) begin
    if (endbit) n_endbit++;
    if (est_valid) begin
      exp_t e;
      n_est++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected estimate");
      end else begin
        e = q.pop_front();
        checks++;
        if (est_d != MW'(e.exp.d)) begin
          failures++;
          $display("symbol %0d: metric %0d, expected %0d", n_est, est_d, e.exp.d);
        end
        for (int i = 1; i <= 4; i++) begin
          sym_t es;
          es.re = (e.exp.sre[i] == 0) ? 3'b0 : enc(e.exp.sre[i]);
          es.im = (e.exp.sim[i] == 0) ? 3'b0 : enc(e.exp.sim[i]);
          checks++;
          if (est_s[i] !== es) begin
            failures++;
            $display("symbol %0d level %0d: got %h expected %h", n_est, i, est_s[i], es);
          end
        end
        checks++;
        if (int'(est_mf) != e.mf) begin
          failures++;
          $display("symbol %0d: mf %0d expected %0d", n_est, est_mf, e.mf);
        end
        checks++;
        // est_valid is registered eta + 4 edges after the accepting edge
        if (cycle - e.t_acc != e.eta + 4) begin
          failures++;
          $display("symbol %0d: latency %0d, expected %0d", n_est, cycle - e.t_acc, e.eta + 4);
        end
      end
      if (n_est == NSYM) begin
        checks++;
        if (n_endbit != NSYM) begin
          failures++;
          $display("endbit pulsed %0d times for %0d symbols", n_endbit, NSYM);
        end
        checks++;
        if (mode_switches == 0) begin failures++; $display("no mode switch exercised"); end
        $display("mode switches: %0d", mode_switches);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // Watchdog
  initial begin
    repeat (NSYM * 80 + 200) @(posedge clk);
    failures++;
    $display("watchdog: only %0d of %0d estimates", n_est, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
