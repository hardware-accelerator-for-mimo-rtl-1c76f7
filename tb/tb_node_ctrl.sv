// tb_node_ctrl: checks both candidate orders of the control unit.  For every
// accepted vector symbol exactly eta candidates must follow on consecutive
// clocks, covering the whole constellation once, with NS on the first, `last`
// and endbit on the last, the symbol's MF/NA in instr and a new tag.  In the
// zig-zag unit the first candidate must be the point nearest y_hat_4/R_44.
// in_ready may only be high when idle or on the last candidate, and
// consecutive symbols must follow with no idle clock.
module tb_node_ctrl;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        in_valid = 1'b0;
  logic        rdy [2];
  row_t [NT:1] in_rows;
  mf_e         in_mf;
  logic [1:0]  in_na;
  path_t       po [2];
  row_t [NT:1] rows [2];
  logic        endbit [2];
  int checks = 0, failures = 0;
  int n_sym [2] = '{0, 0};
  int n_b2b = 0;

  node_ctrl #(.ZIGZAG(1'b0)) u0 (.clk, .rst_n, .in_valid, .in_ready(rdy[0]), .in_rows, .in_mf, .in_na,
                                 .path_o(po[0]), .rows(rows[0]), .endbit(endbit[0]));
  node_ctrl #(.ZIGZAG(1'b1)) u1 (.clk, .rst_n, .in_valid, .in_ready(rdy[1]), .in_rows, .in_mf, .in_na,
                                 .path_o(po[1]), .rows(rows[1]), .endbit(endbit[1]));

  always #5 clk = ~clk;

  localparam int NSYM = 40;

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NSYM; k++) begin
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
      in_valid = 1'b1;
      in_mf = mf_e'($urandom_range(0, 2));
      in_na = 2'($urandom_range(1, 3));
      in_rows = '0;
      in_rows[4].y.re = DW'(int'($urandom_range(0, 1200)) - 600);
      in_rows[4].y.im = DW'(int'($urandom_range(0, 1200)) - 600);
      in_rows[4].r[4].re = DW'($urandom_range(10, 100));
      forever begin
        logic acc;
        acc = rdy[0];
        checks++;
        if (rdy[0] !== rdy[1]) begin failures++; $display("in_ready differs between orders"); end
        @(negedge clk);
        if (acc) break;
      end
      in_valid = 1'b0;
    end
  end

  // per-instance monitor
  for (genvar g = 0; g < 2; g++) begin : g_mon
    int cnt = 0, eta = 0;
    logic seen [8][8];
    logic prev_last = 1'b0;
    logic prev_tag;
    row_t [NT:1] r4;
    always @(negedge clk) begin
      if (po[g].valid) begin
        if (po[g].instr.ns) begin
          checks++;
          if (cnt != 0) begin failures++; $display("u%0d: NS after %0d candidates", g, cnt); end
          eta = nlev(int'(po[g].instr.mf)) ** 2;
          foreach (seen[a, b]) seen[a][b] = 1'b0;
          if (prev_last) n_b2b++;
          checks++;
          if (n_sym[g] > 0 && po[g].tag == prev_tag) begin failures++; $display("u%0d: tag did not toggle", g); end
          prev_tag = po[g].tag;
          if (g == 1) begin
            int L;
            L = nlev(int'(po[g].instr.mf));
            checks++;
            if (po[g].s[4] !== {enc(near(int'(rows[g][4].y.re), int'(rows[g][4].r[4].re), int'(po[g].instr.mf))),
                                enc(near(int'(rows[g][4].y.im), int'(rows[g][4].r[4].re), int'(po[g].instr.mf)))}) begin
              failures++; $display("u1: first candidate is not the nearest point");
            end
          end
        end
        begin
          int a, b, L;
          L = nlev(int'(po[g].instr.mf));
          a = (po[g].s[4].re[2] ? -1 : 1) * (2 * int'(po[g].s[4].re[1:0]) + 1);
          b = (po[g].s[4].im[2] ? -1 : 1) * (2 * int'(po[g].s[4].im[1:0]) + 1);
          checks++;
          if (a < -(L - 1) || a > L - 1 || b < -(L - 1) || b > L - 1 || seen[(a + 7) / 2][(b + 7) / 2]) begin
            failures++; $display("u%0d: candidate %0d,%0d out of range or repeated", g, a, b);
          end else seen[(a + 7) / 2][(b + 7) / 2] = 1'b1;
        end
        cnt++;
        checks++;
        if (po[g].last !== (cnt == eta) || endbit[g] !== (cnt == eta)) begin
          failures++; $display("u%0d: last/endbit wrong at candidate %0d of %0d", g, cnt, eta);
        end
        if (cnt == eta) begin cnt = 0; n_sym[g]++; end
      end else begin
        checks++;
        if (cnt != 0) begin failures++; $display("u%0d: gap inside a symbol", g); end
      end
      prev_last = po[g].valid && po[g].last;
      if (n_sym[0] == NSYM && n_sym[1] == NSYM) begin
        checks++;
        if (n_b2b == 0) begin failures++; $display("no back-to-back symbols"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NSYM * 70 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
