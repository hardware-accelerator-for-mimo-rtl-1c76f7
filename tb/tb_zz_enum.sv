// tb_zz_enum: checks the zig-zag enumeration order against a model built from
// two pointers walking away from the nearest level, the first step taken
// towards the side of c, alternating while both sides have levels left.
module tb_zz_enum;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  logic signed [CW-1:0] c;
  logic signed [DW-1:0] rii;
  mf_e                  mf;
  comp_t                order [8];
  int checks = 0, failures = 0;

  zz_enum dut (.*);

  task automatic check(int cv, int rv, int m);
    int L, v0, lo, hi, side, n;
    int exp_v [8];
    c = CW'(cv); rii = DW'(rv); mf = mf_e'(m);
    #1;
    L  = nlev(m);
    v0 = near(cv, rv, m);
    exp_v[0] = v0;
    lo = v0 - 2; hi = v0 + 2;
    side = (cv >= rv * v0) ? 1 : -1;   // first step towards c
    n = 1;
    while (n < L) begin
      if (side > 0 && hi <= L - 1) begin exp_v[n] = hi; hi += 2; n++; side = -side; end
      else if (side < 0 && lo >= -(L - 1)) begin exp_v[n] = lo; lo -= 2; n++; side = -side; end
      else side = -side;
    end
    for (int k = 0; k < L; k++) begin
      checks++;
      if (order[k] !== enc(exp_v[k])) begin
        failures++;
        $display("c=%0d r=%0d mf=%0d k=%0d: got %b expected %b", cv, rv, m, k, order[k], enc(exp_v[k]));
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++)
      check(int'($urandom_range(0, 6000)) - 3000, int'($urandom_range(1, 400)), int'($urandom_range(0, 2)));
    check(0, 50, 2);
    check(-350, 50, 2);
    check(351, 50, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
