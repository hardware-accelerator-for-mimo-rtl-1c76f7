// tb_qam_slicer: checks the programmable slicer against an exhaustive
// nearest-level search for random values, diagonal entries and all three
// modulation formats, plus the exact threshold values (ties).
module tb_qam_slicer;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  logic signed [CW-1:0] c;
  logic signed [DW-1:0] rii;
  mf_e                  mf;
  comp_t                q;
  int checks = 0, failures = 0;

  qam_slicer dut (.*);

  task automatic check(int cv, int rv, int m);
    c = CW'(cv); rii = DW'(rv); mf = mf_e'(m);
    #1;
    checks++;
    if (q !== enc(near(cv, rv, m))) begin
      failures++;
      $display("c=%0d r=%0d mf=%0d: got %b expected %b", cv, rv, m, q, enc(near(cv, rv, m)));
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++)
      check(int'($urandom_range(0, 8000)) - 4000, int'($urandom_range(1, 500)), int'($urandom_range(0, 2)));
    for (int m = 0; m < 3; m++)
      for (int t = -8; t <= 8; t++) begin
        check(t * 37, 37, m);
        check(t * 37 + 1, 37, m);
        check(t * 37 - 1, 37, m);
      end
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
