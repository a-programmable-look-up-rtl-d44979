// tb_nus_region_select: self-checking test of the partition selector.
// After reset the selector must follow scheme alpha (x = -0.97 lies in partition 5); after the
// CSL table is rewritten with schemes beta and gamma it must follow those. Expected partitions
// come from the limits computed in nus_tb_pkg. Inputs include every limit and its neighbours,
// the ends of the domain and random codes.
module tb_nus_region_select;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel;
  logic signed [X_W-1:0] cfg_csl = '0, x = '0;
  int checks = 0, failures = 0;

  nus_region_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_x(scheme_t sc, int xi);
    x = X_W'(xi);
    #1;
    checks++;
    if (int'(sel) != part_of(sc, xi)) begin
      failures++;
      $display("FAIL x=%0d sel=%0d expected %0d", xi, sel, part_of(sc, xi));
    end
  endtask

  task automatic sweep(scheme_t sc);
    check_x(sc, -16384);
    check_x(sc, 16383);
    check_x(sc, 0);
    for (int n = 1; n <= P; n++) begin
      for (int d = -2; d <= 2; d++) begin
        int v;
        v = sc.csl[n] + d;
        if (v >= -16384 && v <= 16383) check_x(sc, v);
      end
    end
    repeat (3000) check_x(sc, int'($urandom_range(32767)) - 16384);
  endtask

  initial begin
    scheme_t sc;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    sc = make_scheme(0);
    // example of the source: x = -0.97 selects partition 5
    check_x(sc, -15892);
    checks++;
    if (sel != 5) begin failures++; $display("FAIL -0.97 -> %0d", sel); end
    sweep(sc);
    for (int s = 1; s < NS; s++) begin
      sc = make_scheme(s);
      for (int n = 1; n <= P; n++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = SEL_W'(n); cfg_csl = sc.cfg[n].csl;
      end
      @(negedge clk);
      cfg_we = 0;
      sweep(sc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
