// tb_nus_difference_address: self-checking test of the Difference_Address subsystem.
// 1. The table entries computed in nus_tb_pkg from the partition limits and frequencies of
//    scheme alpha must equal the reset contents held in nus_pkg (the published table), and the
//    word counts of the schemes must be 445 (alpha), 374 (beta), 390 (gamma) and 127 (uniform
//    f = 128, whose last pitch step lies above CSL_22 and is reached only through the clamp).
//    All four schemes are then swept.
// 2. With each scheme loaded (alpha from reset, the others written one partition per
//    clock), every one of the 32768 input codes must give the address and residual worked out
//    from PIL_n, SMN_n and the pitch 2/f_n (not from the bit slicing the block uses).
//    The example of the source (x = -0.97: partition 5, Dsp 1024, Add log 78) is checked too.
module tb_nus_difference_address;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel;
  nus_cfg_t cfg = '0;
  logic signed [X_W-1:0] x = '0;
  logic [8:0] address;
  logic [X_W-1:0] difference;
  int checks = 0, failures = 0;

  nus_difference_address #(.ADDR_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(scheme_t sc);
    int a, d, bad;
    bad = 0;
    for (int xi = -16384; xi <= 16383; xi++) begin
      x = X_W'(xi);
      #1;
      addr_diff(sc, xi, a, d);
      checks++;
      if (int'(address) != a || int'(difference) != d) begin
        failures++;
        if (bad++ < 10)
          $display("FAIL x=%0d sel=%0d addr=%0d/%0d diff=%0d/%0d", xi, sel, address, a, difference, d);
      end
    end
  endtask

  initial begin
    scheme_t sc;
    int exp_total [NS];
    exp_total = '{445, 374, 390, 127};
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      sc = make_scheme(s);
      checks++;
      if (sc.total != exp_total[s]) begin
        failures++;
        $display("FAIL scheme %0d uses %0d words", s, sc.total);
      end
    end
    sc = make_scheme(0);
    for (int n = 1; n <= P; n++) begin
      checks++;
      if (sc.cfg[n] != alpha_cfg(n)) begin
        failures++;
        $display("FAIL partition %0d: computed entry differs from the reset entry", n);
      end
    end
    // x = -0.97 (code -15892)
    x = -15'sd15892;
    #1;
    checks++;
    if (sel != 5 || dut.dsp != 1024 || dut.add_log != 78) begin
      failures++;
      $display("FAIL example: sel=%0d dsp=%0d add_log=%0d", sel, dut.dsp, dut.add_log);
    end
    sweep(sc);
    for (int s = 1; s < NS; s++) begin
      sc = make_scheme(s);
      for (int n = 1; n <= P; n++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = SEL_W'(n); cfg = sc.cfg[n];
      end
      @(negedge clk);
      cfg_we = 0;
      sweep(sc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
