// tb_nus_add_log: self-checking test of the Add log_n table.
// Checks the reset contents against scheme alpha as computed in nus_tb_pkg (0, 19, 38, ...,
// -32322), then random signed writes read back against a shadow copy.
module tb_nus_add_log;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel = '0;
  logic signed [LOG_W-1:0] cfg_add_log = '0, add_log;
  int checks = 0, failures = 0;
  int shadow [1:P];

  nus_add_log dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int n = 1; n <= P; n++) begin
      sel = SEL_W'(n);
      #1;
      checks++;
      if (int'(add_log) != shadow[n]) begin
        failures++;
        $display("FAIL n=%0d add_log=%0d expected %0d", n, add_log, shadow[n]);
      end
    end
  endtask

  initial begin
    scheme_t sc;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    sc = make_scheme(0);
    for (int n = 1; n <= P; n++) shadow[n] = int'(sc.cfg[n].add_log);
    checks++;
    if (shadow[22] != -32322 || shadow[5] != 78) begin
      failures++;
      $display("FAIL reference scheme alpha: %0d %0d", shadow[5], shadow[22]);
    end
    read_all();
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < 10; w++) begin
        int n, v;
        n = int'($urandom_range(P, 1));
        v = int'($urandom_range(65535)) - 32768;
        @(negedge clk);
        cfg_we = 1; cfg_idx = SEL_W'(n); cfg_add_log = LOG_W'(v);
        shadow[n] = v;
      end
      @(negedge clk);
      cfg_we = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
