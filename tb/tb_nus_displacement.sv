// tb_nus_displacement: self-checking test of the Dsp_n table.
// Checks the reset contents (f_n/2 of scheme alpha: 16384 for partitions 1 and 22, 16 for 11
// and 12), then random writes followed by reads of every partition against a shadow copy, and
// that out-of-range partition numbers write nothing.
module tb_nus_displacement;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel = '0;
  logic [DSP_W-1:0] cfg_dsp = '0, dsp;
  int checks = 0, failures = 0;
  int shadow [1:P];

  nus_displacement dut (.*);

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
      if (int'(dsp) != shadow[n]) begin
        failures++;
        $display("FAIL n=%0d dsp=%0d expected %0d", n, dsp, shadow[n]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 1; n <= P; n++) shadow[n] = SCHEME_F[0][n-1] / 2;
    read_all();
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < 10; w++) begin
        int n, v;
        n = int'($urandom_range(31));
        v = int'($urandom_range(16384));
        @(negedge clk);
        cfg_we = 1; cfg_idx = SEL_W'(n); cfg_dsp = DSP_W'(v);
        if (n >= 1 && n <= P) shadow[n] = v;
      end
      @(negedge clk);
      cfg_we = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
