// tb_nus_delay: self-checking test of the delay line at the three depths the interpolator uses
// (1, 4 and 6 clocks). Random data goes in every clock; each output must equal the input of
// exactly N clocks before, and all outputs must be zero right after reset.
module tb_nus_delay;
  logic clk = 0, rst = 1;
  logic [14:0] din = '0, d1, d4, d6;
  logic [14:0] hist [0:15];
  int checks = 0, failures = 0;

  nus_delay #(.W(15), .N(1)) u1 (.clk, .rst, .din, .dout(d1));
  nus_delay #(.W(15), .N(4)) u4 (.clk, .rst, .din, .dout(d4));
  nus_delay #(.W(15), .N(6)) u6 (.clk, .rst, .din, .dout(d6));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (d1 != 0 || d4 != 0 || d6 != 0) begin failures++; $display("FAIL not cleared by reset"); end
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) hist[i] = '0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      din = 15'($urandom);
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = din;
      @(posedge clk);
      #1;
      if (c >= 6) begin
        checks += 3;
        if (d1 != hist[0]) begin failures++; $display("FAIL N=1 at %0d", c); end
        if (d4 != hist[3]) begin failures++; $display("FAIL N=4 at %0d", c); end
        if (d6 != hist[5]) begin failures++; $display("FAIL N=6 at %0d", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
