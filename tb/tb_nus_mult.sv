// tb_nus_mult: self-checking test of the pipelined multiplier (signed 32-bit x unsigned 15-bit,
// latency 4). Random operands, including the extremes, enter every clock; each product is
// compared, four clocks later, with a 64-bit product computed in the testbench.
module tb_nus_mult;
  logic clk = 0, rst = 1;
  logic signed [31:0] a = '0;
  logic [14:0] b = '0;
  logic signed [46:0] p;
  longint expq [$];
  int checks = 0, failures = 0;

  nus_mult #(.A_W(32), .B_W(15), .LAT(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      longint e;
      case (c % 50)
        0: begin a = 32'sh7FFFFFFF; b = 15'h7FFF; end
        1: begin a = 32'sh80000000; b = 15'h7FFF; end
        2: begin a = -32'sd1; b = 15'd1; end
        default: begin a = $urandom; b = 15'($urandom); end
      endcase
      expq.push_back(longint'(a) * longint'({49'd0, b}));
      @(posedge clk);
      #1;
      if (expq.size() >= 4) begin
        e = expq.pop_front();
        checks++;
        if (longint'(p) != e) begin
          failures++;
          $display("FAIL c=%0d p=%0d expected %0d", c, p, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
