// tb_udsp_soft_reset: self-checking test of the soft-reset block.
//
// Issues commands to random stacks and to all stacks (8'hFF) with random
// lengths and checks that exactly the targeted soft_rst lines are high for
// 1 + arg[3:0] cycles starting the cycle after the command.
module tb_udsp_soft_reset;
  logic clk = 1'b0, rst_n = 1'b0, cmd = 1'b0;
  logic [7:0] target = '0;
  logic [19:0] arg = '0;
  logic soft_rst [81];
  int checks = 0, failures = 0;

  udsp_soft_reset dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      int t, len;
      t = ($urandom_range(0, 4) == 0) ? 255 : $urandom_range(0, 80);
      len = $urandom_range(0, 15);
      @(negedge clk);
      cmd = 1'b1; target = 8'(t); arg = 20'(len);
      @(negedge clk);
      cmd = 1'b0;
      for (int n = 0; n < len + 3; n++) begin
        for (int s = 0; s < 81; s++) begin
          logic e;
          e = (n <= len) && (t == 255 || t == s);
          checks++;
          if (soft_rst[s] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL stack %0d cycle %0d", s, n);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
