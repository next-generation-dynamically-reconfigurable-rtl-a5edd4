// tb_udsp_l4_prog: self-checking test of the I/O-layer programmer.
//
// Sends 4-word configurations to random boxes (including an index past the
// last box) and checks that exactly the addressed box gets one write strobe,
// one cycle after the last word, with the 120 low bits of the 4 words.
module tb_udsp_l4_prog;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, w_valid = 1'b0;
  logic [1:0] w_idx = '0;
  logic [7:0] w_box = '0;
  logic [31:0] w_data = '0;
  logic l4_we [9];
  logic [L4_IW-1:0] l4_data;
  int checks = 0, failures = 0;

  udsp_l4_prog dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      int box;
      box = $urandom_range(0, 10);
      w = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        w_valid = 1'b1; w_idx = 2'(k); w_box = 8'(box); w_data = w[32*k +: 32];
        #1;
        for (int b = 0; b < 9; b++) begin
          checks++;
          if (l4_we[b]) failures++;
        end
      end
      @(negedge clk);
      w_valid = 1'b0;
      for (int b = 0; b < 9; b++) begin
        checks++;
        if (l4_we[b] !== (b == box)) begin failures++; $display("FAIL strobe box %0d", b); end
      end
      if (box < 9) begin
        checks++;
        if (l4_data !== w[119:0]) begin failures++; $display("FAIL data"); end
      end
      @(negedge clk);
      for (int b = 0; b < 9; b++) begin
        checks++;
        if (l4_we[b]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
