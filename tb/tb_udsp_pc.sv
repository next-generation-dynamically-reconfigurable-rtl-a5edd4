// tb_udsp_pc: self-checking test of the program counter module.
//
// For random settings of each mode (hold, loop, once, ping-pong) with random
// first/last values and dwell times, compares the counter cycle by cycle
// with a sequence generated here from the mode's definition.
module tb_udsp_pc;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cmd = 1'b0, done;
  logic [19:0] arg = '0;
  logic [PC_W-1:0] pc;
  int checks = 0, failures = 0;

  udsp_pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (pc !== 3'd0) failures++;
    for (int r = 0; r < 40; r++) begin
      int mode, first, last, dwell, p, dir, hold;
      mode = r % 4; first = $urandom_range(0, 7); last = $urandom_range(0, 7);
      dwell = $urandom_range(0, 3);
      @(negedge clk);
      cmd = 1'b1;
      arg = 20'((mode << 16) | (first << 12) | (last << 8) | dwell);
      @(negedge clk);
      cmd = 1'b0;
      p = first; dir = 1; hold = 0;
      for (int n = 0; n < 60; n++) begin
        checks++;
        if (int'(pc) != p) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d f %0d l %0d d %0d n %0d: pc %0d exp %0d",
                                      mode, first, last, dwell, n, pc, p);
        end
        if (mode == 2 && p == last) begin
          checks++;
          if (!done) failures++;
        end
        @(negedge clk);
        if (hold < dwell) hold++;
        else begin
          hold = 0;
          case (mode)
            0: p = first;
            1: p = (p == last) ? first : (p + 1) % 8;
            2: if (p != last) p = (p + 1) % 8;
            default: begin
              if (first == last) p = first;
              else begin
                if (dir == 1 && p == last) dir = -1;
                else if (dir == -1 && p == first) dir = 1;
                p = (p + dir + 8) % 8;
              end
            end
          endcase
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
