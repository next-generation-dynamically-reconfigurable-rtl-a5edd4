// tb_udsp_vs_prog: self-checking test of the vertical-stack programmer.
//
// Sends random 64-word frames and records every write on the configuration
// bus. Checks the 48 writes come in order (8 core instructions, 8 + 8
// constants, 8 layer-1, 8 layer-2, 8 layer-3 instructions), each with the
// right stack, address and the bits cut from the frame at the documented
// offsets (74*i, 592+16*j, 720+16*j, 848+90*i, 1568+24*i, 1760+24*i), and
// that programming takes 48 cycles of busy after the last word.
module tb_udsp_vs_prog;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, w_valid = 1'b0, busy;
  logic [5:0] w_idx = '0;
  logic [7:0] w_stack = '0;
  logic [31:0] w_data = '0;
  cfg_bus_t cfg;
  int checks = 0, failures = 0;

  udsp_vs_prog dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2047:0] frame;
  int nwr, busy_cycles;

  always @(posedge clk) if (busy) busy_cycles++;

  task automatic chk(input string what, input logic [89:0] got, input logic [89:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h vs %h", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n && cfg.we) begin
    int grp, a, ofs, wd;
    grp = nwr / 8; a = nwr % 8;
    case (grp)
      0: begin ofs = 74*a;        wd = 74; end
      1: begin ofs = 592 + 16*a;  wd = 16; end
      2: begin ofs = 720 + 16*a;  wd = 16; end
      3: begin ofs = 848 + 90*a;  wd = 90; end
      4: begin ofs = 1568 + 24*a; wd = 24; end
      default: begin ofs = 1760 + 24*a; wd = 24; end
    endcase
    chk("target", 90'(cfg.target), 90'(grp));
    chk("addr", 90'(cfg.addr), 90'(a));
    chk("stack", 90'(cfg.stack_id), 90'(w_stack));
    chk("data", cfg.data, 90'((frame >> ofs) & ((2048'(1) << wd) - 1)));
    nwr++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      nwr = 0; busy_cycles = 0;
      w_stack = 8'($urandom);
      for (int k = 0; k < 64; k++) begin
        frame[32*k +: 32] = $urandom;
        @(negedge clk);
        w_valid = 1'b1; w_idx = 6'(k); w_data = frame[32*k +: 32];
        @(negedge clk);
        w_valid = 1'b0;
      end
      // a word offered while busy must not change the frame being written
      w_valid = 1'b1; w_idx = 6'd0; w_data = ~frame[31:0];
      @(negedge clk);
      w_valid = 1'b0;
      repeat (60) @(negedge clk);
      chk("48 writes", 90'(nwr), 90'd48);
      chk("busy 48 cycles", 90'(busy_cycles), 90'd48);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
