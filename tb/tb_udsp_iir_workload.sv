// tb_udsp_iir_workload: recursive (IIR) filters on one compute core.
//
// The feedback loop of a direct-form IIR section closes inside the core:
//   Add0 = In0 + MS1,  MS1 = Add0 (delayed) x Const1,  Out1 = Add0 delayed 1
// so y[n] = x[n] + a*y[n-D]. D = 1 (one register in the loop, the shortest
// legal loop) and D = 2 (a two-sample recursion, using the second tap of the
// adder-to-multiplier delay line) are run with random input and random
// coefficients |a| < 0.5, each for 200 samples, against a model computed
// here with the same Q1.15 multiply and wrap-around addition. One output per
// cycle is checked: the loop runs at the full sample rate. The mapping
// (which units, ports and delays) is this test's own; the units and delay
// ranges it relies on are the core's.
module tb_udsp_iir_workload;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, soft_rst = 1'b0;
  logic [PC_W-1:0] pc = '0;
  word_t din [N_CIO];
  word_t dout [N_CIO];
  logic cfg_we = 1'b0;
  cfg_target_e cfg_target = T_CORE;
  logic [PC_W-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  int checks = 0, failures = 0;

  udsp_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t q15(input word_t a, input word_t b);
    int p;
    if (a == -32768 && b == -32768) return 16'sh7fff;
    p = int'(a) * int'(b);
    return word_t'(p >>> 15);
  endfunction

  task automatic cfg_write(input cfg_target_e t, input int a, input logic [CFG_DW-1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = t; cfg_addr = PC_W'(a); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  core_instr_t ins;
  word_t a, y [0:1023];
  word_t x;

  initial begin
    for (int k = 0; k < N_CIO; k++) din[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 1; d <= 2; d++) begin
      a = word_t'($urandom_range(0, 32767) - 16384);
      cfg_write(T_C1, 0, CFG_DW'(a));
      ins = '0;
      ins.sel_a0p1  = 1'b0; ins.dly_a0p1  = 2'd0;     // In0, no delay
      ins.sel_a0p2  = 2'd1; ins.dly_a0p2  = 2'd0;     // MS1, no delay
      ins.sel_ms1p1 = 2'd1; ins.dly_ms1p1 = 2'(d);    // Add0, d delays
      ins.sel_ms1p2 = 2'd3;                           // Const1
      ins.sel_o1    = 2'd2; ins.dly_o1    = 2'd1;     // Add0, 1 delay
      cfg_write(T_CORE, 0, CFG_DW'(ins));
      @(negedge clk); soft_rst = 1'b1; din[0] = '0;
      @(negedge clk); soft_rst = 1'b0;
      for (int n = 0; n < 200; n++) begin
        x = word_t'($urandom_range(0, 65535) >> 2) - 16'sd8192;
        din[0] = x;
        y[n] = x + q15(n >= d ? y[n-d] : word_t'(0), a);
        @(negedge clk);
        checks++;
        if (dout[1] !== y[n]) begin
          failures++;
          if (failures < 10) $display("FAIL D=%0d n=%0d: got %0d expected %0d", d, n, dout[1], y[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
