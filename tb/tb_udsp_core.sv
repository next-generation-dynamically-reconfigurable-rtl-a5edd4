// tb_udsp_core: self-checking test of the compute core.
//
// Programs the core through its configuration port and streams random data:
//  1. single-cycle MAC  (In1 x Const0 accumulated in Add0, read on Out1),
//     checked against a running sum of Q1.15 products; one result per cycle;
//  2. two-tap FIR       (Out1 = c0*x[n-1] + c1*x[n-2] through MS0, MS1, Add0),
//  3. long delay lines  (Out0 = In0 delayed 16, Out3 = In3 delayed 5),
//  4. shifter + subtract (Out2 = In3 - (In1 >>> 2)),
//  5. temporal multiplexing: two MAC programs in instructions 0 and 1 using
//     states 0 and 1, the program counter alternating every cycle; each state
//     keeps its own accumulator and delay registers,
//  6. soft reset clears the state but keeps the program,
//  7. data-cache write of In1 into Const0 and the -1 * -1 saturation.
// Expected values come from a cycle model written here from the rules.
module tb_udsp_core;
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
    repeat (20000) @(posedge clk);
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

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cfg_write(input cfg_target_e t, input int a, input logic [CFG_DW-1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = t; cfg_addr = PC_W'(a); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic prog(input int a, input core_instr_t i);
    cfg_write(T_CORE, a, CFG_DW'(i));
  endtask

  task automatic sreset();
    @(negedge clk);
    soft_rst = 1'b1;
    for (int k = 0; k < N_CIO; k++) din[k] = '0;
    @(negedge clk);
    soft_rst = 1'b0;
  endtask

  core_instr_t ins;
  word_t xh [0:255];
  word_t yh [0:255];
  word_t acc_m [N_STATES], xl_m [N_STATES], o_m [N_STATES];
  word_t c0v, c1v, e;

  initial begin
    for (int k = 0; k < N_CIO; k++) din[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------------- 1. single-cycle MAC
    c0v = word_t'($urandom_range(0, 65535));
    cfg_write(T_C0, 0, CFG_DW'(c0v));
    ins = '0;
    ins.sel_ms0p1 = 2'd0; ins.dly_ms0p1 = 2'd1;     // In1, 1 delay
    ins.sel_ms0p2 = 2'd3;                           // Const0
    ins.sel_a0p1  = 1'b1; ins.dly_a0p1 = 2'd0;      // MS0, no delay
    ins.add_acc   = 2'b01;
    ins.sel_o1    = 2'd2; ins.dly_o1 = 2'd1;        // Add0, 1 delay
    prog(0, ins);
    sreset();
    for (int k = 0; k < N_STATES; k++) begin acc_m[k] = '0; xl_m[k] = '0; o_m[k] = '0; end
    for (int n = 0; n < 60; n++) begin
      check("mac out1", dout[1], o_m[0]);
      din[1] = word_t'($urandom_range(0, 65535));
      @(negedge clk);
      o_m[0] = acc_m[0] + q15(xl_m[0], c0v);
      acc_m[0] = o_m[0];
      xl_m[0] = din[1];
    end

    // ---------------------------------------------------- 2. two-tap FIR
    c0v = word_t'($urandom_range(0, 65535));
    c1v = word_t'($urandom_range(0, 65535));
    cfg_write(T_C0, 2, CFG_DW'(c0v));
    cfg_write(T_C1, 5, CFG_DW'(c1v));
    ins = '0;
    ins.c0_addr = 3'd2; ins.c1_addr = 3'd5;
    ins.sel_ms0p1 = 2'd0; ins.dly_ms0p1 = 2'd1;   // In1 d1
    ins.sel_ms0p2 = 2'd3;
    ins.sel_ms1p1 = 2'd0; ins.dly_ms1p1 = 2'd2;   // In2 d2
    ins.sel_ms1p2 = 2'd3;
    ins.sel_a0p1 = 1'b1; ins.sel_a0p2 = 2'd1;     // MS0 + MS1
    ins.sel_o1 = 2'd2; ins.dly_o1 = 2'd1;
    // long delay lines and shifter/subtract on the free units
    ins.sel_o0 = 1'b0; ins.dly_o0 = 5'd16;
    ins.sel_o3 = 1'b0; ins.dly_o3 = 5'd5;
    prog(3, ins);
    @(negedge clk); pc = 3'd3;
    sreset();
    for (int k = 0; k < 256; k++) begin xh[k] = '0; yh[k] = '0; end
    for (int n = 0; n < 120; n++) begin
      if (n >= 3) begin
        e = q15(xh[n-2], c0v) + q15(xh[n-3], c1v);
        check("fir out1", dout[1], e);
      end
      if (n >= 16) check("delay16 out0", dout[0], yh[n-16]);
      if (n >= 5)  check("delay5 out3", dout[3], xh[n-5]);
      xh[n] = word_t'($urandom_range(0, 65535));
      yh[n] = word_t'($urandom_range(0, 65535));
      din[1] = xh[n]; din[2] = xh[n]; din[0] = yh[n]; din[3] = xh[n];
      @(negedge clk);
    end

    // ---------------------------------------------------- 4. shifter + subtract
    ins = '0;
    ins.ms_shift = 2'b01; ins.ms0_shamt = 4'hE;      // -2: arithmetic right by 2
    ins.sel_ms0p1 = 2'd0; ins.dly_ms0p1 = 2'd1;      // In1 d1
    ins.sel_a1p1 = 1'b0; ins.dly_a1p1 = 2'd1;        // In3 d1
    ins.sel_a1p2 = 2'd1; ins.dly_a1p2 = 2'd0;        // MS0 d0
    ins.add_sub = 2'b10;
    ins.sel_o2 = 2'd3; ins.dly_o2 = 2'd1;            // Add1 d1
    prog(4, ins);
    @(negedge clk); pc = 3'd4;
    sreset();
    for (int n = 0; n < 60; n++) begin
      if (n >= 2) begin
        e = xh[n-2] - (yh[n-2] >>> 2);
        check("shift-sub out2", dout[2], e);
      end
      xh[n] = word_t'($urandom_range(0, 65535));
      yh[n] = word_t'($urandom_range(0, 65535));
      din[3] = xh[n]; din[1] = yh[n];
      @(negedge clk);
    end

    // ---------------------------------------------------- 5. temporal multiplexing
    c0v = word_t'($urandom_range(0, 65535));
    c1v = word_t'($urandom_range(0, 65535));
    cfg_write(T_C0, 0, CFG_DW'(c0v));
    cfg_write(T_C0, 1, CFG_DW'(c1v));
    ins = '0;
    ins.sel_ms0p1 = 2'd0; ins.dly_ms0p1 = 2'd1;
    ins.sel_ms0p2 = 2'd3;
    ins.sel_a0p1 = 1'b1; ins.add_acc = 2'b01;
    ins.sel_o1 = 2'd2; ins.dly_o1 = 2'd1;
    ins.state = 2'd0; ins.c0_addr = 3'd0;
    prog(0, ins);
    ins.state = 2'd1; ins.c0_addr = 3'd1;
    prog(1, ins);
    @(negedge clk); pc = 3'd0;
    sreset();
    for (int k = 0; k < N_STATES; k++) begin acc_m[k] = '0; xl_m[k] = '0; o_m[k] = '0; end
    for (int n = 0; n < 80; n++) begin
      int s;
      s = n % 2;
      pc = PC_W'(s);
      #1;
      check("tdm out1", dout[1], o_m[s]);
      din[1] = word_t'($urandom_range(0, 65535));
      @(negedge clk);
      o_m[s] = acc_m[s] + q15(xl_m[s], (s == 0) ? c0v : c1v);
      acc_m[s] = o_m[s];
      xl_m[s] = din[1];
    end

    // ---------------------------------------------------- 6. soft reset keeps program
    pc = 3'd0;
    sreset();
    din[1] = 16'sd0;
    check("soft reset clears out1", dout[1], 16'sd0);
    din[1] = 16'sh4000;          // 0.5
    @(negedge clk);              // captured
    din[1] = 16'sd0;
    @(negedge clk);              // accumulated
    check("program kept after soft reset", dout[1], q15(16'sh4000, c0v));

    // ---------------------------------------------------- 7. data cache and saturation
    ins = '0;
    ins.c_we = 2'b01; ins.c0_addr = 3'd6;            // In1 -> Const0[6]
    prog(5, ins);
    ins = '0;
    ins.c0_addr = 3'd6;
    ins.sel_ms0p1 = 2'd0; ins.dly_ms0p1 = 2'd1;
    ins.sel_ms0p2 = 2'd3;
    ins.sel_o0 = 1'b1; ins.dly_o0 = 5'd1;            // MS0 d1
    prog(6, ins);
    @(negedge clk);
    pc = 3'd5; din[1] = -16'sd32768;
    @(negedge clk);
    pc = 3'd6;
    @(negedge clk);
    @(negedge clk);
    check("cache write and -1*-1 saturation", dout[0], 16'sh7fff);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
