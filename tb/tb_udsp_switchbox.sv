// tb_udsp_switchbox: self-checking test of the routing switch box.
//
// Two instances: the layer-1 box (21 ports, 8 tokens, sparse first level,
// 90-bit words) and a layer-2/3 box (6 ports, 4 tokens, full first level,
// 24-bit words). All 8 instructions of each are loaded with random codes;
// then, for random program counter values and random inputs, every output is
// compared with a model of the two-level selection (token code 0 = zero,
// code k = sparse choice (t + 8(k-1)) mod 21 or input k-1; output code =
// token number). Outputs must follow inputs and pc in the same cycle.
module tb_udsp_switchbox;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PC_W-1:0] pc = '0;
  logic we1 = 1'b0, we2 = 1'b0;
  logic [PC_W-1:0] addr = '0;
  logic [L1_IW-1:0]  d1 = '0;
  logic [L23_IW-1:0] d2 = '0;
  word_t i1 [L1_NIO], o1 [L1_NIO];
  word_t i2 [L23_NIO], o2 [L23_NIO];
  logic [L1_IW-1:0]  m1 [N_INSTR];
  logic [L23_IW-1:0] m2 [N_INSTR];
  int checks = 0, failures = 0;

  udsp_switchbox dut1 (.clk, .rst_n, .pc, .cfg_we(we1), .cfg_addr(addr), .cfg_data(d1),
                       .din(i1), .dout(o1));
  udsp_switchbox #(.NIN(6), .NOUT(6), .NTOK(4), .TSEL_W(3), .OSEL_W(2), .IW(24), .SPARSE(1'b0))
    dut2 (.clk, .rst_n, .pc, .cfg_we(we2), .cfg_addr(addr), .cfg_data(d2), .din(i2), .dout(o2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t exp1(input int o, input int p);
    int oc, tc, idx;
    oc = int'(m1[p][24 + 3*o +: 3]);
    tc = int'(m1[p][3*oc +: 3]);
    if (tc == 0) return '0;
    idx = (oc + 8*(tc-1)) % 21;
    return i1[idx];
  endfunction

  function automatic word_t exp2(input int o, input int p);
    int oc, tc;
    oc = int'(m2[p][12 + 2*o +: 2]);
    tc = int'(m2[p][3*oc +: 3]);
    if (tc == 0 || tc > 6) return '0;
    return i2[tc-1];
  endfunction

  initial begin
    for (int k = 0; k < L1_NIO; k++) i1[k] = '0;
    for (int k = 0; k < L23_NIO; k++) i2[k] = '0;
    repeat (2) @(negedge clk);
    // reset value: every output zero
    for (int k = 0; k < L1_NIO; k++) i1[k] = word_t'(k + 1);
    #1;
    checks++; if (o1[0] !== '0 || o1[20] !== '0) failures++;
    rst_n = 1'b1;
    for (int p = 0; p < N_INSTR; p++) begin
      for (int b = 0; b < L1_IW; b++) m1[p][b] = 1'($urandom);
      for (int b = 0; b < L23_IW; b++) m2[p][b] = 1'($urandom);
      @(negedge clk);
      addr = PC_W'(p); d1 = m1[p]; d2 = m2[p]; we1 = 1'b1; we2 = 1'b1;
      @(negedge clk);
      we1 = 1'b0; we2 = 1'b0;
    end
    for (int n = 0; n < 400; n++) begin
      pc = PC_W'($urandom_range(0, 7));
      for (int k = 0; k < L1_NIO; k++) i1[k] = word_t'($urandom);
      for (int k = 0; k < L23_NIO; k++) i2[k] = word_t'($urandom);
      #1;
      for (int o = 0; o < L1_NIO; o++) begin
        checks++;
        if (o1[o] !== exp1(o, int'(pc))) begin
          failures++;
          if (failures < 10) $display("FAIL L1 out %0d pc %0d: %h vs %h", o, pc, o1[o], exp1(o, int'(pc)));
        end
      end
      for (int o = 0; o < L23_NIO; o++) begin
        checks++;
        if (o2[o] !== exp2(o, int'(pc))) begin
          failures++;
          if (failures < 10) $display("FAIL L2 out %0d pc %0d", o, pc);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
