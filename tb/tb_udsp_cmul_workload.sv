// tb_udsp_cmul_workload: complex multiplication at one result per cycle on
// two compute cores.
//
// Both cores see the same four inputs: In0 = br, In1 = ar, In2 = ai, In3 = bi.
//   core R: MS0 = ar*br (In1 x In0), MS1 = ai*bi (In2 x In3), Add0 = MS0 - MS1
//   core I: MS0 = ar*bi (In1 x In3), MS1 = ai*br (In2 x In0), Add0 = MS0 + MS1
// and Out1 = Add0 on both, so Out1 of R and I carry the real and imaginary
// parts of (ar + j ai)(br + j bi). The multiplier inputs take one register
// and Add0 -> Out1 one more, so a product appears two cycles after its
// operands, and a new one follows every cycle. 300 random operand pairs are
// checked against a model with the same Q1.15 multiply and wrap-around
// add/subtract. The mapping is this test's own; it uses only the core's
// connectivity (multiplier port 2 may read In0, In2 or In3).
module tb_udsp_cmul_workload;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, soft_rst = 1'b0;
  logic [PC_W-1:0] pc = '0;
  word_t din [N_CIO];
  word_t dout_r [N_CIO], dout_i [N_CIO];
  logic cfg_we_r = 1'b0, cfg_we_i = 1'b0;
  cfg_target_e cfg_target = T_CORE;
  logic [PC_W-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  int checks = 0, failures = 0;

  udsp_core u_r (.clk, .rst_n, .soft_rst, .pc, .din, .dout(dout_r), .cfg_we(cfg_we_r),
                 .cfg_target, .cfg_addr, .cfg_data);
  udsp_core u_i (.clk, .rst_n, .soft_rst, .pc, .din, .dout(dout_i), .cfg_we(cfg_we_i),
                 .cfg_target, .cfg_addr, .cfg_data);

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

  core_instr_t ir, ii;
  word_t ar, ai, br, bi, er, ei;

  initial begin
    for (int k = 0; k < N_CIO; k++) din[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ir = '0;
    ir.sel_ms0p1 = 2'd0; ir.dly_ms0p1 = 2'd1;   // In1
    ir.sel_ms0p2 = 2'd0; ir.dly_ms0p2 = 2'd1;   // In0
    ir.sel_ms1p1 = 2'd0; ir.dly_ms1p1 = 2'd1;   // In2
    ir.sel_ms1p2 = 2'd2; ir.dly_ms1p2 = 2'd1;   // In3
    ir.sel_a0p1  = 1'b1; ir.sel_a0p2 = 2'd1;    // MS0, MS1
    ir.add_sub   = 2'b01;                       // Add0 subtracts
    ir.sel_o1    = 2'd2; ir.dly_o1 = 2'd1;      // Add0
    ii = ir;
    ii.sel_ms0p2 = 2'd2;                        // In3
    ii.sel_ms1p2 = 2'd0;                        // In0
    ii.add_sub   = 2'b00;
    @(negedge clk);
    cfg_data = CFG_DW'(ir); cfg_we_r = 1'b1;
    @(negedge clk);
    cfg_we_r = 1'b0; cfg_data = CFG_DW'(ii); cfg_we_i = 1'b1;
    @(negedge clk);
    cfg_we_i = 1'b0;
    for (int n = 0; n < 301; n++) begin
      er = q15(ar, br) - q15(ai, bi);
      ei = q15(ar, bi) + q15(ai, br);
      ar = word_t'($urandom); ai = word_t'($urandom);
      br = word_t'($urandom); bi = word_t'($urandom);
      din[0] = br; din[1] = ar; din[2] = ai; din[3] = bi;
      @(negedge clk);
      if (n > 0) begin
        checks += 2;
        if (dout_r[1] !== er) begin
          failures++;
          if (failures < 10) $display("FAIL re n=%0d: got %0d expected %0d", n, dout_r[1], er);
        end
        if (dout_i[1] !== ei) begin
          failures++;
          if (failures < 10) $display("FAIL im n=%0d: got %0d expected %0d", n, dout_i[1], ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
