// tb_udsp_vstack: self-checking test of one vertical stack.
//
// Programs the stack (ID 5) over the configuration bus and checks routes
// through every layer, with random data each cycle:
//   west L1 wire 0 -> L1 -> core In0 -> Out0 (3-cycle long delay) -> L1 ->
//       east L1 wire 2                                   (latency 3 cycles)
//   north L1 wire 1 -> L1 -> L2 -> L3 -> up to the I/O layer  (0 cycles)
//   I/O layer -> L3 -> L2 -> L1 -> south L1 wire 3            (0 cycles)
//   north L2 -> south L2, east L3 -> west L3                  (0 cycles)
// A write addressed to another stack must be ignored, and unused outputs
// must stay zero.
module tb_udsp_vstack;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, soft_rst = 1'b0;
  logic [PC_W-1:0] pc = '0;
  cfg_bus_t cfg;
  word_t l1_in [4][L1_WPD], l1_out [4][L1_WPD];
  word_t l2_in [4], l2_out [4], l3_in [4], l3_out [4];
  word_t l4_in, l4_out;
  word_t core_out [N_CIO];
  word_t hist [0:511];
  int checks = 0, failures = 0;

  udsp_vstack #(.ID(8'd5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h vs %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] id, input cfg_target_e t, input logic [CFG_DW-1:0] d);
    @(negedge clk);
    cfg = '0; cfg.we = 1'b1; cfg.stack_id = id; cfg.target = t; cfg.addr = '0; cfg.data = d;
    @(negedge clk);
    cfg = '0;
  endtask

  logic [L1_IW-1:0]  w1;
  logic [L23_IW-1:0] w2, w3;
  logic [7:0]        used;
  core_instr_t       ci;

  // route layer-1 input `i` to output `o` through a free token
  task automatic l1_route(input int i, input int o);
    for (int t = 0; t < 8; t++)
      for (int s = 0; s < 7; s++)
        if (!used[t] && (t + 8*s) % 21 == i) begin
          used[t] = 1'b1;
          w1[3*t +: 3] = 3'(s + 1);
          w1[24 + 3*o +: 3] = 3'(t);
          return;
        end
    $display("no token for input %0d", i);
    failures++;
  endtask

  initial begin
    cfg = '0;
    for (int d = 0; d < 4; d++) begin
      for (int w = 0; w < L1_WPD; w++) l1_in[d][w] = '0;
      l2_in[d] = '0; l3_in[d] = '0;
    end
    l4_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // layer 1: find a token left at zero for the unused outputs
    w1 = '0; used = '0;
    l1_route(4 + 4*D_W + 0, 0);                 // west wire 0 -> core In0
    l1_route(0, 4 + 4*D_E + 2);                 // core Out0 -> east wire 2
    l1_route(4 + 4*D_N + 1, 20);                // north wire 1 -> up
    l1_route(20, 4 + 4*D_S + 3);                // down -> south wire 3
    begin
      int z;
      z = 0;
      for (int t = 7; t >= 0; t--) if (!used[t]) z = t;
      for (int o = 0; o < L1_NIO; o++)
        if (!(o inside {0, 4 + 4*D_E + 2, 20, 4 + 4*D_S + 3})) w1[24 + 3*o +: 3] = 3'(z);
    end
    // layer 2: tok0 <- L1 (in 4), tok1 <- L3 (in 5), tok2 <- north (in 0), tok3 zero
    w2 = '0;
    w2[0 +: 3] = 3'd5; w2[3 +: 3] = 3'd6; w2[6 +: 3] = 3'd1; w2[9 +: 3] = 3'd0;
    for (int o = 0; o < 6; o++) w2[12 + 2*o +: 2] = 2'd3;
    w2[12 + 2*5 +: 2] = 2'd0;   // to L3
    w2[12 + 2*4 +: 2] = 2'd1;   // to L1
    w2[12 + 2*D_S +: 2] = 2'd2; // south
    // layer 3: tok0 <- L2 (in 4), tok1 <- L4 (in 5), tok2 <- east (in 1)
    w3 = '0;
    w3[0 +: 3] = 3'd5; w3[3 +: 3] = 3'd6; w3[6 +: 3] = 3'd2;
    for (int o = 0; o < 6; o++) w3[12 + 2*o +: 2] = 2'd3;
    w3[12 + 2*5 +: 2] = 2'd0;   // up to L4
    w3[12 + 2*4 +: 2] = 2'd1;   // down to L2
    w3[12 + 2*D_W +: 2] = 2'd2; // west
    ci = '0;
    ci.sel_o0 = 1'b0; ci.dly_o0 = 5'd3;

    wr(8'd5, T_L1, CFG_DW'(w1));
    wr(8'd5, T_L2, CFG_DW'(w2));
    wr(8'd5, T_L3, CFG_DW'(w3));
    wr(8'd5, T_CORE, CFG_DW'(ci));
    ci.dly_o0 = 5'd9;
    wr(8'd6, T_CORE, CFG_DW'(ci));              // other stack: ignored

    for (int n = 0; n < 200; n++) begin
      word_t a, b, c, d, e;
      a = word_t'($urandom); b = word_t'($urandom); c = word_t'($urandom);
      d = word_t'($urandom); e = word_t'($urandom);
      l1_in[D_W][0] = a; hist[n] = a;
      l1_in[D_N][1] = b; l4_in = c; l2_in[D_N] = d; l3_in[D_E] = e;
      #1;
      chk("L1->L2->L3->L4", l4_out, b);
      chk("L4->L3->L2->L1", l1_out[D_S][3], c);
      chk("L2 north->south", l2_out[D_S], d);
      chk("L3 east->west", l3_out[D_W], e);
      chk("unused L1 out", l1_out[D_N][0], '0);
      chk("unused L2 out", l2_out[D_E], '0);
      if (n >= 3) begin
        chk("core delay 3 east", l1_out[D_E][2], hist[n-3]);
        chk("core_out tap", core_out[0], hist[n-3]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
