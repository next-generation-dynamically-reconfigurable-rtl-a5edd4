// tb_udsp_top: end-to-end test of the UDSP array, run on a 5 x 5 array.
//
// Everything is programmed through the control module (stack and I/O-layer
// frames on the eFPGA port, commands on the serial port). The mapped
// algorithm is a two-tap FIR filter followed by a gain and a delay, spread
// over four cores and all four routing layers:
//   ext_in_left[0] -> I/O box 0 -> L3 -> L2 -> L1 of stack (0,0)
//   core (0,0): y = c0*x[n-1] + c1*x[n-2]         (MS0, MS1, Add0)
//   L1 east (distance 1)          -> core (0,1): z = g*y   (MS0)
//   L1 up -> L2 east (distance 2) -> L2 -> L1 -> core (0,3): 4-cycle delay line
//   L1 -> L2 -> L3 south (distance 3) -> stack (3,3) L3 up -> I/O box 0 ->
//   ext_out_top[0]
// Checked: every output sample against a model of that chain with its
// latency (10 cycles from input to output), a program-counter switch to instruction 1 (new gain
// from another constant and another state copy), a soft reset of every
// stack (outputs flush to zero, the program stays), and the observer read
// back over the serial port and over JTAG (after an IDCODE read). Each
// mechanism must happen at least once.
// The chain itself is this test's own choice; it uses the routing reach of
// layers 1-3, the registered I/O layer and the control frames as the design
// defines them. Output: ext_out_top[0] against the model, one check per
// cycle; the watchdog stops the run after 100000 cycles.
module tb_udsp_top;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b0, tdo;
  logic sdi = 1'b0, sen = 1'b0, sdo;
  logic efpga_valid = 1'b0, efpga_ready;
  logic [31:0] efpga_data = '0;
  word_t ext_in_left [4], ext_in_top [2], ext_out_top [2], ext_out_right;
  logic [PC_W-1:0] pc;
  logic pc_done, jtag_overrun, serial_overrun;
  logic [1:0] active_source;
  int checks = 0, failures = 0;
  int n_vs = 0, n_l4 = 0, n_stream = 0, n_switch = 0, n_srst = 0, n_obs = 0, n_jtag = 0;

  localparam int unsigned ROWS = 5, COLS = 5;
  udsp_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic efpga(input logic [31:0] w);
    @(negedge clk);
    efpga_valid = 1'b1; efpga_data = w;
    #1;
    while (!efpga_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    efpga_valid = 1'b0;
  endtask

  task automatic serial(input logic [31:0] w, output logic [31:0] back);
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      sdi = w[i]; sen = 1'b1;
      #1 back[i] = sdo;
    end
    @(negedge clk);
    sen = 1'b0;
  endtask

  // one TCK period of 8 system clocks; tdo sampled before the rising edge
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(negedge clk);
    o = tdo;
    tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
  endtask

  // from Run-Test/Idle: shift n bits through IR (ir = 1) or DR, back to idle
  task automatic jshift(input bit ir, input int n, input logic [31:0] din, output logic [31:0] dout);
    logic o;
    dout = '0;
    tclk(1'b1, 1'b0, o);
    if (ir) tclk(1'b1, 1'b0, o);
    tclk(1'b0, 1'b0, o);
    tclk(1'b0, 1'b0, o);
    for (int i = 0; i < n; i++) begin
      tclk((i == n-1), din[i], o);
      dout[i] = o;
    end
    tclk(1'b1, 1'b0, o);
    tclk(1'b0, 1'b0, o);
  endtask

  // ---------------------------------------------------------------- frame building
  core_instr_t        ci [N_INSTR];
  logic [15:0]        k0 [N_CONST], k1 [N_CONST];
  logic [L1_IW-1:0]   w1;
  logic [L23_IW-1:0]  w2, w3;
  logic [7:0]         used;

  task automatic clear_stack();
    for (int i = 0; i < N_INSTR; i++) ci[i] = '0;
    for (int i = 0; i < N_CONST; i++) begin k0[i] = '0; k1[i] = '0; end
    w1 = '0; w2 = '0; w3 = '0; used = '0;
    // token 7 stays zero; every L1 output points at it unless routed
    used[7] = 1'b1;
    for (int o = 0; o < L1_NIO; o++) w1[24 + 3*o +: 3] = 3'd7;
    // token 3 of L2/L3 stays zero
    for (int o = 0; o < L23_NIO; o++) begin
      w2[12 + 2*o +: 2] = 2'd3;
      w3[12 + 2*o +: 2] = 2'd3;
    end
  endtask

  // route layer-1 input i to outputs o (and o2 if >= 0) through a free token
  task automatic l1_route(input int i, input int o, input int o2 = -1);
    for (int t = 0; t < 8; t++)
      for (int s = 0; s < 7; s++)
        if (!used[t] && (t + 8*s) % 21 == i) begin
          used[t] = 1'b1;
          w1[3*t +: 3] = 3'(s + 1);
          w1[24 + 3*o +: 3] = 3'(t);
          if (o2 >= 0) w1[24 + 3*o2 +: 3] = 3'(t);
          return;
        end
    $display("no layer-1 token for input %0d", i);
    failures++;
  endtask

  // layer 2/3: token t takes input i, drives output o
  task automatic l23(input bit l3, input int t, input int i, input int o);
    if (l3) begin w3[3*t +: 3] = 3'(i + 1); w3[12 + 2*o +: 2] = 2'(t); end
    else    begin w2[3*t +: 3] = 3'(i + 1); w2[12 + 2*o +: 2] = 2'(t); end
  endtask

  task automatic send_stack(input int id);
    logic [2047:0] f;
    f = '0;
    for (int i = 0; i < N_INSTR; i++) begin
      f[74*i +: 74]        = ci[i];
      f[848 + 90*i +: 90]  = w1;
      f[1568 + 24*i +: 24] = w2;
      f[1760 + 24*i +: 24] = w3;
    end
    for (int j = 0; j < N_CONST; j++) begin
      f[592 + 16*j +: 16] = k0[j];
      f[720 + 16*j +: 16] = k1[j];
    end
    efpga({4'd1, 8'(id), 20'd0});
    for (int k = 0; k < 64; k++) efpga(f[32*k +: 32]);
    repeat (50) @(negedge clk);
    n_vs++;
  endtask

  task automatic send_l4(input int box, input logic [L4_IW-1:0] c);
    logic [127:0] w;
    w = 128'(c);
    efpga({4'd2, 8'(box), 20'd0});
    for (int k = 0; k < 4; k++) efpga(w[32*k +: 32]);
    n_l4++;
  endtask

  // ---------------------------------------------------------------- stream model
  word_t xs [0:4095];
  int    cyc;
  word_t c0v, c1v, gv, g2v, gain;

  function automatic word_t expect_out(input int k);
    word_t f;
    int j;
    j = k - 7;
    f = (j - 3 >= 0 ? q15(xs[j-3], c0v) : word_t'(0)) + (j - 4 >= 0 ? q15(xs[j-4], c1v) : word_t'(0));
    return q15(f, gain);
  endfunction

  // run n cycles of random (or constant) input, checking after `skip`
  task automatic stream(input int n, input int skip, input bit rnd, input word_t cval);
    for (int m = 0; m < n; m++) begin
      if (m >= skip) begin
        checks++;
        if (ext_out_top[0] !== expect_out(cyc)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: out %0d expected %0d", cyc, ext_out_top[0], expect_out(cyc));
        end else n_stream++;
      end
      xs[cyc] = rnd ? word_t'($urandom) : cval;
      ext_in_left[0] = xs[cyc];
      cyc++;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [L4_IW-1:0] c4;
    logic [31:0] back;
    for (int i = 0; i < 4; i++) ext_in_left[i] = '0;
    ext_in_top[0] = '0; ext_in_top[1] = '0;
    for (int i = 0; i < 4096; i++) xs[i] = '0;
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; trst_n = 1'b1;

    c0v = word_t'($urandom); c1v = word_t'($urandom);
    gv = word_t'($urandom); g2v = word_t'($urandom);

    // stack (0,0): FIR
    clear_stack();
    k0[0] = c0v; k1[0] = c1v;
    for (int i = 0; i < N_INSTR; i++) begin
      ci[i].sel_ms0p1 = 2'd0; ci[i].dly_ms0p1 = 2'd1; ci[i].sel_ms0p2 = 2'd3;
      ci[i].sel_ms1p1 = 2'd0; ci[i].dly_ms1p1 = 2'd2; ci[i].sel_ms1p2 = 2'd3;
      ci[i].sel_a0p1 = 1'b1;  ci[i].sel_a0p2 = 2'd1;
      ci[i].sel_o1 = 2'd2;    ci[i].dly_o1 = 2'd1;
    end
    l23(1'b1, 0, 5, 4);                       // L3: from L4 -> down
    l23(1'b0, 0, 5, 4);                       // L2: from L3 -> down
    l1_route(20, 1, 2);                       // L1: from L2 -> core In1, In2
    l1_route(1, 4 + 4*D_E + 0);               // core Out1 -> east wire 0
    send_stack(0);

    // stack (0,1): gain g (instruction 0, state 0) or g2 (instruction 1, state 1)
    clear_stack();
    k0[0] = gv; k0[1] = g2v;
    for (int i = 0; i < N_INSTR; i++) begin
      ci[i].sel_ms0p1 = 2'd0; ci[i].dly_ms0p1 = 2'd1; ci[i].sel_ms0p2 = 2'd3;
      ci[i].sel_o1 = 2'd1;    ci[i].dly_o1 = 2'd1;
    end
    ci[1].c0_addr = 3'd1; ci[1].state = 2'd1;
    l1_route(4 + 4*D_W + 0, 1);               // west wire 0 -> core In1
    l1_route(1, 20);                          // core Out1 -> up
    l23(1'b0, 0, 4, D_E);                     // L2: from L1 -> east (to (0,3))
    send_stack(1);

    // stack (0,3): 4-cycle delay line
    clear_stack();
    for (int i = 0; i < N_INSTR; i++) begin
      ci[i].sel_o0 = 1'b0; ci[i].dly_o0 = 5'd4;
    end
    l23(1'b0, 0, D_W, 4);                     // L2: west -> down to L1
    l1_route(20, 0);                          // L1: from L2 -> core In0
    l1_route(0, 20);                          // core Out0 -> up
    l23(1'b0, 1, 4, 5);                       // L2: from L1 -> up to L3
    l23(1'b1, 0, 4, D_S);                     // L3: from L2 -> south (to (3,3))
    send_stack(3);

    // stack (3,3): layer 3 north -> up to the I/O layer
    clear_stack();
    l23(1'b1, 0, D_N, 5);
    send_stack(3*COLS + 3);

    // I/O layer: box 0 feeds stack (0,0) from its west edge wire 0 and sends
    //            stack (3,3) to its north edge wire 0
    c4 = '0;
    c4[0 +: 5] = 5'(16 + 2*D_W + 0 + 1);                  // stack (0,0) <- west wire 0
    c4[(16 + 2*D_N + 0)*5 +: 5] = 5'(15 + 1);             // north wire 0 <- stack (3,3)
    send_l4(0, c4);

    // program counter: hold at instruction 0
    serial({4'd3, 8'd0, 20'h0_0000}, back);

    // ------------------------------------------------ run, instruction 0
    gain = gv;
    stream(300, 20, 1'b1, '0);

    // ------------------------------------------------ switch to instruction 1
    serial({4'd3, 8'd0, 20'h0_1000}, back);
    @(negedge clk);
    if (pc == 3'd1) n_switch++;
    gain = g2v;
    stream(300, 20, 1'b1, '0);

    // ------------------------------------------------ observer via serial port
    efpga({4'd5, 8'd1, 20'd1});               // probe stack 1, output 1
    begin
      word_t cx, fx;
      cx = word_t'($urandom);
      ext_in_left[0] = cx;
      repeat (30) @(negedge clk);
      serial({4'd0, 28'd0}, back);            // NOP word, observer sampled
      serial({4'd0, 28'd0}, back);            // returns the sample
      fx = q15(cx, c0v) + q15(cx, c1v);
      checks++;
      if (back[31:24] !== 8'd1 || back[15:0] !== q15(fx, g2v)) begin
        failures++;
        $display("FAIL observer %h expected data %h", back, q15(fx, g2v));
      end else n_obs++;
      // the same probe read through JTAG (IR 3 = OBSERVE); IDCODE first
      begin
        logic o;
        logic [31:0] r;
        repeat (6) tclk(1'b1, 1'b0, o);
        tclk(1'b0, 1'b0, o);
        jshift(1'b1, 4, 32'h1, r);
        jshift(1'b0, 32, 32'h0, r);
        checks++;
        if (r !== 32'h1D5B_0001) begin
          failures++; $display("FAIL JTAG IDCODE %h", r);
        end else n_jtag++;
        jshift(1'b1, 4, 32'h3, r);
        jshift(1'b0, 32, 32'h0, r);
        checks++;
        if (r[31:24] !== 8'd1 || r[15:0] !== q15(fx, g2v)) begin
          failures++; $display("FAIL JTAG observer %h expected data %h", r, q15(fx, g2v));
        end else n_jtag++;
      end
    end

    // ------------------------------------------------ soft reset of all stacks
    ext_in_left[0] = '0;
    repeat (2) @(negedge clk);
    efpga({4'd4, 8'hFF, 20'd0});
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (ext_out_top[0] !== '0) begin
      failures++; $display("FAIL soft reset did not flush");
    end else n_srst++;
    for (int i = 0; i < 4096; i++) xs[i] = '0;
    cyc = 0;
    stream(200, 0, 1'b1, '0);                 // program kept: model from zero state

    // ------------------------------------------------ every mechanism seen
    if (n_vs < 4 || n_l4 < 1 || n_stream == 0 || n_switch == 0 || n_srst == 0 || n_obs == 0 || n_jtag < 2) begin
      failures++;
      $display("FAIL mechanism missing: vs %0d l4 %0d stream %0d switch %0d srst %0d obs %0d jtag %0d",
               n_vs, n_l4, n_stream, n_switch, n_srst, n_obs, n_jtag);
    end
    $display("mechanisms: stack frames %0d, I/O frames %0d, stream samples %0d, pc switches %0d, soft resets %0d, observer reads %0d, JTAG reads %0d",
             n_vs, n_l4, n_stream, n_switch, n_srst, n_obs, n_jtag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
