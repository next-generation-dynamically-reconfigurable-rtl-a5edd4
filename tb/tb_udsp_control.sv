// tb_udsp_control: self-checking test of the whole control module.
//
// Frames arrive through all three ports:
//   eFPGA  : a 2 Kb stack frame for stack 7 -> 48 configuration-bus writes
//            with the right stack and data; an I/O-layer frame for box 2;
//            an observe command for stack 3, output 2,
//   serial : a program-counter command (loop 2..5) -> pc sequence,
//   JTAG   : a soft reset of all stacks -> every soft_rst line pulses, then
//            an OBSERVE read-back of the probed core output.
module tb_udsp_control;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b0, tdo;
  logic sdi = 1'b0, sen = 1'b0, sdo;
  logic efpga_valid = 1'b0, efpga_ready;
  logic [31:0] efpga_data = '0;
  cfg_bus_t cfg;
  logic l4_we [9];
  logic [L4_IW-1:0] l4_data;
  logic [PC_W-1:0] pc;
  logic pc_done, jtag_overrun, serial_overrun;
  logic soft_rst [81];
  word_t core_out [81][N_CIO];
  logic [1:0] src_grant;
  int checks = 0, failures = 0;

  udsp_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h vs %h", what, got, exp);
    end
  endtask

  task automatic efpga(input logic [31:0] w);
    @(negedge clk);
    efpga_valid = 1'b1; efpga_data = w;
    #1;
    while (!efpga_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    efpga_valid = 1'b0;
  endtask

  task automatic serial(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      sdi = w[i]; sen = 1'b1;
    end
    @(negedge clk);
    sen = 1'b0;
  endtask

  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(negedge clk);
    o = tdo;
    tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
  endtask

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

  logic [2047:0] frame;
  int nwr, nrst;
  logic [89:0] first_core;
  logic [31:0] r;

  always @(posedge clk) if (cfg.we) begin
    nwr++;
    if (cfg.stack_id !== 8'd7) failures++;
    if (cfg.target == T_CORE && cfg.addr == 3'd0) first_core = cfg.data;
  end
  always @(posedge clk) if (soft_rst[0] && soft_rst[40] && soft_rst[80]) nrst++;

  initial begin
    logic o;
    for (int s = 0; s < 81; s++) for (int p = 0; p < 4; p++) core_out[s][p] = word_t'(s*4 + p);
    nwr = 0; nrst = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; trst_n = 1'b1;
    repeat (6) tclk(1'b1, 1'b0, o);
    tclk(1'b0, 1'b0, o);

    // eFPGA: stack frame
    for (int k = 0; k < 64; k++) frame[32*k +: 32] = $urandom;
    efpga({4'd1, 8'd7, 20'd0});
    for (int k = 0; k < 64; k++) efpga(frame[32*k +: 32]);
    repeat (60) @(negedge clk);
    chk("48 stack writes", 128'(nwr), 128'd48);
    chk("core instruction 0", 128'(first_core), 128'(frame[73:0]));

    // eFPGA: I/O layer frame for box 2
    efpga({4'd2, 8'd2, 20'd0});
    efpga(32'h0102_0304); efpga(32'h0506_0708); efpga(32'h090A_0B0C); efpga(32'hFF0E_0F10);
    #1;
    chk("l4 strobe", {l4_we[0], l4_we[1], l4_we[2], l4_we[3]}, 4'b0010);
    chk("l4 data", 128'(l4_data), 128'(120'h0E_0F10_090A_0B0C_0506_0708_0102_0304));

    // serial: program counter loop 2..5, dwell 0
    serial({4'd3, 8'd0, 20'h1_2500});
    repeat (3) @(negedge clk);
    begin
      int p;
      p = int'(pc);
      for (int n = 0; n < 12; n++) begin
        chk("pc in 2..5", 128'(pc >= 3'd2 && pc <= 3'd5), 128'd1);
        @(negedge clk);
        chk("pc step", 128'(pc), 128'((p == 5) ? 2 : p + 1));
        p = int'(pc);
      end
    end

    // JTAG: soft reset of every stack
    jshift(1'b1, 4, 32'h2, r);
    jshift(1'b0, 32, {4'd4, 8'hFF, 20'd0}, r);
    repeat (4) @(negedge clk);
    chk("soft reset of all stacks, one cycle", 128'(nrst), 128'd1);

    // eFPGA: observe stack 3 output 2; JTAG reads it back
    efpga({4'd5, 8'd3, 20'd2});
    repeat (3) @(negedge clk);
    jshift(1'b1, 4, 32'h3, r);
    jshift(1'b0, 32, 32'h0, r);
    chk("observer stack", 128'(r[31:24]), 128'd3);
    chk("observer data", 128'(r[15:0]), 128'(3*4 + 2));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
