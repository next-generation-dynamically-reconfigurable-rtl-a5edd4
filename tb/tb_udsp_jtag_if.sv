// tb_udsp_jtag_if: self-checking test of the JTAG interface.
//
// Drives TCK at 1/8 of the system clock. Checks: the IDCODE read after
// reset, BYPASS (one-bit delay), FRAME words (shifted LSB first, issued at
// Update-DR, held until ready), OBSERVE capture of obs_data, the IR capture
// pattern, and the overrun flag when a word arrives while one is waiting.
module tb_udsp_jtag_if;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b0, tdo;
  logic w_valid, w_ready = 1'b0, overrun;
  logic [31:0] w_data, obs_data = 32'hCAFE_0042;
  int checks = 0, failures = 0;

  udsp_jtag_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h vs %h", what, got, exp);
    end
  endtask

  // one TCK cycle; returns TDO sampled just before the rising edge
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(negedge clk);
    o = tdo;
    tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
  endtask

  task automatic go_idle();
    logic o;
    repeat (6) tclk(1'b1, 1'b0, o);
    tclk(1'b0, 1'b0, o);
  endtask

  // from Run-Test/Idle: shift n bits of IR or DR, return to Run-Test/Idle
  task automatic shift(input bit ir, input int n, input logic [31:0] din, output logic [31:0] dout);
    logic o;
    dout = '0;
    tclk(1'b1, 1'b0, o);                 // Select-DR
    if (ir) tclk(1'b1, 1'b0, o);         // Select-IR
    tclk(1'b0, 1'b0, o);                 // Capture
    tclk(1'b0, 1'b0, o);                 // Shift
    for (int i = 0; i < n; i++) begin
      tclk((i == n-1), din[i], o);       // last bit -> Exit1
      dout[i] = o;
    end
    tclk(1'b1, 1'b0, o);                 // Update
    tclk(1'b0, 1'b0, o);                 // Run-Test/Idle
  endtask

  logic [31:0] r;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1; trst_n = 1'b1;
    go_idle();
    shift(1'b0, 32, 32'h0, r);
    chk("IDCODE after reset", r, 32'h1D5B_0001);
    shift(1'b1, 4, 32'h2, r);
    chk("IR capture pattern", r[3:0], 4'b0001);
    shift(1'b0, 32, 32'h1234_5678, r);
    repeat (4) @(negedge clk);
    chk("frame word valid", {31'b0, w_valid}, 32'd1);
    chk("frame word data", w_data, 32'h1234_5678);
    w_ready = 1'b1;
    @(negedge clk);
    w_ready = 1'b0;
    chk("word taken", {31'b0, w_valid}, 32'd0);
    shift(1'b0, 32, 32'hA5A5_0F0F, r);
    chk("frame DR captures zero", r, 32'h0);
    shift(1'b0, 32, 32'h0BAD_F00D, r);        // arrives while A5A5 waits
    chk("overrun", {31'b0, overrun}, 32'd1);
    chk("waiting word kept", w_data, 32'hA5A5_0F0F);
    shift(1'b1, 4, 32'h3, r);                 // OBSERVE
    shift(1'b0, 32, 32'h0, r);
    chk("observe capture", r, 32'hCAFE_0042);
    shift(1'b1, 4, 32'hF, r);                 // BYPASS
    shift(1'b0, 8, 32'h000000B5, r);
    chk("bypass one-bit delay", r[7:0], 8'h6A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
