// tb_udsp_serial_if: self-checking test of the direct serial port.
//
// Shifts random 32-bit words in (MSB first, with gaps in `sen`), checks each
// appears on w_valid/w_data, that sdo returns the observer word sampled at
// the end of the previous word, and that a word arriving while one waits
// sets `overrun` and is dropped.
module tb_udsp_serial_if;
  logic clk = 1'b0, rst_n = 1'b0, sdi = 1'b0, sen = 1'b0, sdo;
  logic w_valid, w_ready = 1'b0, overrun;
  logic [31:0] w_data, obs_data = '0;
  int checks = 0, failures = 0;

  udsp_serial_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h vs %h", what, got, exp);
    end
  endtask

  task automatic send(input logic [31:0] w, output logic [31:0] back);
    for (int i = 31; i >= 0; i--) begin
      sdi = w[i]; sen = 1'b1;
      #1 back[i] = sdo;
      @(negedge clk);
      sen = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  logic [31:0] w, back, last_obs;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last_obs = '0;
    for (int n = 0; n < 20; n++) begin
      w = $urandom;
      obs_data = $urandom;
      send(w, back);
      chk("sdo returns observer word", back, last_obs);
      last_obs = obs_data;
      chk("word valid", {31'b0, w_valid}, 32'd1);
      chk("word data", w_data, w);
      w_ready = 1'b1;
      @(negedge clk);
      w_ready = 1'b0;
    end
    chk("no overrun", {31'b0, overrun}, 32'd0);
    send(32'h1111_2222, back);
    send(32'h3333_4444, back);
    chk("overrun flagged", {31'b0, overrun}, 32'd1);
    chk("first word kept", w_data, 32'h1111_2222);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
