// tb_udsp_io_switchbox: self-checking test of the registered I/O-layer box.
//
// Loads random 120-bit configurations and checks that each output equals,
// one clock later, the input its 5-bit code selects (0 or a code past the
// last input gives zero); also checks that the reset configuration drives
// zeros and that the box ignores the data until reprogrammed.
module tb_udsp_io_switchbox;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [L4_IW-1:0] cfg = '0;
  word_t din [L4_NIO], dout [L4_NIO], prev [L4_NIO];
  int checks = 0, failures = 0;

  udsp_io_switchbox dut (.clk, .rst_n, .cfg_we(we), .cfg_data(cfg), .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < L4_NIO; k++) din[k] = word_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < L4_NIO; k++) begin
      checks++;
      if (dout[k] !== '0) failures++;
    end
    for (int r = 0; r < 10; r++) begin
      logic [L4_IW-1:0] c;
      for (int b = 0; b < L4_IW; b++) c[b] = 1'($urandom);
      @(negedge clk);
      cfg = c; we = 1'b1;
      @(negedge clk);
      we = 1'b0;
      for (int n = 0; n < 20; n++) begin
        for (int k = 0; k < L4_NIO; k++) begin
          din[k] = word_t'($urandom);
          prev[k] = din[k];
        end
        @(negedge clk);
        for (int o = 0; o < L4_NIO; o++) begin
          int code;
          word_t e;
          code = int'(c[o*L4_SW +: L4_SW]);
          e = (code >= 1 && code <= L4_NIO) ? prev[code-1] : '0;
          checks++;
          if (dout[o] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL out %0d code %0d: %h vs %h", o, code, dout[o], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
