// tb_udsp_priority: self-checking test of the priority checker.
//
// Random sources offer frames of random length at random times. Checks that,
// when idle, the lowest-index offering source wins (JTAG > serial > eFPGA),
// that a granted source keeps the grant for its whole frame even when a
// higher-priority source starts offering, and that every word arrives in
// order without loss.
module tb_udsp_priority;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid [3], s_ready [3];
  logic [31:0] s_data [3];
  logic m_valid, m_ready = 1'b1, frame_done;
  logic [31:0] m_data;
  logic [1:0] grant;
  int checks = 0, failures = 0;
  int remaining [3];
  int seq [3];
  int cur = -1, left = 0;

  udsp_priority dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame_done models the distributor, which knows the frame length
  logic fd = 1'b0;
  assign frame_done = fd;

  initial begin
    for (int i = 0; i < 3; i++) begin
      s_valid[i] = 1'b0; s_data[i] = '0; remaining[i] = 0; seq[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      // sources start frames at random
      for (int i = 0; i < 3; i++)
        if (remaining[i] == 0 && $urandom_range(0, 7) == 0) remaining[i] = $urandom_range(1, 6);
      for (int i = 0; i < 3; i++) begin
        s_valid[i] = (remaining[i] > 0);
        s_data[i]  = {8'(i), 8'(remaining[i]), 16'(seq[i])};
      end
      m_ready = ($urandom_range(0, 3) != 0);
      fd = 1'b0;
      #1;
      if (m_valid) begin
        int g, el;
        g = (cur >= 0) ? cur : (s_valid[0] ? 0 : (s_valid[1] ? 1 : 2));
        checks++;
        if (int'(grant) != g) begin failures++; $display("FAIL grant %0d vs %0d", grant, g); end
        el = (cur >= 0) ? left : remaining[g];
        fd = m_ready && (el == 1);
        if (m_ready) begin
          checks++;
          if (m_data !== {8'(g), 8'(remaining[g]), 16'(seq[g])}) begin
            failures++; $display("FAIL data %h", m_data);
          end
        end
        #1;
        if (m_ready) begin
          if (cur < 0) begin cur = g; left = remaining[g]; end
          remaining[cur]--; seq[cur]++; left--;
          if (left == 0) cur = -1;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
