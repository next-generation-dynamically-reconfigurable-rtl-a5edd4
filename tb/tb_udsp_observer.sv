// tb_udsp_observer: self-checking test of the debug observer.
//
// Drives random core outputs, selects random stack/port probes, and checks
// the read-out word {stack, toggle count, sample} against a model: the
// sample is the selected output one cycle earlier and the count grows by one
// for each cycle in which the sampled value changed (saturating at 255).
module tb_udsp_observer;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cmd = 1'b0;
  logic [7:0] target = '0;
  logic [19:0] arg = '0;
  word_t core_out [81][N_CIO];
  logic [31:0] obs_word;
  int checks = 0, failures = 0;

  udsp_observer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 81; s++) for (int p = 0; p < 4; p++) core_out[s][p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      int st, pt, tog;
      word_t smp;
      st = $urandom_range(0, 80); pt = $urandom_range(0, 3);
      cmd = 1'b1; target = 8'(st); arg = 20'(pt);
      @(negedge clk);
      cmd = 1'b0;
      tog = 0;
      smp = obs_word[15:0];
      for (int n = 0; n < 40; n++) begin
        word_t v;
        v = ($urandom_range(0, 1) == 0) ? smp : word_t'($urandom);
        for (int s = 0; s < 81; s++) for (int p = 0; p < 4; p++) core_out[s][p] = word_t'($urandom);
        core_out[st][pt] = v;
        @(negedge clk);
        if (v != smp && tog < 255) tog++;
        smp = v;
        checks++;
        if (obs_word !== {8'(st), 8'(tog), smp}) begin
          failures++;
          if (failures < 10) $display("FAIL %h vs %h", obs_word, {8'(st), 8'(tog), smp});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
