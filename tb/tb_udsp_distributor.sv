// tb_udsp_distributor: self-checking test of the frame distributor.
//
// Sends a random sequence of frames of every type, with random gaps and a
// random `vs_busy`, and checks: payload words of stack frames come out on
// vs_* with index 0..63 and the header's stack; I/O-layer frames on l4_*
// with index 0..3; PC, soft-reset and observe headers give one command pulse
// with target and argument; unknown types are skipped; frame_done pulses
// once per frame, on its last word; no payload word is taken while vs_busy.
module tb_udsp_distributor;
  import udsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready, vs_busy = 1'b0;
  logic [31:0] s_data = '0;
  logic vs_valid, l4_valid, pc_cmd, rst_cmd, obs_cmd, frame_done;
  logic [5:0] vs_idx;
  logic [7:0] vs_stack, l4_box, cmd_target;
  logic [31:0] vs_data, l4_data;
  logic [1:0] l4_idx;
  logic [19:0] cmd_arg;
  int checks = 0, failures = 0;
  int frames_done = 0;

  udsp_distributor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  always @(posedge clk) if (frame_done) frames_done++;
  always @(posedge clk) if (vs_busy && vs_valid) begin failures++; $display("FAIL took word while busy"); end

  // send one word, waiting for s_ready; check outputs in the accepting cycle
  task automatic send(input logic [31:0] w, input int kind, input int idx, input logic [7:0] tgt,
                      input bit last);
    @(negedge clk);
    while ($urandom_range(0, 2) == 0) @(negedge clk);
    s_valid = 1'b1; s_data = w;
    vs_busy = ($urandom_range(0, 3) == 0);
    #1;
    while (!s_ready) begin
      @(negedge clk);
      vs_busy = ($urandom_range(0, 3) == 0);
      #1;
    end
    unique case (kind)
      1: begin
        chk("vs_valid", {31'b0, vs_valid}, 1); chk("vs_idx", 32'(vs_idx), 32'(idx));
        chk("vs_stack", 32'(vs_stack), 32'(tgt)); chk("vs_data", vs_data, w);
      end
      2: begin
        chk("l4_valid", {31'b0, l4_valid}, 1); chk("l4_idx", 32'(l4_idx), 32'(idx));
        chk("l4_box", 32'(l4_box), 32'(tgt)); chk("l4_data", l4_data, w);
      end
      3: begin chk("pc_cmd", {31'b0, pc_cmd}, 1); chk("arg", 32'(cmd_arg), 32'(w[19:0])); end
      4: begin chk("rst_cmd", {31'b0, rst_cmd}, 1); chk("target", 32'(cmd_target), 32'(tgt)); end
      5: begin chk("obs_cmd", {31'b0, obs_cmd}, 1); chk("target", 32'(cmd_target), 32'(tgt)); end
      default: begin
        chk("no payload strobe", {30'b0, vs_valid, l4_valid}, 0);
        chk("no command", {29'b0, pc_cmd, rst_cmd, obs_cmd}, 0);
      end
    endcase
    chk("frame_done", {31'b0, frame_done}, {31'b0, last});
    @(negedge clk);
    s_valid = 1'b0; vs_busy = 1'b0;
  endtask

  initial begin
    int nframes;
    nframes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 40; f++) begin
      int t;
      logic [7:0] tgt;
      t = $urandom_range(0, 7);
      tgt = 8'($urandom);
      nframes++;
      if (t == 1) begin
        send({4'(t), tgt, 20'($urandom)}, 0, 0, tgt, 1'b0);
        for (int k = 0; k < FRAME_WORDS; k++) send($urandom, 1, k, tgt, k == FRAME_WORDS-1);
      end else if (t == 2) begin
        send({4'(t), tgt, 20'($urandom)}, 0, 0, tgt, 1'b0);
        for (int k = 0; k < 4; k++) send($urandom, 2, k, tgt, k == 3);
      end else begin
        send({4'(t), tgt, 20'($urandom)}, (t >= 3 && t <= 5) ? t : 0, 0, tgt, 1'b1);
      end
    end
    repeat (2) @(negedge clk);
    chk("frames completed", 32'(frames_done), 32'(nframes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
