// udsp_soft_reset: soft reset of the cores' state registers.
//
// A command with a target stack index (8'hFF = every stack) raises
// `soft_rst` for that stack for 1 + arg[3:0] cycles, starting the cycle after
// the command. The core clears all 4 preserved copies of its delay registers
// and accumulators, so a new iteration of an algorithm starts clean while the
// instruction and constant memories (the program) stay. A new command
// replaces one still running. Clearing state without erasing the program
// follows the design description; the pulse length and target coding are
// this design's own.
module udsp_soft_reset #(
  parameter int unsigned N_STACKS = 81
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd,
  input  logic [7:0]  target,
  input  logic [19:0] arg,
  output logic        soft_rst [N_STACKS]
);

  logic [7:0] tgt;
  logic [4:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tgt <= '0; left <= '0;
    end else if (cmd) begin
      tgt  <= target;
      left <= 5'(arg[3:0]) + 5'd1;
    end else if (left != 0) begin
      left <= left - 5'd1;
    end
  end

  always_comb begin
    for (int s = 0; s < N_STACKS; s++)
      soft_rst[s] = (left != 0) && (tgt == 8'hFF || 32'(tgt) == s);
  end

endmodule
