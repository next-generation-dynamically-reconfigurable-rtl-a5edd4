// udsp_observer: debug probe on the core outputs.
//
// A command selects one core output (stack `target`, port arg[1:0]). Every
// cycle the observer registers that output and counts the cycles in which it
// changed value (an activity counter that shows a stuck or dead path). The
// read-out word for the serial interfaces is
//   {stack[7:0], toggles[7:0], data[15:0]}.
// The toggle count resets when a new probe is selected and saturates at 255.
// Probing the array's data signals for fault finding and reading them out
// through the serial interfaces follows the design description; the probe
// format and the activity count are this design's own.
module udsp_observer
  import udsp_pkg::*;
#(
  parameter int unsigned N_STACKS = 81
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd,
  input  logic [7:0]  target,
  input  logic [19:0] arg,
  input  word_t       core_out [N_STACKS][N_CIO],
  output logic [31:0] obs_word
);

  logic [7:0] stk;
  logic [1:0] port;
  word_t      sample, sel;
  logic [7:0] toggles;

  always_comb begin
    sel = '0;
    for (int s = 0; s < N_STACKS; s++)
      if (32'(stk) == s) sel = core_out[s][port];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stk <= '0; port <= '0; sample <= '0; toggles <= '0;
    end else if (cmd) begin
      stk <= target; port <= arg[1:0]; toggles <= '0;
    end else begin
      sample <= sel;
      if (sel != sample && toggles != 8'hFF) toggles <= toggles + 8'd1;
    end
  end

  assign obs_word = {stk, toggles, sample};

endmodule
