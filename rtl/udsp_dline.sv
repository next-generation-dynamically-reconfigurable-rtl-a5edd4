// udsp_dline: programmable delay on one sink port of the core, with one copy
// of the line per temporal state.
//
// Every clock the line of the active state `st` shifts in `din`; the lines of
// the other states hold, so an algorithm that is swapped out keeps its data.
// `dout` is `zin` when `dly` is 0 (a combinational path that the core only
// feeds from sources allowed to connect without a register) and tap dly-1 of
// the active line otherwise. `dly` must not exceed MAXD. `clr` (soft reset)
// clears every state; `rst_n` is the asynchronous chip reset.
module udsp_dline
  import udsp_pkg::*;
#(
  parameter int unsigned MAXD = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [ST_W-1:0] st,
  input  word_t           din,
  input  word_t           zin,
  input  logic [4:0]      dly,
  output word_t           dout
);

  word_t line [N_STATES][MAXD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STATES; s++)
        for (int k = 0; k < MAXD; k++) line[s][k] <= '0;
    end else if (clr) begin
      for (int s = 0; s < N_STATES; s++)
        for (int k = 0; k < MAXD; k++) line[s][k] <= '0;
    end else begin
      line[st][0] <= din;
      for (int k = 1; k < MAXD; k++) line[st][k] <= line[st][k-1];
    end
  end

  always_comb begin
    dout = zin;
    for (int k = 0; k < MAXD; k++)
      if (32'(dly) == k + 1) dout = line[st][k];
  end

endmodule
