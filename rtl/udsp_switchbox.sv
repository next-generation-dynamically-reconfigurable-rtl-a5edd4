// udsp_switchbox: delay-less programmable switch box of routing layers 1..3.
//
// Two levels of multiplexers. The first level is sparse: each of NTOK
// "tokens" (internal routing wires) picks one input, or zero, with a TSEL_W-bit
// code (0 = zero, k = k-th choice). With SPARSE set, token t's choice k
// reaches input l1_conn(t, k-1) = (t + 8*(k-1)) mod NIN, a pattern with low
// input cross-correlation; without it, choice k is input k-1 (full). The
// second level is full: each output picks any token with an OSEL_W-bit code.
// An unused output is forced to zero by pointing it at a zeroed token, so no
// switching activity travels along idle wires.
//
// The box keeps N_INSTR instructions and reads the one at the shared program
// counter `pc`, so routing changes in the same cycle as the cores. Instruction
// layout (LSB first): NTOK token codes, then NOUT output codes; bits above
// NTOK*TSEL_W + NOUT*OSEL_W are unused. Instructions reset to zero, which
// drives every output to zero. `cfg_we` writes instruction `cfg_addr`.
//
// Timing: `dout` is a combinational function of `din` (no register).
// The box is used as layer 1 (21 in/out, 8 tokens, 90-bit word) and as layers
// 2 and 3 (6 in/out, 4 tokens, 24-bit word). Token counts and word widths
// follow the design description; the two-level sparse/full structure follows
// its switch-box discussion; the port lists, codes and sparse pattern are
// this design's own.
//
// Routing boxes connected to each other form structural combinational loops
// (east out -> neighbour west in -> back). A valid program never closes one,
// as in any FPGA-style routing fabric; lint tools report them. While the
// chip reset rst_n is low every output is held at zero, so no loop can be
// active before the instructions have been cleared.
module udsp_switchbox
  import udsp_pkg::*;
#(
  parameter int unsigned NIN    = L1_NIO,
  parameter int unsigned NOUT   = L1_NIO,
  parameter int unsigned NTOK   = L1_TOK,
  parameter int unsigned TSEL_W = 3,
  parameter int unsigned OSEL_W = 3,
  parameter int unsigned IW     = L1_IW,
  parameter bit          SPARSE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] pc,
  input  logic            cfg_we,
  input  logic [PC_W-1:0] cfg_addr,
  input  logic [IW-1:0]   cfg_data,
  input  word_t           din  [NIN],
  output word_t           dout [NOUT]
);

  localparam int unsigned USED = NTOK*TSEL_W + NOUT*OSEL_W;

  initial begin
    assert (USED <= IW) else $error("switchbox instruction does not fit");
  end

  logic [IW-1:0] imem [N_INSTR];
  logic [IW-1:0] ins;
  word_t         tok [NTOK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_INSTR; i++) imem[i] <= '0;
    end else if (cfg_we) begin
      imem[cfg_addr] <= cfg_data;
    end
  end

  assign ins = imem[pc];

  for (genvar t = 0; t < NTOK; t++) begin : g_tok
    logic [TSEL_W-1:0] code;
    assign code = ins[t*TSEL_W +: TSEL_W];
    always_comb begin
      tok[t] = '0;
      for (int k = 1; k < (1 << TSEL_W); k++) begin
        if (32'(code) == k) begin
          if (SPARSE)        tok[t] = din[l1_conn(t, k-1)];
          else if (k <= NIN) tok[t] = din[k-1];
        end
      end
    end
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    logic [OSEL_W-1:0] code;
    assign code = ins[NTOK*TSEL_W + o*OSEL_W +: OSEL_W];
    always_comb begin
      dout[o] = '0;
      if (rst_n)
        for (int k = 0; k < NTOK; k++)
          if (32'(code) == k) dout[o] = tok[k];
    end
  end

endmodule
