// udsp_io_switchbox: one switch box of the registered I/O layer (layer 4).
//
// The box serves a 4x4 patch of vertical stacks. Its inputs are the 16 upward
// wires of the layer-3 boxes under it and 2 wires from each neighbouring I/O
// box (north, east, south, west); its outputs are the 16 downward wires to the
// layer-3 boxes and 2 wires to each neighbour. Every output selects any input
// or zero with a 5-bit code (0 = zero, k = input k-1) and is registered, so a
// route through this layer costs one cycle per box. Unlike the routing layers
// it has a single instruction (a 120-bit configuration word) and does not
// follow the program counter.
//
// Input order: 0..15 stacks (row-major inside the patch), 16+2*d+w neighbour
// direction d (N, E, S, W), wire w. Outputs use the same order.
// `cfg_we` loads the configuration; reset clears it (all outputs zero).
// The registered layer, the single instruction and the 4x4 coverage follow
// the design description; the port counts and codes are this design's own.
module udsp_io_switchbox
  import udsp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [L4_IW-1:0] cfg_data,
  input  word_t            din  [L4_NIO],
  output word_t            dout [L4_NIO]
);

  logic [L4_IW-1:0] cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg <= '0;
    else if (cfg_we) cfg <= cfg_data;
  end

  for (genvar o = 0; o < L4_NIO; o++) begin : g_out
    logic [L4_SW-1:0] code;
    word_t            nxt;
    assign code = cfg[o*L4_SW +: L4_SW];
    always_comb begin
      nxt = '0;
      for (int k = 0; k < L4_NIO; k++)
        if (32'(code) == k + 1) nxt = din[k];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dout[o] <= '0;
      else        dout[o] <= nxt;
    end
  end

endmodule
