// udsp_vstack: vertical stack, the repeated tile of the UDSP array.
//
// One compute core with the three routing-layer switch boxes above it. Layer 1
// (8 tokens, 4 wires per direction) links the core to its nearest neighbours,
// layer 2 (4 tokens, 1 wire per direction) is wired by the array to stacks two
// positions away and layer 3 (likewise) to stacks three positions away. The
// layers are joined vertically: layer 1 <-> layer 2 <-> layer 3 <-> the I/O
// layer above. All routing is delay-less; only the core holds registers.
//
// Layer-1 box port order: 0..3 core outputs (in) / core inputs (out),
// 4+4*d+w direction d wire w, 20 the layer-2 link. Layer-2/3 box order:
// 0..3 directions, 4 the layer below, 5 the layer above.
//
// Programming: the stack listens on the shared configuration bus and accepts
// writes whose stack_id equals ID; the target field picks the core
// instruction memory, a constant bank or one of the three switch boxes, and
// addr the instruction (or constant) index. All boxes follow the shared `pc`.
// `core_out` exposes the core outputs for the observer.
// The stack composition and the per-layer hop distances follow the design
// description; port order and wire counts are this design's own.
//
// The three boxes are joined both ways (layer 1 up to layer 2 and layer 2
// down to layer 1, likewise 2 <-> 3), so the netlist holds structural
// combinational loops through the delay-less boxes; lint tools report them.
// A program that closes one is invalid, like a routing cycle in an FPGA; at
// reset every box drives zero, so none is active.
module udsp_vstack
  import udsp_pkg::*;
#(
  parameter logic [7:0] ID = 8'd0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            soft_rst,
  input  logic [PC_W-1:0] pc,
  input  cfg_bus_t        cfg,
  input  word_t           l1_in  [4][L1_WPD],
  output word_t           l1_out [4][L1_WPD],
  input  word_t           l2_in  [4],
  output word_t           l2_out [4],
  input  word_t           l3_in  [4],
  output word_t           l3_out [4],
  input  word_t           l4_in,
  output word_t           l4_out,
  output word_t           core_out [N_CIO]
);

  logic  mine;
  word_t core_in [N_CIO];
  word_t s1_in  [L1_NIO], s1_out [L1_NIO];
  word_t s2_in  [L23_NIO], s2_out [L23_NIO];
  word_t s3_in  [L23_NIO], s3_out [L23_NIO];

  assign mine = cfg.we && (cfg.stack_id == ID);

  udsp_core u_core (
    .clk, .rst_n, .soft_rst, .pc,
    .din(core_in), .dout(core_out),
    .cfg_we(mine && (cfg.target inside {T_CORE, T_C0, T_C1})),
    .cfg_target(cfg.target), .cfg_addr(cfg.addr), .cfg_data(cfg.data)
  );

  // layer 1
  for (genvar i = 0; i < N_CIO; i++) begin : g_l1c
    assign s1_in[i]  = core_out[i];
    assign core_in[i] = s1_out[i];
  end
  for (genvar d = 0; d < 4; d++) begin : g_l1d
    for (genvar w = 0; w < L1_WPD; w++) begin : g_w
      assign s1_in[N_CIO + d*L1_WPD + w] = l1_in[d][w];
      assign l1_out[d][w] = s1_out[N_CIO + d*L1_WPD + w];
    end
  end
  assign s1_in[L1_NIO-1] = s2_out[4];

  udsp_switchbox #(
    .NIN(L1_NIO), .NOUT(L1_NIO), .NTOK(L1_TOK), .TSEL_W(3), .OSEL_W(3),
    .IW(L1_IW), .SPARSE(1'b1)
  ) u_l1 (
    .clk, .rst_n, .pc,
    .cfg_we(mine && cfg.target == T_L1), .cfg_addr(cfg.addr),
    .cfg_data(cfg.data[L1_IW-1:0]), .din(s1_in), .dout(s1_out)
  );

  // layer 2
  for (genvar d = 0; d < 4; d++) begin : g_l2d
    assign s2_in[d]  = l2_in[d];
    assign l2_out[d] = s2_out[d];
    assign s3_in[d]  = l3_in[d];
    assign l3_out[d] = s3_out[d];
  end
  assign s2_in[4] = s1_out[L1_NIO-1];
  assign s2_in[5] = s3_out[4];

  udsp_switchbox #(
    .NIN(L23_NIO), .NOUT(L23_NIO), .NTOK(L23_TOK), .TSEL_W(3), .OSEL_W(2),
    .IW(L23_IW), .SPARSE(1'b0)
  ) u_l2 (
    .clk, .rst_n, .pc,
    .cfg_we(mine && cfg.target == T_L2), .cfg_addr(cfg.addr),
    .cfg_data(cfg.data[L23_IW-1:0]), .din(s2_in), .dout(s2_out)
  );

  // layer 3
  assign s3_in[4] = s2_out[5];
  assign s3_in[5] = l4_in;
  assign l4_out   = s3_out[5];

  udsp_switchbox #(
    .NIN(L23_NIO), .NOUT(L23_NIO), .NTOK(L23_TOK), .TSEL_W(3), .OSEL_W(2),
    .IW(L23_IW), .SPARSE(1'b0)
  ) u_l3 (
    .clk, .rst_n, .pc,
    .cfg_we(mine && cfg.target == T_L3), .cfg_addr(cfg.addr),
    .cfg_data(cfg.data[L23_IW-1:0]), .din(s3_in), .dout(s3_out)
  );

endmodule
