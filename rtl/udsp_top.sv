// udsp_top: the Universal DSP array.
//
// ROWS x COLS vertical stacks (default 9 x 9 = 81 cores), each a 16-bit
// reconfigurable core under three delay-less routing layers, a registered
// I/O layer (layer 4) of boxes each covering 4 x 4 stacks, and the control
// module that programs it all.
//
// Routing: layer-1 boxes talk to the neighbouring stack in each direction
// (4 wires per direction), layer-2 boxes to the stack two positions away and
// layer-3 boxes to the stack three positions away (1 wire per direction),
// all in the same row or column. Wires leaving the array edge read zero.
// Layer 4 joins each stack's layer-3 box to its I/O box and the I/O boxes to
// their neighbours (2 wires per direction), one register per box.
// Chip I/O through layer 4: ext_in_left[i] drives I/O box (i mod R4, 0), west
// wire (i / R4) mod 2; ext_in_top[i] drives box (0, i mod C4), north wire
// (i / C4) mod 2, and ext_out_top[i] is that box's north output wire;
// ext_out_right is box (0, C4-1), east output wire 0 (R4 x C4 is the I/O
// grid). Use ROWS, COLS >= 5 so these wires are distinct.
//
// Every core and routing box follows the one program counter from the
// control module; the I/O layer has a single configuration. Data latency of a
// route: 0 cycles through layers 1-3, 1 cycle per I/O box, plus the delays
// programmed in the cores.
//
// The routing layers form structural combinational loops (a box's east
// output reaches its neighbour's west input and back). A valid program never
// closes one, as in any FPGA-style fabric, and all routing instructions reset
// to "drive zero"; lint and synthesis tools still report the loops.
// The 81-core array, 3 delay-less layers with 1/2/3-stack reach, the
// registered I/O layer over 4x4 stacks, the 4 left inputs, 2 top inputs and
// outputs and 1 right output follow the design description; wire counts and
// the exact border wiring are this design's own.
module udsp_top
  import udsp_pkg::*;
#(
  parameter int unsigned ROWS = 9,
  parameter int unsigned COLS = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  input  logic        sdi,
  input  logic        sen,
  output logic        sdo,
  input  logic        efpga_valid,
  input  logic [31:0] efpga_data,
  output logic        efpga_ready,
  input  word_t       ext_in_left  [4],
  input  word_t       ext_in_top   [2],
  output word_t       ext_out_top  [2],
  output word_t       ext_out_right,
  output logic [PC_W-1:0] pc,
  output logic        pc_done,
  output logic        jtag_overrun,
  output logic        serial_overrun,
  output logic [1:0]  active_source
);

  localparam int unsigned NS  = ROWS*COLS;
  localparam int unsigned R4  = (ROWS + L4_SPAN - 1)/L4_SPAN;
  localparam int unsigned C4  = (COLS + L4_SPAN - 1)/L4_SPAN;
  localparam int unsigned N4  = R4*C4;

  initial begin
    assert (NS <= 256) else $error("at most 256 stacks");
  end

  cfg_bus_t         cfg;
  logic             l4_we [N4];
  logic [L4_IW-1:0] l4_data;
  logic             soft_rst [NS];
  word_t            core_out [NS][N_CIO];

  word_t l1o [NS][4][L1_WPD];
  word_t l1i [NS][4][L1_WPD];
  word_t l2o [NS][4], l2i [NS][4];
  word_t l3o [NS][4], l3i [NS][4];
  word_t l4o [NS], l4i [NS];
  word_t b_in  [N4][L4_NIO];
  word_t b_out [N4][L4_NIO];
  word_t ext_w [N4][4][L4_WPD];

  udsp_control #(.N_STACKS(NS), .N_L4(N4)) u_ctrl (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo, .sdi, .sen, .sdo,
    .efpga_valid, .efpga_data, .efpga_ready,
    .cfg, .l4_we, .l4_data, .pc, .pc_done, .soft_rst, .core_out,
    .jtag_overrun, .serial_overrun, .src_grant(active_source)
  );

  // ---------------------------------------------------------------- stacks
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int unsigned S = r*COLS + c;

      udsp_vstack #(.ID(8'(S))) u_vs (
        .clk, .rst_n, .soft_rst(soft_rst[S]), .pc, .cfg,
        .l1_in(l1i[S]), .l1_out(l1o[S]),
        .l2_in(l2i[S]), .l2_out(l2o[S]),
        .l3_in(l3i[S]), .l3_out(l3o[S]),
        .l4_in(l4i[S]), .l4_out(l4o[S]),
        .core_out(core_out[S])
      );

      // layer 1: distance 1, 4 wires per direction
      for (genvar w = 0; w < L1_WPD; w++) begin : g_w
        assign l1i[S][D_N][w] = (r >= 1)        ? l1o[S-COLS][D_S][w] : '0;
        assign l1i[S][D_S][w] = (r + 1 < ROWS)  ? l1o[S+COLS][D_N][w] : '0;
        assign l1i[S][D_W][w] = (c >= 1)        ? l1o[S-1][D_E][w]    : '0;
        assign l1i[S][D_E][w] = (c + 1 < COLS)  ? l1o[S+1][D_W][w]    : '0;
      end
      // layer 2: distance 2
      assign l2i[S][D_N] = (r >= 2)       ? l2o[S-2*COLS][D_S] : '0;
      assign l2i[S][D_S] = (r + 2 < ROWS) ? l2o[S+2*COLS][D_N] : '0;
      assign l2i[S][D_W] = (c >= 2)       ? l2o[S-2][D_E]      : '0;
      assign l2i[S][D_E] = (c + 2 < COLS) ? l2o[S+2][D_W]      : '0;
      // layer 3: distance 3
      assign l3i[S][D_N] = (r >= 3)       ? l3o[S-3*COLS][D_S] : '0;
      assign l3i[S][D_S] = (r + 3 < ROWS) ? l3o[S+3*COLS][D_N] : '0;
      assign l3i[S][D_W] = (c >= 3)       ? l3o[S-3][D_E]      : '0;
      assign l3i[S][D_E] = (c + 3 < COLS) ? l3o[S+3][D_W]      : '0;
      // layer 4 link
      assign l4i[S] = b_out[(r/L4_SPAN)*C4 + c/L4_SPAN][(r%L4_SPAN)*L4_SPAN + c%L4_SPAN];
    end
  end

  // ---------------------------------------------------------------- I/O layer
  always_comb begin
    for (int b = 0; b < N4; b++)
      for (int d = 0; d < 4; d++)
        for (int w = 0; w < L4_WPD; w++) ext_w[b][d][w] = '0;
    for (int i = 0; i < 4; i++)
      ext_w[(i % R4)*C4][D_W][(i / R4) % L4_WPD] = ext_in_left[i];
    for (int i = 0; i < 2; i++)
      ext_w[i % C4][D_N][(i / C4) % L4_WPD] = ext_in_top[i];
  end

  for (genvar i = 0; i < 2; i++) begin : g_top_out
    assign ext_out_top[i] = b_out[i % C4][L4_SPAN*L4_SPAN + 2*D_N + (i / C4) % L4_WPD];
  end
  assign ext_out_right = b_out[C4-1][L4_SPAN*L4_SPAN + 2*D_E];

  for (genvar br = 0; br < R4; br++) begin : g_br
    for (genvar bc = 0; bc < C4; bc++) begin : g_bc
      localparam int unsigned B = br*C4 + bc;

      for (genvar k = 0; k < L4_SPAN*L4_SPAN; k++) begin : g_k
        localparam int unsigned RR = br*L4_SPAN + k/L4_SPAN;
        localparam int unsigned CC = bc*L4_SPAN + k%L4_SPAN;
        if (RR < ROWS && CC < COLS) begin : g_in
          assign b_in[B][k] = l4o[RR*COLS + CC];
        end else begin : g_none
          assign b_in[B][k] = '0;
        end
      end
      for (genvar w = 0; w < L4_WPD; w++) begin : g_w
        localparam int unsigned O = L4_SPAN*L4_SPAN;
        assign b_in[B][O + 2*D_N + w] = (br >= 1)     ? b_out[B-C4][O + 2*D_S + w] : ext_w[B][D_N][w];
        assign b_in[B][O + 2*D_S + w] = (br + 1 < R4) ? b_out[B+C4][O + 2*D_N + w] : ext_w[B][D_S][w];
        assign b_in[B][O + 2*D_W + w] = (bc >= 1)     ? b_out[B-1][O + 2*D_E + w]  : ext_w[B][D_W][w];
        assign b_in[B][O + 2*D_E + w] = (bc + 1 < C4) ? b_out[B+1][O + 2*D_W + w]  : ext_w[B][D_E][w];
      end

      udsp_io_switchbox u_io (
        .clk, .rst_n, .cfg_we(l4_we[B]), .cfg_data(l4_data),
        .din(b_in[B]), .dout(b_out[B])
      );
    end
  end

endmodule
