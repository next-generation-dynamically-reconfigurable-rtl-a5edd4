// udsp_vs_prog: vertical-stack programmer.
//
// Collects the 64 words of one stack frame (word k holds frame bits
// 32k+31..32k) and then writes the stack's memories over the shared
// configuration bus, one entry per cycle, 48 writes in all:
//   8 core instructions (74 b) at frame bit 74*i,
//   8 + 8 constants (16 b) at 592 + 16*j and 720 + 16*j,
//   8 layer-1 instructions (90 b) at 848 + 90*i,
//   8 layer-2 and 8 layer-3 instructions (24 b) at 1568 + 24*i and 1760 + 24*i.
// Bits 1952..2047 are unused. `busy` is high from the last frame word until
// the last write. A stack is reprogrammed only through this 2 Kb frame, as
// the design description sets out; the layout inside the frame is this
// design's own.
module udsp_vs_prog
  import udsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        w_valid,
  input  logic [5:0]  w_idx,
  input  logic [7:0]  w_stack,
  input  logic [31:0] w_data,
  output logic        busy,
  output cfg_bus_t    cfg
);

  logic [31:0] buf_q [FRAME_WORDS];
  logic [FRAME_W-1:0] flat;
  logic [7:0]  stack_q;
  logic [5:0]  wcnt;     // 0..47 : target = wcnt/8, addr = wcnt%8

  for (genvar k = 0; k < FRAME_WORDS; k++) begin : g_flat
    assign flat[32*k +: 32] = buf_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < FRAME_WORDS; k++) buf_q[k] <= '0;
      stack_q <= '0;
      busy    <= 1'b0;
      wcnt    <= '0;
    end else begin
      if (w_valid && !busy) begin
        buf_q[w_idx] <= w_data;
        stack_q      <= w_stack;
        if (w_idx == 6'(FRAME_WORDS - 1)) begin
          busy <= 1'b1;
          wcnt <= '0;
        end
      end else if (busy) begin
        wcnt <= wcnt + 6'd1;
        if (wcnt == 6'd47) busy <= 1'b0;
      end
    end
  end

  always_comb begin
    logic [2:0] a;
    a = wcnt[2:0];
    cfg          = '0;
    cfg.we       = busy;
    cfg.stack_id = stack_q;
    cfg.addr     = a;
    unique case (wcnt[5:3])
      3'd0: begin cfg.target = T_CORE; cfg.data = CFG_DW'(flat[OFS_CORE + 32'(a)*CORE_IW +: CORE_IW]); end
      3'd1: begin cfg.target = T_C0;   cfg.data = CFG_DW'(flat[OFS_C0 + 32'(a)*DW +: DW]); end
      3'd2: begin cfg.target = T_C1;   cfg.data = CFG_DW'(flat[OFS_C1 + 32'(a)*DW +: DW]); end
      3'd3: begin cfg.target = T_L1;   cfg.data = CFG_DW'(flat[OFS_L1 + 32'(a)*L1_IW +: L1_IW]); end
      3'd4: begin cfg.target = T_L2;   cfg.data = CFG_DW'(flat[OFS_L2 + 32'(a)*L23_IW +: L23_IW]); end
      default: begin cfg.target = T_L3; cfg.data = CFG_DW'(flat[OFS_L3 + 32'(a)*L23_IW +: L23_IW]); end
    endcase
  end

endmodule
