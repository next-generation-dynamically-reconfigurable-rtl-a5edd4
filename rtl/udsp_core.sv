// udsp_core: the reconfigurable compute core of one vertical stack.
//
// Resources: two multiplier/shifters (MS0, MS1), two add/subtract units (A0,
// A1), two 8x16-bit constant banks (C0, C1), four data inputs and four data
// outputs. Every sink port picks its source in a single hop, as listed in the
// connectivity matrix (see udsp_pkg), through a programmable delay whose legal
// range depends on the source, as in the delay matrix:
//   In  -> MS 1..2, In -> Add 0..1, In0->Out0 and In3->Out3 1..16 (long lines),
//   In1->Out1 and In2->Out2 1..2, MS -> Add/Out 0..1, Add -> anything 1..2,
//   Const -> 0. A programmed delay outside the range is clamped into it, so
//   no program can close a loop without a register.
// The multiplier is a Q1.15 (16,15) fractional multiply, (a*b)>>>15, which
// saturates only for -1 * -1. The shifter shifts port 1 by a signed amount
// (positive left, negative arithmetic right). Add/sub wraps in two's
// complement. An adder in accumulate mode uses its own registered previous
// result instead of port 2, which gives a single-cycle multiply-accumulate.
//
// Temporal multiplexing: an 8-entry instruction memory is read at the shared
// program counter `pc`, so the core changes function in one cycle. The 2-bit
// state field of the instruction selects which of the 4 copies of every delay
// register and accumulator is used; the other copies hold. `soft_rst` clears
// all copies but keeps the instruction and constant memories.
//
// Programming: `cfg_we` with `cfg_target` T_CORE writes instruction `cfg_addr`
// (74 LSBs of `cfg_data`); T_C0 / T_C1 write a constant (16 LSBs). A core
// instruction may also write In1 into C0 and In2 into C1 (data-cache use);
// a programming write to the same bank wins.
//
// Timing: no combinational path from `din` to `dout` (every In->Out route has
// at least one register). The resource list, the connectivity and delay
// matrices, the (16,15) multiplier, the 74-bit instruction with its 38/20/14/2
// split, 8 instructions and 4 states follow the design description. The bit
// layout, the shifter range, wrap-around adders, the forced-zero choice on the
// MS port-1 muxes and the accumulate mode are this design's choices.
module udsp_core
  import udsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              soft_rst,
  input  logic [PC_W-1:0]   pc,
  input  word_t             din  [N_CIO],
  output word_t             dout [N_CIO],
  input  logic              cfg_we,
  input  cfg_target_e       cfg_target,
  input  logic [PC_W-1:0]   cfg_addr,
  input  logic [CFG_DW-1:0] cfg_data
);

  // ------------------------------------------------------------ memories
  core_instr_t imem  [N_INSTR];
  word_t       cbank0 [N_CONST];
  word_t       cbank1 [N_CONST];
  core_instr_t ins;

  assign ins = imem[pc];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_INSTR; i++) imem[i] <= '0;
    end else if (cfg_we && cfg_target == T_CORE) begin
      imem[cfg_addr] <= core_instr_t'(cfg_data[CORE_IW-1:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CONST; i++) begin
        cbank0[i] <= '0;
        cbank1[i] <= '0;
      end
    end else begin
      if (cfg_we && cfg_target == T_C0) cbank0[cfg_addr] <= cfg_data[DW-1:0];
      else if (ins.c_we[0])             cbank0[ins.c0_addr] <= din[1];
      if (cfg_we && cfg_target == T_C1) cbank1[cfg_addr] <= cfg_data[DW-1:0];
      else if (ins.c_we[1])             cbank1[ins.c1_addr] <= din[2];
    end
  end

  word_t c0, c1;
  assign c0 = cbank0[ins.c0_addr];
  assign c1 = cbank1[ins.c1_addr];

  // ------------------------------------------------------------ unit outputs
  word_t ms0, ms1, a0, a1;
  // sink-port values after their delays
  word_t ms0p1, ms0p2, ms1p1, ms1p2, a0p1, a0p2, a1p1, a1p2;

  // ------------------------------------------------------------ delay clamps
  function automatic logic [4:0] d12(input logic [1:0] d);   // range 1..2
    return (d >= 2'd2) ? 5'd2 : 5'd1;
  endfunction
  function automatic logic [4:0] d01(input logic [1:0] d);   // range 0..1
    return (d != 2'd0) ? 5'd1 : 5'd0;
  endfunction
  function automatic logic [4:0] dlong(input logic [4:0] d); // range 1..16
    return (d == 5'd0) ? 5'd1 : ((d > 5'd16) ? 5'd16 : d);
  endfunction

  // ------------------------------------------------------------ source muxes
  // full mux feeds the delay line; z-mux is the zero-delay path and only
  // carries sources that may connect without a register.
  word_t f_ms0p1, f_ms0p2, f_ms1p1, f_ms1p2, f_a0p1, f_a0p2, f_a1p1, f_a1p2;
  word_t f_o0, f_o1, f_o2, f_o3;
  word_t z_ms0p2, z_ms1p2, z_a0p1, z_a0p2, z_a1p1, z_a1p2, z_o0, z_o1, z_o2, z_o3;
  logic [4:0] e_ms0p1, e_ms0p2, e_ms1p1, e_ms1p2, e_a0p1, e_a0p2, e_a1p1, e_a1p2;
  logic [4:0] e_o0, e_o1, e_o2, e_o3;

  always_comb begin
  end

  always_comb begin
    // MS0 port 1: In1, A0, A1, zero
    unique case (ins.sel_ms0p1)
      2'd0: f_ms0p1 = din[1];
      2'd1: f_ms0p1 = a0;
      2'd2: f_ms0p1 = a1;
      default: f_ms0p1 = '0;
    endcase
    e_ms0p1 = (ins.sel_ms0p1 == 2'd3) ? 5'd0 : d12(ins.dly_ms0p1);
  end

  always_comb begin
    // MS0 port 2: In0, In2, In3, C0
    unique case (ins.sel_ms0p2)
      2'd0: f_ms0p2 = din[0];
      2'd1: f_ms0p2 = din[2];
      2'd2: f_ms0p2 = din[3];
      default: f_ms0p2 = c0;
    endcase
    z_ms0p2 = (ins.sel_ms0p2 == 2'd3) ? c0 : '0;
    e_ms0p2 = (ins.sel_ms0p2 == 2'd3) ? 5'd0 : d12(ins.dly_ms0p2);
  end

  always_comb begin
    // MS1 port 1: In2, A0, A1, zero
    unique case (ins.sel_ms1p1)
      2'd0: f_ms1p1 = din[2];
      2'd1: f_ms1p1 = a0;
      2'd2: f_ms1p1 = a1;
      default: f_ms1p1 = '0;
    endcase
    e_ms1p1 = (ins.sel_ms1p1 == 2'd3) ? 5'd0 : d12(ins.dly_ms1p1);
  end

  always_comb begin
    // MS1 port 2: In0, In1, In3, C1
    unique case (ins.sel_ms1p2)
      2'd0: f_ms1p2 = din[0];
      2'd1: f_ms1p2 = din[1];
      2'd2: f_ms1p2 = din[3];
      default: f_ms1p2 = c1;
    endcase
    z_ms1p2 = (ins.sel_ms1p2 == 2'd3) ? c1 : '0;
    e_ms1p2 = (ins.sel_ms1p2 == 2'd3) ? 5'd0 : d12(ins.dly_ms1p2);
  end

  always_comb begin
    // A0 port 1: In0, MS0
    f_a0p1 = ins.sel_a0p1 ? ms0 : din[0];
    z_a0p1 = f_a0p1;
    e_a0p1 = d01(ins.dly_a0p1);
  end

  always_comb begin
    // A0 port 2: In2, MS1, A1, C0
    unique case (ins.sel_a0p2)
      2'd0: f_a0p2 = din[2];
      2'd1: f_a0p2 = ms1;
      2'd2: f_a0p2 = a1;
      default: f_a0p2 = c0;
    endcase
    unique case (ins.sel_a0p2)
      2'd0: z_a0p2 = din[2];
      2'd1: z_a0p2 = ms1;
      2'd2: z_a0p2 = '0;
      default: z_a0p2 = c0;
    endcase
    unique case (ins.sel_a0p2)
      2'd2:    e_a0p2 = d12(ins.dly_a0p2);
      2'd3:    e_a0p2 = 5'd0;
      default: e_a0p2 = d01(ins.dly_a0p2);
    endcase
  end

  always_comb begin
    // A1 port 1: In3, MS1
    f_a1p1 = ins.sel_a1p1 ? ms1 : din[3];
    z_a1p1 = f_a1p1;
    e_a1p1 = d01(ins.dly_a1p1);
  end

  always_comb begin
    // A1 port 2: In1, MS0, A0, C1
    unique case (ins.sel_a1p2)
      2'd0: f_a1p2 = din[1];
      2'd1: f_a1p2 = ms0;
      2'd2: f_a1p2 = a0;
      default: f_a1p2 = c1;
    endcase
    unique case (ins.sel_a1p2)
      2'd0: z_a1p2 = din[1];
      2'd1: z_a1p2 = ms0;
      2'd2: z_a1p2 = '0;
      default: z_a1p2 = c1;
    endcase
    unique case (ins.sel_a1p2)
      2'd2:    e_a1p2 = d12(ins.dly_a1p2);
      2'd3:    e_a1p2 = 5'd0;
      default: e_a1p2 = d01(ins.dly_a1p2);
    endcase
  end

  always_comb begin
    // Out0: In0 (long line), MS0
    f_o0 = ins.sel_o0 ? ms0 : din[0];
    z_o0 = ins.sel_o0 ? ms0 : '0;
    e_o0 = ins.sel_o0 ? d01(ins.dly_o0[1:0]) : dlong(ins.dly_o0);
  end

  always_comb begin
    // Out3: In3 (long line), MS1
    f_o3 = ins.sel_o3 ? ms1 : din[3];
    z_o3 = ins.sel_o3 ? ms1 : '0;
    e_o3 = ins.sel_o3 ? d01(ins.dly_o3[1:0]) : dlong(ins.dly_o3);
  end

  always_comb begin
    // Out1: In1, MS0, A0, A1
    unique case (ins.sel_o1)
      2'd0: f_o1 = din[1];
      2'd1: f_o1 = ms0;
      2'd2: f_o1 = a0;
      default: f_o1 = a1;
    endcase
    z_o1 = (ins.sel_o1 == 2'd1) ? ms0 : '0;
    e_o1 = (ins.sel_o1 == 2'd1) ? d01(ins.dly_o1) : d12(ins.dly_o1);
  end

  always_comb begin
    // Out2: In2, MS1, A0, A1
    unique case (ins.sel_o2)
      2'd0: f_o2 = din[2];
      2'd1: f_o2 = ms1;
      2'd2: f_o2 = a0;
      default: f_o2 = a1;
    endcase
    z_o2 = (ins.sel_o2 == 2'd1) ? ms1 : '0;
    e_o2 = (ins.sel_o2 == 2'd1) ? d01(ins.dly_o2) : d12(ins.dly_o2);
  end

  // ------------------------------------------------------------ delay lines
  udsp_dline #(.MAXD(2)) u_d_ms0p1 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_ms0p1), .zin('0),     .dly(e_ms0p1), .dout(ms0p1));
  udsp_dline #(.MAXD(2)) u_d_ms0p2 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_ms0p2), .zin(z_ms0p2), .dly(e_ms0p2), .dout(ms0p2));
  udsp_dline #(.MAXD(2)) u_d_ms1p1 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_ms1p1), .zin('0),     .dly(e_ms1p1), .dout(ms1p1));
  udsp_dline #(.MAXD(2)) u_d_ms1p2 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_ms1p2), .zin(z_ms1p2), .dly(e_ms1p2), .dout(ms1p2));
  udsp_dline #(.MAXD(2)) u_d_a0p1 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_a0p1), .zin(z_a0p1), .dly(e_a0p1), .dout(a0p1));
  udsp_dline #(.MAXD(2)) u_d_a0p2 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_a0p2), .zin(z_a0p2), .dly(e_a0p2), .dout(a0p2));
  udsp_dline #(.MAXD(2)) u_d_a1p1 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_a1p1), .zin(z_a1p1), .dly(e_a1p1), .dout(a1p1));
  udsp_dline #(.MAXD(2)) u_d_a1p2 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_a1p2), .zin(z_a1p2), .dly(e_a1p2), .dout(a1p2));
  udsp_dline #(.MAXD(LONG_DLY)) u_d_o0 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_o0), .zin(z_o0), .dly(e_o0), .dout(dout[0]));
  udsp_dline #(.MAXD(2)) u_d_o1 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_o1), .zin(z_o1), .dly(e_o1), .dout(dout[1]));
  udsp_dline #(.MAXD(2)) u_d_o2 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_o2), .zin(z_o2), .dly(e_o2), .dout(dout[2]));
  udsp_dline #(.MAXD(LONG_DLY)) u_d_o3 (.clk, .rst_n, .clr(soft_rst), .st(ins.state),
    .din(f_o3), .zin(z_o3), .dly(e_o3), .dout(dout[3]));

  // ------------------------------------------------------------ arithmetic
  function automatic word_t ms_op(input logic shift, input logic [3:0] shamt,
                                  input word_t p1, input word_t p2);
    logic signed [2*DW-1:0] prod;
    logic signed [3:0]      sa;
    sa = shamt;
    if (shift) begin
      if (sa >= 0) return p1 <<< sa;
      else         return p1 >>> (-sa);
    end
    prod = p1 * p2;
    if (p1 == word_t'(16'sh8000) && p2 == word_t'(16'sh8000)) return word_t'(16'sh7fff);
    return prod[2*DW-2:DW-1];
  endfunction

  assign ms0 = ms_op(ins.ms_shift[0], ins.ms0_shamt, ms0p1, ms0p2);
  assign ms1 = ms_op(ins.ms_shift[1], ins.ms1_shamt, ms1p1, ms1p2);

  word_t acc0 [N_STATES];
  word_t acc1 [N_STATES];
  word_t a0_rhs, a1_rhs;

  assign a0_rhs = ins.add_acc[0] ? acc0[ins.state] : a0p2;
  assign a1_rhs = ins.add_acc[1] ? acc1[ins.state] : a1p2;
  assign a0 = ins.add_sub[0] ? (a0p1 - a0_rhs) : (a0p1 + a0_rhs);
  assign a1 = ins.add_sub[1] ? (a1p1 - a1_rhs) : (a1p1 + a1_rhs);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STATES; s++) begin
        acc0[s] <= '0;
        acc1[s] <= '0;
      end
    end else if (soft_rst) begin
      for (int s = 0; s < N_STATES; s++) begin
        acc0[s] <= '0;
        acc1[s] <= '0;
      end
    end else begin
      acc0[ins.state] <= a0;
      acc1[ins.state] <= a1;
    end
  end

endmodule
