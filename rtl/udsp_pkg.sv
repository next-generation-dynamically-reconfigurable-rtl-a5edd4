// udsp_pkg: types and constants shared by the UDSP array.
//
// The array is a grid of vertical stacks. Each stack holds one 16-bit compute
// core and three delay-less switch boxes (routing layers 1..3). A registered
// I/O layer (layer 4) joins the array borders to the stacks, and a control
// module programs everything through frames of 2048 bits.
//
// Numbers taken from the design description: 16-bit data, 8 instructions per
// core and per switch box, 4 temporal state copies per register, a 74-bit core
// instruction (38 delay + 20 selection + 14 operation + 2 state bits), 90-bit
// layer-1 and 24-bit layer-2/3 instructions, 8 tokens in layer 1 and 4 in
// layers 2 and 3, a 2 Kb frame per vertical stack, up to 256 stacks, a 9x9
// array and layer-4 boxes covering 4x4 stacks. The field layout inside each
// instruction word, the frame layout and the control word formats are this
// design's own choices.
package udsp_pkg;

  // ---------------------------------------------------------------- data
  localparam int unsigned DW        = 16;  // data word width
  localparam int unsigned N_INSTR   = 8;   // temporal instructions
  localparam int unsigned PC_W      = 3;
  localparam int unsigned N_STATES  = 4;   // preserved states per register
  localparam int unsigned ST_W      = 2;
  localparam int unsigned N_CIO     = 4;   // core data inputs = outputs
  localparam int unsigned N_CONST   = 8;   // words per constant bank
  localparam int unsigned CA_W      = 3;
  localparam int unsigned LONG_DLY  = 16;  // longest delay of the long lines

  typedef logic signed [DW-1:0] word_t;

  // ---------------------------------------------------------------- core instruction (74 bits)
  // Sink-port selection codes follow the core connectivity matrix:
  //   MS0.p1 : 0 In1, 1 Add0, 2 Add1, 3 zero     MS0.p2 : 0 In0, 1 In2, 2 In3, 3 Const0
  //   MS1.p1 : 0 In2, 1 Add0, 2 Add1, 3 zero     MS1.p2 : 0 In0, 1 In1, 2 In3, 3 Const1
  //   Add0.p1: 0 In0, 1 MS0                      Add0.p2: 0 In2, 1 MS1, 2 Add1, 3 Const0
  //   Add1.p1: 0 In3, 1 MS1                      Add1.p2: 0 In1, 1 MS0, 2 Add0, 3 Const1
  //   Out0   : 0 In0, 1 MS0                      Out1   : 0 In1, 1 MS0, 2 Add0, 3 Add1
  //   Out2   : 0 In2, 1 MS1, 2 Add0, 3 Add1      Out3   : 0 In3, 1 MS1
  typedef struct packed {
    // temporal state (2)
    logic [ST_W-1:0]  state;
    // operation (14)
    logic [1:0]       add_acc;     // 1: port 2 replaced by own accumulator
    logic [1:0]       add_sub;     // 1: p1 - p2, 0: p1 + p2
    logic [3:0]       ms1_shamt;   // signed shift, +left / -arith right
    logic [3:0]       ms0_shamt;
    logic [1:0]       ms_shift;    // 1: shifter, 0: multiplier (Q1.15)
    // selection (20)
    logic [1:0]       sel_o2, sel_o1;
    logic             sel_o3, sel_o0;
    logic [1:0]       sel_a1p2;
    logic             sel_a1p1;
    logic [1:0]       sel_a0p2;
    logic             sel_a0p1;
    logic [1:0]       sel_ms1p2, sel_ms1p1, sel_ms0p2, sel_ms0p1;
    // delays and constant banks (38)
    logic [1:0]       c_we;        // data-cache write of In1->Const0, In2->Const1
    logic [CA_W-1:0]  c1_addr, c0_addr;
    logic [1:0]       dly_o2, dly_o1;
    logic [4:0]       dly_o3, dly_o0;   // long delay lines
    logic [1:0]       dly_a1p2, dly_a1p1, dly_a0p2, dly_a0p1;
    logic [1:0]       dly_ms1p2, dly_ms1p1, dly_ms0p2, dly_ms0p1;
  } core_instr_t;

  localparam int unsigned CORE_IW = $bits(core_instr_t);   // 74

  // ---------------------------------------------------------------- switch boxes
  localparam int unsigned L1_TOK  = 8;
  localparam int unsigned L1_WPD  = 4;   // wires per direction in layer 1
  localparam int unsigned L1_NIO  = N_CIO + 4*L1_WPD + 1;  // 21 in, 21 out
  localparam int unsigned L1_IW   = 90;  // 8*3 + 21*3 = 87 bits used
  localparam int unsigned L23_TOK = 4;
  localparam int unsigned L23_NIO = 6;   // 4 directions, one down, one up
  localparam int unsigned L23_IW  = 24;  // 4*3 + 6*2

  // directions
  localparam int unsigned D_N = 0, D_E = 1, D_S = 2, D_W = 3;

  // layer 4 (I/O layer)
  localparam int unsigned L4_SPAN = 4;              // box covers 4x4 stacks
  localparam int unsigned L4_WPD  = 2;              // wires per direction
  localparam int unsigned L4_NIO  = L4_SPAN*L4_SPAN + 4*L4_WPD;  // 24
  localparam int unsigned L4_SW   = 5;
  localparam int unsigned L4_IW   = L4_NIO*L4_SW;   // 120

  // ---------------------------------------------------------------- stack configuration bus
  typedef enum logic [2:0] {
    T_CORE = 3'd0, T_C0 = 3'd1, T_C1 = 3'd2, T_L1 = 3'd3, T_L2 = 3'd4, T_L3 = 3'd5
  } cfg_target_e;

  localparam int unsigned CFG_DW = 90;
  typedef struct packed {
    logic              we;
    logic [7:0]        stack_id;
    cfg_target_e       target;
    logic [PC_W-1:0]   addr;
    logic [CFG_DW-1:0] data;
  } cfg_bus_t;

  // ---------------------------------------------------------------- frames
  localparam int unsigned FRAME_W     = 2048;
  localparam int unsigned FRAME_WORDS = FRAME_W/32;
  localparam int unsigned OFS_CORE = 0;
  localparam int unsigned OFS_C0   = OFS_CORE + N_INSTR*CORE_IW;   // 592
  localparam int unsigned OFS_C1   = OFS_C0 + N_CONST*DW;          // 720
  localparam int unsigned OFS_L1   = OFS_C1 + N_CONST*DW;          // 848
  localparam int unsigned OFS_L2   = OFS_L1 + N_INSTR*L1_IW;       // 1568
  localparam int unsigned OFS_L3   = OFS_L2 + N_INSTR*L23_IW;      // 1760
  localparam int unsigned FRAME_USED = OFS_L3 + N_INSTR*L23_IW;    // 1952
  localparam int unsigned L4_WORDS = 4;

  // header word: [31:28] type, [27:20] target, [19:0] argument
  typedef enum logic [3:0] {
    F_NOP = 4'd0, F_VS_PROG = 4'd1, F_L4_PROG = 4'd2, F_PC = 4'd3,
    F_SOFT_RST = 4'd4, F_OBSERVE = 4'd5
  } frame_type_e;

  // program counter modes
  typedef enum logic [1:0] {
    PC_HOLD = 2'd0, PC_LOOP = 2'd1, PC_ONCE = 2'd2, PC_PINGPONG = 2'd3
  } pc_mode_e;

  // Layer-1 sparse first level: token t, choice s (0..6) reaches input
  // (t + 8*s) mod 21. The pattern keeps every input on two or three tokens and
  // gives a low mean and variance of the input cross-correlation.
  function automatic int unsigned l1_conn(input int unsigned t, input int unsigned s);
    return (t + 8*s) % L1_NIO;
  endfunction

endpackage
