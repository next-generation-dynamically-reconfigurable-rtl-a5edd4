// udsp_distributor: decodes frames and hands them to the programmers.
//
// A frame is a header word followed by a payload:
//   header [31:28] type, [27:20] target, [19:0] argument
//   F_VS_PROG  target = stack, 64 payload words (the 2048-bit stack frame)
//   F_L4_PROG  target = I/O-layer box, 4 payload words (120-bit config)
//   F_PC       no payload, argument to the program-counter module
//   F_SOFT_RST no payload, target = stack (8'hFF = all stacks)
//   F_OBSERVE  no payload, target = stack, argument[1:0] = core output
//   other      ignored (one word)
// Payload words go out with their index on vs_*/l4_*; header-only frames
// give a one-cycle command pulse. `frame_done` pulses with the last word of
// every frame. While `vs_busy` (the stack programmer still writing the
// previous frame) no payload word is taken: s_ready stays low.
// vs_data, l4_data, cmd_target and cmd_arg are the word fields as received
// (no logic of their own); the valid and command strobes say when they count.
// The frame types follow the sub-modules of the control module in the design
// description; the word format is this design's own.
module udsp_distributor
  import udsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  input  logic [31:0] s_data,
  output logic        s_ready,
  input  logic        vs_busy,
  output logic        vs_valid,
  output logic [5:0]  vs_idx,
  output logic [7:0]  vs_stack,
  output logic [31:0] vs_data,
  output logic        l4_valid,
  output logic [1:0]  l4_idx,
  output logic [7:0]  l4_box,
  output logic [31:0] l4_data,
  output logic        pc_cmd,
  output logic        rst_cmd,
  output logic        obs_cmd,
  output logic [7:0]  cmd_target,
  output logic [19:0] cmd_arg,
  output logic        frame_done
);

  typedef enum logic [1:0] { S_HDR, S_VS, S_L4 } dstate_e;

  dstate_e     st;
  logic [7:0]  tgt;
  logic [5:0]  cnt;
  logic        take;
  frame_type_e ftype;

  assign ftype   = frame_type_e'(s_data[31:28]);
  assign s_ready = (st == S_HDR) || (st == S_L4) || (st == S_VS && !vs_busy);
  assign take    = s_valid && s_ready;

  assign vs_valid = take && st == S_VS;
  assign vs_idx   = cnt;
  assign vs_stack = tgt;
  assign vs_data  = s_data;
  assign l4_valid = take && st == S_L4;
  assign l4_idx   = cnt[1:0];
  assign l4_box   = tgt;
  assign l4_data  = s_data;

  assign pc_cmd     = take && st == S_HDR && ftype == F_PC;
  assign rst_cmd    = take && st == S_HDR && ftype == F_SOFT_RST;
  assign obs_cmd    = take && st == S_HDR && ftype == F_OBSERVE;
  assign cmd_target = s_data[27:20];
  assign cmd_arg    = s_data[19:0];

  always_comb begin
    frame_done = 1'b0;
    if (take) begin
      unique case (st)
        S_HDR:   frame_done = !(ftype inside {F_VS_PROG, F_L4_PROG});
        S_VS:    frame_done = (cnt == 6'(FRAME_WORDS - 1));
        default: frame_done = (cnt == 6'(L4_WORDS - 1));
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_HDR; tgt <= '0; cnt <= '0;
    end else if (take) begin
      unique case (st)
        S_HDR: begin
          tgt <= s_data[27:20];
          cnt <= '0;
          if (ftype == F_VS_PROG)      st <= S_VS;
          else if (ftype == F_L4_PROG) st <= S_L4;
        end
        default: begin
          cnt <= cnt + 6'd1;
          if (frame_done) st <= S_HDR;
        end
      endcase
    end
  end

endmodule
