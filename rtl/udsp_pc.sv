// udsp_pc: programmable program counter shared by every core and switch box.
//
// The counter picks which of the 8 temporal instructions is active in the
// whole array, so all routing and core functions change in the same cycle.
// A command (`cmd`, argument `arg`) sets
//   arg[17:16] mode, arg[14:12] first, arg[10:8] last, arg[7:0] dwell
// and restarts the counter at `first`. The counter holds each value for
// dwell+1 cycles and then steps:
//   PC_HOLD     stay at first
//   PC_LOOP     first, first+1, .. last, first, .. (wrapping)
//   PC_ONCE     first .. last, then stay at last; `done` goes high
//   PC_PINGPONG first .. last .. first .. (direction reverses at the ends)
// Steps are modulo 8, so last < first wraps through 7 -> 0. Reset: pc = 0,
// PC_HOLD. A shared, programmable counter that supports several forms of
// temporal jump follows the design description; the modes are this design's.
module udsp_pc
  import udsp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd,
  input  logic [19:0]     arg,
  output logic [PC_W-1:0] pc,
  output logic            done
);

  pc_mode_e        mode;
  logic [PC_W-1:0] first, last;
  logic [7:0]      dwell, cnt;
  logic            down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= PC_HOLD; first <= '0; last <= '0; dwell <= '0;
      cnt <= '0; pc <= '0; down <= 1'b0; done <= 1'b0;
    end else if (cmd) begin
      mode  <= pc_mode_e'(arg[17:16]);
      first <= arg[14:12];
      last  <= arg[10:8];
      dwell <= arg[7:0];
      pc    <= arg[14:12];
      cnt   <= '0;
      down  <= 1'b0;
      done  <= (pc_mode_e'(arg[17:16]) == PC_ONCE) && (arg[14:12] == arg[10:8]);
    end else if (cnt != dwell) begin
      cnt <= cnt + 8'd1;
    end else begin
      cnt <= '0;
      unique case (mode)
        PC_HOLD: pc <= first;
        PC_LOOP: pc <= (pc == last) ? first : pc + 3'd1;
        PC_ONCE: begin
          if (pc != last) pc <= pc + 3'd1;
          if (pc + 3'd1 == last || pc == last) done <= 1'b1;
        end
        default: begin   // PC_PINGPONG
          if (first == last) pc <= first;
          else if (!down) begin
            if (pc + 3'd1 == last) down <= 1'b1;
            pc <= pc + 3'd1;
          end else begin
            if (pc - 3'd1 == first) down <= 1'b0;
            pc <= pc - 3'd1;
          end
        end
      endcase
    end
  end

endmodule
