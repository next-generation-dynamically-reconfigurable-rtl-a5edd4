// udsp_jtag_if: JTAG test access port that feeds the control module.
//
// A standard 16-state TAP controller with a 4-bit instruction register. TCK,
// TMS and TDI are synchronised into the system clock and the TAP advances on
// each detected TCK rising edge (TDO changes on the falling edge), so `clk`
// must run at least 4x faster than TCK. trst_n resets the TAP.
// Instructions: IDCODE (4'h1, selected after reset), FRAME (4'h2): a 32-bit
// data register shifted LSB first whose content is issued as one frame word
// on `w_valid`/`w_data` at Update-DR; OBSERVE (4'h3): a 32-bit register that
// captures `obs_data` at Capture-DR; any other code selects BYPASS.
// A frame word waits in a holding register until `w_ready`; a word completed
// while one is still waiting is dropped and sets the sticky `overrun`.
// The choice of JTAG as the programming interface follows the design
// description; the instruction codes, register lengths and the oversampled
// TCK are this design's own.
module udsp_jtag_if #(
  parameter logic [31:0] IDCODE = 32'h1D5B_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  output logic        w_valid,
  output logic [31:0] w_data,
  input  logic        w_ready,
  input  logic [31:0] obs_data,
  output logic        overrun
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [3:0] IR_IDCODE = 4'h1, IR_FRAME = 4'h2, IR_OBSERVE = 4'h3;

  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s, trst_s;
  logic       rise, fall;
  tap_e       st, st_n;
  logic [3:0] ir, ir_sh;
  logic [31:0] dr;
  logic        byp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s <= '0; tms_s <= '1; tdi_s <= '0; trst_s <= '0;
    end else begin
      tck_s <= {tck_s[1:0], tck};
      tms_s <= {tms_s[0], tms};
      tdi_s <= {tdi_s[0], tdi};
      trst_s <= {trst_s[0], trst_n};
    end
  end
  assign rise = tck_s[1] & ~tck_s[2];
  assign fall = ~tck_s[1] & tck_s[2];

  always_comb begin
    unique case (st)
      TLR:    st_n = tms_s[1] ? TLR    : RTI;
      RTI:    st_n = tms_s[1] ? SEL_DR : RTI;
      SEL_DR: st_n = tms_s[1] ? SEL_IR : CAP_DR;
      CAP_DR: st_n = tms_s[1] ? EX1_DR : SH_DR;
      SH_DR:  st_n = tms_s[1] ? EX1_DR : SH_DR;
      EX1_DR: st_n = tms_s[1] ? UPD_DR : PA_DR;
      PA_DR:  st_n = tms_s[1] ? EX2_DR : PA_DR;
      EX2_DR: st_n = tms_s[1] ? UPD_DR : SH_DR;
      UPD_DR: st_n = tms_s[1] ? SEL_DR : RTI;
      SEL_IR: st_n = tms_s[1] ? TLR    : CAP_IR;
      CAP_IR: st_n = tms_s[1] ? EX1_IR : SH_IR;
      SH_IR:  st_n = tms_s[1] ? EX1_IR : SH_IR;
      EX1_IR: st_n = tms_s[1] ? UPD_IR : PA_IR;
      PA_IR:  st_n = tms_s[1] ? EX2_IR : PA_IR;
      EX2_IR: st_n = tms_s[1] ? UPD_IR : SH_IR;
      default: st_n = tms_s[1] ? SEL_DR : RTI;   // UPD_IR
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= TLR; ir <= IR_IDCODE; ir_sh <= '0; dr <= '0; byp <= 1'b0;
      tdo <= 1'b0; w_valid <= 1'b0; w_data <= '0; overrun <= 1'b0;
    end else begin
      if (w_valid && w_ready) w_valid <= 1'b0;
      if (!trst_s[1]) begin
        st <= TLR;
        ir <= IR_IDCODE;
      end else if (rise) begin
        st <= st_n;
        unique case (st)
          TLR:    ir <= IR_IDCODE;
          CAP_IR: ir_sh <= 4'b0001;
          SH_IR:  ir_sh <= {tdi_s[1], ir_sh[3:1]};
          UPD_IR: ir <= ir_sh;
          CAP_DR: begin
            byp <= 1'b0;
            unique case (ir)
              IR_IDCODE:  dr <= IDCODE;
              IR_OBSERVE: dr <= obs_data;
              default:    dr <= '0;
            endcase
          end
          SH_DR: begin
            if (ir inside {IR_IDCODE, IR_FRAME, IR_OBSERVE}) dr <= {tdi_s[1], dr[31:1]};
            else                                             byp <= tdi_s[1];
          end
          UPD_DR: begin
            if (ir == IR_FRAME) begin
              if (w_valid && !w_ready) overrun <= 1'b1;
              else begin
                w_valid <= 1'b1;
                w_data  <= dr;
              end
            end
          end
          default: ;
        endcase
      end else if (fall) begin
        if (st == SH_IR)      tdo <= ir_sh[0];
        else if (st == SH_DR) tdo <= (ir inside {IR_IDCODE, IR_FRAME, IR_OBSERVE}) ? dr[0] : byp;
      end
    end
  end

endmodule
