// udsp_control: control module of the UDSP array.
//
// Three instruction sources run concurrently: a JTAG TAP, a direct serial
// port on test pins and a parallel word port from an on-chip eFPGA. The
// priority checker lets one source at a time (JTAG first, then serial, then
// eFPGA) hand whole frames to the distributor, which sends stack frames to
// the vertical-stack programmer, I/O-layer frames to the layer-4 programmer
// and commands to the program counter, the soft-reset block and the observer.
// The observer word can be read back through JTAG (OBSERVE instruction) or
// the serial port, not through the eFPGA port.
//
// Outputs: the shared stack configuration bus `cfg`, per-box layer-4 write
// strobes and data, the shared program counter `pc` and per-stack soft
// resets. `core_out` carries every core output to the observer.
// The partition into these sub-modules follows the design description; the
// frame and command formats are described in udsp_distributor.
module udsp_control
  import udsp_pkg::*;
#(
  parameter int unsigned N_STACKS = 81,
  parameter int unsigned N_L4     = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  // JTAG
  input  logic             tck,
  input  logic             tms,
  input  logic             tdi,
  input  logic             trst_n,
  output logic             tdo,
  // direct serial
  input  logic             sdi,
  input  logic             sen,
  output logic             sdo,
  // eFPGA word port
  input  logic             efpga_valid,
  input  logic [31:0]      efpga_data,
  output logic             efpga_ready,
  // to the array
  output cfg_bus_t         cfg,
  output logic             l4_we [N_L4],
  output logic [L4_IW-1:0] l4_data,
  output logic [PC_W-1:0]  pc,
  output logic             pc_done,
  output logic             soft_rst [N_STACKS],
  input  word_t            core_out [N_STACKS][N_CIO],
  // status
  output logic             jtag_overrun,
  output logic             serial_overrun,
  output logic [1:0]       src_grant
);

  logic        s_valid [3];
  logic [31:0] s_data  [3];
  logic        s_ready [3];
  logic        m_valid, m_ready, frame_done;
  logic [31:0] m_data;
  logic [31:0] obs_word;

  logic        vs_busy, vs_valid, l4_valid, pc_cmd, rst_cmd, obs_cmd;
  logic [5:0]  vs_idx;
  logic [7:0]  vs_stack, l4_box, cmd_target;
  logic [31:0] vs_data, l4_wdata;
  logic [1:0]  l4_idx;
  logic [19:0] cmd_arg;

  udsp_jtag_if u_jtag (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo,
    .w_valid(s_valid[0]), .w_data(s_data[0]), .w_ready(s_ready[0]),
    .obs_data(obs_word), .overrun(jtag_overrun)
  );

  udsp_serial_if u_ser (
    .clk, .rst_n, .sdi, .sen, .sdo,
    .w_valid(s_valid[1]), .w_data(s_data[1]), .w_ready(s_ready[1]),
    .obs_data(obs_word), .overrun(serial_overrun)
  );

  assign s_valid[2]  = efpga_valid;
  assign s_data[2]   = efpga_data;
  assign efpga_ready = s_ready[2];

  udsp_priority #(.NSRC(3)) u_prio (
    .clk, .rst_n, .s_valid, .s_data, .s_ready,
    .m_valid, .m_data, .m_ready, .frame_done, .grant(src_grant)
  );

  udsp_distributor u_dist (
    .clk, .rst_n, .s_valid(m_valid), .s_data(m_data), .s_ready(m_ready),
    .vs_busy, .vs_valid, .vs_idx, .vs_stack, .vs_data,
    .l4_valid, .l4_idx, .l4_box, .l4_data(l4_wdata),
    .pc_cmd, .rst_cmd, .obs_cmd, .cmd_target, .cmd_arg, .frame_done
  );

  udsp_vs_prog u_vsp (
    .clk, .rst_n, .w_valid(vs_valid), .w_idx(vs_idx), .w_stack(vs_stack),
    .w_data(vs_data), .busy(vs_busy), .cfg
  );

  udsp_l4_prog #(.N_L4(N_L4)) u_l4p (
    .clk, .rst_n, .w_valid(l4_valid), .w_idx(l4_idx), .w_box(l4_box),
    .w_data(l4_wdata), .l4_we, .l4_data
  );

  udsp_pc u_pc (.clk, .rst_n, .cmd(pc_cmd), .arg(cmd_arg), .pc, .done(pc_done));

  udsp_soft_reset #(.N_STACKS(N_STACKS)) u_srst (
    .clk, .rst_n, .cmd(rst_cmd), .target(cmd_target), .arg(cmd_arg), .soft_rst
  );

  udsp_observer #(.N_STACKS(N_STACKS)) u_obs (
    .clk, .rst_n, .cmd(obs_cmd), .target(cmd_target), .arg(cmd_arg),
    .core_out, .obs_word
  );

endmodule
