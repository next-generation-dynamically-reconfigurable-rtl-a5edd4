// udsp_l4_prog: I/O-layer (layer 4) programmer.
//
// Collects the 4 payload words of an F_L4_PROG frame (word k = bits
// 32k+31..32k) and, one cycle after the last, pulses `l4_we[box]` with the
// low 120 bits as the box's single configuration word. Boxes are numbered
// row-major over the layer-4 grid; an index past N_L4 is ignored. That the
// I/O layer has its own programmer follows the design description; the word
// format is this design's own.
module udsp_l4_prog
  import udsp_pkg::*;
#(
  parameter int unsigned N_L4 = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_valid,
  input  logic [1:0]       w_idx,
  input  logic [7:0]       w_box,
  input  logic [31:0]      w_data,
  output logic             l4_we [N_L4],
  output logic [L4_IW-1:0] l4_data
);

  logic [31:0] buf_q [L4_WORDS];
  logic        go;
  logic [7:0]  box_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L4_WORDS; k++) buf_q[k] <= '0;
      go <= 1'b0; box_q <= '0;
    end else begin
      go <= w_valid && (w_idx == 2'(L4_WORDS - 1));
      if (w_valid) begin
        buf_q[w_idx] <= w_data;
        box_q        <= w_box;
      end
    end
  end

  assign l4_data = {buf_q[3][L4_IW-97:0], buf_q[2], buf_q[1], buf_q[0]};

  always_comb begin
    for (int b = 0; b < N_L4; b++) l4_we[b] = go && (32'(box_q) == b);
  end

endmodule
