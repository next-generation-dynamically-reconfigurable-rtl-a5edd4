// udsp_priority: priority checker between the three instruction sources.
//
// Sources (index 0 JTAG, 1 direct serial, 2 eFPGA) offer frame words with
// valid/ready. When no frame is in progress the lowest-index source with a
// word is granted; the grant then stays with that source until the
// distributor signals `frame_done`, so frames from different sources never
// interleave. Words pass through combinationally (no added latency).
// That all three inputs are accepted concurrently and one is given precedence
// follows the design description; the fixed order JTAG > serial > eFPGA and
// the frame lock are this design's own.
module udsp_priority #(
  parameter int unsigned NSRC = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid [NSRC],
  input  logic [31:0] s_data  [NSRC],
  output logic        s_ready [NSRC],
  output logic        m_valid,
  output logic [31:0] m_data,
  input  logic        m_ready,
  input  logic        frame_done,
  output logic [1:0]  grant
);

  logic       locked;
  logic [1:0] cur, pick;

  always_comb begin
    pick = 2'(NSRC - 1);
    for (int i = NSRC - 1; i >= 0; i--)
      if (s_valid[i]) pick = 2'(i);
  end

  assign grant   = locked ? cur : pick;
  assign m_valid = s_valid[grant];
  assign m_data  = s_data[grant];

  always_comb begin
    for (int i = 0; i < NSRC; i++) s_ready[i] = (32'(grant) == i) && m_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
    end else if (frame_done) begin
      locked <= 1'b0;
    end else if (m_valid && m_ready && !locked) begin
      locked <= 1'b1;
      cur    <= grant;
    end
  end

endmodule
