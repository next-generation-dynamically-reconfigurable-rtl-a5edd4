// udsp_serial_if: direct serial programming port on test pins.
//
// Bits on `sdi` are taken on clock edges where `sen` is high, MSB first; every
// 32 bits form one frame word, presented on `w_valid`/`w_data` until
// `w_ready`. A word completed while the previous one still waits is dropped
// and sets the sticky `overrun`. While a word shifts in, `sdo` shifts out
// (MSB first, one bit per `sen`) the observer word `obs_data` sampled when the
// previous word completed, so reading the observer costs one dummy word.
// The existence of the port follows the design description; the pin protocol
// is this design's own.
module udsp_serial_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sdi,
  input  logic        sen,
  output logic        sdo,
  output logic        w_valid,
  output logic [31:0] w_data,
  input  logic        w_ready,
  input  logic [31:0] obs_data,
  output logic        overrun
);

  logic [31:0] ish, osh;
  logic [4:0]  cnt;

  assign sdo = osh[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ish <= '0; osh <= '0; cnt <= '0;
      w_valid <= 1'b0; w_data <= '0; overrun <= 1'b0;
    end else begin
      if (w_valid && w_ready) w_valid <= 1'b0;
      if (sen) begin
        ish <= {ish[30:0], sdi};
        cnt <= cnt + 5'd1;
        if (cnt == 5'd31) begin
          osh <= obs_data;
          if (w_valid && !w_ready) overrun <= 1'b1;
          else begin
            w_valid <= 1'b1;
            w_data  <= {ish[30:0], sdi};
          end
        end else begin
          osh <= {osh[30:0], 1'b0};
        end
      end
    end
  end

endmodule
