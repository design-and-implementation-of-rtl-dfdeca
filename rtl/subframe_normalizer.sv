// subframe_normalizer: applies a constant scale factor to the downlink subframe.
// At the frame start (`freeze`) the current scale factor of the power estimator is captured
// and kept for the whole subframe, so all its symbols see the same gain: out = x*s/2^12,
// saturated to 16 bits.
// Timing: out_valid follows in_valid by one cycle.
module subframe_normalizer
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        freeze,
  input  logic [15:0] scale_in,
  input  logic        in_valid,
  input  cplx16_t     in_data,
  output logic        out_valid,
  output cplx16_t     out_data,
  output logic [15:0] scale_held
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale_held <= 16'h1000;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      if (freeze) scale_held <= scale_in;
      out_valid <= in_valid;
      if (in_valid) begin
        out_data.re <= sat16(48'(($signed(34'(in_data.re)) * $signed({18'd0, scale_held})) >>> 12));
        out_data.im <= sat16(48'(($signed(34'(in_data.im)) * $signed({18'd0, scale_held})) >>> 12));
      end
    end
  end
endmodule
