// ddc: digital down-converter from the real IF samples of the ADC to complex baseband.
// Runs at the converter clock. Each 14-bit ADC sample is rotated by -2*pi*IF_INC*n/2^32 with
// a CORDIC (I/Q demodulation), then a third-order CIC decimator (integrators at the high rate,
// comb sections at the low rate) filters and reduces the rate by R. The CIC gain R^3 and the
// factor 1/2 of the real-to-complex conversion are removed by a shift of GAIN_SHIFT.
// The CIC is this design's choice of decimation filter; only integer factors are supported.
// Timing: out_valid pulses once every R clocks.
module ddc
  import wimax_pkg::*;
#(
  parameter int unsigned R          = 8,
  parameter int unsigned GAIN_SHIFT = 8,
  parameter logic [31:0] IF_INC     = 32'd805306368
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [13:0] adc_in,
  output logic               out_valid,
  output cplx16_t            out_data
);
  localparam int unsigned W = 40;
  localparam int unsigned CW = $clog2(R);

  logic [31:0]         ph;
  cplx16_t             bb;
  logic                bb_v;
  logic signed [W-1:0] i_re [3], i_im [3];
  logic signed [W-1:0] c_re [3], c_im [3];
  logic [CW-1:0]       div;
  logic signed [15:0]  nph;
  cplx16_t             adc_c;

  assign nph      = -$signed(ph[31:16]);
  assign adc_c.re = {adc_in, 2'b00};
  assign adc_c.im = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= ph + IF_INC;
  end

  cordic_rot u_mix (
    .clk, .rst_n, .in_valid(1'b1), .in_data(adc_c), .angle(nph),
    .out_valid(bb_v), .out_data(bb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; out_valid <= 1'b0; out_data <= '0;
      for (int k = 0; k < 3; k++) begin c_re[k] <= '0; c_im[k] <= '0; i_re[k] <= '0; i_im[k] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (bb_v) begin
        i_re[0] <= i_re[0] + W'(bb.re);
        i_im[0] <= i_im[0] + W'(bb.im);
        i_re[1] <= i_re[1] + i_re[0];
        i_im[1] <= i_im[1] + i_im[0];
        i_re[2] <= i_re[2] + i_re[1];
        i_im[2] <= i_im[2] + i_im[1];
        div <= (div == CW'(R - 1)) ? '0 : div + 1'b1;
        if (div == '0) begin
          logic signed [W-1:0] a_re, a_im, s_re, s_im;
          a_re = i_re[2];
          a_im = i_im[2];
          for (int k = 0; k < 3; k++) begin
            s_re = a_re - c_re[k];
            s_im = a_im - c_im[k];
            c_re[k] <= a_re;
            c_im[k] <= a_im;
            a_re = s_re;
            a_im = s_im;
          end
          out_valid   <= 1'b1;
          out_data.re <= sat16(48'(a_re >>> GAIN_SHIFT));
          out_data.im <= sat16(48'(a_im >>> GAIN_SHIFT));
        end
      end
    end
  end
endmodule
