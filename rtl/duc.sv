// duc: digital up-converter from complex baseband to a real intermediate frequency.
// Runs at the converter clock. It requests one baseband sample every R clocks (in_req), raises
// the rate by R with a third-order CIC interpolator (comb sections at the low rate, zero
// stuffing, integrators at the high rate; gain R^2 removed by a shift of GAIN_SHIFT) and
// modulates the result to IF with a numerically controlled oscillator and a CORDIC rotator:
// dac = Re{x * e^{j*2*pi*IF_INC*n/2^32}}.
// The CIC is this design's choice of interpolation filter, and only integer factors are
// supported (8 for the 8.75 MHz profile at an 80 MHz converter clock).
// Timing: in_data is taken in the cycle of in_req; dac_out is valid every cycle.
module duc
  import wimax_pkg::*;
#(
  parameter int unsigned R          = 8,
  parameter int unsigned GAIN_SHIFT = 6,
  parameter logic [31:0] IF_INC     = 32'd805306368   // 15 MHz at 80 MHz
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               in_req,
  input  cplx16_t            in_data,
  output logic signed [15:0] dac_out
);
  localparam int unsigned W = 40;
  localparam int unsigned CW = $clog2(R);

  logic [CW-1:0]       div;
  logic signed [W-1:0] c_re [3], c_im [3];     // comb delay registers
  logic signed [W-1:0] cmb_re, cmb_im;         // comb output (held)
  logic signed [W-1:0] i_re [3], i_im [3];     // integrators
  logic [31:0]         ph;
  cplx16_t             up;
  cplx16_t             mixed;
  logic                mixed_v;

  assign in_req = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; ph <= '0; cmb_re <= '0; cmb_im <= '0;
      for (int k = 0; k < 3; k++) begin c_re[k] <= '0; c_im[k] <= '0; i_re[k] <= '0; i_im[k] <= '0; end
    end else begin
      logic signed [W-1:0] a_re, a_im, s_re, s_im;
      div <= (div == CW'(R - 1)) ? '0 : div + 1'b1;
      ph  <= ph + IF_INC;
      if (in_req) begin
        // three comb sections at the low rate
        a_re = W'(in_data.re);
        a_im = W'(in_data.im);
        for (int k = 0; k < 3; k++) begin
          s_re = a_re - c_re[k];
          s_im = a_im - c_im[k];
          c_re[k] <= a_re;
          c_im[k] <= a_im;
          a_re = s_re;
          a_im = s_im;
        end
        cmb_re <= a_re;
        cmb_im <= a_im;
      end
      // zero-stuffed input: the comb value enters the integrators once per R clocks
      i_re[0] <= i_re[0] + ((div == CW'(1)) ? cmb_re : '0);
      i_im[0] <= i_im[0] + ((div == CW'(1)) ? cmb_im : '0);
      i_re[1] <= i_re[1] + i_re[0];
      i_im[1] <= i_im[1] + i_im[0];
      i_re[2] <= i_re[2] + i_re[1];
      i_im[2] <= i_im[2] + i_im[1];
    end
  end

  assign up.re = sat16(48'(i_re[2] >>> GAIN_SHIFT));
  assign up.im = sat16(48'(i_im[2] >>> GAIN_SHIFT));

  cordic_rot u_mix (
    .clk, .rst_n, .in_valid(1'b1), .in_data(up), .angle(ph[31:16]),
    .out_valid(mixed_v), .out_data(mixed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_out <= '0;
    else if (mixed_v) dac_out <= mixed.re;
  end
endmodule
