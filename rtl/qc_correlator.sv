// qc_correlator: quantised cross-correlation with the end of the known preamble.
// Each component of the incoming sample is quantised to -1, 0 or +1 (dead zone |v| <= thr) and
// the last 64 quantised samples are correlated with 64 ternary reference values, the quantised
// last 64 time-domain samples of the expected preamble: R = sum_n q(x[t-63+n]) * conj(c[n]).
// Products of ternary values need no multipliers. The reference is written by the control
// processor through coef_we/coef_addr (2-bit two's complement per component).
// Timing: out_valid and the metric follow in_valid by two cycles (shift, then registered sum),
// the same latency as delay_correlator; the metric is 9-bit signed per component.
module qc_correlator
  import wimax_pkg::*;
#(
  parameter int unsigned TAPS = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        thr,
  input  logic               coef_we,
  input  logic [5:0]         coef_addr,
  input  logic signed [1:0]  coef_re,
  input  logic signed [1:0]  coef_im,
  input  logic               in_valid,
  input  cplx16_t            in_data,
  output logic               out_valid,
  output logic signed [8:0]  out_re,
  output logic signed [8:0]  out_im
);
  logic signed [1:0] qre [TAPS];
  logic signed [1:0] qim [TAPS];
  logic signed [1:0] cre [TAPS];
  logic signed [1:0] cim [TAPS];

  function automatic logic signed [1:0] quant(logic signed [15:0] v, logic [15:0] t);
    if (v > $signed({1'b0, t[14:0]})) return 2'sd1;
    if (v < -$signed({1'b0, t[14:0]})) return -2'sd1;
    return 2'sd0;
  endfunction

  logic signed [8:0] sum_re, sum_im;
  logic              v_q;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    // qre[TAPS-1] is the newest sample and meets the last reference value
    for (int n = 0; n < TAPS; n++) begin
      sum_re = sum_re + 9'(qre[n] * cre[n]) + 9'(qim[n] * cim[n]);
      sum_im = sum_im + 9'(qim[n] * cre[n]) - 9'(qre[n] * cim[n]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < TAPS; n++) begin
        qre[n] <= '0; qim[n] <= '0; cre[n] <= '0; cim[n] <= '0;
      end
      out_valid <= 1'b0;
      v_q       <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      if (coef_we) begin
        cre[coef_addr] <= coef_re;
        cim[coef_addr] <= coef_im;
      end
      v_q       <= in_valid;
      out_valid <= v_q;
      if (in_valid) begin
        for (int n = 0; n < TAPS - 1; n++) begin
          qre[n] <= qre[n+1];
          qim[n] <= qim[n+1];
        end
        qre[TAPS-1] <= quant(in_data.re, thr);
        qim[TAPS-1] <= quant(in_data.im, thr);
      end
      // the sum reflects the register contents, so present it one cycle after the shift
      out_re <= sum_re;
      out_im <= sum_im;
    end
  end
endmodule
