// power_estimator: received power measurement and normalisation of the synchronisation input.
// The ADCs have no programmable gain, so the mean power P = mean |x|^2 is measured over a
// sliding window of the last 2^LOG_WIN samples (running sum plus a delay line of |x|^2; samples
// before the window is first filled count as zero). After each new sample a bit-serial search
// (16 cycles) finds the largest scale s (unsigned, 12 fractional bits) with P*s^2 <= TARGET,
// i.e. s ~ sqrt(TARGET/P). The samples are multiplied by the current s (out = x*s/2^12,
// saturated) to feed the correlators, and s is given out as the scale factor for subframe
// normalisation. A sliding window (rather than blocks) means that at the end of the preamble the
// scale reflects the preamble itself, whatever the block phase.
// Timing: out_valid follows in_valid by one cycle; `power` is updated 1 cycle and `scale` 17
// cycles after a sample (samples must be at least 17 cycles apart for every sample to restart
// the search; faster input simply skips searches).
module power_estimator
  import wimax_pkg::*;
#(
  parameter int unsigned LOG_WIN = 10,
  parameter longint unsigned TARGET = 64'd67108864   // 2^26: rms amplitude 2^13
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx16_t     in_data,
  output logic        out_valid,
  output cplx16_t     out_data,
  output logic [15:0] scale,
  output logic [31:0] power,
  output logic        scale_valid
);
  localparam int unsigned D = 1 << LOG_WIN;
  logic [31+LOG_WIN:0] acc;
  logic [31:0]         hist [D];
  logic [LOG_WIN-1:0]  wp;
  logic                filled, pend;
  logic [15:0]         s_try;
  logic [4:0]          bitn;
  logic                searching;
  logic [31:0]         e2, e2_old;

  assign e2 = 32'($unsigned(32'(in_data.re) * 32'(in_data.re))) +
              32'($unsigned(32'(in_data.im) * 32'(in_data.im)));
  assign e2_old = filled ? hist[wp] : 32'd0;

  always_ff @(posedge clk) if (in_valid) hist[wp] <= e2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; wp <= '0; filled <= 1'b0; pend <= 1'b0; power <= '0; scale <= 16'h1000;
      s_try <= '0; bitn <= '0; searching <= 1'b0; scale_valid <= 1'b0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      scale_valid <= 1'b0;
      out_valid   <= in_valid;
      if (in_valid) begin
        out_data.re <= sat16(48'(($signed(34'(in_data.re)) * $signed({18'd0, scale})) >>> 12));
        out_data.im <= sat16(48'(($signed(34'(in_data.im)) * $signed({18'd0, scale})) >>> 12));
        acc <= acc + (32+LOG_WIN)'(e2) - (32+LOG_WIN)'(e2_old);
        wp  <= wp + 1'b1;
        if (wp == '1) filled <= 1'b1;
        pend <= 1'b1;
      end
      if (pend && !searching && !in_valid) begin
        power     <= 32'(acc >> LOG_WIN);
        pend      <= 1'b0;
        searching <= 1'b1;
        bitn      <= 5'd15;
        s_try     <= '0;
      end
      if (searching) begin
        logic [15:0] cand;
        logic [63:0] lhs;
        cand = s_try | (16'd1 << bitn);
        lhs  = 64'(power) * 64'(cand) * 64'(cand);
        if (lhs <= (TARGET << 24)) s_try <= cand;
        if (bitn == '0) begin
          searching   <= 1'b0;
          scale       <= (lhs <= (TARGET << 24)) ? cand : s_try;
          scale_valid <= 1'b1;
        end else begin
          bitn <= bitn - 1'b1;
        end
      end
    end
  end
endmodule
