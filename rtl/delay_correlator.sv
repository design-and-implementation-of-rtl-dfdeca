// delay_correlator: sliding delay-and-correlate metric used twice in frame synchronisation.
// For every new sample x[t] it forms p[t] = x[t-LAG] * conj(x[t]) (Q1.15 product) and keeps the
// running sum of the last WIN products, i.e. R = sum_{n=0}^{WIN-1} r(k+n) r*(k+n+LAG) with
// k = t-LAG-WIN+1. With LAG = WIN = N/3 this is the preamble repetition (RPB) metric, with
// LAG = N and WIN = G the cyclic-prefix (CP) metric. The sum is scaled by 2^-SHIFT in place of
// the 1/WIN normalisation and saturated to 16 bits. Two circular buffers hold the LAG past
// samples and the WIN past products.
// Until the buffers have filled once, the missing old values count as zero.
// Timing: one sample per in_valid; out_valid follows in_valid by two cycles.
module delay_correlator
  import wimax_pkg::*;
#(
  parameter int unsigned LAG   = 341,
  parameter int unsigned WIN   = 341,
  parameter int unsigned SHIFT = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx16_t in_data,
  output logic    out_valid,
  output cplx16_t out_metric
);
  localparam int unsigned LW = $clog2(LAG);
  localparam int unsigned PW = $clog2(WIN);
  localparam int unsigned AW = 18 + PW + 1;

  cplx16_t            xbuf [LAG];
  logic signed [17:0] pbuf_re [WIN];
  logic signed [17:0] pbuf_im [WIN];
  logic [LW-1:0]      xp;
  logic [PW-1:0]      pp;
  logic signed [17:0] p_re, p_im;
  logic               p_valid;
  logic signed [AW-1:0] acc_re, acc_im;
  cplx16_t            xd;
  logic               xfull, pfull;
  logic signed [17:0] pold_re, pold_im;

  assign xd      = xfull ? xbuf[xp] : '0;
  assign pold_re = pfull ? pbuf_re[pp] : '0;
  assign pold_im = pfull ? pbuf_im[pp] : '0;

  always_ff @(posedge clk) begin
    if (in_valid) xbuf[xp] <= in_data;
    if (p_valid) begin
      pbuf_re[pp] <= p_re;
      pbuf_im[pp] <= p_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xp <= '0; pp <= '0; xfull <= 1'b0; pfull <= 1'b0;
      p_re <= '0; p_im <= '0; p_valid <= 1'b0;
      acc_re <= '0; acc_im <= '0;
      out_valid <= 1'b0; out_metric <= '0;
    end else begin
      logic signed [AW-1:0] n_re, n_im;
      n_re = acc_re + AW'(p_re) - AW'(pold_re);
      n_im = acc_im + AW'(p_im) - AW'(pold_im);
      p_valid   <= in_valid;
      out_valid <= p_valid;
      if (in_valid) begin
        // (a + jb)(c - jd) with a + jb the delayed sample, c + jd the new one
        p_re <= 18'((32'(xd.re) * 32'(in_data.re) + 32'(xd.im) * 32'(in_data.im)) >>> 15);
        p_im <= 18'((32'(xd.im) * 32'(in_data.re) - 32'(xd.re) * 32'(in_data.im)) >>> 15);
        xp   <= (xp == LW'(LAG - 1)) ? '0 : xp + 1'b1;
        if (xp == LW'(LAG - 1)) xfull <= 1'b1;
      end
      if (p_valid) begin
        acc_re <= n_re;
        acc_im <= n_im;
        pp     <= (pp == PW'(WIN - 1)) ? '0 : pp + 1'b1;
        if (pp == PW'(WIN - 1)) pfull <= 1'b1;
        out_metric.re <= sat16(48'(n_re >>> SHIFT));
        out_metric.im <= sat16(48'(n_im >>> SHIFT));
      end
    end
  end
endmodule
