// peak_detector: frame start detection from the three synchronisation metrics.
// The decision function |R_RPB|^2 * |R_CP|^2 * |R_QC|^2 is evaluated for every sample (each
// squared magnitude of the 16-bit metrics is first reduced by 2^-16 to keep the product at
// 51 bits). Because the input is power-normalised, the frame start is taken as the first sample
// at which the function exceeds the threshold `thr`. All three metrics peak on the last sample
// of the preamble symbol, so the frame start (first sample of the preamble's cyclic prefix) is
// the detection sample minus (N + G - 1). After a detection the detector is blind for HOLDOFF
// samples, slightly less than a frame, so one frame gives one detection.
// Outputs: `detect` pulses for one cycle, `theta` is the frame start as a sample count, and the
// RPB and CP metrics of that sample are held for frequency offset estimation.
// Timing: inputs are registered, detect comes two cycles after the metrics.
module peak_detector
  import wimax_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned G       = 128,
  parameter int unsigned HOLDOFF = 49000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [50:0]       thr,
  input  logic              in_valid,
  input  cplx16_t           r_rpb,
  input  cplx16_t           r_cp,
  input  logic signed [8:0] r_qc_re,
  input  logic signed [8:0] r_qc_im,
  output logic              detect,
  output logic [31:0]       theta,
  output logic [31:0]       det_idx,   // sample number of the detection sample
  output cplx16_t           rpb_at_peak,
  output cplx16_t           cp_at_peak,
  output logic [50:0]       metric
);
  logic [31:0] t_cnt, t_q;
  logic [32:0] m_rpb, m_cp;
  logic [16:0] m_qc;
  logic        v_q;
  cplx16_t     rpb_q, cp_q;
  logic [31:0] blind;

  function automatic logic [32:0] mag2(cplx16_t c);
    return 33'($unsigned(32'(c.re) * 32'(c.re))) + 33'($unsigned(32'(c.im) * 32'(c.im)));
  endfunction

  assign metric = 51'(m_rpb[32:16]) * 51'(m_cp[32:16]) * 51'(m_qc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_cnt <= '0; t_q <= '0; m_rpb <= '0; m_cp <= '0; m_qc <= '0; v_q <= 1'b0;
      rpb_q <= '0; cp_q <= '0; blind <= '0;
      detect <= 1'b0; theta <= '0; det_idx <= '0; rpb_at_peak <= '0; cp_at_peak <= '0;
    end else begin
      detect <= 1'b0;
      v_q    <= in_valid;
      if (in_valid) begin
        t_cnt <= t_cnt + 1'b1;
        t_q   <= t_cnt;
        m_rpb <= mag2(r_rpb);
        m_cp  <= mag2(r_cp);
        m_qc  <= 17'($unsigned(18'(r_qc_re) * 18'(r_qc_re)) + $unsigned(18'(r_qc_im) * 18'(r_qc_im)));
        rpb_q <= r_rpb;
        cp_q  <= r_cp;
      end
      if (v_q) begin
        if (blind != '0) begin
          blind <= blind - 1'b1;
        end else if (metric > thr) begin
          detect      <= 1'b1;
          theta       <= t_q - 32'(N + G - 1);
          det_idx     <= t_q;
          rpb_at_peak <= rpb_q;
          cp_at_peak  <= cp_q;
          blind       <= 32'(HOLDOFF);
        end
      end
    end
  end
endmodule
