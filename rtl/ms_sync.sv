// ms_sync: frame detection and synchronisation subsystem of the mobile station.
// Synchronisation path: the DDC output is power-normalised (power_estimator) and fed to the
// RPB autocorrelation (lag and window N/3), the CP autocorrelation (lag N, window G) and the
// quantised cross-correlation with the end of the preamble. The peak detector thresholds the
// product of their squared magnitudes and gives the frame start; the CFO estimator combines
// the RPB and CP phases at that instant.
// Data path: the samples are scaled by the factor frozen at the frame start (subframe
// normalisation), derotated by the estimated CFO and passed on with `out_sof` marking the
// first sample of the cyclic prefix of the symbol following the preamble, for the CP remover.
// Samples are numbered at the input; the data path carries its own count so that the mark lands
// on the right sample whatever the pipeline latencies (the data path is the slower one).
// Energy registers: mean energy of the 2^ELOG samples after the preamble and of 2^RLOG samples
// of the receive/transmit gap (rtg_start from the uplink controller), for SNR estimation.
module ms_sync
  import wimax_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned G       = 128,
  parameter int unsigned HOLDOFF = 49000,
  parameter int unsigned PLOG    = 10,
  parameter int unsigned ELOG    = 10,
  parameter int unsigned RLOG    = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration registers
  input  logic [50:0]        det_thr,
  input  logic [15:0]        qc_thr,
  input  logic               coef_we,
  input  logic [5:0]         coef_addr,
  input  logic signed [1:0]  coef_re,
  input  logic signed [1:0]  coef_im,
  // samples from the DDC
  input  logic               in_valid,
  input  cplx16_t            in_data,
  // to the CP remover
  output logic               out_valid,
  output cplx16_t            out_data,
  output logic               out_sof,
  // status
  output logic               detect,
  output logic [31:0]        theta,
  output logic               cfo_done,
  output logic signed [18:0] eps_comb,
  output logic [15:0]        scale,
  output logic [31:0]        energy_post,
  output logic [31:0]        energy_rtg,
  input  logic               rtg_start
);
  localparam int unsigned L3 = N / 3;

  // ---------------- synchronisation path ----------------
  logic    r_valid, rpb_v, cp_v, qc_v, scale_v;
  cplx16_t r, rpb, cpm, rpb_pk, cp_pk;
  logic signed [8:0] qc_re, qc_im;
  logic [31:0] power;
  logic [50:0] metric;
  logic [31:0] det_idx;
  logic signed [18:0] eps_rpb, eps_cp;
  logic signed [31:0] phase_inc;

  power_estimator #(.LOG_WIN(PLOG)) u_pow (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(r_valid), .out_data(r),
    .scale, .power, .scale_valid(scale_v)
  );

  delay_correlator #(.LAG(L3), .WIN(L3), .SHIFT($clog2(L3))) u_rpb (
    .clk, .rst_n, .in_valid(r_valid), .in_data(r), .out_valid(rpb_v), .out_metric(rpb)
  );

  delay_correlator #(.LAG(N), .WIN(G), .SHIFT($clog2(G))) u_cp (
    .clk, .rst_n, .in_valid(r_valid), .in_data(r), .out_valid(cp_v), .out_metric(cpm)
  );

  // all three metrics have the same two-cycle latency, so they line up sample by sample
  qc_correlator u_qc (
    .clk, .rst_n, .thr(qc_thr), .coef_we, .coef_addr, .coef_re, .coef_im,
    .in_valid(r_valid), .in_data(r), .out_valid(qc_v), .out_re(qc_re), .out_im(qc_im)
  );

  peak_detector #(.N(N), .G(G), .HOLDOFF(HOLDOFF)) u_peak (
    .clk, .rst_n, .thr(det_thr), .in_valid(rpb_v), .r_rpb(rpb), .r_cp(cpm),
    .r_qc_re(qc_re), .r_qc_im(qc_im), .detect, .theta, .det_idx,
    .rpb_at_peak(rpb_pk), .cp_at_peak(cp_pk), .metric
  );

  cfo_estimator #(.N(N)) u_cfo (
    .clk, .rst_n, .start(detect), .r_rpb(rpb_pk), .r_cp(cp_pk), .done(cfo_done),
    .eps_rpb, .eps_cp, .eps_comb, .phase_inc
  );

  // ---------------- data path ----------------
  logic    n_valid;
  cplx16_t n_data;
  logic [15:0] scale_held;
  logic [31:0] d_idx, sof_idx;
  logic        sof_pend;

  subframe_normalizer u_norm (
    .clk, .rst_n, .freeze(detect), .scale_in(scale), .in_valid, .in_data,
    .out_valid(n_valid), .out_data(n_data), .scale_held
  );

  cfo_corrector u_corr (
    .clk, .rst_n, .load(cfo_done), .phase_inc, .in_valid(n_valid), .in_data(n_data),
    .out_valid, .out_data
  );

  assign out_sof = out_valid && sof_pend && (d_idx == sof_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_idx <= '0; sof_idx <= '0; sof_pend <= 1'b0;
    end else begin
      if (out_valid) d_idx <= d_idx + 1'b1;
      if (detect) begin
        sof_idx  <= det_idx + 1'b1;   // first sample after the preamble
        sof_pend <= 1'b1;
      end else if (out_sof) begin
        sof_pend <= 1'b0;
      end
    end
  end


  // ---------------- SNR energy registers ----------------
  energy_meter #(.LOG_WIN(ELOG)) u_e_post (
    .clk, .rst_n, .start(detect), .in_valid, .in_data, .energy(energy_post), .done()
  );
  energy_meter #(.LOG_WIN(RLOG)) u_e_rtg (
    .clk, .rst_n, .start(rtg_start), .in_valid, .in_data, .energy(energy_rtg), .done()
  );
endmodule
