// wimax_phy_top: FPGA datapaths of an OFDMA-TDD WiMAX base station and mobile station.
// Both stations are built from the same parts: a coding coprocessor (tail-biting convolutional
// code, interleaving, mapping and their inverses), cyclic prefix handling around external
// FFT/IFFT cores, and a converter FPGA with digital up/down-conversion. The base station adds
// the TDD frame control; the mobile station adds the downlink synchronisation subsystem and the
// uplink transmission control. They stand side by side here with all their ports brought out
// (bs_* and ms_*), sharing only clock and reset; connecting bs_dac_out to ms_adc_in and
// ms_dac_out to bs_adc_in gives the cabled test link.
// The FFT/IFFT cores, the control-processor tasks (subcarrier mapping, equalisation, ranging,
// frame scheduling) and the converters are outside this RTL.
// Defaults: N = 1024, G = N/8, converter clock 80 MHz with 10 Msample/s baseband (R = 8).
module wimax_phy_top
  import wimax_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned G       = 128,
  parameter int unsigned R       = 8,
  parameter int unsigned HOLDOFF = 49000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                bs_run,
  input  frame_cfg_t          bs_fcfg,
  input  codec_cfg_t          bs_ccfg,
  input  logic                bs_txb_valid,
  input  logic                bs_txb_bit,
  input  logic                bs_txb_last,
  output logic                bs_txb_ready,
  output logic                bs_txp_valid,
  output cplx16_t             bs_txp_point,
  output logic                bs_txp_last,
  input  logic                bs_rxp_valid,
  input  cplx16_t             bs_rxp_point,
  input  logic                bs_rxp_last,
  output logic                bs_rxp_ready,
  output logic                bs_rxb_valid,
  output logic                bs_rxb_bit,
  output logic                bs_rxb_last,
  input  logic                bs_rxb_ready,
  output logic [31:0]         bs_cinr_mse,
  output logic [31:0]         bs_cinr_sig,
  input  logic                bs_ifft_valid,
  input  cplx16_t             bs_ifft_data,
  output logic                bs_ifft_ready,
  output logic                bs_fft_valid,
  output cplx16_t             bs_fft_data,
  output logic                bs_fft_sop,
  output logic                bs_fft_eop,
  output logic                bs_frame_start,
  output logic [15:0]         bs_frame_no,
  output logic signed [15:0]  bs_dac_out,
  input  logic signed [13:0]  bs_adc_in,
  input  frame_cfg_t          ms_fcfg,
  input  codec_cfg_t          ms_ccfg,
  input  logic [50:0]         ms_det_thr,
  input  logic [15:0]         ms_qc_thr,
  input  logic                ms_coef_we,
  input  logic [5:0]          ms_coef_addr,
  input  logic signed [1:0]   ms_coef_re,
  input  logic signed [1:0]   ms_coef_im,
  input  logic signed [15:0]  ms_advance,
  input  logic [15:0]         ms_postfix_pat,
  input  logic [4:0]          ms_pat_len,
  input  logic                ms_txb_valid,
  input  logic                ms_txb_bit,
  input  logic                ms_txb_last,
  output logic                ms_txb_ready,
  output logic                ms_txp_valid,
  output cplx16_t             ms_txp_point,
  output logic                ms_txp_last,
  input  logic                ms_rxp_valid,
  input  cplx16_t             ms_rxp_point,
  input  logic                ms_rxp_last,
  output logic                ms_rxp_ready,
  output logic                ms_rxb_valid,
  output logic                ms_rxb_bit,
  output logic                ms_rxb_last,
  input  logic                ms_rxb_ready,
  output logic [31:0]         ms_cinr_mse,
  output logic [31:0]         ms_cinr_sig,
  input  logic                ms_ifft_valid,
  input  cplx16_t             ms_ifft_data,
  output logic                ms_ifft_ready,
  output logic                ms_fft_valid,
  output cplx16_t             ms_fft_data,
  output logic                ms_fft_sop,
  output logic                ms_fft_eop,
  output logic                ms_detect,
  output logic [31:0]         ms_theta,
  output logic signed [18:0]  ms_eps_comb,
  output logic                ms_cfo_done,
  output logic [15:0]         ms_scale,
  output logic [31:0]         ms_energy_post,
  output logic [31:0]         ms_energy_rtg,
  output logic                ms_ul_active,
  output logic                ms_locked,
  output logic signed [15:0]  ms_dac_out,
  input  logic signed [13:0]  ms_adc_in
);
  bs_station #(.N(N), .G(G), .R(R)) u_bs (
    .clk, .rst_n, .run(bs_run), .fcfg(bs_fcfg),
    .ccfg(bs_ccfg), .txb_valid(bs_txb_valid), .txb_bit(bs_txb_bit), .txb_last(bs_txb_last),
    .txb_ready(bs_txb_ready), .txp_valid(bs_txp_valid), .txp_point(bs_txp_point), .txp_last(bs_txp_last),
    .rxp_valid(bs_rxp_valid), .rxp_point(bs_rxp_point), .rxp_last(bs_rxp_last), .rxp_ready(bs_rxp_ready),
    .rxb_valid(bs_rxb_valid), .rxb_bit(bs_rxb_bit), .rxb_last(bs_rxb_last), .rxb_ready(bs_rxb_ready),
    .cinr_mse(bs_cinr_mse), .cinr_sig(bs_cinr_sig), .ifft_valid(bs_ifft_valid), .ifft_data(bs_ifft_data),
    .ifft_ready(bs_ifft_ready), .fft_valid(bs_fft_valid), .fft_data(bs_fft_data), .fft_sop(bs_fft_sop),
    .fft_eop(bs_fft_eop), .frame_start(bs_frame_start), .frame_no(bs_frame_no), .dac_out(bs_dac_out),
    .adc_in(bs_adc_in)
  );

  ms_station #(.N(N), .G(G), .R(R), .HOLDOFF(HOLDOFF)) u_ms (
    .clk, .rst_n, .fcfg(ms_fcfg), .ccfg(ms_ccfg),
    .det_thr(ms_det_thr), .qc_thr(ms_qc_thr), .coef_we(ms_coef_we), .coef_addr(ms_coef_addr),
    .coef_re(ms_coef_re), .coef_im(ms_coef_im), .advance(ms_advance), .postfix_pat(ms_postfix_pat),
    .pat_len(ms_pat_len), .txb_valid(ms_txb_valid), .txb_bit(ms_txb_bit), .txb_last(ms_txb_last),
    .txb_ready(ms_txb_ready), .txp_valid(ms_txp_valid), .txp_point(ms_txp_point), .txp_last(ms_txp_last),
    .rxp_valid(ms_rxp_valid), .rxp_point(ms_rxp_point), .rxp_last(ms_rxp_last), .rxp_ready(ms_rxp_ready),
    .rxb_valid(ms_rxb_valid), .rxb_bit(ms_rxb_bit), .rxb_last(ms_rxb_last), .rxb_ready(ms_rxb_ready),
    .cinr_mse(ms_cinr_mse), .cinr_sig(ms_cinr_sig), .ifft_valid(ms_ifft_valid), .ifft_data(ms_ifft_data),
    .ifft_ready(ms_ifft_ready), .fft_valid(ms_fft_valid), .fft_data(ms_fft_data), .fft_sop(ms_fft_sop),
    .fft_eop(ms_fft_eop), .detect(ms_detect), .theta(ms_theta), .eps_comb(ms_eps_comb),
    .cfo_done(ms_cfo_done), .scale(ms_scale), .energy_post(ms_energy_post), .energy_rtg(ms_energy_rtg),
    .ul_active(ms_ul_active), .locked(ms_locked), .dac_out(ms_dac_out), .adc_in(ms_adc_in)
  );
endmodule
