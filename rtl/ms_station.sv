// ms_station: FPGA datapath of the mobile station.
// Coding coprocessor; on the OFDM FPGA the prefix/postfix insertion after the IFFT and the
// cyclic prefix removal before the FFT (FFT/IFFT cores outside, through the ifft_*/fft_*
// ports); on the converter FPGA the synchronisation subsystem, the uplink transmission control,
// the DUC and the DDC.
// Downlink: ADC -> DDC -> synchronisation (detection, normalisation, CFO correction) -> CP
// removal -> FFT input. Uplink: IFFT output -> prefix/postfix insertion -> uplink control
// (window relative to the detected frame start) -> DUC -> DAC.
module ms_station
  import wimax_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned G       = 128,
  parameter int unsigned R       = 8,
  parameter int unsigned HOLDOFF = 49000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  frame_cfg_t         fcfg,
  input  codec_cfg_t         ccfg,
  input  logic [50:0]        det_thr,
  input  logic [15:0]        qc_thr,
  input  logic               coef_we,
  input  logic [5:0]         coef_addr,
  input  logic signed [1:0]  coef_re,
  input  logic signed [1:0]  coef_im,
  input  logic signed [15:0] advance,
  input  logic [15:0]        postfix_pat,
  input  logic [4:0]         pat_len,
  // coding coprocessor, control processor side
  input  logic               txb_valid,
  input  logic               txb_bit,
  input  logic               txb_last,
  output logic               txb_ready,
  output logic               txp_valid,
  output cplx16_t            txp_point,
  output logic               txp_last,
  input  logic               rxp_valid,
  input  cplx16_t            rxp_point,
  input  logic               rxp_last,
  output logic               rxp_ready,
  output logic               rxb_valid,
  output logic               rxb_bit,
  output logic               rxb_last,
  input  logic               rxb_ready,
  output logic [31:0]        cinr_mse,
  output logic [31:0]        cinr_sig,
  // IFFT output (uplink symbols)
  input  logic               ifft_valid,
  input  cplx16_t            ifft_data,
  output logic               ifft_ready,
  // FFT input (downlink symbols without cyclic prefix)
  output logic               fft_valid,
  output cplx16_t            fft_data,
  output logic               fft_sop,
  output logic               fft_eop,
  // synchronisation status registers
  output logic               detect,
  output logic [31:0]        theta,
  output logic signed [18:0] eps_comb,
  output logic               cfo_done,
  output logic [15:0]        scale,
  output logic [31:0]        energy_post,
  output logic [31:0]        energy_rtg,
  output logic               ul_active,
  output logic               locked,
  // converters
  output logic signed [15:0] dac_out,
  input  logic signed [13:0] adc_in
);
  coding_coprocessor u_codec (
    .clk, .rst_n, .cfg(ccfg),
    .txb_valid, .txb_bit, .txb_last, .txb_ready, .txp_valid, .txp_point, .txp_last,
    .rxp_valid, .rxp_point, .rxp_last, .rxp_ready, .rxb_valid, .rxb_bit, .rxb_last, .rxb_ready,
    .cinr_mse, .cinr_sig
  );

  logic    ddc_v, s_v, s_sof, sample_en, ul_start, rtg_active, rtg_start;
  cplx16_t ddc_d, s_d, tx_bb, cpi_data;
  logic    cpi_valid, cpi_ready, cpi_sos;

  ddc #(.R(R)) u_ddc (.clk, .rst_n, .adc_in, .out_valid(ddc_v), .out_data(ddc_d));

  // power and post-preamble energy windows of one symbol (N samples)
  ms_sync #(.N(N), .G(G), .HOLDOFF(HOLDOFF), .PLOG($clog2(N)), .ELOG($clog2(N))) u_sync (
    .clk, .rst_n, .det_thr, .qc_thr, .coef_we, .coef_addr, .coef_re, .coef_im,
    .in_valid(ddc_v), .in_data(ddc_d), .out_valid(s_v), .out_data(s_d), .out_sof(s_sof),
    .detect, .theta, .cfo_done, .eps_comb, .scale, .energy_post, .energy_rtg, .rtg_start
  );

  cp_remover #(.N(N), .G(G)) u_cpr (
    .clk, .rst_n, .in_valid(s_v), .in_data(s_d), .sync(s_sof),
    .out_valid(fft_valid), .out_data(fft_data), .out_sop(fft_sop), .out_eop(fft_eop)
  );

  cp_inserter #(.N(N), .G(G)) u_cpi (
    .clk, .rst_n, .postfix_pat, .pat_len, .pat_restart(ul_start),
    .in_valid(ifft_valid), .in_data(ifft_data), .in_ready(ifft_ready),
    .out_valid(cpi_valid), .out_data(cpi_data), .out_sos(cpi_sos), .out_ready(cpi_ready)
  );

  ul_tx_control #(.N(N), .G(G)) u_ulc (
    .clk, .rst_n, .sample_en, .detect, .dl_len(fcfg.dl_len), .ttg_len(fcfg.ttg_len),
    .ul_len(fcfg.ul_len), .rtg_len(fcfg.rtg_len), .advance, .in_valid(cpi_valid),
    .in_data(cpi_data), .in_ready(cpi_ready), .tx_data(tx_bb), .ul_active, .ul_start,
    .rtg_active, .rtg_start, .locked
  );

  duc #(.R(R)) u_duc (.clk, .rst_n, .in_req(sample_en), .in_data(tx_bb), .dac_out);
endmodule
