// bs_station: FPGA datapath of the base station.
// Coding coprocessor; on the OFDM FPGA the cyclic prefix insertion after the IFFT and the cyclic
// prefix removal before the FFT (the FFT/IFFT cores themselves are outside, reached through the
// ifft_*/fft_* ports); on the converter FPGA the TDD frame control, the DUC and the DDC.
// Downlink: IFFT output -> CP insertion -> frame control (downlink window) -> DUC -> DAC.
// Uplink: ADC -> DDC -> frame control (uplink window) -> CP removal -> FFT input.
module bs_station
  import wimax_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned G = 128,
  parameter int unsigned R = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  frame_cfg_t         fcfg,
  input  codec_cfg_t         ccfg,
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
  // IFFT output (time-domain downlink symbols of N samples)
  input  logic               ifft_valid,
  input  cplx16_t            ifft_data,
  output logic               ifft_ready,
  // FFT input (uplink symbols without cyclic prefix)
  output logic               fft_valid,
  output cplx16_t            fft_data,
  output logic               fft_sop,
  output logic               fft_eop,
  // frame status
  output logic               frame_start,
  output logic [15:0]        frame_no,
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

  logic    cpi_valid, cpi_ready, cpi_sos, sample_en, dl_active;
  cplx16_t cpi_data, tx_bb;
  logic    ddc_v, rx_v, rx_sof;
  cplx16_t ddc_d, rx_d;

  cp_inserter #(.N(N), .G(G)) u_cpi (
    .clk, .rst_n, .postfix_pat(16'd0), .pat_len(5'd1), .pat_restart(frame_start),
    .in_valid(ifft_valid), .in_data(ifft_data), .in_ready(ifft_ready),
    .out_valid(cpi_valid), .out_data(cpi_data), .out_sos(cpi_sos), .out_ready(cpi_ready)
  );

  frame_control u_fc (
    .clk, .rst_n, .run, .sample_en, .dl_len(fcfg.dl_len), .ttg_len(fcfg.ttg_len),
    .ul_len(fcfg.ul_len), .rtg_len(fcfg.rtg_len), .tx_valid(cpi_valid), .tx_in(cpi_data),
    .tx_ready(cpi_ready), .tx_data(tx_bb), .frame_start, .dl_active, .rx_in_valid(ddc_v),
    .rx_in(ddc_d), .rx_valid(rx_v), .rx_data(rx_d), .rx_sof, .frame_no
  );

  duc #(.R(R)) u_duc (.clk, .rst_n, .in_req(sample_en), .in_data(tx_bb), .dac_out);

  ddc #(.R(R)) u_ddc (.clk, .rst_n, .adc_in, .out_valid(ddc_v), .out_data(ddc_d));

  cp_remover #(.N(N), .G(G)) u_cpr (
    .clk, .rst_n, .in_valid(rx_v), .in_data(rx_d), .sync(rx_sof),
    .out_valid(fft_valid), .out_data(fft_data), .out_sop(fft_sop), .out_eop(fft_eop)
  );
endmodule
