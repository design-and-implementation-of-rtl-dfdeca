// coding_coprocessor: channel coding and decoding FPGA (the TBCC encoder and decoder).
// Transmit: information bits from the control processor enter the TX FIFO and pass through the
// randomizer, the tail-biting convolutional encoder with puncturing, the bit interleaver and
// the symbol mapper; the constellation points go back to the control processor, which maps
// them onto subcarriers. Receive: equalised points enter the soft decisor (which also measures
// the EVM), the soft bits are deinterleaved, Viterbi-decoded and derandomized, and the bits are
// returned through the RX FIFO. Blocks are delimited by the `last` flags.
// Flow control: a new transmit block is taken from the FIFO only while the interleaver is
// not reading out, and a received point is taken only while deinterleaver and decoder can
// accept, so no stage ever has to stall its output.
module coding_coprocessor
  import wimax_pkg::*;
#(
  parameter int unsigned MAX_BITS = 288,
  parameter int unsigned TB       = 48,
  parameter int unsigned SW       = 6,
  parameter int unsigned FIFO_D   = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  codec_cfg_t  cfg,
  // transmit: bits in, points out
  input  logic        txb_valid,
  input  logic        txb_bit,
  input  logic        txb_last,
  output logic        txb_ready,
  output logic        txp_valid,
  output cplx16_t     txp_point,
  output logic        txp_last,
  // receive: points in, bits out
  input  logic        rxp_valid,
  input  cplx16_t     rxp_point,
  input  logic        rxp_last,
  output logic        rxp_ready,
  output logic        rxb_valid,
  output logic        rxb_bit,
  output logic        rxb_last,
  input  logic        rxb_ready,
  // CINR estimate registers
  output logic [31:0] cinr_mse,
  output logic [31:0] cinr_sig
);
  // ---------------- transmit ----------------
  logic       tf_valid, tf_pop, tf_bit, tf_last, first_tx, wait_enc;
  logic [1:0] tf_data;
  logic       rz_v, rz_b, rz_l, enc_ready, enc_v, enc_b, enc_l, il_ready, il_v, il_b, il_l;

  sync_fifo #(.W(2), .DEPTH(FIFO_D)) u_tx_fifo (
    .clk, .rst_n, .in_valid(txb_valid), .in_data({txb_last, txb_bit}), .in_ready(txb_ready),
    .out_valid(tf_valid), .out_data(tf_data), .out_ready(tf_pop), .level()
  );
  assign {tf_last, tf_bit} = tf_data;
  assign tf_pop = tf_valid && enc_ready && il_ready && !wait_enc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_tx <= 1'b1; wait_enc <= 1'b0;
    end else begin
      if (tf_pop) first_tx <= tf_last;
      if (tf_pop && tf_last) wait_enc <= 1'b1;
      else if (!enc_ready) wait_enc <= 1'b0;
    end
  end

  randomizer u_rand (
    .clk, .rst_n, .init(tf_pop && first_tx), .in_valid(tf_pop), .in_bit(tf_bit),
    .in_last(tf_last), .out_valid(rz_v), .out_bit(rz_b), .out_last(rz_l)
  );

  fec_tx #(.MAX_BITS(MAX_BITS)) u_enc (
    .clk, .rst_n, .rate(cfg.rate), .in_valid(rz_v), .in_bit(rz_b), .in_last(rz_l),
    .in_ready(enc_ready), .out_valid(enc_v), .out_bit(enc_b), .out_last(enc_l)
  );

  bit_interleaver #(.W(1), .MAX_NCBPS(2*MAX_BITS), .INVERSE(1'b0)) u_il (
    .clk, .rst_n, .modulation(cfg.modulation), .ncbps(cfg.ncbps), .in_valid(enc_v),
    .in_data(enc_b), .in_last(enc_l), .in_ready(il_ready), .out_valid(il_v),
    .out_data(il_b), .out_last(il_l)
  );

  symbol_mapper u_map (
    .clk, .rst_n, .modulation(cfg.modulation), .in_valid(il_v), .in_bit(il_b),
    .in_last(il_l), .out_valid(txp_valid), .out_point(txp_point), .out_last(txp_last)
  );

  // ---------------- receive ----------------
  logic                 sd_ready, sd_v, sd_l, di_ready, di_v, di_l, dec_ready, dec_v, dec_b, dec_l;
  logic signed [SW-1:0] sd_s;
  logic [SW-1:0]        di_s;
  logic                 dr_v, dr_b, dr_l, first_rx, rf_ready;

  assign rxp_ready = sd_ready && di_ready && dec_ready && rf_ready;

  soft_decisor #(.SW(SW)) u_sd (
    .clk, .rst_n, .modulation(cfg.modulation), .in_valid(rxp_valid && rxp_ready),
    .in_point(rxp_point), .in_last(rxp_last), .in_ready(sd_ready), .out_valid(sd_v),
    .out_soft(sd_s), .out_last(sd_l), .mse(cinr_mse), .sig_pow(cinr_sig), .est_valid()
  );

  bit_interleaver #(.W(SW), .MAX_NCBPS(2*MAX_BITS), .INVERSE(1'b1)) u_dil (
    .clk, .rst_n, .modulation(cfg.modulation), .ncbps(cfg.ncbps), .in_valid(sd_v),
    .in_data(sd_s), .in_last(sd_l), .in_ready(di_ready), .out_valid(di_v),
    .out_data(di_s), .out_last(di_l)
  );

  fec_rx #(.MAX_BITS(MAX_BITS), .TB(TB), .SW(SW)) u_dec (
    .clk, .rst_n, .rate(cfg.rate), .in_valid(di_v), .in_soft($signed(di_s)), .in_last(di_l),
    .in_ready(dec_ready), .out_valid(dec_v), .out_bit(dec_b), .out_last(dec_l)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_rx <= 1'b1;
    else if (dec_v) first_rx <= dec_l;
  end

  randomizer u_derand (
    .clk, .rst_n, .init(dec_v && first_rx), .in_valid(dec_v), .in_bit(dec_b),
    .in_last(dec_l), .out_valid(dr_v), .out_bit(dr_b), .out_last(dr_l)
  );

  sync_fifo #(.W(2), .DEPTH(FIFO_D)) u_rx_fifo (
    .clk, .rst_n, .in_valid(dr_v), .in_data({dr_l, dr_b}), .in_ready(rf_ready),
    .out_valid(rxb_valid), .out_data({rxb_last, rxb_bit}), .out_ready(rxb_ready), .level()
  );
endmodule
