// frame_control: TDD frame timing of the base station (BS side of the SX35 FPGA).
// A free-running sample counter (enabled by `run`) divides each frame into the downlink
// subframe (dl_len samples, preamble first), the transmit/receive gap, the uplink subframe and
// the receive/transmit gap. In the downlink window samples from the cyclic-prefix inserter are
// sent to the DUC, otherwise zeros. In the uplink window samples from the DDC are passed on to
// the cyclic-prefix remover, the first one marked with rx_sof.
// Interface: sample_en is the DUC's sample request; tx_data is registered on it and held.
// rx samples arrive with rx_in_valid at the same rate and leave one cycle later.
module frame_control
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        sample_en,
  input  logic [19:0] dl_len,
  input  logic [19:0] ttg_len,
  input  logic [19:0] ul_len,
  input  logic [19:0] rtg_len,
  input  logic        tx_valid,
  input  cplx16_t     tx_in,
  output logic        tx_ready,
  output cplx16_t     tx_data,
  output logic        frame_start,
  output logic        dl_active,
  input  logic        rx_in_valid,
  input  cplx16_t     rx_in,
  output logic        rx_valid,
  output cplx16_t     rx_data,
  output logic        rx_sof,
  output logic [15:0] frame_no
);
  logic [19:0] pos, frame_len, ul_beg, ul_end;
  logic        ul_win, ul_seen;

  assign frame_len = dl_len + ttg_len + ul_len + rtg_len;
  assign ul_beg    = dl_len + ttg_len;
  assign ul_end    = ul_beg + ul_len;
  assign dl_active = run && pos < dl_len;
  assign ul_win    = run && pos >= ul_beg && pos < ul_end;
  assign tx_ready  = sample_en && dl_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; tx_data <= '0; frame_start <= 1'b0; frame_no <= '0;
      rx_valid <= 1'b0; rx_data <= '0; rx_sof <= 1'b0; ul_seen <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (run && sample_en) begin
        if (pos == frame_len - 1'b1) begin
          pos         <= '0;
          frame_start <= 1'b1;
          frame_no    <= frame_no + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
        tx_data <= (dl_active && tx_valid) ? tx_in : '0;
      end
      rx_valid <= rx_in_valid && ul_win;
      rx_sof   <= rx_in_valid && ul_win && !ul_seen;
      rx_data  <= rx_in;
      if (rx_in_valid && ul_win) ul_seen <= 1'b1;
      if (!ul_win) ul_seen <= 1'b0;
    end
  end
endmodule
