// ul_tx_control: schedules the mobile station's uplink subframe (MS side of the SX35 FPGA).
// A sample counter gives the position in the TDD frame. Each frame detection sets it to the
// position of the detection sample, N+G-1 after the frame start; between detections it runs
// free with period dl_len + ttg_len + ul_len + rtg_len. Uplink samples (from the prefix/postfix
// inserter) are forwarded to the DUC only inside the uplink window, which starts
// dl_len + ttg_len - advance samples after the frame start (`advance` is the timing correction
// a base station returns after ranging); outside it zeros are sent. The receive/transmit gap at
// the end of the frame is flagged for the noise energy measurement.
// Interface: sample_en is the DUC's sample request; tx_data is registered on it and held, so the
// DUC takes it at its next request. Upstream handshake in_valid/in_ready.
module ul_tx_control
  import wimax_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned G = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_en,
  input  logic               detect,
  input  logic [19:0]        dl_len,
  input  logic [19:0]        ttg_len,
  input  logic [19:0]        ul_len,
  input  logic [19:0]        rtg_len,
  input  logic signed [15:0] advance,
  input  logic               in_valid,
  input  cplx16_t            in_data,
  output logic               in_ready,
  output cplx16_t            tx_data,
  output logic               ul_active,
  output logic               ul_start,
  output logic               rtg_active,
  output logic               rtg_start,
  output logic               locked
);
  logic [19:0] pos, frame_len, ul_beg, ul_end, rtg_beg;

  assign frame_len = dl_len + ttg_len + ul_len + rtg_len;
  assign ul_beg    = dl_len + ttg_len - 20'(advance);
  assign ul_end    = ul_beg + ul_len;
  assign rtg_beg   = dl_len + ttg_len + ul_len;

  assign ul_active  = locked && pos >= ul_beg && pos < ul_end;
  assign rtg_active = locked && pos >= rtg_beg;
  assign in_ready   = sample_en && ul_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; locked <= 1'b0; tx_data <= '0; ul_start <= 1'b0; rtg_start <= 1'b0;
    end else begin
      ul_start  <= 1'b0;
      rtg_start <= 1'b0;
      if (detect) begin
        pos    <= 20'(N + G - 1);
        locked <= 1'b1;
      end else if (sample_en) begin
        pos <= (pos == frame_len - 1'b1) ? '0 : pos + 1'b1;
        if (locked && pos + 1'b1 == ul_beg) ul_start <= 1'b1;
        if (locked && pos + 1'b1 == rtg_beg) rtg_start <= 1'b1;
      end
      if (sample_en) tx_data <= (ul_active && in_valid) ? in_data : '0;
    end
  end
endmodule
