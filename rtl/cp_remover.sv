// cp_remover: removes the cyclic prefix of every received symbol before the FFT.
// `sync`, given together with a sample, marks that sample as the first of a symbol's cyclic
// prefix. From there the samples are counted in symbols of N+G: the first G are dropped and
// the next N are passed with sop/eop marks. Between syncs the count runs on freely; before the
// first sync nothing is passed.
// Timing: one cycle latency.
module cp_remover
  import wimax_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned G = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx16_t in_data,
  input  logic    sync,
  output logic    out_valid,
  output cplx16_t out_data,
  output logic    out_sop,
  output logic    out_eop
);
  localparam int unsigned RW = $clog2(N + G);
  logic [RW-1:0] cnt, c;
  logic          active;

  assign c = sync ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; active <= 1'b0;
      out_valid <= 1'b0; out_data <= '0; out_sop <= 1'b0; out_eop <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      if (in_valid) begin
        if (sync) active <= 1'b1;
        cnt <= (c == RW'(N + G - 1)) ? '0 : c + 1'b1;
        if ((active || sync) && c >= RW'(G)) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
          out_sop   <= (c == RW'(G));
          out_eop   <= (c == RW'(N + G - 1));
        end
      end
    end
  end
endmodule
