// bit_interleaver: block interleaver (or, with INVERSE=1, deinterleaver) of the coding chain.
// One block of ncbps coded bits (or W-bit soft values) is written, then read out permuted with
// the two-step rule of IEEE 802.16e: m = (ncbps/16)*(k mod 16) + floor(k/16), then
// j = s*floor(m/s) + (m + ncbps - floor(16*m/ncbps)) mod s, with s = bits per carrier / 2
// (at least 1). The interleaver writes input k to address j and reads addresses in order; the
// deinterleaver writes in order and reads address j. ncbps must be a multiple of 16.
// Interface: in_valid/in_last with in_ready (low while a block is read out); `modulation` and
// `ncbps` are sampled with the first input of a block. Output one value per cycle, registered.
module bit_interleaver
  import wimax_pkg::*;
#(
  parameter int unsigned W         = 1,
  parameter int unsigned MAX_NCBPS = 576,
  parameter bit          INVERSE   = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mod_t         modulation,
  input  logic [9:0]   ncbps,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  input  logic         in_last,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         out_last
);
  localparam int unsigned AW = $clog2(MAX_NCBPS);

  logic [W-1:0] mem [MAX_NCBPS];
  logic         reading;
  logic [9:0]   k, n_q;
  logic [2:0]   s_q;
  logic [9:0]   j;

  // permuted address of position k
  always_comb begin
    logic [9:0] n, m;
    logic [2:0] s;
    n = (k == '0 && !reading) ? ncbps : n_q;
    s = (k == '0 && !reading) ? ((modulation == MOD_64QAM) ? 3'd3 :
                                 (modulation == MOD_16QAM) ? 3'd2 : 3'd1) : s_q;
    m = 10'((32'(n) / 16) * 32'(k % 16) + 32'(k / 16));
    j = 10'(32'(s) * (32'(m) / 32'(s)) +
            (32'(m) + 32'(n) - (16 * 32'(m)) / (n == '0 ? 32'd1 : 32'(n))) % 32'(s));
  end

  assign in_ready = !reading;

  always_ff @(posedge clk) begin
    if (!reading && in_valid) mem[AW'(INVERSE ? k : j)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      k         <= '0;
      n_q       <= '0;
      s_q       <= 3'd1;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (!reading) begin
        if (in_valid) begin
          if (k == '0) begin
            n_q <= ncbps;
            s_q <= (modulation == MOD_64QAM) ? 3'd3 : (modulation == MOD_16QAM) ? 3'd2 : 3'd1;
          end
          if (in_last) begin
            k       <= '0;
            reading <= 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
      end else begin
        out_valid <= 1'b1;
        out_data  <= mem[AW'(INVERSE ? j : k)];
        out_last  <= (k == n_q - 1'b1);
        if (k == n_q - 1'b1) begin
          k       <= '0;
          reading <= 1'b0;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end
endmodule
