// symbol_mapper: maps coded bits to QPSK, 16-QAM or 64-QAM points (16x2 complex).
// Bits arrive one per cycle; after 2, 4 or 6 bits (by `modulation`, sampled at the first bit of
// each symbol) one point is issued. The first half of a symbol's bits sets I, the second half Q;
// within an axis the first bit is the sign and the rest select the level in Gray order.
// Output registered: the point appears one cycle after the bit that completes it.
module symbol_mapper
  import wimax_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    modulation,
  input  logic    in_valid,
  input  logic    in_bit,
  input  logic    in_last,
  output logic    out_valid,
  output cplx16_t out_point,
  output logic    out_last
);
  logic [5:0] bits;
  logic [2:0] cnt;
  mod_t       mod_q, mod_now;
  logic [5:0] bits_now;

  always_comb begin
    mod_now  = (cnt == '0) ? modulation : mod_q;
    bits_now = bits;
    bits_now[cnt] = in_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits      <= '0;
      cnt       <= '0;
      mod_q     <= MOD_QPSK;
      out_valid <= 1'b0;
      out_point <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) begin
        mod_q <= mod_now;
        bits  <= bits_now;
        if (32'(cnt) == bits_per_symbol(mod_now) - 1) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_point <= map_point(mod_now, bits_now);
          out_last  <= in_last;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
