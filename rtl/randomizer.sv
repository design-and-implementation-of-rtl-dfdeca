// randomizer: data randomizer / derandomizer of the channel coding chain.
// Each bit is XORed with a pseudo-random sequence from the generator 1 + x^14 + x^15. The same
// circuit randomizes on transmit and derandomizes on receive. `init` loads the seed at the start
// of every FEC block or burst. The polynomial and seed are those of IEEE 802.16e; the load point
// (once per block) is this design's choice.
// Timing: one bit per cycle when in_valid is high, output registered one cycle later.
module randomizer #(
  parameter logic [14:0] SEED = 15'b011011100010101
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,       // reload the seed (may coincide with the first in_valid of a block)
  input  logic in_valid,
  input  logic in_bit,
  input  logic in_last,
  output logic out_valid,
  output logic out_bit,
  output logic out_last
);
  // lfsr[14] is stage 15 and lfsr[13] stage 14 of the standard's register.
  logic [14:0] lfsr, cur;
  logic        prbs;

  always_comb begin
    cur  = init ? SEED : lfsr;
    prbs = cur[14] ^ cur[13];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid & in_last;
      if (in_valid) begin
        out_bit <= in_bit ^ prbs;
        lfsr    <= {cur[13:0], prbs};
      end else if (init) begin
        lfsr <= SEED;
      end
    end
  end
endmodule
