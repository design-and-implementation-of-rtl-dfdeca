// fec_tx: tail-biting convolutional encoder (FEC TX) of the coding coprocessor.
// A FEC block of up to MAX_BITS information bits is first stored. The encoder register
// (constraint length 7, generators 171/133 octal) is then primed with the last six bits of the
// block, which makes the end state equal the start state (tail biting), and the block is
// encoded from its first bit. The mother rate 1/2 output X1 Y1 X2 Y2 ... is punctured to 2/3
// (X1 Y1 Y2) or 3/4 (X1 Y1 Y2 X3) by skipping the removed positions.
// Interface: bits in with in_valid/in_ready and in_last ending a block; `rate` is sampled with
// the first bit of a block. Coded bits leave one per cycle at most (out_valid, out_last marks
// the final one); the encoder does not stall on the output side. Priming takes 6 cycles and
// every information bit takes 2 cycles.
module fec_tx
  import wimax_pkg::*;
#(
  parameter int unsigned MAX_BITS = 288
) (
  input  logic  clk,
  input  logic  rst_n,
  input  rate_t rate,
  input  logic  in_valid,
  input  logic  in_bit,
  input  logic  in_last,
  output logic  in_ready,
  output logic  out_valid,
  output logic  out_bit,
  output logic  out_last
);
  localparam int unsigned AW = $clog2(MAX_BITS + 1);

  typedef enum logic [1:0] {S_LOAD, S_PRIME, S_ENC} state_t;
  state_t state;

  logic [MAX_BITS-1:0] blk;
  logic [AW-1:0]       nbits, idx;
  logic [5:0]          sreg;      // sreg[0] is the most recent bit
  logic                sub;       // 0: X output, 1: Y output of the current bit
  logic [1:0]          phase;     // position within the puncturing period
  rate_t               rate_q;
  logic                u, x_bit, y_bit, keep, last_slot;

  assign in_ready = (state == S_LOAD);
  assign u        = blk[idx];
  assign x_bit    = u ^ sreg[0] ^ sreg[1] ^ sreg[2] ^ sreg[5];
  assign y_bit    = u ^ sreg[1] ^ sreg[2] ^ sreg[4] ^ sreg[5];

  // Puncturing: 2/3 removes X of the second bit, 3/4 removes X2 and Y3.
  always_comb begin
    keep = 1'b1;
    case (rate_q)
      RATE_2_3: if (phase == 2'd1 && !sub) keep = 1'b0;
      RATE_3_4: if ((phase == 2'd1 && !sub) || (phase == 2'd2 && sub)) keep = 1'b0;
      default: ;
    endcase
  end

  // The last kept slot of the block: Y of the last bit, except X for rate 3/4 phase 2.
  assign last_slot = (idx == nbits - 1'b1) &&
                     ((rate_q == RATE_3_4 && phase == 2'd2) ? !sub : sub);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      blk       <= '0;
      nbits     <= '0;
      idx       <= '0;
      sreg      <= '0;
      sub       <= 1'b0;
      phase     <= '0;
      rate_q    <= RATE_1_2;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          if (idx == '0) rate_q <= rate;
          blk[idx] <= in_bit;
          if (in_last || idx == AW'(MAX_BITS - 1)) begin
            nbits <= idx + 1'b1;
            // prime with the last six bits (fewer blocks than 6 bits wrap around)
            idx   <= (idx + 1'b1 >= AW'(6)) ? idx + 1'b1 - AW'(6) : '0;
            state <= S_PRIME;
            sub   <= 1'b0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_PRIME: begin
          sreg <= {sreg[4:0], u};
          if (idx == nbits - 1'b1) begin
            // six priming bits have been shifted when nbits >= 6
            idx   <= '0;
            phase <= '0;
            state <= S_ENC;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_ENC: begin
          out_valid <= keep;
          out_bit   <= sub ? y_bit : x_bit;
          out_last  <= keep & last_slot;
          sub       <= ~sub;
          if (sub) begin
            sreg <= {sreg[4:0], u};
            case (rate_q)
              RATE_2_3: phase <= (phase == 2'd1) ? 2'd0 : phase + 1'b1;
              RATE_3_4: phase <= (phase == 2'd2) ? 2'd0 : phase + 1'b1;
              default:  phase <= 2'd0;
            endcase
            if (idx == nbits - 1'b1) begin
              idx   <= '0;
              state <= S_LOAD;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
