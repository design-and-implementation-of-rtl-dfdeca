// fec_rx: depuncturing and tail-biting Viterbi decoder (FEC RX) of the coding coprocessor.
// Soft bits of one FEC block are depunctured into X/Y pairs (removed positions become zero,
// i.e. no information) and stored. The starting state of a tail-biting block is unknown, so the
// decoder is run over a wrapped sequence: the last TB pairs of the block, the whole block, then
// its first TB pairs, where TB is the traceback length. A block shorter than TB is instead
// decoded three times in a row. Only the decisions of the middle copy are output. The
// add-compare-select unit handles all 64 states in one cycle, stores one decision bit per state
// and step, and a traceback from the best final state recovers the bits.
// Soft bits are signed; a positive value favours a 1. Path metrics use wrap-around arithmetic.
// Interface: in_valid/in_soft/in_last with in_ready; `rate` is sampled with the first soft bit.
// Decoded bits leave with out_valid/out_last, one per cycle.
// Timing for N information bits: N+2*TB cycles of add-compare-select (3N if N < TB), the same
// number for traceback, then N output cycles.
module fec_rx
  import wimax_pkg::*;
#(
  parameter int unsigned MAX_BITS = 288,
  parameter int unsigned TB       = 48,
  parameter int unsigned SW       = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rate_t                rate,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_soft,
  input  logic                 in_last,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic                 out_bit,
  output logic                 out_last
);
  localparam int unsigned MAX_STEPS = (MAX_BITS + 2 * TB > 3 * TB) ? MAX_BITS + 2 * TB : 3 * TB;
  localparam int unsigned AW = $clog2(MAX_BITS + 1);
  localparam int unsigned SAW = $clog2(MAX_STEPS + 1);
  localparam int unsigned MW = 16;

  typedef enum logic [2:0] {S_LOAD, S_ACS, S_BEST, S_TRACE, S_OUT} state_t;
  state_t state;

  logic signed [SW-1:0] xs [MAX_BITS];
  logic signed [SW-1:0] ys [MAX_BITS];
  logic [63:0]          dec_mem [MAX_STEPS];
  logic [MAX_BITS-1:0]  obits;

  logic [AW-1:0]  widx, nbits, j, pre;
  logic           wsub;
  logic [1:0]     phase;
  rate_t          rate_q;
  logic [SAW-1:0] step, nsteps;
  logic [MW-1:0]  pm [64];
  logic [63:0]    dec_now;
  logic [MW-1:0]  pm_next [64];
  logic [5:0]     st, best;
  logic [MW-1:0]  best_m;

  assign in_ready = (state == S_LOAD);

  // ---------------- depuncturing writer ----------------
  logic x_punct_next, y_punct_here;
  logic [1:0] phase_next;
  always_comb begin
    case (rate_q)
      RATE_2_3: phase_next = (phase == 2'd1) ? 2'd0 : phase + 1'b1;
      RATE_3_4: phase_next = (phase == 2'd2) ? 2'd0 : phase + 1'b1;
      default:  phase_next = 2'd0;
    endcase
    // X of the following bit removed (phase 1 for 2/3 and 3/4)
    x_punct_next = (rate_q != RATE_1_2) && (phase_next == 2'd1);
    // Y of this bit removed (3/4, phase 2)
    y_punct_here = (rate_q == RATE_3_4) && (phase == 2'd2);
  end

  // ---------------- add-compare-select ----------------
  logic signed [SW-1:0] sx, sy;
  assign sx = xs[j];
  assign sy = ys[j];

  function automatic logic signed [SW+1:0] bmetric(logic xb, logic yb,
                                                   logic signed [SW-1:0] a,
                                                   logic signed [SW-1:0] b);
    logic signed [SW+1:0] ea, eb;
    ea = xb ? (SW+2)'(a) : -(SW+2)'(a);
    eb = yb ? (SW+2)'(b) : -(SW+2)'(b);
    return ea + eb;
  endfunction

  always_comb begin
    for (int s = 0; s < 64; s++) begin
      logic [5:0] p0, p1;
      logic       u, x0, y0, x1, y1;
      logic [MW-1:0] m0, m1;
      u  = s[5];
      p0 = {s[4:0], 1'b0};
      p1 = {s[4:0], 1'b1};
      // p[5] is the most recent register bit, p[0] the oldest
      x0 = u ^ p0[5] ^ p0[4] ^ p0[3] ^ p0[0];
      y0 = u ^ p0[4] ^ p0[3] ^ p0[1] ^ p0[0];
      x1 = u ^ p1[5] ^ p1[4] ^ p1[3] ^ p1[0];
      y1 = u ^ p1[4] ^ p1[3] ^ p1[1] ^ p1[0];
      m0 = pm[p0] + MW'(bmetric(x0, y0, sx, sy));
      m1 = pm[p1] + MW'(bmetric(x1, y1, sx, sy));
      // wrap-around comparison
      dec_now[s] = $signed(m1 - m0) > 0;
      pm_next[s] = dec_now[s] ? m1 : m0;
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_ACS) dec_mem[step] <= dec_now;
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      if (!wsub) begin
        xs[widx] <= in_soft;
        if (y_punct_here) ys[widx] <= '0;
      end else begin
        ys[widx] <= in_soft;
        if (x_punct_next && widx != AW'(MAX_BITS - 1)) xs[widx + 1'b1] <= '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      widx      <= '0;
      wsub      <= 1'b0;
      phase     <= '0;
      rate_q    <= RATE_1_2;
      nbits     <= '0;
      j         <= '0;
      pre       <= '0;
      step      <= '0;
      nsteps    <= '0;
      st        <= '0;
      best      <= '0;
      best_m    <= '0;
      obits     <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
      for (int s = 0; s < 64; s++) pm[s] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          logic [AW-1:0] n_now;
          logic          adv_bit;
          if (widx == '0 && !wsub && phase == '0) rate_q <= rate;
          // next kept slot
          if (!wsub) begin
            adv_bit = y_punct_here;
            wsub    <= !y_punct_here;
          end else begin
            adv_bit = 1'b1;
            wsub    <= x_punct_next;
          end
          n_now = widx + 1'b1;
          if (adv_bit) begin
            widx  <= widx + 1'b1;
            phase <= phase_next;
          end
          if (in_last) begin
            nbits <= n_now;
            if (n_now >= AW'(TB)) begin
              j      <= n_now - AW'(TB);
              pre    <= AW'(TB);
              nsteps <= SAW'(n_now) + SAW'(2 * TB);
            end else begin
              j      <= '0;
              pre    <= n_now;
              nsteps <= SAW'(3) * SAW'(n_now);
            end
            step  <= '0;
            for (int s = 0; s < 64; s++) pm[s] <= '0;
            state <= S_ACS;
          end
        end
        S_ACS: begin
          for (int s = 0; s < 64; s++) pm[s] <= pm_next[s];
          j <= (j == nbits - 1'b1) ? '0 : j + 1'b1;
          if (step == nsteps - 1'b1) begin
            best   <= '0;
            st     <= '0;
            state  <= S_BEST;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_BEST: begin
          // serial search of the best final metric, one state per cycle
          if (st == '0 || $signed(pm[st] - best_m) > 0) begin
            best   <= st;
            best_m <= pm[st];
          end
          if (st == 6'd63) state <= S_TRACE;
          st <= st + 1'b1;
        end
        S_TRACE: begin
          logic [5:0] cur;
          logic [SAW-1:0] rel;
          cur = (step == nsteps - 1'b1) ? best : st;
          rel = step - SAW'(pre);
          if (step >= SAW'(pre) && rel < SAW'(nbits)) obits[rel[AW-1:0]] <= cur[5];
          st <= {cur[4:0], dec_mem[step][cur]};
          if (step == '0) begin
            widx  <= '0;
            state <= S_OUT;
          end else begin
            step <= step - 1'b1;
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_bit   <= obits[widx];
          out_last  <= (widx == nbits - 1'b1);
          if (widx == nbits - 1'b1) begin
            widx  <= '0;
            wsub  <= 1'b0;
            phase <= '0;
            state <= S_LOAD;
          end else begin
            widx <= widx + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
