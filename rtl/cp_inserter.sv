// cp_inserter: cyclic prefix insertion after the IFFT, with per-symbol prefix/postfix choice.
// Symbols of N samples are written into one half of a ping-pong buffer while the other half is
// read out as N+G samples: with a prefix the last G samples come first, then the whole symbol;
// with a postfix the whole symbol is followed by its first G samples. Bit i of `postfix_pat`
// chooses a postfix for the i-th symbol of a pattern of pat_len symbols, which restarts on
// `pat_restart`. An all-zero pattern gives plain cyclic prefixes (base station); the mobile
// station uses the pattern for initial ranging symbol pairs.
// Interface: valid/ready on both sides; output data are read from the buffer combinationally.
module cp_inserter
  import wimax_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned G = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] postfix_pat,
  input  logic [4:0]  pat_len,
  input  logic        pat_restart,
  input  logic        in_valid,
  input  cplx16_t     in_data,
  output logic        in_ready,
  output logic        out_valid,
  output cplx16_t     out_data,
  output logic        out_sos,      // first output sample of a symbol
  input  logic        out_ready
);
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned RW = $clog2(N + G);

  cplx16_t       mem [2*N];
  logic [1:0]    full;
  logic          wb, rb;
  logic [AW-1:0] wcnt;
  logic [RW-1:0] rcnt;
  logic [3:0]    pidx;
  logic          post_now;
  logic [AW-1:0] raddr;

  assign in_ready  = !full[wb];
  assign out_valid = full[rb];
  assign post_now  = postfix_pat[pidx];
  assign out_sos   = out_valid && rcnt == '0;

  always_comb begin
    if (post_now) raddr = (rcnt < RW'(N)) ? AW'(rcnt) : AW'(rcnt - RW'(N));
    else          raddr = (rcnt < RW'(G)) ? AW'(rcnt + RW'(N - G)) : AW'(rcnt - RW'(G));
  end
  assign out_data = mem[{rb, raddr}];

  always_ff @(posedge clk) if (in_valid && in_ready) mem[{wb, wcnt}] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wcnt <= '0; rcnt <= '0; pidx <= '0;
    end else begin
      logic [1:0] f;
      f = full;
      if (in_valid && in_ready) begin
        if (wcnt == AW'(N - 1)) begin
          wcnt  <= '0;
          f[wb] = 1'b1;
          wb    <= ~wb;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (rcnt == RW'(N + G - 1)) begin
          rcnt  <= '0;
          f[rb] = 1'b0;
          rb    <= ~rb;
          pidx  <= (5'(pidx) + 5'd1 >= pat_len) ? '0 : pidx + 1'b1;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
      if (pat_restart) pidx <= '0;
      full <= f;
    end
  end
endmodule
