// cfo_estimator: carrier frequency offset from the RPB and CP metrics at the frame start.
// Both metric values are turned into angles by a shared iterative CORDIC (RPB first). In units
// of the subcarrier spacing, the CP metric gives eps_cp = angle_cp/2pi, unambiguous in
// [-1/2, 1/2), and the preamble repetition metric gives eps_rpb = 3*angle_rpb/2pi in [-3/2, 3/2).
// The combined estimate is eps_cp + k with the integer k in -2..2 that brings it nearest to
// eps_rpb. eps values are signed with 16 fractional bits. The result is also given as the
// per-sample phase step 2*pi*eps/N of a 32-bit phase accumulator (2^32 = 2*pi) for the
// corrector. N must be a power of two; the low 16-log2(N) bits of phase_inc are then always
// zero (6 bits at N = 1024), since eps has 16 fractional bits.
// Sign: the metrics are x[n-L]*conj(x[n]), so a received signal turning as exp(+j*2*pi*f*n/N)
// gives eps = -f, i.e. eps is the correction to apply (the corrector rotates by +2*pi*eps*n/N).
// Timing: `start` (the frame detection pulse) to `done` takes about 2*(ITER+2) cycles.
module cfo_estimator
  import wimax_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  cplx16_t            r_rpb,
  input  cplx16_t            r_cp,
  output logic               done,
  output logic signed [18:0] eps_rpb,
  output logic signed [18:0] eps_cp,
  output logic signed [18:0] eps_comb,
  output logic signed [31:0] phase_inc
);
  localparam int unsigned LOGN = $clog2(N);

  typedef enum logic [2:0] {E_IDLE, E_RPB, E_WRPB, E_CP, E_WCP, E_COMB} est_t;
  est_t          st;
  cplx16_t       rpb_q, cp_q;
  logic          c_start, c_busy, c_done;
  logic signed [15:0] c_x, c_y, c_ang;

  cordic_vec u_cordic (
    .clk, .rst_n, .start(c_start), .x_in(c_x), .y_in(c_y),
    .busy(c_busy), .done(c_done), .angle(c_ang)
  );

  assign c_start = (st == E_RPB) || (st == E_CP);
  assign c_x     = (st == E_RPB) ? rpb_q.re : cp_q.re;
  assign c_y     = (st == E_RPB) ? rpb_q.im : cp_q.im;

  // pick k in -2..2 minimising |eps_cp + k - eps_rpb|
  logic signed [18:0] best_k_eps;
  always_comb begin
    logic signed [19:0] d, bd;
    best_k_eps = eps_cp;
    bd = 20'sh7ffff;
    for (int k = -2; k <= 2; k++) begin
      d = 20'(eps_cp) + 20'(k * 65536) - 20'(eps_rpb);
      if (d < 0) d = -d;
      if (d < bd) begin
        bd = d;
        best_k_eps = 19'(20'(eps_cp) + 20'(k * 65536));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; rpb_q <= '0; cp_q <= '0; done <= 1'b0;
      eps_rpb <= '0; eps_cp <= '0; eps_comb <= '0; phase_inc <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        E_IDLE: if (start) begin rpb_q <= r_rpb; cp_q <= r_cp; st <= E_RPB; end
        E_RPB:  st <= E_WRPB;
        E_WRPB: if (c_done) begin eps_rpb <= 19'(3 * 32'(c_ang)); st <= E_CP; end
        E_CP:   st <= E_WCP;
        E_WCP:  if (c_done) begin eps_cp <= 19'(c_ang); st <= E_COMB; end
        E_COMB: begin
          eps_comb  <= best_k_eps;
          // 2*pi*eps/N in 2^32 units: eps * 2^16 * 2^16 / 2^LOGN
          phase_inc <= 32'(48'(best_k_eps) <<< (16 - LOGN + 16) >>> 16);
          done      <= 1'b1;
          st        <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
