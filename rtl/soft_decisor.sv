// soft_decisor: soft demapper and EVM-based CINR estimator.
// Each received (equalised) point gives 2, 4 or 6 soft bits by the usual piecewise-linear
// approximations: sign bit from -v, level bits from |v| - 2a (16-QAM), |v| - 4a and
// 2a - ||v| - 4a| (64-QAM), a being the unit amplitude. They are scaled to SW-bit signed values
// (positive favours a 1) and issued one per cycle; in_ready is low while a point is being issued.
// For the CINR estimate the soft signs are mapped back to the nearest constellation point; the
// squared error to it and the point's energy are accumulated over 2^LOG_WIN points and then
// latched in the `mse` and `sig_pow` registers for the control processor to read.
module soft_decisor
  import wimax_pkg::*;
#(
  parameter int unsigned SW      = 6,
  parameter int unsigned LOG_WIN = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mod_t                 modulation,
  input  logic                 in_valid,
  input  cplx16_t              in_point,
  input  logic                 in_last,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic signed [SW-1:0] out_soft,
  output logic                 out_last,
  output logic [31:0]          mse,       // mean squared error per point
  output logic [31:0]          sig_pow,   // mean energy of the decided points
  output logic                 est_valid  // pulses when mse/sig_pow are updated
);
  localparam logic signed [SW-1:0] SMAX = {1'b0, {(SW-1){1'b1}}};

  logic signed [SW-1:0] soft_q [6];
  logic [2:0]           nleft, idx;
  logic                 last_q;
  logic [2:0]           nbits;
  logic signed [SW-1:0] soft_c [6];
  cplx16_t              ideal;
  logic [5:0]           hard;

  function automatic logic signed [SW-1:0] qsoft(logic signed [19:0] v, int unsigned sh);
    logic signed [19:0] s;
    s = v >>> sh;
    if (s > 20'(SMAX)) return SMAX;
    if (s < -20'(SMAX)) return -SMAX;
    return s[SW-1:0];
  endfunction

  function automatic logic signed [19:0] absv(logic signed [19:0] v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    logic signed [19:0] vi, vq, a;
    int unsigned sh;
    vi = 20'(in_point.re);
    vq = 20'(in_point.im);
    for (int k = 0; k < 6; k++) soft_c[k] = '0;
    case (modulation)
      MOD_16QAM: begin
        a = 20'(AMP_16QAM); sh = 10; nbits = 3'd4;
        soft_c[0] = qsoft(-vi, sh);
        soft_c[1] = qsoft(absv(vi) - 2 * a, sh);
        soft_c[2] = qsoft(-vq, sh);
        soft_c[3] = qsoft(absv(vq) - 2 * a, sh);
      end
      MOD_64QAM: begin
        a = 20'(AMP_64QAM); sh = 9; nbits = 3'd6;
        soft_c[0] = qsoft(-vi, sh);
        soft_c[1] = qsoft(absv(vi) - 4 * a, sh);
        soft_c[2] = qsoft(2 * a - absv(absv(vi) - 4 * a), sh);
        soft_c[3] = qsoft(-vq, sh);
        soft_c[4] = qsoft(absv(vq) - 4 * a, sh);
        soft_c[5] = qsoft(2 * a - absv(absv(vq) - 4 * a), sh);
      end
      default: begin
        a = 20'(AMP_QPSK); sh = 11; nbits = 3'd2;
        soft_c[0] = qsoft(-vi, sh);
        soft_c[1] = qsoft(-vq, sh);
      end
    endcase
    // hard decisions straight from the soft-bit signs, then back to a point
    for (int k = 0; k < 6; k++) hard[k] = (soft_c[k] > 0);
    ideal = map_point(modulation, hard);
  end

  // error vector magnitude accumulation
  logic signed [16:0] ei, eq;
  logic [33:0]        e2, p2;
  logic [31+LOG_WIN:0] acc_e, acc_p;
  logic [LOG_WIN-1:0] cnt;
  assign ei = 17'(in_point.re) - 17'(ideal.re);
  assign eq = 17'(in_point.im) - 17'(ideal.im);
  assign e2 = 34'($unsigned(34'(ei) * 34'(ei))) + 34'($unsigned(34'(eq) * 34'(eq)));
  assign p2 = 34'($unsigned(34'(ideal.re) * 34'(ideal.re))) + 34'($unsigned(34'(ideal.im) * 34'(ideal.im)));

  assign in_ready = (nleft == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nleft     <= '0;
      idx       <= '0;
      last_q    <= 1'b0;
      out_valid <= 1'b0;
      out_soft  <= '0;
      out_last  <= 1'b0;
      acc_e     <= '0;
      acc_p     <= '0;
      cnt       <= '0;
      mse       <= '0;
      sig_pow   <= '0;
      est_valid <= 1'b0;
      for (int k = 0; k < 6; k++) soft_q[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      est_valid <= 1'b0;
      if (nleft != '0) begin
        out_valid <= 1'b1;
        out_soft  <= soft_q[idx];
        out_last  <= last_q && (nleft == 3'd1);
        idx       <= idx + 1'b1;
        nleft     <= nleft - 1'b1;
      end else if (in_valid) begin
        for (int k = 0; k < 6; k++) soft_q[k] <= soft_c[k];
        // first soft bit leaves now, the others in the following cycles
        out_valid <= 1'b1;
        out_soft  <= soft_c[0];
        out_last  <= 1'b0;
        idx       <= 3'd1;
        nleft     <= nbits - 1'b1;
        last_q    <= in_last;
        cnt       <= cnt + 1'b1;
        if (cnt == '1) begin
          mse       <= 32'((acc_e + (LOG_WIN+32)'(e2)) >> LOG_WIN);
          sig_pow   <= 32'((acc_p + (LOG_WIN+32)'(p2)) >> LOG_WIN);
          est_valid <= 1'b1;
          acc_e     <= '0;
          acc_p     <= '0;
        end else begin
          acc_e <= acc_e + (LOG_WIN+32)'(e2);
          acc_p <= acc_p + (LOG_WIN+32)'(p2);
        end
      end
    end
  end
endmodule
