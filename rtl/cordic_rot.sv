// cordic_rot: pipelined CORDIC in rotation mode, multiplies a complex value by e^{j*angle}.
// The angle (16-bit binary angle, 2^15 = pi) is first brought into [-pi/2, pi/2) by an optional
// rotation by pi, then 15 pipelined micro-rotations follow. The CORDIC gain is removed by a final
// multiplication by 1/K, so |out| = |in| up to rounding. One sample per cycle, latency 17 cycles.
module cordic_rot
  import wimax_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx16_t            in_data,
  input  logic signed [15:0] angle,
  output logic               out_valid,
  output cplx16_t            out_data
);
  localparam int unsigned ST = 15;

  function automatic logic signed [17:0] atan_tab(int unsigned i);
    case (i)
      0: return 18'sd8192;  1: return 18'sd4836;  2: return 18'sd2555;  3: return 18'sd1297;
      4: return 18'sd651;   5: return 18'sd326;   6: return 18'sd163;   7: return 18'sd81;
      8: return 18'sd41;    9: return 18'sd20;   10: return 18'sd10;   11: return 18'sd5;
      12: return 18'sd3;   13: return 18'sd1;    14: return 18'sd1;
      default: return 18'sd0;
    endcase
  endfunction

  logic signed [19:0] xs [ST+1];
  logic signed [19:0] ys [ST+1];
  logic signed [17:0] zs [ST+1];
  logic [ST+1:0]      vs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= ST; k++) begin xs[k] <= '0; ys[k] <= '0; zs[k] <= '0; end
      vs       <= '0;
      out_data <= '0;
    end else begin
      // stage 0: fold the angle into [-pi/2, pi/2)
      vs[0] <= in_valid;
      if (angle >= 16'sd16384 || angle < -16'sd16384) begin
        xs[0] <= -20'(in_data.re);
        ys[0] <= -20'(in_data.im);
        zs[0] <= 18'(angle) + ((angle < 0) ? 18'sd32768 : -18'sd32768);
      end else begin
        xs[0] <= 20'(in_data.re);
        ys[0] <= 20'(in_data.im);
        zs[0] <= 18'(angle);
      end
      for (int k = 0; k < ST; k++) begin
        vs[k+1] <= vs[k];
        if (zs[k] >= 0) begin
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - atan_tab(k);
        end else begin
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + atan_tab(k);
        end
      end
      // gain correction
      vs[ST+1]    <= vs[ST];
      out_data.re <= sat16(48'((xs[ST] * 36'(CORDIC_INV_GAIN)) >>> 15));
      out_data.im <= sat16(48'((ys[ST] * 36'(CORDIC_INV_GAIN)) >>> 15));
    end
  end
  assign out_valid = vs[ST+1];
endmodule
