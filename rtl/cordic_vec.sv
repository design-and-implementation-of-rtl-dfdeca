// cordic_vec: iterative CORDIC in vectoring mode, returns the angle of a complex value.
// After `start` the input is folded into the right half plane (adding +/-pi to the angle), then
// ITER micro-rotations drive y to zero while accumulating the rotation angle from an arctangent
// table. The result is a 16-bit binary angle (2^15 = pi) with `done` pulsing ITER+1 cycles
// after `start`. `busy` is high in between; a start while busy is ignored.
module cordic_vec #(
  parameter int unsigned ITER = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [15:0] x_in,
  input  logic signed [15:0] y_in,
  output logic               busy,
  output logic               done,
  output logic signed [15:0] angle
);
  // atan(2^-i) in units of pi/2^15
  function automatic logic signed [17:0] atan_tab(int unsigned i);
    case (i)
      0: return 18'sd8192;  1: return 18'sd4836;  2: return 18'sd2555;  3: return 18'sd1297;
      4: return 18'sd651;   5: return 18'sd326;   6: return 18'sd163;   7: return 18'sd81;
      8: return 18'sd41;    9: return 18'sd20;   10: return 18'sd10;   11: return 18'sd5;
      12: return 18'sd3;   13: return 18'sd1;    14: return 18'sd1;
      default: return 18'sd0;
    endcase
  endfunction

  logic signed [19:0] x, y;
  logic signed [17:0] z;
  logic [4:0]         i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; i <= '0;
      busy <= 1'b0; done <= 1'b0; angle <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i    <= '0;
          if (x_in < 0) begin
            x <= -20'(x_in);
            y <= -20'(y_in);
            z <= (y_in < 0) ? -18'sd32768 : 18'sd32768;
          end else begin
            x <= 20'(x_in);
            y <= 20'(y_in);
            z <= '0;
          end
        end
      end else if (32'(i) < ITER) begin
        if (y > 0) begin
          x <= x + (y >>> i);
          y <= y - (x >>> i);
          z <= z + atan_tab(32'(i));
        end else begin
          x <= x - (y >>> i);
          y <= y + (x >>> i);
          z <= z - atan_tab(32'(i));
        end
        i <= i + 1'b1;
      end else begin
        busy  <= 1'b0;
        done  <= 1'b1;
        angle <= z[15:0];   // wraps +pi to -pi
      end
    end
  end
endmodule
