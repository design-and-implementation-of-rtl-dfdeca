// tb_delay_correlator: random complex samples, in bursts with gaps, through a small instance
// (LAG 21, WIN 16) and the RPB-sized one (LAG = WIN = 341); every output is compared with the
// windowed sum of x[t-LAG]*conj(x[t]) recomputed from the whole sample history, then scaled by
// 2^-SHIFT and saturated. Also checks the two-cycle latency.
module tb_delay_correlator;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, v1, v2;
  cplx16_t in_data, m1, m2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  delay_correlator #(.LAG(21), .WIN(16), .SHIFT(4)) d1 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v1), .out_metric(m1));
  delay_correlator #(.LAG(341), .WIN(341), .SHIFT(9)) d2 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v2), .out_metric(m2));

  int xr[$], xi[$];
  int vpipe[3];

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  function automatic void expect_metric(int lag, int win, int sh, output int er, output int ei);
    longint sr, si;
    int t;
    sr = 0; si = 0;
    t = xr.size() - 1;
    for (int n = 0; n < win; n++) begin
      int k, ar, ai;
      k = t - n;
      if (k < 0) break;
      ar = (k - lag >= 0) ? xr[k - lag] : 0;
      ai = (k - lag >= 0) ? xi[k - lag] : 0;
      sr += (longint'(ar) * xr[k] + longint'(ai) * xi[k]) >>> 15;
      si += (longint'(ai) * xr[k] - longint'(ar) * xi[k]) >>> 15;
    end
    er = sat(sr >>> sh);
    ei = sat(si >>> sh);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      // a periodic signal (period 21) half of the time, noise otherwise
      if ((i / 400) % 2 == 0) begin
        in_data.re = 16'($urandom_range(0, 40000) - 20000);
        in_data.im = 16'($urandom_range(0, 40000) - 20000);
      end else begin
        in_data.re = 16'(((i % 21) * 1500) - 15000);
        in_data.im = 16'(12000 - ((i % 21) * 1100));
      end
      if (in_valid) begin
        xr.push_back(in_data.re);
        xi.push_back(in_data.im);
        // outputs appear two cycles later; wait for them
        @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        @(posedge clk);
        #1;
        checks += 3;
        if (!v1 || !v2) failures++;
        begin
          int er, ei;
          expect_metric(21, 16, 4, er, ei);
          if (m1.re !== 16'(er) || m1.im !== 16'(ei)) failures++;
          expect_metric(341, 341, 9, er, ei);
          if (m2.re !== 16'(er) || m2.im !== 16'(ei)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
