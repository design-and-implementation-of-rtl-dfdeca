// tb_power_estimator: segments of 90 samples at several amplitudes (window 64). After every
// sample the power register must equal the mean of |x|^2 over the last 64 samples computed
// here and the scale factor must be the largest 16-bit value with P*s^2 <= target*2^24, found
// here by a direct search. The normalised output
// must equal x*s/2^12 with the scale in force.
module tb_power_estimator;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, scale_valid;
  cplx16_t in_data, out_data;
  logic [15:0] scale;
  logic [31:0] power;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  power_estimator #(.LOG_WIN(6)) dut (.*);

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int amps[] = '{20000, 3000, 500, 12000, 60};
    longint h[$];
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (amps[a]) begin
      for (int n = 0; n < 90; n++) begin
        int vr, vi, sc;
        longint acc, p, s_exp;
        vr = $urandom_range(0, 2 * amps[a]) - amps[a];
        vi = $urandom_range(0, 2 * amps[a]) - amps[a];
        h.push_back(longint'(vr) * vr + longint'(vi) * vi);
        if (h.size() > 64) void'(h.pop_front());
        sc = scale;
        @(negedge clk);
        in_valid = 1; in_data.re = 16'(vr); in_data.im = 16'(vi);
        @(negedge clk);
        in_valid = 0;
        checks += 2;
        if (out_data.re !== 16'(sat((longint'(vr) * sc) >>> 12))) failures++;
        if (out_data.im !== 16'(sat((longint'(vi) * sc) >>> 12))) failures++;
        // sliding mean of the last 64 samples (missing ones count as zero) and its scale
        acc = 0;
        foreach (h[k]) acc += h[k];
        p = acc >> 6;
        s_exp = 0;
        for (int b = 15; b >= 0; b--) begin
          longint c;
          c = s_exp | (64'd1 << b);
          if (p * c * c <= (64'd67108864 << 24)) s_exp = c;
        end
        repeat (19) @(negedge clk);
        checks += 2;
        if (longint'(power) != p) failures++;
        if (longint'(scale) != s_exp) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
