// tb_duc: checks the digital up-converter (CIC interpolation by R=8 + 15 MHz CORDIC mixer at an
// 80 MHz clock). A sample is requested exactly every R clocks. For each test input (two
// constant complex values and a slow complex tone) the real DAC output is fitted, after the
// filter has settled, by a least-squares sinusoid at the expected output frequency
// (IF + tone frequency / R). Checks: fitted amplitude equals the input magnitude (unity gain)
// within 2%, the phase difference between the two constant inputs equals the phase difference
// of the inputs (so the complex value is carried by the carrier), and the residual after the fit
// is below 1.5% of the amplitude (no images or distortion).
module tb_duc;
  import wimax_pkg::*;
  localparam int R = 8;
  localparam real PI = 3.14159265358979;
  localparam real W_IF = 2.0 * PI * 805306368.0 / 4294967296.0;
  logic clk = 0, rst_n = 0;
  logic in_req;
  cplx16_t in_data;
  logic signed [15:0] dac_out;
  int checks = 0, failures = 0;
  int cyc = 0, last_req = -1;
  always #5 clk = ~clk;

  duc #(.R(R)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("fail: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // baseband source: constant or rotating at w_bb per input sample
  real amp_re = 0, amp_im = 0, w_bb = 0, bb_ph = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_req) begin
      if (last_req >= 0) chk(cyc - last_req == R, "request period");
      last_req = cyc;
      bb_ph += w_bb;
    end
  end
  always_comb begin
    in_data.re = 16'($rtoi(amp_re * $cos(bb_ph) - amp_im * $sin(bb_ph)));
    in_data.im = 16'($rtoi(amp_re * $sin(bb_ph) + amp_im * $cos(bb_ph)));
  end

  // least-squares fit of dac_out to a*cos(w n) + b*sin(w n) over M clocks
  task automatic fit(input real w, input int M, output real a_re, output real a_im, output real rms);
    real d[], c, s, sc, ss, sres;
    d = new[M];
    sc = 0; ss = 0;
    for (int n = 0; n < M; n++) begin
      @(posedge clk); #1;
      d[n] = real'(dac_out);
      sc += d[n] * $cos(w * real'(cyc));
      ss += d[n] * $sin(w * real'(cyc));
    end
    a_re = 2.0 * sc / M;
    a_im = -2.0 * ss / M;
    sres = 0;
    for (int n = 0; n < M; n++) begin
      real t;
      t = w * real'(cyc - M + 1 + n);
      sres += (d[n] - (a_re * $cos(t) - a_im * $sin(t))) ** 2;
    end
    rms = $sqrt(sres / M);
  endtask

  initial begin
    real a1r, a1i, a2r, a2i, a3r, a3i, r1, r2, r3, m1, m2, m3, dphi;
    repeat (3) @(posedge clk);
    rst_n = 1;
    amp_re = 12000; amp_im = 5000;
    repeat (400) @(posedge clk);
    fit(W_IF, 1600, a1r, a1i, r1);
    amp_re = -3000; amp_im = 9000;
    repeat (400) @(posedge clk);
    fit(W_IF, 1600, a2r, a2i, r2);
    m1 = $sqrt(a1r * a1r + a1i * a1i);
    m2 = $sqrt(a2r * a2r + a2i * a2i);
    $display("amp1 %f (exp %f) rms %f  amp2 %f (exp %f) rms %f", m1, 13000.0, r1, m2,
             $sqrt(9.0e6 + 8.1e7), r2);
    chk(m1 > 0.98 * 13000.0 && m1 < 1.02 * 13000.0, "gain 1");
    chk(m2 > 0.98 * $sqrt(9.0e7) && m2 < 1.02 * $sqrt(9.0e7), "gain 2");
    chk(r1 < 0.015 * m1 && r2 < 0.015 * m2, "residual");
    // phase of fitted carrier relative to input must be the same for both inputs
    dphi = ($atan2(a2i, a2r) - $atan2(a1i, a1r)) - ($atan2(9000.0, -3000.0) - $atan2(5000.0, 12000.0));
    while (dphi > PI) dphi -= 2 * PI;
    while (dphi < -PI) dphi += 2 * PI;
    $display("phase error %f rad", dphi);
    chk(dphi < 0.03 && dphi > -0.03, "phase tracks input");
    // slow complex tone: output at IF + w_bb / R
    amp_re = 15000; amp_im = 0; w_bb = 2.0 * PI / 40.0;
    repeat (400) @(posedge clk);
    fit(W_IF + w_bb / R, 3200, a3r, a3i, r3);
    m3 = $sqrt(a3r * a3r + a3i * a3i);
    $display("tone amp %f rms %f", m3, r3);
    chk(m3 > 0.95 * 15000.0 && m3 < 1.02 * 15000.0, "tone gain (with CIC droop)");
    chk(r3 < 0.03 * m3, "tone residual");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
