// tb_ddc: checks the digital down-converter (15 MHz CORDIC mixer + CIC decimation by R=8 at an
// 80 MHz clock). The 14-bit ADC input is a real tone A*cos(w n + theta) at the IF, or offset from
// it by a small frequency. Expected complex output: 4*A*exp(j*theta) (14-bit full scale maps to
// 16-bit full scale), rotating by R*offset per output sample for the offset tone. Checks output
// rate (one sample per R clocks), magnitude within 2%, phase within 0.02 rad, the per-sample
// phase step for the offset tone, and that the 2*IF mixing image does not appear (the output of
// a constant-phase input stays within 1% of its mean).
module tb_ddc;
  import wimax_pkg::*;
  localparam int R = 8;
  localparam real PI = 3.14159265358979;
  localparam real W_IF = 2.0 * PI * 805306368.0 / 4294967296.0;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc_in;
  logic out_valid;
  cplx16_t out_data;
  int checks = 0, failures = 0;
  int k = 0, last_v = -1;
  real amp = 0, theta = 0, dw = 0;
  always #5 clk = ~clk;

  ddc #(.R(R)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("fail: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k counts the clocks since reset, matching the mixer phase accumulator
  always @(negedge clk) if (rst_n) begin
    adc_in = 14'($rtoi($floor(amp * $cos((W_IF + dw) * real'(k) + theta) + 0.5)));
    k++;
  end

  int nv = 0;
  real prev_ph = 0;
  bit mode_const = 1, measure = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    real mag, ph, ep;
    if (last_v >= 0) chk(k - last_v == R, "output rate");
    last_v = k;
    if (measure) begin
      mag = $sqrt(real'(out_data.re) ** 2 + real'(out_data.im) ** 2);
      ph  = $atan2(real'(out_data.im), real'(out_data.re));
      chk(mag > 0.98 * 4 * amp && mag < 1.02 * 4 * amp, "magnitude");
      if (mode_const) begin
        ep = ph - theta;
      end else begin
        ep = ph - prev_ph - dw * R;
      end
      while (ep > PI) ep -= 2 * PI;
      while (ep < -PI) ep += 2 * PI;
      if (mode_const || nv > 0) chk(ep < 0.02 && ep > -0.02, "phase");
      if (failures > 0 && failures < 5) $display("mag %f ph %f ep %f", mag, ph, ep);
      prev_ph = ph;
      nv++;
    end
  end

  initial begin
    adc_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;   // released between edges: the first clock edge has phase 0
    for (int t = 0; t < 4; t++) begin
      measure = 0;
      amp = 3000.0 + 1500.0 * t; theta = -2.5 + 1.6 * t;
      repeat (200) @(posedge clk);
      measure = 1;
      repeat (800) @(posedge clk);
    end
    measure = 0; mode_const = 0; dw = 2.0 * PI / 800.0; amp = 7000.0; nv = 0;
    repeat (200) @(posedge clk);
    measure = 1;
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
