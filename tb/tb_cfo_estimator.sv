// tb_cfo_estimator: builds RPB and CP metric values for a set of frequency offsets between
// -1.4 and +1.4 subcarrier spacings (the RPB phase turns three times slower than the CP phase)
// and checks the RPB, CP and combined estimates (16 fractional bits) and the phase step.
module tb_cfo_estimator;
  import wimax_pkg::*;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  logic start, done;
  cplx16_t r_rpb, r_cp;
  logic signed [18:0] eps_rpb, eps_cp, eps_comb;
  logic signed [31:0] phase_inc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cfo_estimator #(.N(N)) dut (.*);

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real offs[] = '{0.0, 0.1, -0.3, 0.45, 0.7, -0.8, 1.2, -1.35, 1.4, -0.05};
    start = 0; r_rpb = '0; r_cp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (offs[k]) begin
      real e, pr, pc, ecp;
      int n;
      e = offs[k];
      pr = 2.0 * 3.14159265358979 * e / 3.0;
      pc = 2.0 * 3.14159265358979 * e;
      @(negedge clk);
      r_rpb.re = 16'($rtoi(9000.0 * $cos(pr))); r_rpb.im = 16'($rtoi(9000.0 * $sin(pr)));
      r_cp.re  = 16'($rtoi(7000.0 * $cos(pc)));  r_cp.im  = 16'($rtoi(7000.0 * $sin(pc)));
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0;
      while (!done && n < 100) begin @(negedge clk); n++; end
      checks += 5;
      if (n >= 100) failures++;
      // CP alone sees the offset modulo one subcarrier
      ecp = e - $floor(e + 0.5);
      if (rabs(real'(eps_rpb) / 65536.0 - e) > 0.01) failures++;
      if (rabs(real'(eps_cp) / 65536.0 - ecp) > 0.01) failures++;
      if (rabs(real'(eps_comb) / 65536.0 - e) > 0.01) failures++;
      if (phase_inc != 32'(eps_comb) <<< 6) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
