// tb_peak_detector: drives the three metrics with noise-level values and inserts peaks; checks
// the decision function against a product computed here, that detection happens on the first
// sample above the threshold with the right frame start (N+G-1 earlier) and latched metrics,
// and that a second peak inside the blind interval is ignored while one after it is detected.
module tb_peak_detector;
  import wimax_pkg::*;
  localparam int N = 64, G = 8, HOLD = 300;
  logic clk = 0, rst_n = 0;
  logic [50:0] thr, metric;
  logic in_valid, detect;
  cplx16_t r_rpb, r_cp, rpb_at_peak, cp_at_peak;
  logic signed [8:0] r_qc_re, r_qc_im;
  logic [31:0] theta, det_idx;
  int checks = 0, failures = 0, ndet = 0, cyc = 0;
  always #5 clk = ~clk;

  peak_detector #(.N(N), .G(G), .HOLDOFF(HOLD)) dut (.*);

  int exp_det[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && detect) begin
    checks += 4;
    ndet++;
    if (exp_det.size() == 0) failures++;
    else begin
      int t;
      t = exp_det.pop_front();
      if (int'(det_idx) != t) failures++;
      if (int'(theta) != t - (N + G - 1)) failures++;
      if (rpb_at_peak.re != 16'sd3000 || cp_at_peak.re != 16'sd2000) failures++;
    end
  end

  initial begin
    longint m1, m2, m3, prod, thr_v;
    int last_above;
    thr_v = 64'd50000000;
    thr = 51'(thr_v); in_valid = 0; r_rpb = '0; r_cp = '0; r_qc_re = '0; r_qc_im = '0;
    last_above = -1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1200; t++) begin
      bit pk;
      // peaks at samples 100, 250 (inside the blind time) and 600
      pk = (t == 100 || t == 250 || t == 600);
      @(negedge clk);
      in_valid = 1;
      r_rpb.re = pk ? 16'sd3000 : 16'($urandom_range(0, 1000)); r_rpb.im = pk ? 16'sd0 : 16'sd200;
      r_cp.re  = pk ? 16'sd2000 : 16'($urandom_range(0, 1000)); r_cp.im  = 16'sd100;
      r_qc_re  = pk ? 9'sd100 : 9'($urandom_range(0, 30));       r_qc_im  = 9'sd3;
      m1 = (longint'(r_rpb.re) * r_rpb.re + longint'(r_rpb.im) * r_rpb.im) >> 16;
      m2 = (longint'(r_cp.re) * r_cp.re + longint'(r_cp.im) * r_cp.im) >> 16;
      m3 = longint'(r_qc_re) * r_qc_re + longint'(r_qc_im) * r_qc_im;
      prod = m1 * m2 * m3;
      if (prod > thr_v && t - last_above > HOLD) begin
        exp_det.push_back(t);
        last_above = t;
      end
      @(negedge clk);
      in_valid = 0;
      @(posedge clk);
      #1;
      checks++;
      if (metric != 51'(prod)) failures++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (ndet != 2 || exp_det.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
