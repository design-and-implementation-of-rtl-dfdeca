// tb_qc_correlator: loads a random ternary reference, streams random samples (with segments
// that contain the reference pattern) and compares each output with the quantised correlation
// computed here; checks that the full match reaches the maximum of 128.
module tb_qc_correlator;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] thr;
  logic coef_we, in_valid, out_valid;
  logic [5:0] coef_addr;
  logic signed [1:0] coef_re, coef_im;
  cplx16_t in_data;
  logic signed [8:0] out_re, out_im;
  int checks = 0, failures = 0, full_hits = 0;
  always #5 clk = ~clk;

  qc_correlator dut (.*);

  int cr[64], ci[64];
  int qr[$], qi[$];

  function automatic int q(int v, int t);
    return (v > t) ? 1 : (v < -t) ? -1 : 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr = 16'd1000; coef_we = 0; coef_addr = '0; coef_re = '0; coef_im = '0;
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      cr[n] = $urandom_range(0, 1) ? 1 : -1;
      ci[n] = $urandom_range(0, 2) - 1;
      @(negedge clk);
      coef_we = 1; coef_addr = 6'(n); coef_re = 2'(cr[n]); coef_im = 2'(ci[n]);
    end
    @(negedge clk);
    coef_we = 0;
    for (int n = 0; n < 64; n++) begin qr.push_back(0); qi.push_back(0); end
    for (int i = 0; i < 1500; i++) begin
      int vr, vi, sr, si;
      if (i % 300 >= 200 && i % 300 < 264) begin
        // the reference itself at a large amplitude
        vr = cr[(i % 300) - 200] * 9000;
        vi = ci[(i % 300) - 200] * 9000;
      end else begin
        vr = $urandom_range(0, 6000) - 3000;
        vi = $urandom_range(0, 6000) - 3000;
      end
      @(negedge clk);
      in_valid = 1; in_data.re = 16'(vr); in_data.im = 16'(vi);
      qr.push_back(q(vr, 1000)); qi.push_back(q(vi, 1000));
      void'(qr.pop_front()); void'(qi.pop_front());
      sr = 0; si = 0;
      for (int n = 0; n < 64; n++) begin
        sr += qr[n] * cr[n] + qi[n] * ci[n];
        si += qi[n] * cr[n] - qr[n] * ci[n];
      end
      @(negedge clk);
      in_valid = 0;
      @(posedge clk);
      #1;
      checks += 3;
      if (!out_valid) failures++;   // two cycles after in_valid
      if (out_re !== 9'(sr)) failures++;
      if (out_im !== 9'(si)) failures++;
      if (i % 300 == 263) begin
        checks++;
        // |c|^2 summed over the reference
        begin
          int e;
          e = 0;
          for (int n = 0; n < 64; n++) e += cr[n] * cr[n] + ci[n] * ci[n];
          if (int'(out_re) != e || out_im != 0) failures++;
          else full_hits++;
        end
      end
    end
    checks++;
    if (full_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
