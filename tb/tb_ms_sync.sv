// tb_ms_sync: end-to-end test of the mobile-station synchronisation chain at a reduced size
// (N=64, G=8, one sample every 8 clocks as from the DDC). The testbench builds OFDM frames with
// its own DFT: a preamble using every third subcarrier (boosted), five data symbols on all
// used subcarriers and a silent gap, adds noise, a carrier frequency offset of EPS subcarrier
// spacings and an arbitrary gain. The quantised reference of the last 64 preamble samples is
// loaded into the cross-correlator. Checks per frame: one detection, at the last preamble
// sample (theta = frame start); combined CFO estimate within 0.05 subcarrier of -EPS (the
// estimator's sign convention); out_sof on the first prefix sample after the preamble; after
// CFO correction the prefix of a data symbol matches its copy N samples later in phase (within
// the phase left by a 0.05 subcarrier error); normalised output power near the target; the two
// energy registers agree with the energies computed here.
module tb_ms_sync;
  import wimax_pkg::*;
  localparam int N = 64, G = 8, NS = 5, GAP = 200, LEAD = 150;
  localparam int FRAME = (NS + 1) * (N + G) + GAP;
  localparam int NF = 3;
  localparam real PI = 3.14159265358979;
  localparam real EPS = 0.3;
  localparam real GAIN = 0.37;
  localparam real NOISE = 60.0;

  logic clk = 0, rst_n = 0;
  logic [50:0] det_thr;
  logic [15:0] qc_thr, scale;
  logic coef_we, in_valid, out_valid, out_sof, detect, cfo_done, rtg_start;
  logic [5:0] coef_addr;
  logic signed [1:0] coef_re, coef_im;
  cplx16_t in_data, out_data;
  logic [31:0] theta, energy_post, energy_rtg;
  logic signed [18:0] eps_comb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ms_sync #(.N(N), .G(G), .HOLDOFF(FRAME - 100), .PLOG(6), .ELOG(6), .RLOG(4)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("fail: %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- signal generation ----------------
  localparam int TOTAL = LEAD + NF * FRAME;
  real sre[TOTAL], sim_[TOTAL];       // clean signal (with CFO and gain)
  int  xre[TOTAL], xim[TOTAL];        // quantised received samples
  real pre_re[N], pre_im[N];

  task automatic ofdm(input bit preamble, output real tre[N], output real tim[N]);
    real fre[N], fim[N];
    for (int k = 0; k < N; k++) begin fre[k] = 0; fim[k] = 0; end
    for (int m = -26; m <= 26; m++) begin
      int k;
      k = (m + N) % N;
      if (m == 0) continue;
      if (preamble) begin
        if (m % 3 != 0) continue;
        fre[k] = $urandom_range(0, 1) ? 1.41 : -1.41;
        fim[k] = 0;
      end else begin
        fre[k] = $urandom_range(0, 1) ? 0.707 : -0.707;
        fim[k] = $urandom_range(0, 1) ? 0.707 : -0.707;
      end
    end
    for (int n = 0; n < N; n++) begin
      tre[n] = 0; tim[n] = 0;
      for (int k = 0; k < N; k++) begin
        real a;
        a = 2.0 * PI * k * n / N;
        tre[n] += fre[k] * $cos(a) - fim[k] * $sin(a);
        tim[n] += fre[k] * $sin(a) + fim[k] * $cos(a);
      end
      tre[n] *= 20000.0 / 8.0; tim[n] *= 20000.0 / 8.0;
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic build();
    real tre[N], tim[N];
    for (int i = 0; i < TOTAL; i++) begin sre[i] = 0; sim_[i] = 0; end
    ofdm(1, pre_re, pre_im);
    for (int f = 0; f < NF; f++)
      for (int s = 0; s <= NS; s++) begin
        int base;
        base = LEAD + f * FRAME + s * (N + G);
        if (s == 0) begin tre = pre_re; tim = pre_im; end
        else ofdm(0, tre, tim);
        for (int n = 0; n < N + G; n++) begin
          int src;
          src = (n < G) ? n + N - G : n - G;
          sre[base + n] = tre[src];
          sim_[base + n] = tim[src];
        end
      end
    for (int i = 0; i < TOTAL; i++) begin
      real a, r, q;
      a = 2.0 * PI * EPS * i / N;
      r = GAIN * (sre[i] * $cos(a) - sim_[i] * $sin(a)) + NOISE * gauss();
      q = GAIN * (sre[i] * $sin(a) + sim_[i] * $cos(a)) + NOISE * gauss();
      xre[i] = $rtoi(r); xim[i] = $rtoi(q);
    end
  endtask

  // ---------------- output monitoring ----------------
  int in_idx = 0, out_idx = 0, ndet = 0, nsof = 0, ncfo = 0;
  int sof_at[$], det_at[$];
  cplx16_t outs[TOTAL];
  always @(posedge clk) if (rst_n) begin
    if (detect) begin
      ndet++;
      det_at.push_back(int'(theta));
    end
    if (cfo_done) ncfo++;
    if (out_valid) begin
      outs[out_idx] = out_data;
      if (out_sof) begin nsof++; sof_at.push_back(out_idx); end
      out_idx++;
    end
  end

  initial begin
    real e_sig, e_noise;
    build();
    det_thr = 51'd100000000;
    qc_thr = 16'd0; coef_we = 0; coef_addr = 0; coef_re = 0; coef_im = 0;
    in_valid = 0; in_data = '0; rtg_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // load the quantised reference (sign of each component of the undistorted preamble)
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 6'(n);
      coef_re = (pre_re[n] >= 0) ? 2'sd1 : -2'sd1;
      coef_im = (pre_im[n] >= 0) ? 2'sd1 : -2'sd1;
    end
    @(negedge clk) coef_we = 0;
    for (int i = 0; i < TOTAL; i++) begin
      @(negedge clk);
      in_valid = 1; in_data.re = 16'(xre[i]); in_data.im = 16'(xim[i]);
      rtg_start = ((i - LEAD) % FRAME == (NS + 1) * (N + G) + 20) && i > LEAD + FRAME;
      @(negedge clk);
      in_valid = 0; rtg_start = 0;
      repeat (6) @(negedge clk);
    end
    repeat (200) @(negedge clk);

    $display("detections=%0d sof=%0d cfo=%0d eps_comb=%0d (exp %0d) scale=%0d",
             ndet, nsof, ncfo, eps_comb, $rtoi(-EPS * 65536), scale);
    chk(ndet == NF && nsof == NF && ncfo == NF, "one detection per frame");
    for (int f = 0; f < NF && f < det_at.size() && f < sof_at.size(); f++) begin
      int fs;
      real pr, pi_, ang, pw;
      fs = LEAD + f * FRAME;
      chk(det_at[f] == fs, $sformatf("frame %0d start %0d vs %0d", f, det_at[f], fs));
      chk(sof_at[f] == fs + N + G, $sformatf("frame %0d sof %0d", f, sof_at[f]));
      // CP of the second data symbol vs its copy: residual phase after correction (the first
      // samples after the preamble pass before the new estimate is loaded)
      pr = 0; pi_ = 0; pw = 0;
      for (int n = 0; n < G; n++) begin
        cplx16_t a, b;
        a = outs[fs + 2 * (N + G) + n];
        b = outs[fs + 2 * (N + G) + n + N];
        pr  += real'(b.re) * a.re + real'(b.im) * a.im;
        pi_ += real'(b.im) * a.re - real'(b.re) * a.im;
      end
      for (int n = 0; n < N + G; n++) begin
        cplx16_t a;
        a = outs[fs + N + G + n];
        pw += real'(a.re) * a.re + real'(a.im) * a.im;
      end
      pw /= (N + G);
      ang = $atan2(pi_, pr);
      $display("frame %0d: residual CP phase %f rad (uncorrected %f), power %e", f, ang,
               2 * PI * EPS, pw);
      chk(ang < 0.35 && ang > -0.35, "CFO corrected");   // 0.05 subcarrier -> 0.31 rad
      chk(pw > 0.25 * 67108864.0 && pw < 2.0 * 67108864.0, "normalised power");
    end
    // the estimator reports the offset as the correction sign (a signal turning by
    // exp(+j*2*pi*EPS*n/N) gives eps = -EPS)
    chk(eps_comb > 19'($rtoi((-EPS - 0.05) * 65536)) && eps_comb < 19'($rtoi((-EPS + 0.05) * 65536)),
        "CFO estimate");
    // energies: after the preamble (64 samples) and in the gap (16 samples, noise only)
    e_sig = 0; e_noise = 0;
    for (int n = 0; n < 64; n++) begin
      int i;
      i = LEAD + (NF - 1) * FRAME + N + G + n;
      e_sig += real'(xre[i]) ** 2 + real'(xim[i]) ** 2;
    end
    e_sig /= 64;
    $display("energy_post %0d (data ~%e) energy_rtg %0d (noise %e)", energy_post, e_sig,
             energy_rtg, 2 * NOISE * NOISE);
    chk(real'(energy_post) > 0.8 * e_sig && real'(energy_post) < 1.25 * e_sig, "signal energy");
    chk(real'(energy_rtg) > 0.4 * 2 * NOISE * NOISE && real'(energy_rtg) < 2.0 * 2 * NOISE * NOISE,
        "noise energy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
