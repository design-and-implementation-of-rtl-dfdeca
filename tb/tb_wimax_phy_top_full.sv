// tb_wimax_phy_top_full: end-to-end test of the base station and mobile station datapaths, at full size:
// top-level defaults (N=1024, G=128) and the 5 ms frame of 25 downlink and 18 uplink symbols.
// The base-station DAC output is cabled to the mobile-station ADC and back (14-bit ADCs take
// the top bits of the 16-bit DAC words, plus a little noise). The testbench plays the parts
// outside the RTL: the control processor and DSP (bit generation, subcarrier mapping of the
// coded points, channel estimation from a known reference symbol, one-tap equalisation) and the
// FFT/IFFT cores (direct DFTs on 200 subcarriers around DC, inside the band the CIC filters pass).
// Downlink frame: preamble (every third subcarrier, boosted), reference symbol, coded data,
// filler. Uplink: reference symbol, coded data, filler, and a "ranging" symbol (the last one,
// or the 16th for longer subframes, the postfix pattern being 16 symbols long) sent with a
// cyclic postfix. The coding modes change from frame to frame (QPSK 1/2, 16-QAM 3/4,
// 64-QAM 2/3, 64-QAM 3/4). Checks: decoded downlink and uplink bits equal the transmitted ones; the postfix
// symbol arrives with the cyclic shift a postfix implies; frame detection once per frame at the
// frame start plus the link delay; the CFO estimate is near zero (no offset in this link).
// Mechanism counters (each must be non-zero at the end): MS frame detections, CFO estimates,
// BS frame starts, MS uplink windows, correct blocks for each coding mode (downlink or
// uplink), correct uplink blocks, postfix symbols verified, receive/transmit-gap energy measurements, CINR
// register updates.
module tb_wimax_phy_top_full;
  import wimax_pkg::*;
  localparam int N = 1024, G = 128, R = 8;
  localparam int KMAX = 100;              // used subcarriers: +-1 .. +-KMAX
  localparam int NU = 2 * KMAX;
  localparam int NDL = 25, NUL = 18;     // OFDM symbols per subframe
  localparam int RNG = (NUL - 1 < 15) ? NUL - 1 : 15;   // uplink symbol sent with a postfix
  localparam int TTG = 232, RTG = 232;
  localparam int NF = 3;                   // frames sent by the base station
  localparam longint THR = 100000000;
  localparam int S = N + G;
  localparam int DL = NDL * S, UL = NUL * S, FL = DL + TTG + UL + RTG;
  localparam real PI = 3.14159265358979;
  // coding modes: info bits per block and coded bits (ncbps)
  localparam int KB[4] = '{288, 288, 256, 288};
  localparam int CB[4] = '{576, 384, 384, 384};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT ports ----------------
  logic bs_run;
  frame_cfg_t bs_fcfg, ms_fcfg;
  codec_cfg_t bs_ccfg, ms_ccfg;
  logic bs_txb_valid, bs_txb_bit, bs_txb_last, bs_txb_ready, bs_txp_valid, bs_txp_last;
  cplx16_t bs_txp_point, bs_rxp_point, bs_ifft_data, bs_fft_data;
  logic bs_rxp_valid, bs_rxp_last, bs_rxp_ready, bs_rxb_valid, bs_rxb_bit, bs_rxb_last, bs_rxb_ready;
  logic [31:0] bs_cinr_mse, bs_cinr_sig;
  logic bs_ifft_valid, bs_ifft_ready, bs_fft_valid, bs_fft_sop, bs_fft_eop, bs_frame_start;
  logic [15:0] bs_frame_no;
  logic signed [15:0] bs_dac_out, ms_dac_out;
  logic signed [13:0] bs_adc_in, ms_adc_in;
  logic [50:0] ms_det_thr;
  logic [15:0] ms_qc_thr, ms_postfix_pat, ms_scale;
  logic ms_coef_we;
  logic [5:0] ms_coef_addr;
  logic signed [1:0] ms_coef_re, ms_coef_im;
  logic signed [15:0] ms_advance;
  logic [4:0] ms_pat_len;
  logic ms_txb_valid, ms_txb_bit, ms_txb_last, ms_txb_ready, ms_txp_valid, ms_txp_last;
  cplx16_t ms_txp_point, ms_rxp_point, ms_ifft_data, ms_fft_data;
  logic ms_rxp_valid, ms_rxp_last, ms_rxp_ready, ms_rxb_valid, ms_rxb_bit, ms_rxb_last, ms_rxb_ready;
  logic [31:0] ms_cinr_mse, ms_cinr_sig, ms_theta, ms_energy_post, ms_energy_rtg;
  logic ms_ifft_valid, ms_ifft_ready, ms_fft_valid, ms_fft_sop, ms_fft_eop;
  logic ms_detect, ms_cfo_done, ms_ul_active, ms_locked;
  logic signed [18:0] ms_eps_comb;

  wimax_phy_top dut (.*);   // default parameters: N=1024, G=128, R=8, HOLDOFF=49000

  // the cabled link: 16-bit DAC words to 14-bit ADC inputs, with a little noise
  always_ff @(posedge clk) begin
    ms_adc_in <= 14'((bs_dac_out >>> 2) + $signed(4'($urandom_range(0, 4))) - 2);
    bs_adc_in <= 14'((ms_dac_out >>> 2) + $signed(4'($urandom_range(0, 4))) - 2);
  end

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // mechanism counters
  int n_detect = 0, n_cfo = 0, n_bs_frames = 0, n_ul_win = 0, n_dl_ok[4] = '{0, 0, 0, 0};
  int n_ul_mode_ok[4] = '{0, 0, 0, 0};
  int n_ul_ok = 0, n_postfix = 0, n_rtg_energy = 0, n_cinr = 0, n_dl_dec = 0, n_ul_dec = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DSP helpers ----------------
  real cs[N], sn[N];
  int  ks[NU];
  real c_amp;
  real pre_re[NU], pre_im[NU], ref_re[NU], ref_im[NU], rng_re[NU], rng_im[NU];

  function automatic void qpsk(output real re, output real im);
    re = $urandom_range(0, 1) ? 11585.0 : -11585.0;
    im = $urandom_range(0, 1) ? 11585.0 : -11585.0;
  endfunction

  // time samples x[n] = c_amp * sum_i X_i exp(+j 2 pi k_i n / N)
  task automatic idft(input real xr[NU], input real xi[NU], output int tr[N], output int ti[N]);
    for (int n = 0; n < N; n++) begin
      real ar, ai;
      ar = 0; ai = 0;
      for (int i = 0; i < NU; i++) begin
        int m;
        m = ((ks[i] * n) % N + N) % N;
        ar += xr[i] * cs[m] - xi[i] * sn[m];
        ai += xr[i] * sn[m] + xi[i] * cs[m];
      end
      tr[n] = $rtoi(ar * c_amp);
      ti[n] = $rtoi(ai * c_amp);
    end
  endtask

  // Y_i = sum_n y[n] exp(-j 2 pi k_i n / N)
  task automatic dft(input cplx16_t y[N], output real yr[NU], output real yi[NU]);
    for (int i = 0; i < NU; i++) begin
      yr[i] = 0; yi[i] = 0;
      for (int n = 0; n < N; n++) begin
        int m;
        m = ((ks[i] * n) % N + N) % N;
        yr[i] += real'(y[n].re) * cs[m] + real'(y[n].im) * sn[m];
        yi[i] += real'(y[n].im) * cs[m] - real'(y[n].re) * sn[m];
      end
    end
  endtask

  function automatic codec_cfg_t mode_cfg(int m);
    codec_cfg_t c;
    c.rate       = (m == 0) ? RATE_1_2 : (m == 2) ? RATE_2_3 : RATE_3_4;
    c.modulation = (m == 0) ? MOD_QPSK : (m == 1) ? MOD_16QAM : MOD_64QAM;
    c.ncbps      = 10'(CB[m]);
    return c;
  endfunction

  function automatic int npoints(int m);
    return CB[m] / ((m == 0) ? 2 : (m == 1) ? 4 : 6);
  endfunction

  function automatic int sat(real v);
    return (v > 32767.0) ? 32767 : (v < -32768.0) ? -32768 : $rtoi(v);
  endfunction

  // ---------------- coprocessor access ----------------
  cplx16_t bs_txq[$], ms_txq[$];
  bit bs_txl[$], ms_txl[$];
  always @(posedge clk) if (rst_n) begin
    if (bs_txp_valid) begin bs_txq.push_back(bs_txp_point); bs_txl.push_back(bs_txp_last); end
    if (ms_txp_valid) begin ms_txq.push_back(ms_txp_point); ms_txl.push_back(ms_txp_last); end
  end

  // encode one block on a station (0 = BS, 1 = MS); returns the constellation points
  task automatic encode(input bit ms, input int m, input bit bits[$], output cplx16_t pts[$]);
    if (ms) ms_ccfg = mode_cfg(m); else bs_ccfg = mode_cfg(m);
    foreach (bits[i]) begin
      @(negedge clk);
      if (ms) begin ms_txb_valid = 1; ms_txb_bit = bits[i]; ms_txb_last = (i == bits.size() - 1); end
      else    begin bs_txb_valid = 1; bs_txb_bit = bits[i]; bs_txb_last = (i == bits.size() - 1); end
      while (!(ms ? ms_txb_ready : bs_txb_ready)) @(negedge clk);
    end
    @(negedge clk);
    bs_txb_valid = 0; ms_txb_valid = 0;
    pts.delete();
    forever begin
      cplx16_t p;
      bit l;
      if (ms) begin
        wait (ms_txq.size() > 0);
        p = ms_txq.pop_front(); l = ms_txl.pop_front();
      end else begin
        wait (bs_txq.size() > 0);
        p = bs_txq.pop_front(); l = bs_txl.pop_front();
      end
      pts.push_back(p);
      if (l) break;
    end
    chk(pts.size() == npoints(m), "points per block");
  endtask

  // decode one block of equalised points on a station; returns the bits
  task automatic decode(input bit ms, input int m, input cplx16_t pts[$], output bit bits[$]);
    if (ms) ms_ccfg = mode_cfg(m); else bs_ccfg = mode_cfg(m);
    foreach (pts[i]) begin
      @(negedge clk);
      if (ms) begin ms_rxp_valid = 1; ms_rxp_point = pts[i]; ms_rxp_last = (i == pts.size() - 1); end
      else    begin bs_rxp_valid = 1; bs_rxp_point = pts[i]; bs_rxp_last = (i == pts.size() - 1); end
      while (!(ms ? ms_rxp_ready : bs_rxp_ready)) @(negedge clk);
    end
    @(negedge clk);
    if (ms) ms_rxp_valid = 0; else bs_rxp_valid = 0;
    bits.delete();
    forever begin
      @(posedge clk);
      if (ms ? ms_rxb_valid : bs_rxb_valid) begin
        bits.push_back(ms ? ms_rxb_bit : bs_rxb_bit);
        if (ms ? ms_rxb_last : bs_rxb_last) break;
      end
    end
  endtask

  // ---------------- data ----------------
  bit      dl_bits[NF][$], ul_bits[NF + 2][$];
  cplx16_t dl_pts[NF][$], ul_pts[NF + 2][$];
  function automatic int dl_mode(int f); return f % 4; endfunction
  function automatic int ul_mode(int j); return (j + 1) % 4; endfunction

  // symbol s of a subframe: X values on the used subcarriers
  task automatic build_symbol(input bit ul, input int blk, input int s,
                              output real xr[NU], output real xi[NU]);
    cplx16_t pts[$];
    int nd;
    pts = ul ? ul_pts[blk] : dl_pts[blk];
    nd = (pts.size() + NU - 1) / NU;
    for (int i = 0; i < NU; i++) begin
      int p;
      if (!ul && s == 0) begin xr[i] = pre_re[i]; xi[i] = pre_im[i]; continue; end
      if (ul && s == RNG) begin xr[i] = rng_re[i]; xi[i] = rng_im[i]; continue; end
      if ((!ul && s == 1) || (ul && s == 0)) begin xr[i] = ref_re[i]; xi[i] = ref_im[i]; continue; end
      p = (s - (ul ? 1 : 2)) * NU + i;
      if (s - (ul ? 1 : 2) < nd && p < pts.size()) begin
        xr[i] = real'(pts[p].re); xi[i] = real'(pts[p].im);
      end else begin
        qpsk(xr[i], xi[i]);
      end
    end
  endtask

  // ---------------- transmit feeders ----------------
  task automatic feed(input bit ul, input int nblk);
    for (int b = 0; b < nblk; b++)
      for (int s = 0; s < (ul ? NUL : NDL); s++) begin
        real xr[NU], xi[NU];
        int tr[N], ti[N];
        build_symbol(ul, b, s, xr, xi);
        idft(xr, xi, tr, ti);
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          if (ul) begin ms_ifft_valid = 1; ms_ifft_data.re = 16'(tr[n]); ms_ifft_data.im = 16'(ti[n]); end
          else    begin bs_ifft_valid = 1; bs_ifft_data.re = 16'(tr[n]); bs_ifft_data.im = 16'(ti[n]); end
          while (!(ul ? ms_ifft_ready : bs_ifft_ready)) @(negedge clk);
        end
      end
    @(negedge clk);
    if (ul) ms_ifft_valid = 0; else bs_ifft_valid = 0;
  endtask

  // ---------------- receive capture ----------------
  longint cyc = 0, c_run = -1;
  function automatic int frame_of(longint c);
    return int'((c - c_run) / (longint'(FL) * R));
  endfunction

  typedef struct { int frame; int sym; cplx16_t d[N]; } rxsym_t;
  rxsym_t ms_rxq[$], bs_rxq[$];
  cplx16_t ms_cur[N], bs_cur[N];
  int ms_n = 0, bs_n = 0, ms_want = 0, ms_frame = 0, ms_take = 0, bs_last_frame = -1, bs_sym = 0;
  bit ms_ok = 0;
  int ul_frame_blk[NF + 4];
  int ul_blocks = 0;
  bit ul_prev = 0;
  int det_frames[$];
  logic [31:0] rtg_prev = 0, cinr_prev = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && c_run >= 0) begin
      if (bs_frame_start) n_bs_frames++;
      if (ms_detect) begin
        n_detect++;
        ms_frame = frame_of(cyc);
        det_frames.push_back(ms_frame);
        ms_want = NDL - 1;
        ms_take = 1;
        // detection lies a few samples (the link delay) after the last preamble sample
        chk((cyc - c_run) / R - longint'(ms_frame) * FL >= S - 1 &&
            (cyc - c_run) / R - longint'(ms_frame) * FL <= S + 12, "detection time");
      end
      if (ms_cfo_done) begin
        n_cfo++;
        chk(ms_eps_comb > -19'sd1311 && ms_eps_comb < 19'sd1311, "CFO estimate near zero");
      end
      if (ms_energy_rtg != rtg_prev) n_rtg_energy++;
      rtg_prev = ms_energy_rtg;
      if (ms_cinr_mse != cinr_prev) n_cinr++;
      cinr_prev = ms_cinr_mse;
      if (ms_ul_active && !ul_prev) begin
        n_ul_win++;
        if (frame_of(cyc) < NF + 4) ul_frame_blk[frame_of(cyc)] = ul_blocks;
        ul_blocks++;
      end
      ul_prev = ms_ul_active;
      // MS: symbols after each detection
      if (ms_fft_valid) begin
        if (ms_fft_sop) begin ms_n = 0; ms_ok = ms_want > 0; end
        ms_cur[ms_n] = ms_fft_data;
        ms_n++;
        if (ms_fft_eop) begin
          if (ms_ok && ms_n == N) begin
            rxsym_t r;
            r.frame = ms_frame; r.sym = ms_take; r.d = ms_cur;
            ms_rxq.push_back(r);
            ms_take++;
            ms_want--;
          end
          ms_ok = 0;
        end
      end
      // BS: uplink symbols, numbered within each frame
      if (bs_fft_valid) begin
        if (bs_fft_sop) begin
          bs_n = 0;
          if (frame_of(cyc) != bs_last_frame) begin bs_last_frame = frame_of(cyc); bs_sym = 0; end
        end
        bs_cur[bs_n] = bs_fft_data;
        bs_n++;
        if (bs_fft_eop && bs_n == N) begin
          rxsym_t r;
          r.frame = bs_last_frame; r.sym = bs_sym; r.d = bs_cur;
          bs_rxq.push_back(r);
          bs_sym++;
        end
      end
    end
  end

  // equalise a set of received symbols against the reference symbol
  task automatic equalise(input real hr[NU], input real hi[NU], input real yr[NU], input real yi[NU],
                          output real er[NU], output real ei[NU]);
    for (int i = 0; i < NU; i++) begin
      real d;
      d = hr[i] * hr[i] + hi[i] * hi[i];
      er[i] = (yr[i] * hr[i] + yi[i] * hi[i]) / d;
      ei[i] = (yi[i] * hr[i] - yr[i] * hi[i]) / d;
    end
  endtask

  task automatic channel(input rxsym_t r, output real hr[NU], output real hi[NU]);
    real yr[NU], yi[NU];
    dft(r.d, yr, yi);
    for (int i = 0; i < NU; i++) begin
      real d;
      d = ref_re[i] * ref_re[i] + ref_im[i] * ref_im[i];
      hr[i] = (yr[i] * ref_re[i] + yi[i] * ref_im[i]) / d;
      hi[i] = (yi[i] * ref_re[i] - yr[i] * ref_im[i]) / d;
    end
  endtask

  // ---------------- MS downlink receiver (DSP role) ----------------
  task automatic ms_receiver();
    forever begin
      rxsym_t syms[$];
      real hr[NU], hi[NU];
      cplx16_t pts[$];
      bit got[$];
      int f, m, nd;
      wait (ms_rxq.size() >= NDL - 1);
      for (int k = 0; k < NDL - 1; k++) syms.push_back(ms_rxq.pop_front());
      f = syms[0].frame;
      if (f >= NF) continue;
      m = dl_mode(f);
      channel(syms[0], hr, hi);
      nd = (npoints(m) + NU - 1) / NU;
      for (int s = 0; s < nd; s++) begin
        real yr[NU], yi[NU], er[NU], ei[NU];
        dft(syms[1 + s].d, yr, yi);
        equalise(hr, hi, yr, yi, er, ei);
        for (int i = 0; i < NU && pts.size() < npoints(m); i++) begin
          cplx16_t p;
          p.re = 16'(sat(er[i])); p.im = 16'(sat(ei[i]));
          pts.push_back(p);
        end
      end
      decode(1, m, pts, got);
      n_dl_dec++;
      chk(got == dl_bits[f], $sformatf("downlink block of frame %0d (mode %0d)", f, m));
      if (got == dl_bits[f]) n_dl_ok[m]++;
    end
  endtask

  // ---------------- BS uplink receiver (DSP role) ----------------
  task automatic bs_receiver();
    forever begin
      rxsym_t syms[$];
      real hr[NU], hi[NU], yr[NU], yi[NU], er[NU], ei[NU];
      real cr, ci, pe, px, c0r, c0i;
      cplx16_t pts[$];
      bit got[$];
      int f, j, m, nd;
      wait (bs_rxq.size() >= NUL);
      for (int k = 0; k < NUL; k++) syms.push_back(bs_rxq.pop_front());
      f = syms[0].frame;
      if (syms[NUL - 1].frame != f || syms[0].sym != 0) begin
        $display("uplink symbols out of step in frame %0d", f);
        failures++;
        continue;
      end
      if (f >= NF + 4 || ul_frame_blk[f] < 0) continue;   // no uplink burst in this frame
      j = ul_frame_blk[f];
      m = ul_mode(j);
      channel(syms[0], hr, hi);
      nd = (npoints(m) + NU - 1) / NU;
      for (int s = 0; s < nd; s++) begin
        dft(syms[1 + s].d, yr, yi);
        equalise(hr, hi, yr, yi, er, ei);
        for (int i = 0; i < NU && pts.size() < npoints(m); i++) begin
          cplx16_t p;
          p.re = 16'(sat(er[i])); p.im = 16'(sat(ei[i]));
          pts.push_back(p);
        end
      end
      // ranging symbol with postfix: expect X * exp(+j 2 pi k G / N) after equalisation
      dft(syms[RNG].d, yr, yi);
      equalise(hr, hi, yr, yi, er, ei);
      cr = 0; ci = 0; pe = 0; px = 0; c0r = 0; c0i = 0;
      for (int i = 0; i < NU; i++) begin
        real a, xr, xi;
        a = 2.0 * PI * ks[i] * G / N;
        xr = rng_re[i] * $cos(a) - rng_im[i] * $sin(a);
        xi = rng_re[i] * $sin(a) + rng_im[i] * $cos(a);
        cr += er[i] * xr + ei[i] * xi;
        ci += ei[i] * xr - er[i] * xi;
        c0r += er[i] * rng_re[i] + ei[i] * rng_im[i];
        c0i += ei[i] * rng_re[i] - er[i] * rng_im[i];
        pe += er[i] * er[i] + ei[i] * ei[i];
        px += xr * xr + xi * xi;
      end
      begin
        real rho, rho0;
        rho  = $sqrt(cr * cr + ci * ci) / $sqrt(pe * px);
        rho0 = $sqrt(c0r * c0r + c0i * c0i) / $sqrt(pe * px);
        chk(rho > 0.95 && rho0 < 0.7, $sformatf("postfix symbol frame %0d (rho %f, unshifted %f)", f, rho, rho0));
        if (rho > 0.95 && rho0 < 0.7) n_postfix++;
      end
      decode(0, m, pts, got);
      n_ul_dec++;
      chk(got == ul_bits[j], $sformatf("uplink block %0d in frame %0d (mode %0d)", j, f, m));
      if (got == ul_bits[j]) begin n_ul_ok++; n_ul_mode_ok[m]++; end
    end
  endtask

  // ---------------- main sequence ----------------
  initial begin
    frame_cfg_t fc;
    real tre[N], tim[N];
    int pr[N], pi_[N];
    fc.dl_len = 20'(DL); fc.ttg_len = 20'(TTG); fc.ul_len = 20'(UL); fc.rtg_len = 20'(RTG);
    bs_fcfg = fc; ms_fcfg = fc;
    bs_ccfg = mode_cfg(0); ms_ccfg = mode_cfg(0);
    bs_run = 0;
    {bs_txb_valid, bs_txb_bit, bs_txb_last, bs_rxp_valid, bs_rxp_last} = '0;
    {ms_txb_valid, ms_txb_bit, ms_txb_last, ms_rxp_valid, ms_rxp_last} = '0;
    bs_rxp_point = '0; ms_rxp_point = '0; bs_rxb_ready = 1; ms_rxb_ready = 1;
    bs_ifft_valid = 0; bs_ifft_data = '0; ms_ifft_valid = 0; ms_ifft_data = '0;
    ms_det_thr = 51'(THR); ms_qc_thr = 16'd0; ms_coef_we = 0; ms_coef_addr = '0;
    ms_coef_re = '0; ms_coef_im = '0; ms_advance = 16'sd0;
    ms_postfix_pat = 16'(1 << RNG); ms_pat_len = 5'((NUL < 16) ? NUL : 16);
    for (int f = 0; f < NF + 4; f++) ul_frame_blk[f] = -1;
    for (int n = 0; n < N; n++) begin
      cs[n] = $cos(2.0 * PI * n / N);
      sn[n] = $sin(2.0 * PI * n / N);
    end
    for (int i = 0; i < NU; i++) ks[i] = (i < KMAX) ? i - KMAX : i - KMAX + 1;
    c_amp = 3000.0 / (16384.0 * $sqrt(real'(NU)));
    for (int i = 0; i < NU; i++) begin
      qpsk(ref_re[i], ref_im[i]);
      qpsk(rng_re[i], rng_im[i]);
      pre_re[i] = 0; pre_im[i] = 0;
      if (ks[i] % 3 == 0) pre_re[i] = $urandom_range(0, 1) ? 2.0 * 16384.0 : -2.0 * 16384.0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // quantised reference of the last 64 preamble samples for the cross-correlator
    idft(pre_re, pre_im, pr, pi_);
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      ms_coef_we = 1; ms_coef_addr = 6'(n);
      ms_coef_re = (pr[N - 64 + n] >= 0) ? 2'sd1 : -2'sd1;
      ms_coef_im = (pi_[N - 64 + n] >= 0) ? 2'sd1 : -2'sd1;
    end
    @(negedge clk) ms_coef_we = 0;

    // the control processors encode the bursts
    for (int f = 0; f < NF; f++) begin
      for (int b = 0; b < KB[dl_mode(f)]; b++) dl_bits[f].push_back(1'($urandom));
      encode(0, dl_mode(f), dl_bits[f], dl_pts[f]);
    end
    for (int j = 0; j < NF + 2; j++) begin
      for (int b = 0; b < KB[ul_mode(j)]; b++) ul_bits[j].push_back(1'($urandom));
      encode(1, ul_mode(j), ul_bits[j], ul_pts[j]);
    end
    $display("encoded %0d downlink and %0d uplink blocks", NF, NF + 2);

    fork
      feed(0, NF);
      feed(1, NF + 2);
      ms_receiver();
      bs_receiver();
    join_none
    repeat (4 * N) @(negedge clk);      // let the IFFT side fill the prefix inserter
    bs_run = 1;
    c_run = cyc + 1;
    repeat (R * FL * NF + R * DL) @(negedge clk);
    repeat (R * 4 * S) @(negedge clk);  // last uplink burst and decoding

    $display("detections=%0d cfo=%0d bs_frames=%0d ul_windows=%0d dl_ok=%0d/%0d/%0d/%0d (decoded %0d) ul_ok=%0d/%0d/%0d/%0d (decoded %0d) postfix=%0d rtg_energy=%0d cinr=%0d",
             n_detect, n_cfo, n_bs_frames, n_ul_win, n_dl_ok[0], n_dl_ok[1], n_dl_ok[2], n_dl_ok[3], n_dl_dec,
             n_ul_mode_ok[0], n_ul_mode_ok[1], n_ul_mode_ok[2], n_ul_mode_ok[3], n_ul_dec, n_postfix, n_rtg_energy, n_cinr);
    $display("ms energy after preamble %0d, in gap %0d; cinr mse %0d sig %0d", ms_energy_post,
             ms_energy_rtg, ms_cinr_mse, ms_cinr_sig);
    chk(n_detect >= 2, "frame detections");
    chk(n_cfo >= 1, "CFO estimates");
    chk(n_bs_frames >= 1, "BS frame starts");
    chk(n_ul_win >= 1, "MS uplink windows");
    chk(n_dl_ok[0] >= 1, "downlink QPSK 1/2 block");
    chk(n_dl_ok[1] + n_ul_mode_ok[1] >= 1, "16-QAM 3/4 block");
    chk(n_dl_ok[2] + n_ul_mode_ok[2] >= 1, "64-QAM 2/3 block");
    chk(n_dl_ok[3] + n_ul_mode_ok[3] >= 1, "64-QAM 3/4 block");
    chk(n_dl_dec >= 2, "downlink blocks decoded");
    chk(n_ul_ok >= 1 && n_ul_dec >= 1, "uplink blocks");
    chk(n_postfix >= 1, "postfix ranging symbols");
    chk(n_rtg_energy >= 1, "gap energy measurements");
    chk(n_cinr >= 1, "CINR register updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
