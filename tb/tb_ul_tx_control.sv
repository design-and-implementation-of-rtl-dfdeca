// tb_ul_tx_control: drives the mobile-station uplink scheduler with small window lengths
// (DL 40, TTG 5, UL 30, RTG 7 samples, N=16, G=4), a sample request every 3 clocks and frame
// detections at chosen points, including a later detection that moves the frame grid and a
// non-zero timing advance. A reference frame-position counter checks: nothing is sent before the
// first detection, ul_active/in_ready exactly in the (advanced) uplink window, tx_data equal to
// the accepted sample inside it and zero outside, and single-cycle ul_start/rtg_start pulses.
module tb_ul_tx_control;
  import wimax_pkg::*;
  localparam int N = 16, G = 4;
  localparam int DL = 40, TTG = 5, UL = 30, RTG = 7, FL = DL + TTG + UL + RTG;
  logic clk = 0, rst_n = 0;
  logic sample_en, detect, in_valid, in_ready, ul_active, ul_start, rtg_active, rtg_start, locked;
  logic [19:0] dl_len, ttg_len, ul_len, rtg_len;
  logic signed [15:0] advance;
  cplx16_t in_data, tx_data;
  int checks = 0, failures = 0;
  int mpos = 0, nul = 0, nrtg = 0, nsent = 0;
  bit mlock = 0;
  always #5 clk = ~clk;

  ul_tx_control #(.N(N), .G(G)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("fail %s at pos %0d t=%0t", what, mpos, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_ul(int p);
    return p >= DL + TTG - advance && p < DL + TTG - advance + UL;
  endfunction

  logic [15:0] exp_tx = 0;
  bit exp_uls = 0, exp_rtgs = 0;
  always @(posedge clk) if (rst_n) begin
    chk(locked === mlock, "locked");
    chk(ul_active === (mlock && in_ul(mpos)), "ul_active");
    chk(rtg_active === (mlock && mpos >= DL + TTG + UL), "rtg_active");
    chk(in_ready === (sample_en && mlock && in_ul(mpos)), "in_ready");
    chk(ul_start === exp_uls, "ul_start");
    chk(rtg_start === exp_rtgs, "rtg_start");
    if (ul_start) nul++;
    if (rtg_start) nrtg++;
    exp_uls = 0; exp_rtgs = 0;
    if (sample_en) begin
      exp_tx = (mlock && in_ul(mpos) && in_valid) ? in_data.re : 16'd0;
      if (exp_tx != 0) nsent++;
    end
    if (detect) begin
      mpos = N + G - 1; mlock = 1;
    end else if (sample_en) begin
      mpos = (mpos == FL - 1) ? 0 : mpos + 1;
      exp_uls  = mlock && mpos == DL + TTG - advance;
      exp_rtgs = mlock && mpos == DL + TTG + UL;
    end
    #1;
    chk(tx_data.re === exp_tx, "tx_data");
  end

  initial begin
    dl_len = DL; ttg_len = TTG; ul_len = UL; rtg_len = RTG; advance = 0;
    sample_en = 0; detect = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3 * FL * 10; i++) begin
      @(negedge clk);
      sample_en = (i % 3 == 0);
      detect = (i == 3 * 50 + 1) || (i == 3 * FL * 4 + 3 * 17 + 2);
      if (i == 3 * FL * 6) advance = 3;
      in_valid = ($urandom_range(0, 7) != 0);
      in_data.re = 16'($urandom_range(1, 65535)); in_data.im = 16'($urandom);
    end
    chk(nul >= 8 && nrtg >= 8 && nsent > 8 * UL * 3 / 4, "window counts");
    $display("ul windows=%0d rtg=%0d sent=%0d", nul, nrtg, nsent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
