// tb_frame_control: runs the base-station frame timer with small window lengths
// (DL 40, TTG 5, UL 30, RTG 7 samples) and a sample request every 4 clocks. A reference
// position counter in the testbench checks, sample by sample: dl_active and tx_ready only in the
// downlink window, tx_data equal to the accepted sample there and zero elsewhere, frame_start
// once per frame with frame_no counting, and on the receive side rx_valid only in the uplink
// window with rx_sof on its first sample. `run` is dropped for a while to check that time stops.
module tb_frame_control;
  import wimax_pkg::*;
  localparam int DL = 40, TTG = 5, UL = 30, RTG = 7, FL = DL + TTG + UL + RTG;
  logic clk = 0, rst_n = 0;
  logic run, sample_en, tx_valid, tx_ready, frame_start, dl_active, rx_in_valid, rx_valid, rx_sof;
  logic [19:0] dl_len, ttg_len, ul_len, rtg_len;
  logic [15:0] frame_no;
  cplx16_t tx_in, tx_data, rx_in, rx_data;
  int checks = 0, failures = 0;
  int mpos = 0, nfs = 0, nsof = 0, nrx = 0;
  always #5 clk = ~clk;

  frame_control dut (.*);

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

  int cyc = 0;
  logic [15:0] exp_tx;
  bit exp_fs, exp_rx, exp_sof, prev_ul;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // outputs registered at the previous edge
    chk(frame_start === exp_fs, "frame_start");
    chk(rx_valid === exp_rx, "rx_valid");
    chk(rx_sof === exp_sof, "rx_sof");
    if (rx_valid) chk(rx_data === rx_in_q, "rx_data");
    if (frame_start) nfs++;
    if (rx_sof) nsof++;
    if (rx_valid) nrx++;
    chk(dl_active === (run && mpos < DL), "dl_active");
    chk(tx_ready === (run && sample_en && mpos < DL), "tx_ready");
    exp_fs = 0;
    if (run && sample_en) begin
      exp_tx = (mpos < DL && tx_valid) ? tx_in.re : 16'd0;
      if (mpos == FL - 1) begin mpos = 0; exp_fs = 1; end else mpos++;
    end
    exp_rx  = rx_in_valid && run && old_in_ul();
    exp_sof = exp_rx && !prev_ul;
    if (exp_rx) prev_ul = 1;
    if (!(run && old_in_ul())) prev_ul = 0;
    rx_in_q = rx_in;
    #1;
    chk(tx_data.re === exp_tx, "tx_data");
  end
  cplx16_t rx_in_q;
  int pos_before;
  function automatic bit old_in_ul();
    return pos_before >= DL + TTG && pos_before < DL + TTG + UL;
  endfunction
  always @(negedge clk) pos_before = mpos;

  initial begin
    dl_len = DL; ttg_len = TTG; ul_len = UL; rtg_len = RTG;
    run = 0; sample_en = 0; tx_valid = 0; tx_in = '0; rx_in_valid = 0; rx_in = '0;
    exp_tx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4 * FL * 12; i++) begin
      @(negedge clk);
      run = !(i >= 4 * FL * 5 && i < 4 * FL * 5 + 333);
      sample_en = (i % 4 == 0);
      rx_in_valid = sample_en;
      rx_in.re = 16'(i); rx_in.im = 16'(~i);
      if (sample_en) begin
        tx_valid = ($urandom_range(0, 5) != 0);
        tx_in.re = 16'($urandom); tx_in.im = 16'($urandom);
      end
    end
    chk(nfs >= 10 && frame_no == 16'(nfs), "frame count");
    chk(nsof == nfs || nsof == nfs + 1, "sof count");
    chk(nrx >= 10 * UL, "rx count");
    $display("frames=%0d sof=%0d rx=%0d", nfs, nsof, nrx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
