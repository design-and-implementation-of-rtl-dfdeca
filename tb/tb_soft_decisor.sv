// tb_soft_decisor: sends noisy constellation points of all three modulations and checks that
// every point yields the right number of soft bits with the signs of the transmitted bits, and
// that the EVM registers equal the mean squared error and mean energy over each window of 64
// points, computed here from the transmitted points and the added noise.
module tb_soft_decisor;
  import wimax_pkg::*;
  localparam int SW = 6;
  logic clk = 0, rst_n = 0;
  mod_t modulation;
  logic in_valid, in_last, in_ready, out_valid, out_last, est_valid;
  cplx16_t in_point;
  logic signed [SW-1:0] out_soft;
  logic [31:0] mse, sig_pow;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  soft_decisor #(.SW(SW), .LOG_WIN(6)) dut (.*);

  bit exp_q[$];
  longint acc_e, acc_p;
  int npts;
  longint exp_mse_q[$], exp_pow_q[$];

  function automatic int level(mod_t m, int b0, int b1, int b2);
    int mag, a;
    if (m == MOD_QPSK) begin mag = 1; a = 11585; end
    else if (m == MOD_16QAM) begin mag = b1 ? 3 : 1; a = 5181; end
    else begin
      mag = (b1 == 0 && b2 == 0) ? 1 : (b1 == 0) ? 3 : (b2 == 1) ? 5 : 7;
      a = 2528;
    end
    return b0 ? -mag * a : mag * a;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else if ((out_soft > 0) !== exp_q.pop_front()) failures++;
    end
    if (est_valid) begin
      checks += 2;
      if (longint'(mse) != exp_mse_q.pop_front()) failures++;
      if (longint'(sig_pow) != exp_pow_q.pop_front()) failures++;
    end
  end

  initial begin
    modulation = MOD_QPSK; in_valid = 0; in_last = 0; in_point = '0;
    acc_e = 0; acc_p = 0; npts = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 3; mi++) begin
      mod_t m;
      int nb, amp;
      m = mod_t'(mi);
      nb = 2 * (mi + 1);
      amp = (mi == 0) ? 11585 : (mi == 1) ? 5181 : 2528;
      for (int s = 0; s < 128; s++) begin
        int b[6], ire, iim, nre, nim;
        foreach (b[k]) b[k] = $urandom_range(0, 1);
        case (m)
          MOD_QPSK:  begin ire = level(m, b[0], 0, 0); iim = level(m, b[1], 0, 0); end
          MOD_16QAM: begin ire = level(m, b[0], b[1], 0); iim = level(m, b[2], b[3], 0); end
          default:   begin ire = level(m, b[0], b[1], b[2]); iim = level(m, b[3], b[4], b[5]); end
        endcase
        // noise below half the distance between levels
        nre = $urandom_range(0, amp / 2) - amp / 4;
        nim = $urandom_range(0, amp / 2) - amp / 4;
        for (int k = 0; k < nb; k++) exp_q.push_back(b[k][0]);
        acc_e += longint'(nre) * nre + longint'(nim) * nim;
        acc_p += longint'(ire) * ire + longint'(iim) * iim;
        npts++;
        if (npts == 64) begin
          exp_mse_q.push_back(acc_e >> 6);
          exp_pow_q.push_back(acc_p >> 6);
          acc_e = 0; acc_p = 0; npts = 0;
        end
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        modulation = m; in_valid = 1;
        in_point.re = 16'(ire + nre); in_point.im = 16'(iim + nim);
        @(negedge clk);
        in_valid = 0;
        while (!in_ready) @(negedge clk);
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || exp_mse_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
