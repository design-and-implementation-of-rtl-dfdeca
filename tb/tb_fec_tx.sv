// tb_fec_tx: checks the tail-biting encoder against a reference encoder written from the code
// definition (generators 171/133 octal, start state = last six bits of the block) and the
// puncturing patterns of rates 1/2, 2/3 and 3/4, for several block lengths. Also checks that
// a block of n bits is encoded within 6 + 2n cycles after it has been loaded.
module tb_fec_tx;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  rate_t rate;
  logic in_valid, in_bit, in_last, in_ready, out_valid, out_bit, out_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fec_tx dut (.*);

  bit exp_q[$];
  int cyc = 0;
  int got, last_seen, t_loaded, t_done;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_bit !== exp_q.pop_front()) begin failures++; end
    if (out_last) begin
      last_seen++;
      t_done = cyc;
      if (exp_q.size() != 0) failures++;
    end
  end

  task automatic run_block(rate_t r, int n);
    bit b[];
    bit sr[6];
    int per;
    b = new[n];
    foreach (b[i]) b[i] = 1'($urandom_range(0, 1));
    // reference: state holds the last six bits (sr[0] most recent)
    for (int i = 0; i < 6; i++) sr[i] = b[n - 1 - i];
    per = (r == RATE_1_2) ? 1 : (r == RATE_2_3) ? 2 : 3;
    for (int i = 0; i < n; i++) begin
      bit x, y, kx, ky;
      int ph;
      x = b[i] ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];
      y = b[i] ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      ph = i % per;
      kx = !((r != RATE_1_2) && ph == 1);
      ky = !((r == RATE_3_4) && ph == 2);
      if (kx) exp_q.push_back(x);
      if (ky) exp_q.push_back(y);
      for (int k = 5; k > 0; k--) sr[k] = sr[k-1];
      sr[0] = b[i];
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      rate = r; in_valid = 1; in_bit = b[i]; in_last = (i == n - 1);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    t_loaded = cyc;
    while (exp_q.size() != 0) @(negedge clk);
    @(negedge clk);
    checks++;
    if (t_done - t_loaded > 6 + 2 * n + 2) begin failures++; end
  endtask

  initial begin
    rate = RATE_1_2; in_valid = 0; in_bit = 0; in_last = 0; last_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(RATE_1_2, 48);
    run_block(RATE_2_3, 96);
    run_block(RATE_3_4, 144);
    run_block(RATE_1_2, 288);
    run_block(RATE_3_4, 36);
    repeat (5) @(posedge clk);
    checks++;
    if (last_seen != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
