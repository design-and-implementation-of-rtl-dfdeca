// tb_fec_rx: encodes random blocks with a reference tail-biting encoder, punctures them,
// turns the bits into soft values (with noise and a few wrong hard decisions) and checks that
// the decoder returns the original bits. Covers rates 1/2, 2/3 and 3/4, a block longer than the
// traceback length and one shorter (decoded three times over). Also checks the decoding time.
module tb_fec_rx;
  import wimax_pkg::*;
  localparam int SW = 6;
  logic clk = 0, rst_n = 0;
  rate_t rate;
  logic in_valid, in_last, in_ready, out_valid, out_bit, out_last;
  logic signed [SW-1:0] in_soft;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fec_rx #(.MAX_BITS(288), .TB(48), .SW(SW)) dut (.*);

  bit exp_q[$];
  int t_start, t_end;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_bit !== exp_q.pop_front()) failures++;
    if (out_last) t_end = cyc;
  end

  task automatic run_block(rate_t r, int n, int nflip);
    bit b[];
    bit sr[6];
    int per;
    bit cq[$];
    b = new[n];
    foreach (b[i]) b[i] = 1'($urandom_range(0, 1));
    for (int i = 0; i < 6; i++) sr[i] = b[n - 1 - i];
    per = (r == RATE_1_2) ? 1 : (r == RATE_2_3) ? 2 : 3;
    for (int i = 0; i < n; i++) begin
      bit x, y;
      int ph;
      x = b[i] ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];
      y = b[i] ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      ph = i % per;
      if (!((r != RATE_1_2) && ph == 1)) cq.push_back(x);
      if (!((r == RATE_3_4) && ph == 2)) cq.push_back(y);
      for (int k = 5; k > 0; k--) sr[k] = sr[k-1];
      sr[0] = b[i];
      exp_q.push_back(b[i]);
    end
    for (int i = 0; i < cq.size(); i++) begin
      int v;
      v = cq[i] ? 20 : -20;
      v += $urandom_range(0, 16) - 8;
      // a few isolated wrong decisions, well apart
      if (nflip > 0 && i % 37 == 5 && i / 37 < nflip) v = -v / 2;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      rate = r; in_valid = 1; in_soft = SW'(v); in_last = (i == cq.size() - 1);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    t_start = cyc;
    while (exp_q.size() != 0) @(negedge clk);
    @(negedge clk);
    // add-compare-select, best-state search, traceback and output
    checks++;
    if (t_end - t_start > 2 * (n < 48 ? 3 * n : n + 96) + 64 + n + 8) failures++;
  endtask

  initial begin
    rate = RATE_1_2; in_valid = 0; in_soft = '0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(RATE_1_2, 96, 3);
    run_block(RATE_2_3, 144, 2);
    run_block(RATE_3_4, 288, 2);
    run_block(RATE_1_2, 24, 0);
    run_block(RATE_1_2, 48, 0);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
