// tb_bit_interleaver: an interleaver followed by a deinterleaver. The interleaver output is
// compared with the two-step permutation computed here for each block size and modulation, and
// the deinterleaver output with the original data. Also checks that a block is read out in
// ncbps cycles.
module tb_bit_interleaver;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  mod_t modulation;
  logic [9:0] ncbps;
  logic in_valid, in_last, in_ready, i_valid, i_last, i_ready, o_valid, o_last;
  logic [3:0] in_data, i_data, o_data;
  int checks = 0, failures = 0, cyc = 0, first_i, last_i;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  bit_interleaver #(.W(4), .MAX_NCBPS(576), .INVERSE(1'b0)) u_il (
    .clk, .rst_n, .modulation, .ncbps, .in_valid, .in_data, .in_last, .in_ready,
    .out_valid(i_valid), .out_data(i_data), .out_last(i_last));
  bit_interleaver #(.W(4), .MAX_NCBPS(576), .INVERSE(1'b1)) u_dil (
    .clk, .rst_n, .modulation, .ncbps, .in_valid(i_valid), .in_data(i_data), .in_last(i_last),
    .in_ready(i_ready), .out_valid(o_valid), .out_data(o_data), .out_last(o_last));

  logic [3:0] il_exp[$], orig_q[$];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (i_valid) begin
      checks++;
      if (il_exp.size() == 0 || i_data !== il_exp.pop_front()) failures++;
    end
    if (o_valid) begin
      checks++;
      if (orig_q.size() == 0 || o_data !== orig_q.pop_front()) failures++;
    end
  end

  task automatic run_block(mod_t m, int n);
    logic [3:0] d[], p[];
    int s;
    d = new[n];
    p = new[n];
    s = (m == MOD_64QAM) ? 3 : (m == MOD_16QAM) ? 2 : 1;
    foreach (d[k]) d[k] = 4'($urandom);
    for (int k = 0; k < n; k++) begin
      int mk, jk;
      mk = (n / 16) * (k % 16) + k / 16;
      jk = s * (mk / s) + (mk + n - (16 * mk) / n) % s;
      p[jk] = d[k];
    end
    foreach (p[k]) il_exp.push_back(p[k]);
    foreach (d[k]) orig_q.push_back(d[k]);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      modulation = m; ncbps = 10'(n); in_valid = 1; in_data = d[k]; in_last = (k == n - 1);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    while (orig_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    modulation = MOD_QPSK; ncbps = 10'd96; in_valid = 0; in_last = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(MOD_QPSK, 96);
    run_block(MOD_16QAM, 192);
    run_block(MOD_64QAM, 288);
    run_block(MOD_QPSK, 576);
    run_block(MOD_64QAM, 576);
    repeat (3) @(posedge clk);
    checks++;
    if (il_exp.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
