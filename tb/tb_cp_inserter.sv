// tb_cp_inserter: sends random N-sample symbols with random gaps on both the input and output
// handshakes and compares every output sample with a model of the prefix/postfix rule: prefix
// symbols start with the last G samples, postfix symbols end with the first G samples, chosen by
// the pattern bit of the symbol's position in the pattern. Also checks out_sos on the first
// sample and that pat_restart moves the pattern back to position 0.
// Reduced size N=16, G=4 so that many symbols and pattern wraps are covered.
module tb_cp_inserter;
  import wimax_pkg::*;
  localparam int N = 16, G = 4;
  logic clk = 0, rst_n = 0;
  logic [15:0] postfix_pat;
  logic [4:0] pat_len;
  logic pat_restart, in_valid, in_ready, out_valid, out_sos, out_ready;
  cplx16_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cp_inserter #(.N(N), .G(G)) dut (.*);

  cplx16_t sym_q[$];       // input samples in order
  cplx16_t exp_q[$];       // expected output samples
  bit      sos_q[$];
  int      pos = 0, nin = 0, nout = 0, npost = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build expected output whenever a full symbol has been accepted
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    sym_q.push_back(in_data);
    if (sym_q.size() == N) begin
      automatic bit post;
      post = postfix_pat[pos];
      if (post) npost++;
      for (int k = 0; k < N + G; k++) begin
        exp_q.push_back(post ? sym_q[k % N] : sym_q[(k < G) ? N - G + k : k - G]);
        sos_q.push_back(k == 0);
      end
      sym_q.delete();
      pos = (pos + 1 >= pat_len) ? 0 : pos + 1;
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      automatic cplx16_t e;
      automatic bit s;
      e = exp_q.pop_front();
      s = sos_q.pop_front();
      if (e !== out_data || s !== out_sos) begin
        failures++;
        if (failures < 10) $display("mismatch at out %0d: %h vs %h", nout, out_data, e);
      end
    end
    nout++;
  end

  initial begin
    postfix_pat = 16'b0000_0000_0000_0110; pat_len = 5'd5; pat_restart = 0;
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_data.re = 16'($urandom); in_data.im = 16'($urandom);
      end
      out_ready = ($urandom_range(0, 4) != 0);
    end
    // drain and check the restart of the pattern between symbols
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3 * (N + G)) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || out_valid) failures++;
    pat_restart = 1; pos = 0;
    @(negedge clk); pat_restart = 0;
    for (int i = 0; i < 4 * N; i++) begin
      in_valid = 1; in_data.re = 16'(i); in_data.im = 16'(-i);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
    repeat (6 * (N + G)) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || npost == 0) failures++;
    $display("symbols out=%0d postfix symbols=%0d", nout / (N + G), npost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
