// tb_cp_remover: feeds a stream of indexed samples (re = index within the N+G symbol, im = symbol
// number) with random valid gaps, a sync pulse on the first prefix sample of the first symbol
// and a second sync later that moves the symbol grid. Checks that exactly the last N samples of
// every symbol come out, in order, with sop on the first and eop on the last, and that nothing
// comes out before the first sync. Reduced size N=16, G=4.
module tb_cp_remover;
  import wimax_pkg::*;
  localparam int N = 16, G = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, sync, out_valid, out_sop, out_eop;
  cplx16_t in_data, out_data;
  int checks = 0, failures = 0;
  int exp_q[$];
  always #5 clk = ~clk;

  cp_remover #(.N(N), .G(G)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int e;
    checks++;
    if (exp_q.size() == 0) begin failures++; end
    else begin
      e = exp_q.pop_front();
      if ({out_data.im, out_data.re} !== 32'(e)) failures++;
      if (out_sop !== (out_data.re == 16'(G))) failures++;
      if (out_eop !== (out_data.re == 16'(N + G - 1))) failures++;
    end
  end

  task automatic send(int idx, int sym, bit s);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin
      in_valid = 0; sync = 0; @(negedge clk);
    end
    in_valid = 1; sync = s; in_data.re = 16'(idx); in_data.im = 16'(sym);
    @(posedge clk);
  endtask

  initial begin
    in_valid = 0; sync = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // junk before any sync: no output expected
    for (int i = 0; i < 30; i++) send(100 + i, 999, 0);
    // grid 1
    for (int s = 0; s < 40; s++)
      for (int k = 0; k < N + G; k++) begin
        if (k >= G) exp_q.push_back((s << 16) | k);
        send(k, s, s == 0 && k == 0);
      end
    // a partial symbol, then a new sync restarts the grid
    // (the old grid is still followed, so its samples k >= G still come out)
    for (int k = 0; k < 7; k++) begin
      if (k >= G) exp_q.push_back((500 << 16) | k);
      send(k, 500, 0);
    end
    for (int s = 0; s < 40; s++)
      for (int k = 0; k < N + G; k++) begin
        if (k >= G) exp_q.push_back(((s + 1000) << 16) | k);
        send(k, s + 1000, s == 0 && k == 0);
      end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
