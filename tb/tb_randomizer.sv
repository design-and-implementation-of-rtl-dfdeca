// tb_randomizer: checks the randomizer against a bit-level model of 1 + x^14 + x^15, including
// a reload of the seed in the middle of the stream and the round trip back to the data.
module tb_randomizer;
  logic clk = 0, rst_n = 0;
  logic init, in_valid, in_bit, in_last, out_valid, out_bit, out_last;
  logic r2_valid, r2_bit, r2_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  randomizer dut (.clk, .rst_n, .init, .in_valid, .in_bit, .in_last, .out_valid, .out_bit, .out_last);
  // second instance undoes the first
  randomizer dut2 (.clk, .rst_n, .init(init_d), .in_valid(out_valid), .in_bit(out_bit),
                   .in_last(out_last), .out_valid(r2_valid), .out_bit(r2_bit), .out_last(r2_last));
  logic init_d;
  always_ff @(posedge clk) init_d <= init;

  // model: register stages 1..15, output uses stages 14 and 15
  bit [15:1] m;
  bit exp_q[$];
  bit data_q[$];
  bit seed [15] = '{0,1,1,0,1,1,1,0,0,0,1,0,1,0,1};

  task automatic model_seed();
    for (int i = 1; i <= 15; i++) m[i] = seed[15 - i];
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_bit !== exp_q.pop_front()) failures++;
    end
    if (rst_n && r2_valid) begin
      checks++;
      if (r2_bit !== data_q.pop_front()) failures++;
    end
  end

  initial begin
    init = 0; in_valid = 0; in_bit = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      model_seed();
      for (int i = 0; i < 200; i++) begin
        bit d, fb;
        d = $urandom_range(0, 1);
        fb = m[14] ^ m[15];
        exp_q.push_back(d ^ fb);
        data_q.push_back(d);
        m = {m[14:1], fb};
        @(negedge clk);
        init = (i == 0); in_valid = 1; in_bit = d; in_last = (i == 199);
      end
      @(negedge clk);
      init = 0; in_valid = 0; in_last = 0;
      repeat (3) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    if (exp_q.size() != 0 || data_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
