// tb_sync_fifo: random pushes and pops against a queue model, filling the FIFO to full and
// draining it to empty; checks data order, the level count and the full/empty handshakes.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [4:0] level;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  always #5 clk = ~clk;

  sync_fifo #(.W(16), .DEPTH(16)) dut (.*);

  logic [15:0] model[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 500) % 2;   // alternately mostly pushing and mostly popping
      @(negedge clk);
      in_valid  = ($urandom_range(0, 9) < (phase ? 3 : 8));
      out_ready = ($urandom_range(0, 9) < (phase ? 8 : 3));
      in_data   = 16'($urandom);
      checks += 3;
      if (in_ready !== (model.size() < 16)) failures++;
      if (out_valid !== (model.size() > 0)) failures++;
      if (int'(level) != model.size()) failures++;
      if (model.size() == 16) fulls++;
      if (model.size() == 0) empties++;
      if (out_valid) begin
        checks++;
        if (out_data !== model[0]) failures++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (fulls == 0 || empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
