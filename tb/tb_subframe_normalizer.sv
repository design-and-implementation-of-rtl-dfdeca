// tb_subframe_normalizer: the scale factor presented at the input changes all the time, but the
// output must use only the value captured at the last `freeze`: checks x*s/2^12 with saturation.
module tb_subframe_normalizer;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  logic freeze, in_valid, out_valid;
  logic [15:0] scale_in, scale_held;
  cplx16_t in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  subframe_normalizer dut (.*);

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held;
    freeze = 0; in_valid = 0; in_data = '0; scale_in = 16'h1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    held = 4096;
    for (int i = 0; i < 2000; i++) begin
      int vr, vi;
      @(negedge clk);
      scale_in = 16'($urandom_range(1000, 30000));
      freeze = (i % 250 == 10);
      vr = $urandom_range(0, 40000) - 20000;
      vi = $urandom_range(0, 40000) - 20000;
      in_valid = 1; in_data.re = 16'(vr); in_data.im = 16'(vi);
      @(posedge clk);
      if (freeze) held = scale_in;
      #1;
      if (i > 0) begin
        checks += 2;
        if (out_data.re !== 16'(sat((longint'(vr) * held_prev) >>> 12))) failures++;
        if (out_data.im !== 16'(sat((longint'(vi) * held_prev) >>> 12))) failures++;
      end
      held_prev = held;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int held_prev = 4096;
endmodule
