// tb_cfo_corrector: a constant-envelope tone with a known frequency offset goes through the
// corrector loaded with the matching phase step; the output must become a constant phasor
// (offset removed) of the same amplitude. Also checks the 17-cycle latency.
module tb_cfo_corrector;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, in_valid, out_valid;
  logic signed [31:0] phase_inc;
  cplx16_t in_data, out_data;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int t_in[$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  cfo_corrector dut (.*);

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 3;
    nout++;
    if (cyc - t_in.pop_front() != 17) failures++;
    // expected constant value: 12000 + 0j (input starts at phase 0)
    if (rabs(real'(out_data.re) - 12000.0) > 40.0) failures++;
    if (rabs(real'(out_data.im)) > 40.0) failures++;
  end

  initial begin
    real f;   // offset in cycles per sample
    f = -0.0123;
    load = 0; in_valid = 0; in_data = '0; phase_inc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // the input turns by +2*pi*f per sample, so the corrector must turn by -2*pi*f
    phase_inc = 32'($rtoi(-f * 4294967296.0));
    load = 1;
    @(negedge clk);
    load = 0;
    for (int n = 0; n < 1000; n++) begin
      real ph;
      ph = 2.0 * 3.14159265358979 * f * n;
      in_valid = 1;
      in_data.re = 16'($rtoi(12000.0 * $cos(ph)));
      in_data.im = 16'($rtoi(12000.0 * $sin(ph)));
      t_in.push_back(cyc + 1);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (nout != 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
