// tb_symbol_mapper: feeds random bits in QPSK, 16-QAM and 64-QAM and compares each point with
// levels written out from the Gray tables (sign bit first, then level bits), scaled by
// 2^14/sqrt(2), 2^14/sqrt(10) and 2^14/sqrt(42). Checks that a point appears one cycle after
// its last bit.
module tb_symbol_mapper;
  import wimax_pkg::*;
  logic clk = 0, rst_n = 0;
  mod_t modulation;
  logic in_valid, in_bit, in_last, out_valid, out_last;
  cplx16_t out_point;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  symbol_mapper dut (.*);

  typedef struct { int re; int im; } pt_t;
  pt_t exp_q[$];

  function automatic int level(mod_t m, int b0, int b1, int b2);
    int mag, a;
    if (m == MOD_QPSK) begin mag = 1; a = 11585; end
    else if (m == MOD_16QAM) begin mag = b1 ? 3 : 1; a = 5181; end
    else begin
      // Gray order of the magnitudes 1, 3, 5, 7 is 00, 01, 11, 10
      mag = (b1 == 0 && b2 == 0) ? 1 : (b1 == 0) ? 3 : (b2 == 1) ? 5 : 7;
      a = 2528;
    end
    return b0 ? -mag * a : mag * a;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pend;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== pend) failures++;
      if (out_valid) begin
        pt_t e;
        e = exp_q.pop_front();
        if (out_point.re !== 16'(e.re) || out_point.im !== 16'(e.im)) failures++;
      end
    end
  end

  initial begin
    modulation = MOD_QPSK; in_valid = 0; in_bit = 0; in_last = 0; pend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 3; mi++) begin
      mod_t m;
      int nb;
      m = mod_t'(mi);
      nb = 2 * (mi + 1);
      for (int s = 0; s < 60; s++) begin
        int b[6];
        pt_t e;
        foreach (b[k]) b[k] = $urandom_range(0, 1);
        case (m)
          MOD_QPSK:  begin e.re = level(m, b[0], 0, 0); e.im = level(m, b[1], 0, 0); end
          MOD_16QAM: begin e.re = level(m, b[0], b[1], 0); e.im = level(m, b[2], b[3], 0); end
          default:   begin e.re = level(m, b[0], b[1], b[2]); e.im = level(m, b[3], b[4], b[5]); end
        endcase
        exp_q.push_back(e);
        for (int k = 0; k < nb; k++) begin
          @(negedge clk);
          modulation = m; in_valid = 1; in_bit = b[k][0]; in_last = 0;
          pend = 0;
          @(posedge clk);
          #1 pend = (k == nb - 1);
        end
        @(negedge clk);
        in_valid = 0;
        @(posedge clk);
        #1 pend = 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
