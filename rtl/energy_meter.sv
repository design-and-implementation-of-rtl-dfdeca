// energy_meter: mean energy of 2^LOG_WIN consecutive samples after a start pulse.
// Used for the signal (after the preamble) and noise (receive/transmit gap) measurements whose
// ratio gives the SNR estimate. The mean is latched in `energy` with `done`.
module energy_meter
  import wimax_pkg::*;
#(
  parameter int unsigned LOG_WIN = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  input  cplx16_t     in_data,
  output logic [31:0] energy,
  output logic        done
);
  logic [31+LOG_WIN:0] acc;
  logic [LOG_WIN:0]    cnt;
  logic                run;
  logic [31:0]         e2;

  assign e2 = 32'($unsigned(32'(in_data.re) * 32'(in_data.re))) +
              32'($unsigned(32'(in_data.im) * 32'(in_data.im)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; cnt <= '0; run <= 1'b0; energy <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc <= '0; cnt <= '0; run <= 1'b1;
      end else if (run && in_valid) begin
        if (cnt == (LOG_WIN+1)'((1 << LOG_WIN) - 1)) begin
          energy <= 32'((acc + (32+LOG_WIN)'(e2)) >> LOG_WIN);
          done   <= 1'b1;
          run    <= 1'b0;
        end else begin
          acc <= acc + (32+LOG_WIN)'(e2);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
