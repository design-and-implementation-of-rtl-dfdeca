// cfo_corrector: removes the estimated carrier frequency offset from the received samples.
// A 32-bit phase accumulator advances by phase_inc on every valid sample and each sample is
// rotated by the accumulated phase (top 16 bits) with a pipelined CORDIC. `load` (the frame
// start) sets a new phase step and clears the phase. With phase_inc from the estimator, which
// is 2*pi*eps/N, the rotation e^{+j*phase} cancels the offset.
// Timing: one sample per cycle, latency 17 cycles.
module cfo_corrector
  import wimax_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic signed [31:0] phase_inc,
  input  logic               in_valid,
  input  cplx16_t            in_data,
  output logic               out_valid,
  output cplx16_t            out_data
);
  logic [31:0] phase, inc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      inc_q <= '0;
    end else if (load) begin
      phase <= '0;
      inc_q <= phase_inc;
    end else if (in_valid) begin
      phase <= phase + inc_q;
    end
  end

  cordic_rot u_rot (
    .clk, .rst_n, .in_valid, .in_data, .angle(phase[31:16]),
    .out_valid, .out_data
  );
endmodule
