// sync_fifo: single-clock FIFO used between the processing blocks (TX and RX FIFOs).
// A circular buffer of DEPTH words with valid/ready handshakes on both sides; the output word
// is read combinationally from the buffer (first-word fall-through). `level` gives the fill.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [W-1:0]               in_data,
  output logic                       in_ready,
  output logic                       out_valid,
  output logic [W-1:0]               out_data,
  input  logic                       out_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (level != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  // no write into a full FIFO and no read from an empty one
  assert property (@(posedge clk) disable iff (!rst_n) push |-> level < ($clog2(DEPTH+1))'(DEPTH));
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> level != '0);
endmodule
