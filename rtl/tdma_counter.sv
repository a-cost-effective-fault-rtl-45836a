// TDMA slot counter: a log2(N)-bit counter that walks through the N time slots
// of one TSV group, 0, 1, ..., N-1, 0, ...  Slot k belongs to TSV k+1 of the
// group. It advances on every rising clock edge while `en` is high and holds
// otherwise; an asynchronous active-low reset returns it to slot 0.
// The counter width of ceil(log2 N) bits follows the scheme; the reset and the
// hold-while-disabled behaviour are this design's choice.
`timescale 1ps / 1ps
module tdma_counter #(
  parameter int unsigned N  = 4,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [CW-1:0] cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (en) begin
      if (cnt == CW'(N - 1))     cnt <= '0;
      else                       cnt <= cnt + 1'b1;
    end
  end

endmodule
