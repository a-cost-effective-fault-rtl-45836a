// Behavioural model of the on-die oscillator that clocks a group's TDMA
// logic (a ring oscillator in silicon; not synthesizable). While En is high
// it produces a square wave of period 2*HALF_PERIOD_PS picoseconds, starting
// with a rising edge half a period after En rises; when En falls the clock
// finishes its current high phase and then stays low, and no new rising
// edge follows, so no short pulse is produced. The gating by En follows the scheme; the default frequency of
// 500 MHz is the TSV operating frequency used for the scheme's performance
// trade-off, and the glitch-free gating is this model's choice.
`timescale 1ps / 1ps
module tdma_oscillator #(
  parameter int unsigned HALF_PERIOD_PS = 1000
) (
  input  logic en,
  output logic clk
);
  initial clk = 1'b0;

  always begin
    if (!en) begin
      clk = 1'b0;
      @(posedge en);
    end
    #(HALF_PERIOD_PS);
    if (en) begin
      clk = 1'b1;
      #(HALF_PERIOD_PS);
      clk = 1'b0;
    end
  end

endmodule
