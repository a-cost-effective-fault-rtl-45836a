// Behavioural model of a double-TSV interconnect bundle: every control bit
// that crosses from die 1 to die 2 uses two TSVs in parallel, so the bit still
// arrives when one of the two is open. A bit whose two TSVs are both open
// reads as 0 on die 2. Used for the slot number, Testmode, Testresult and En
// that die 1 sends to die 2. Combinational; models physical wiring, not logic.
// Duplicating the control TSVs follows the scheme; modelling a lost bit as 0
// is this model's choice.
`timescale 1ps / 1ps
module double_tsv #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] tx,       // die-1 side
  input  logic [WIDTH-1:0] open_a,   // first TSV of each pair is open
  input  logic [WIDTH-1:0] open_b,   // second TSV of each pair is open
  output logic [WIDTH-1:0] rx        // die-2 side
);

  assign rx = tx & ~(open_a & open_b);

endmodule
