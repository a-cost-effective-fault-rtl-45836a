// Behavioural model of the N regular signal TSVs of one group, as seen by the
// data path. A defect-free TSV passes its die-1 value to die 2 within the
// slot. A TSV whose open resistance is OPEN_FAIL_OHM or more, or whose short
// to the substrate is SHORT_FAIL_OHM or less, misses the slot: die 2 reads 0
// on every bit. The thresholds are this model's choice: 1 kohm of open is a
// 1 kohm x 200 fF = 200 ps extra delay, the smallest delay step the test
// network is characterised for, and 2 kohm is the weakest short it is
// characterised for. Combinational; models physical TSVs, not logic.
`timescale 1ps / 1ps
module tsv_link_model
  import tsv_ft_pkg::*;
#(
  parameter int unsigned N              = 4,
  parameter int unsigned W              = 8,
  parameter int unsigned OPEN_FAIL_OHM  = 1000,
  parameter int unsigned SHORT_FAIL_OHM = 2000
) (
  input  logic [W-1:0] tsv_tx [N],    // die-1 end
  input  tsv_defect_t  defect [N],
  output logic [W-1:0] tsv_rx [N],    // die-2 end
  output logic [N-1:0] broken         // TSV fails at speed
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      broken[i] = (defect[i].r_open_ohm >= OPEN_FAIL_OHM) ||
                  (defect[i].r_short_ohm != 0 && defect[i].r_short_ohm <= SHORT_FAIL_OHM);
      tsv_rx[i] = broken[i] ? '0 : tsv_tx[i];
    end
  end

endmodule
