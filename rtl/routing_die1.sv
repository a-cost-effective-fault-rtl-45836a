// Routing module of one TSV group, die-1 side.
//
// One 1:4 demultiplexer per lane. Lane i's demux takes that lane's output of
// the TDMA demux1 (input data in normal operation, Testmodebar in a test
// frame) and is selected by {Testmode, Testresult} (tsv_ft_pkg::route_sel_e):
//   00 normal path   - data drives TSV i;
//   01 reroute path  - data drives TSV (i+1) mod N, the lane's neighbour;
//   10 pMOS on       - Testmodebar (active low) turns on lane i's pull-down
//                      pMOS so that TSV i can be measured;
//   11 nMOS off      - TSV i failed its test: its signal-path nMOS is turned
//                      off at once.
// Each TSV j has a signal-path nMOS on die 1. It is off while status[j] marks
// the TSV as defective (or while its own test slot has just failed), so a
// defective TSV is never driven. A TSV that is not driven in the current slot
// carries all zeros. Purely combinational.
// The four-way demux and its truth table follow the scheme; the choice of the
// next TSV (i+1) mod N as the reroute target, which tolerates one defective
// TSV per group or several non-adjacent ones, is this design's.
`timescale 1ps / 1ps
module routing_die1
  import tsv_ft_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned W = 8
) (
  input  logic         testmode,
  input  logic [W-1:0] lane_data [N],  // from TDMA demux1
  input  logic         lane_act [N],   // lane owns the current slot
  input  logic         lane_tr [N],    // Testresult for the lane (demux6)
  input  logic [N-1:0] status,         // TSV status register, 1 = defective
  output logic [W-1:0] tsv_tx [N],     // die-1 end of each TSV
  output logic [N-1:0] pmos_on,        // pull-down pMOS of TSV i is on
  output logic [N-1:0] nmos_on         // signal-path nMOS of TSV i is on
);

  logic [W-1:0] norm_d [N];
  logic [W-1:0] rr_d   [N];
  logic [N-1:0] cut_now;
  route_sel_e   sel    [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      sel[i]     = route_sel_e'({testmode, lane_tr[i]});
      norm_d[i]  = '0;
      rr_d[i]    = '0;
      pmos_on[i] = 1'b0;
      cut_now[i] = 1'b0;
      if (lane_act[i]) begin
        unique case (sel[i])
          ROUTE_NORMAL:   norm_d[i]  = lane_data[i];
          ROUTE_REROUTE:  rr_d[i]    = lane_data[i];
          ROUTE_PMOS_ON:  pmos_on[i] = ~lane_data[i][0];  // Testmodebar, active low
          ROUTE_NMOS_OFF: cut_now[i] = 1'b1;
        endcase
      end
    end
    for (int unsigned j = 0; j < N; j++) begin
      nmos_on[j] = !(status[j] || cut_now[j]);
      tsv_tx[j]  = nmos_on[j] ? (norm_d[j] | rr_d[(j + N - 1) % N]) : '0;
    end
  end

endmodule
