// TDMA module of one TSV group (die 1).
//
// It gives each of the N TSVs of a group its own time slot and produces the
// per-lane control signals for testing and for data transfer:
//   counter  - log2(N)-bit slot counter (tdma_counter), clocked by the
//              group's oscillator while En is high;
//   mux1     - N:1, picks input signal line `cnt` in normal operation;
//   mux2     - 2:1, Testmode selects between mux1's output (Testmode = 0) and
//              Testmodebar (Testmode = 1); Testmodebar is the active-low
//              test-enable that turns on the selected lane's pull-down pMOS;
//   demux1   - 1:N, hands mux2's output to routing lane `cnt`;
//   demux6   - 1:N, hands Testresult to routing lane `cnt` as that lane's
//              routing select.
// All outputs are combinational from the registered slot counter, so a lane
// is active for exactly one clock cycle per frame of N cycles.
// The structure follows the scheme; that idle lanes carry all-zero data and a
// zero select, and that Testmodebar is replicated over the W data bits, are
// this design's choices.
`timescale 1ps / 1ps
module tdma_module #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 8,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          testmode,
  input  logic [W-1:0]  in_sig [N],     // input signal lines of the group
  input  logic          testresult,     // from the testing module
  output logic [CW-1:0] cnt,            // current slot
  output logic [W-1:0]  lane_data [N],  // demux1 outputs
  output logic          lane_act [N],   // lane owns the current slot
  output logic          lane_tr [N]     // demux6 outputs (routing selects)
);

  logic [W-1:0] mux1_q;
  logic [W-1:0] mux2_q;
  logic         testmode_bar;

  tdma_counter #(.N(N)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .cnt  (cnt)
  );

  assign testmode_bar = ~testmode;
  assign mux1_q       = in_sig[cnt];
  assign mux2_q       = testmode ? {W{testmode_bar}} : mux1_q;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      lane_act[i]  = en && (cnt == CW'(i));
      lane_data[i] = lane_act[i] ? mux2_q : '0;
      lane_tr[i]   = lane_act[i] ? testresult : 1'b0;
    end
  end

endmodule
