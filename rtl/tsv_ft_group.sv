// One TSV group of the TDMA fault-tolerance scheme, both dies: N regular
// signal TSVs, with no spare TSV, and the TDMA, Testing and Routing modules
// that serve them.
//
// Operation (one clock cycle per slot, N slots per frame):
//   Test frame (Testmode = 1): in slot i the TDMA module sends Testmodebar to
//     lane i, whose routing demux turns on TSV i's pull-down pMOS; with the
//     die-2 pull-up on, the comparator judges V_tsv against V_ref, the result
//     is captured mid-slot and stored in status[i]. A failing TSV has its
//     signal-path nMOS switched off at once. N TSVs are tested in N cycles,
//     one at a time, so only one test current flows at any moment.
//   Normal frame (Testmode = 0): in slot i input line i is sent over TSV i if
//     status[i] = 0, otherwise over TSV (i+1) mod N, which is idle in that
//     slot; die 2 learns Testresult and the slot over double TSVs and steers
//     the data back to output line i. out_sig[i] updates one cycle after the
//     rising edge that ends slot i (latency 1, one update per line per frame).
// Die-1 logic: tdma_module, tsv_testing_ctrl, routing_die1. Die-2 logic:
// routing_die2. Physical parts are behavioural models: tsv_link_model (the N
// signal TSVs), tsv_test_network (pull-up, pull-down, comparator) and
// double_tsv (control bits to die 2). The group structure follows the scheme;
// the interface (defects and double-TSV opens as inputs, for simulation) is
// this design's.
`timescale 1ps / 1ps
module tsv_ft_group
  import tsv_ft_pkg::*;
#(
  parameter int unsigned N              = 4,
  parameter int unsigned W              = 8,
  parameter int unsigned OPEN_FAIL_OHM  = 1000,
  parameter int unsigned SHORT_FAIL_OHM = 2000,
  localparam int unsigned CW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CTL_W = CW + 3
) (
  input  logic             clk,          // TDMA clock from the oscillator
  input  logic             rst_n,
  input  logic             en,           // En
  input  logic             testmode,     // Testmode
  input  logic [15:0]      vref_dmv,     // comparator reference, 0.1 mV steps
  input  logic [W-1:0]     in_sig [N],   // die-1 input signal lines
  input  tsv_defect_t      defect [N],   // state of the signal TSVs
  input  logic [CTL_W-1:0] dbl_open_a,   // state of the double TSVs
  input  logic [CTL_W-1:0] dbl_open_b,
  output logic [W-1:0]     out_sig [N],  // die-2 output signal lines
  output logic [N-1:0]     out_vld,      // out_sig[i] was just updated
  output logic [N-1:0]     status,       // TSV status register (die 1)
  output logic [CW-1:0]    slot,         // current TDMA slot (die 1)
  output logic [N-1:0]     nmos_on,      // signal-path nMOS state (die 1)
  output logic [15:0]      v_tsv_dmv     // measured TSV-end voltage
);

  logic [W-1:0]     lane_data [N];
  logic             lane_act  [N];
  logic             lane_tr   [N];
  logic             testresult;
  logic             cmp_out;
  logic [W-1:0]     tsv_tx [N];
  logic [W-1:0]     tsv_rx [N];
  logic [N-1:0]     pmos_on;
  logic             pullup_on;
  logic [CTL_W-1:0] ctl_tx;
  logic [CTL_W-1:0] ctl_rx;

  // ---------------- die 1 ----------------
  tdma_module #(.N(N), .W(W)) u_tdma (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .testmode  (testmode),
    .in_sig    (in_sig),
    .testresult(testresult),
    .cnt       (slot),
    .lane_data (lane_data),
    .lane_act  (lane_act),
    .lane_tr   (lane_tr)
  );

  tsv_testing_ctrl #(.N(N)) u_test (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .testmode  (testmode),
    .cnt       (slot),
    .cmp_out   (cmp_out),
    .testresult(testresult),
    .status    (status)
  );

  routing_die1 #(.N(N), .W(W)) u_route1 (
    .testmode (testmode),
    .lane_data(lane_data),
    .lane_act (lane_act),
    .lane_tr  (lane_tr),
    .status   (status),
    .tsv_tx   (tsv_tx),
    .pmos_on  (pmos_on),
    .nmos_on  (nmos_on)
  );

  // ---------------- between the dies ----------------
  tsv_link_model #(
    .N(N), .W(W), .OPEN_FAIL_OHM(OPEN_FAIL_OHM), .SHORT_FAIL_OHM(SHORT_FAIL_OHM)
  ) u_tsv (
    .tsv_tx(tsv_tx),
    .defect(defect),
    .tsv_rx(tsv_rx),
    .broken()
  );

  tsv_test_network #(.N(N)) u_tnet (
    .pullup_on(pullup_on),
    .pmos_on  (pmos_on),
    .defect   (defect),
    .vref_dmv (vref_dmv),
    .v_tsv_dmv(v_tsv_dmv),
    .cmp_out  (cmp_out)
  );

  assign ctl_tx = {en, testmode, testresult, slot};

  double_tsv #(.WIDTH(CTL_W)) u_dbl (
    .tx    (ctl_tx),
    .open_a(dbl_open_a),
    .open_b(dbl_open_b),
    .rx    (ctl_rx)
  );

  // ---------------- die 2 ----------------
  routing_die2 #(.N(N), .W(W)) u_route2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (ctl_rx[CW+2]),
    .testmode  (ctl_rx[CW+1]),
    .testresult(ctl_rx[CW]),
    .slot      (ctl_rx[CW-1:0]),
    .tsv_rx    (tsv_rx),
    .out_sig   (out_sig),
    .out_vld   (out_vld),
    .pullup_on (pullup_on)
  );

endmodule
