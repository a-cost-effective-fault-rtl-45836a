// Digital part of the testing module of one TSV group (die 1): the capture
// flip-flop behind the comparator and the N-bit TSV status register.
//
// In a test frame (Testmode = 1) lane `cnt` is tested during its slot: its
// pull-down pMOS is on in the first half of the cycle, the comparator output
// is captured on the falling clock edge (the signal-capture instant), and the
// captured bit is written into status[cnt] on the next rising edge. N TSVs are
// therefore tested in N cycles. Testresult, the bit that steers the routing
// demultiplexers and is sent to die 2, is
//   Testmode = 1: the captured comparator bit of the current slot, once it has
//                 been captured (second half of the slot), 0 before that;
//   Testmode = 0: status[cnt], the stored result of the current slot's TSV.
// A 1 means the TSV is defective. The status register resets to all-good.
// Capture register, status register and the meaning of Testresult follow the
// scheme; the half-cycle capture timing is this design's choice. N must be at
// least 2 (the slot tag used to qualify the capture needs two distinct slots).
`timescale 1ps / 1ps
module tsv_testing_ctrl #(
  parameter int unsigned N  = 4,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          testmode,
  input  logic [CW-1:0] cnt,
  input  logic          cmp_out,     // comparator: 1 = V_tsv below V_ref
  output logic          testresult,
  output logic [N-1:0]  status       // TSV status register, 1 = defective
);

  logic          cap_q;      // the capture flip-flop
  logic [CW-1:0] cap_slot_q; // slot in which cap_q was taken
  logic          cap_vld_q;  // cap_q was taken during a test slot
  logic          cap_now;    // cap_q belongs to the current slot

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_q      <= 1'b0;
      cap_slot_q <= '0;
      cap_vld_q  <= 1'b0;
    end else begin
      cap_q      <= cmp_out;
      cap_slot_q <= cnt;
      cap_vld_q  <= en && testmode;
    end
  end

  assign cap_now = cap_vld_q && (cap_slot_q == cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          status <= '0;
    else if (en && testmode && cap_now)  status[cnt] <= cap_q;
  end

  assign testresult = testmode ? (cap_now && cap_q) : status[cnt];

  initial assert (N >= 2) else $error("tsv_testing_ctrl needs N >= 2");

endmodule
