// Routing module of one TSV group, die-2 side, with the die-2 TDMA demux1
// and the group's output registers.
//
// Die 2 receives the slot number, Testmode, Testresult and En from die 1 over
// double TSVs. Its demux1 (1:N) hands Testresult of slot i to the 1:2 demux
// that sits on TSV (i+1) mod N, the TSV that carries lane i's data when TSV i
// is defective. Each 1:2 demux passes its TSV either to its own output path
// (select 0) or back to output path i (select 1), so a rerouted signal lands
// on its original output. At the end of slot i in normal operation the output
// register out_sig[i] loads its path and out_vld[i] pulses for one cycle,
// i.e. an input presented in slot i is visible one cycle after that slot's
// rising edge. In a test frame the outputs hold and pullup_on turns on the
// die-2 pull-up nMOS of the group's TSV test network.
// The demux1 and the 1:2 demuxes follow the scheme; the output registers,
// their reset to zero and the pull-up control from Testmode are this design's.
`timescale 1ps / 1ps
module routing_die2 #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 8,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // received over double TSV
  input  logic          testmode,    // received over double TSV
  input  logic          testresult,  // received over double TSV
  input  logic [CW-1:0] slot,        // received over double TSV
  input  logic [W-1:0]  tsv_rx [N],  // die-2 end of each TSV
  output logic [W-1:0]  out_sig [N],
  output logic [N-1:0]  out_vld,
  output logic          pullup_on
);

  logic [N-1:0] rr_sel;           // select of the 1:2 demux on TSV j
  logic [W-1:0] own_d  [N];       // 1:2 demux output 0 (own path)
  logic [W-1:0] back_d [N];       // 1:2 demux output 1 (previous lane's path)
  logic [W-1:0] path   [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      rr_sel[(i + 1) % N] = en && !testmode && (slot == CW'(i)) && testresult;
    for (int unsigned j = 0; j < N; j++) begin
      own_d[j]  = rr_sel[j] ? '0 : tsv_rx[j];
      back_d[j] = rr_sel[j] ? tsv_rx[j] : '0;
    end
    for (int unsigned i = 0; i < N; i++)
      path[i] = own_d[i] | back_d[(i + 1) % N];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) out_sig[i] <= '0;
      out_vld <= '0;
    end else begin
      out_vld <= '0;
      if (en && !testmode) begin
        out_sig[slot] <= path[slot];
        out_vld[slot] <= 1'b1;
      end
    end
  end

  assign pullup_on = en && testmode;

endmodule
