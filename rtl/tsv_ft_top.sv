// Top level: TDMA-based fault tolerance for the regular signal TSVs of a
// two-die stack, with no redundant TSVs.
//
// NUM_TSV signal lines cross from die 1 to die 2. They are split into
// G = ceil(NUM_TSV / N) independent groups of N TSVs (tsv_ft_group); line k
// belongs to group k / N, lane k mod N. Lanes of the last group beyond NUM_TSV
// are unused (inputs tied to 0, TSVs defect-free). One enable-gated oscillator
// (tdma_oscillator) clocks all groups, so all groups run their slots in step:
// a test frame (Testmode = 1 for N cycles) measures every TSV of every group,
// and a normal frame (Testmode = 0, N cycles) delivers each line once, over
// its own TSV or, if that one was found defective, over its group neighbour.
// Each group tolerates one defective TSV (more if no two are neighbours).
// Interface: inputs are sampled in their slot on the rising edge of tdma_clk;
// out_sig[k] changes right after the rising edge that ends line k's slot and
// out_vld[k] is high for the following cycle. `defect` and `dbl_open_*`
// describe the state of the physical TSVs, for simulation.
// Defaults: 1000 regular TSVs (the scheme's illustrative design size), groups
// of 4 (its main configuration), 8-bit lines (the width of the data in its
// functional validation) and a 500 MHz TDMA clock. Sharing one oscillator and
// one V_ref over all groups is this design's choice.
`timescale 1ps / 1ps
module tsv_ft_top
  import tsv_ft_pkg::*;
#(
  parameter int unsigned NUM_TSV        = 1000,
  parameter int unsigned N              = 4,
  parameter int unsigned W              = 8,
  parameter int unsigned HALF_PERIOD_PS = 1000,
  parameter int unsigned OPEN_FAIL_OHM  = 1000,
  parameter int unsigned SHORT_FAIL_OHM = 2000,
  localparam int unsigned G     = (NUM_TSV + N - 1) / N,
  localparam int unsigned CW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CTL_W = CW + 3
) (
  input  logic             rst_n,
  input  logic             en,
  input  logic             testmode,
  input  logic [15:0]      vref_dmv,
  input  logic [W-1:0]     in_sig [NUM_TSV],
  input  tsv_defect_t      defect [NUM_TSV],
  input  logic [CTL_W-1:0] dbl_open_a [G],
  input  logic [CTL_W-1:0] dbl_open_b [G],
  output logic             tdma_clk,
  output logic [CW-1:0]    slot,
  output logic [W-1:0]     out_sig [NUM_TSV],
  output logic [NUM_TSV-1:0] out_vld,
  output logic [NUM_TSV-1:0] status,
  output logic [NUM_TSV-1:0] nmos_on,
  output logic [15:0]      v_tsv_dmv [G]
);

  tdma_oscillator #(.HALF_PERIOD_PS(HALF_PERIOD_PS)) u_osc (
    .en (en),
    .clk(tdma_clk)
  );

  logic [CW-1:0] g_slot [G];

  for (genvar g = 0; g < G; g++) begin : g_grp
    logic [W-1:0] gin  [N];
    tsv_defect_t  gdef [N];
    logic [W-1:0] gout [N];
    logic [N-1:0] gvld;
    logic [N-1:0] gstat;
    logic [N-1:0] gnmos;

    for (genvar l = 0; l < N; l++) begin : g_lane
      localparam int unsigned K = g * N + l;
      if (K < NUM_TSV) begin : g_used
        assign gin[l]     = in_sig[K];
        assign gdef[l]    = defect[K];
        assign out_sig[K] = gout[l];
        assign out_vld[K] = gvld[l];
        assign status[K]  = gstat[l];
        assign nmos_on[K] = gnmos[l];
      end else begin : g_pad
        assign gin[l]  = '0;
        assign gdef[l] = '0;
      end
    end

    tsv_ft_group #(
      .N(N), .W(W), .OPEN_FAIL_OHM(OPEN_FAIL_OHM), .SHORT_FAIL_OHM(SHORT_FAIL_OHM)
    ) u_grp (
      .clk       (tdma_clk),
      .rst_n     (rst_n),
      .en        (en),
      .testmode  (testmode),
      .vref_dmv  (vref_dmv),
      .in_sig    (gin),
      .defect    (gdef),
      .dbl_open_a(dbl_open_a[g]),
      .dbl_open_b(dbl_open_b[g]),
      .out_sig   (gout),
      .out_vld   (gvld),
      .status    (gstat),
      .slot      (g_slot[g]),
      .nmos_on   (gnmos),
      .v_tsv_dmv (v_tsv_dmv[g])
    );
  end

  // All groups share the clock and reset, so their slot counters agree.
  assign slot = g_slot[0];

endmodule
