// Behavioural model of the analog test network of one TSV group: the die-2
// pull-up nMOS, the TSVs with their defects, the die-1 pull-down pMOS of each
// TSV and the group's single voltage comparator. Not synthesizable logic in
// the real part (transistors and a comparator); written here as integer
// arithmetic so that the digital test path can be simulated.
//
// With the pull-up on and lane i's pull-down pMOS on, the pMOS/TSV/nMOS stack
// forms a voltage divider; the voltage V_tsv at the die-1 end of TSV i, taken
// at the signal-capture instant, falls as the TSV's defect resistance moves
// away from the defect-free case. The model returns that voltage by
// piecewise-linear interpolation of SPICE-characterised points (65 nm, 25 C,
// 2 um / 180 nm devices, 1.2 V, 0.7 GHz test clock):
//   defect-free            600.4 mV
//   open (void/delam.) R:  1k 546.3, 2k 527.2, 3k 517.1, 4k 510.8, 5k 506.4,
//                          10k 489.3, 50k 442.2 mV (held beyond 50k)
//   short to substrate R:  500 310.1, 1k 380.0, 1.5k 409.6, 2k 431.6 mV
// Between 0 and 500 ohm of short the voltage is taken to fall linearly to 0,
// and above 2 kohm to rise linearly to the defect-free value at 10 kohm; a TSV
// with both defects takes the lower of the two voltages. These three
// extrapolations are this model's own. The comparator output is 1 (TSV
// defective) when V_tsv <= V_ref and some pMOS is on; with several pMOS on
// the lowest-numbered lane is measured.
// Voltages are in 0.1 mV steps; the interface is combinational.
`timescale 1ps / 1ps
module tsv_test_network
  import tsv_ft_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic        pullup_on,      // die-2 pull-up nMOS gate
  input  logic [N-1:0] pmos_on,       // die-1 pull-down pMOS gates
  input  tsv_defect_t defect [N],     // electrical defect of each TSV
  input  logic [15:0] vref_dmv,       // comparator reference, 0.1 mV steps
  output logic [15:0] v_tsv_dmv,      // voltage at the measured TSV end
  output logic        cmp_out         // 1: V_tsv <= V_ref
);

  localparam int NO = 8;
  localparam int OPEN_R [NO] = '{0, 1000, 2000, 3000, 4000, 5000, 10000, 50000};
  localparam int OPEN_V [NO] = '{6004, 5463, 5272, 5171, 5108, 5064, 4893, 4422};
  localparam int NS = 6;
  localparam int SHORT_R [NS] = '{0, 500, 1000, 1500, 2000, 10000};
  localparam int SHORT_V [NS] = '{0, 3101, 3800, 4096, 4316, 6004};

  // Interpolate v(r) over table points (r0,v0) .. (r1,v1).
  function automatic int lerp(int r, int r0, int r1, int v0, int v1);
    return v0 + ((v1 - v0) * (r - r0)) / (r1 - r0);
  endfunction

  function automatic int v_open(logic [31:0] r_ohm);
    int r;
    if (r_ohm >= 32'(OPEN_R[NO-1])) return OPEN_V[NO-1];
    r = int'(r_ohm);
    for (int k = 0; k < NO - 1; k++)
      if (r >= OPEN_R[k] && r < OPEN_R[k+1])
        return lerp(r, OPEN_R[k], OPEN_R[k+1], OPEN_V[k], OPEN_V[k+1]);
    return OPEN_V[0];
  endfunction

  function automatic int v_short(logic [31:0] r_ohm);
    int r;
    if (r_ohm == 0 || r_ohm >= 32'(SHORT_R[NS-1])) return int'(VTSV_GOOD_DMV);
    r = int'(r_ohm);
    for (int k = 0; k < NS - 1; k++)
      if (r >= SHORT_R[k] && r < SHORT_R[k+1])
        return lerp(r, SHORT_R[k], SHORT_R[k+1], SHORT_V[k], SHORT_V[k+1]);
    return int'(VTSV_GOOD_DMV);
  endfunction

  always_comb begin
    int sel;
    int vo;
    int vs;
    sel = -1;
    vo  = 0;
    vs  = 0;
    for (int i = N - 1; i >= 0; i--)
      if (pmos_on[i]) sel = i;
    v_tsv_dmv = 16'd0;
    cmp_out   = 1'b0;
    if (pullup_on) begin
      if (sel < 0) begin
        v_tsv_dmv = 16'(VDD_DMV);           // nothing pulls the node down
      end else begin
        vo        = v_open(defect[sel].r_open_ohm);
        vs        = v_short(defect[sel].r_short_ohm);
        v_tsv_dmv = 16'((vo < vs) ? vo : vs);
        cmp_out   = (v_tsv_dmv <= vref_dmv);
      end
    end
  end

endmodule
