// Shared types and constants of the TDMA-based TSV fault-tolerance scheme.
//
// A group of N regular TSVs is served by one time-division slot counter. In
// every slot exactly one lane is active. Each lane's die-1 routing demultiplexer
// is steered by the pair {Testmode, Testresult}; route_sel_e gives the four
// outcomes of that pair (the four rows of the scheme's routing truth table).
// Analog quantities crossing the behavioural test network (TSV-end voltage and
// comparator reference) are integers in steps of 0.1 mV, so that table values
// such as 546.3 mV are represented exactly.
`timescale 1ps / 1ps
package tsv_ft_pkg;

  // {Testmode, Testresult} -> what a lane's 1:4 routing demux drives.
  typedef enum logic [1:0] {
    ROUTE_NORMAL   = 2'b00,  // normal mode, TSV good: data onto its own TSV
    ROUTE_REROUTE  = 2'b01,  // normal mode, TSV bad: data onto the neighbour TSV
    ROUTE_PMOS_ON  = 2'b10,  // test mode, not (yet) failed: pull-down pMOS on
    ROUTE_NMOS_OFF = 2'b11   // test mode, failed: signal-path nMOS off
  } route_sel_e;

  // Supply and default comparator reference, in 0.1 mV steps.
  localparam int unsigned VDD_DMV      = 12000;  // 1.2 V
  localparam int unsigned VREF_50P_DMV = 6000;   // 50 % of Vdd
  // TSV-end voltage of a defect-free TSV at the capture instant (600.4 mV).
  localparam int unsigned VTSV_GOOD_DMV = 6004;

  // Electrical defect of one TSV, in ohms. 0 means "no such defect":
  // r_open is the series resistance of a void/delamination, r_short the
  // resistance of a leakage path from the TSV to the substrate.
  typedef struct packed {
    logic [31:0] r_open_ohm;
    logic [31:0] r_short_ohm;
  } tsv_defect_t;

endpackage
