// Benchmark-sized testbench of tsv_ft_top: 1362 signal lines, the TSV count
// of the AES-core benchmark stack, in 341 groups of 4 (the last one half
// used), 8-bit lines, 500 MHz clock. Runs test frames and normal frames with
// defects scattered over all groups and checks every output line against a
// reference; see the shared body.
`timescale 1ps / 1ps
module tb_tsv_ft_top_aes;
  import tsv_ft_pkg::*;
  localparam int unsigned NUM_TSV = 1362, N = 4, W = 8;
  localparam int unsigned G = (NUM_TSV + N - 1) / N, CW = 2, CTL_W = CW + 3;
  localparam int ROUNDS = 4;

  logic rst_n = 1'b1, en = 1'b0, testmode = 1'b0;
  logic [15:0] vref_dmv;
  logic [W-1:0] in_sig [NUM_TSV];
  tsv_defect_t defect [NUM_TSV];
  logic [CTL_W-1:0] dbl_open_a [G], dbl_open_b [G];
  logic tdma_clk;
  logic [CW-1:0] slot;
  logic [W-1:0] out_sig [NUM_TSV];
  logic [NUM_TSV-1:0] out_vld, status, nmos_on;
  logic [15:0] v_tsv_dmv [G];

  tsv_ft_top #(.NUM_TSV(NUM_TSV)) dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "tb_tsv_ft_top_body.svh"

endmodule
