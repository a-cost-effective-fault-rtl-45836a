// Self-checking testbench for the behavioural test network: checks the
// TSV-end voltage of the measured lane against the characterised points
// (600.4 mV defect-free; open 1k..50k; short 500..2k), interpolation between
// points, that the lowest-numbered lane with its pMOS on is measured, that the
// comparator fires exactly when V_tsv <= V_ref, and that nothing fires with
// no pMOS on or with the pull-up off.
`timescale 1ps / 1ps
module tb_tsv_test_network;
  import tsv_ft_pkg::*;
  localparam int unsigned N = 4;
  logic pullup_on;
  logic [N-1:0] pmos_on;
  tsv_defect_t defect [N];
  logic [15:0] vref_dmv, v_tsv_dmv;
  logic cmp_out;
  int checks = 0, failures = 0;

  tsv_test_network #(.N(N)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (v=%0d) at %0t", what, v_tsv_dmv, $time); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic meas(int lane, int r_open, int r_short, int exp_v);
    foreach (defect[i]) defect[i] = '0;
    defect[lane].r_open_ohm  = 32'(r_open);
    defect[lane].r_short_ohm = 32'(r_short);
    pullup_on = 1'b1;
    pmos_on   = N'(1) << lane;
    vref_dmv  = 16'(exp_v);
    #10;
    chk(v_tsv_dmv == 16'(exp_v), $sformatf("V_tsv lane %0d open %0d short %0d", lane, r_open, r_short));
    chk(cmp_out == 1'b1, "comparator at V_ref = V_tsv");
    vref_dmv = 16'(exp_v - 1);
    #10;
    chk(cmp_out == 1'b0, "comparator just below V_tsv");
  endtask

  initial begin
    int open_r [8] = '{0, 1000, 2000, 3000, 4000, 5000, 10000, 50000};
    int open_v [8] = '{6004, 5463, 5272, 5171, 5108, 5064, 4893, 4422};
    int shrt_r [4] = '{500, 1000, 1500, 2000};
    int shrt_v [4] = '{3101, 3800, 4096, 4316};
    for (int k = 0; k < 8; k++) meas(k % N, open_r[k], 0, open_v[k]);
    for (int k = 0; k < 4; k++) meas(k % N, 0, shrt_r[k], shrt_v[k]);
    meas(2, 1500, 0, 5463 + (5272 - 5463) / 2); // midway between 1k and 2k
    meas(1, 30000, 0, 4893 + (4422 - 4893) / 2);
    meas(3, 1000, 500, 3101);                    // both defects: lower voltage
    meas(0, 100000, 0, 4422);                    // held beyond 50k
    // Defect-free at 50 % Vdd reference: passes.
    foreach (defect[i]) defect[i] = '0;
    vref_dmv = 16'(VREF_50P_DMV); pmos_on = 4'b0100; pullup_on = 1'b1; #10;
    chk(cmp_out == 1'b0 && v_tsv_dmv == 16'(VTSV_GOOD_DMV), "good TSV at 50% Vdd");
    // 50 % reference catches a 50k open and a 500 ohm short.
    defect[2].r_open_ohm = 50000; #10;
    chk(cmp_out == 1'b1, "50k open at 50% Vdd");
    // lowest lane with pMOS on is measured
    pmos_on = 4'b1100; defect[3] = '0; #10;
    chk(cmp_out == 1'b1 && v_tsv_dmv == 16'd4422, "lowest active lane measured");
    pmos_on = '0; #10;
    chk(cmp_out == 1'b0, "no pMOS on: comparator idle");
    pmos_on = 4'b0100; pullup_on = 1'b0; #10;
    chk(cmp_out == 1'b0, "pull-up off: comparator idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
