// Self-checking testbench for one TSV group (N = 4, W = 8), both dies and the
// TSV models. Each round injects defects (none, one, or two non-adjacent;
// opens and shorts from the characterised range), sets V_ref, runs one test
// frame and then three normal frames of random data. Expected results come
// from a reference in this file: a TSV is found defective when its
// characterised voltage is at or below V_ref; a line reaches die 2 when the
// TSV it is routed over (its own, or the neighbour if found defective) is
// intact and not switched off. Also checks the frame timing (N cycles to test
// N TSVs, each output updated once per frame one cycle after its slot) and
// that a single open in a double-TSV pair is tolerated. A directed case first
// repeats the single-defect example: TSV1 bad, detected in cycle 1, its line
// delivered over TSV2 in cycle 5.
`timescale 1ps / 1ps
module tb_tsv_ft_group;
  import tsv_ft_pkg::*;
  localparam int unsigned N = 4, W = 8, CW = 2, CTL_W = CW + 3;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, testmode = 1'b0;
  logic [15:0] vref_dmv = 16'd6000;
  logic [W-1:0] in_sig [N];
  tsv_defect_t defect [N];
  logic [CTL_W-1:0] dbl_open_a = '0, dbl_open_b = '0;
  logic [W-1:0] out_sig [N];
  logic [N-1:0] out_vld, status, nmos_on;
  logic [CW-1:0] slot;
  logic [15:0] v_tsv_dmv;
  int checks = 0, failures = 0;
  int n_detect = 0, n_reroute = 0, n_normal = 0, n_escape = 0, n_dbl = 0, n_cut = 0;

  tsv_ft_group #(.N(N), .W(W)) dut (.*);

  always #1000 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // characterised defects: {r_open, r_short, V_tsv in 0.1 mV}
  int dr_open  [7] = '{1000, 2000, 5000, 50000, 0,    0,    0};
  int dr_short [7] = '{0,    0,    0,    0,     500,  1000, 2000};
  int dv       [7] = '{5463, 5272, 5064, 4422,  3101, 3800, 4316};

  logic [N-1:0] exp_status, broken;

  // All stimulus changes 1 ps after a rising edge. Returns at the start of
  // slot 0 (at once if already there).
  task automatic frame_start();
    while (slot != '0) begin @(posedge clk); #1; end
  endtask

  task automatic run_test_frame();
    frame_start();
    testmode = 1'b1;
    repeat (N) @(posedge clk);
    #1;
    chk(status == exp_status, $sformatf("status %b after %0d test cycles, expected %b", status, N, exp_status));
    for (int j = 0; j < N; j++) chk(nmos_on[j] == !exp_status[j], "signal-path nMOS state");
    n_cut += $countones(exp_status);
    testmode = 1'b0;
  endtask

  task automatic run_normal_frame();
    logic [W-1:0] d [N];
    foreach (d[i]) d[i] = W'($urandom);
    frame_start();
    foreach (in_sig[i]) in_sig[i] = d[i];
    for (int s = 0; s < N; s++) begin
      int t;
      logic [W-1:0] e;
      @(posedge clk); #1;
      chk(out_vld == (N'(1) << s), "one output updated per slot, one cycle after it");
      t = exp_status[s] ? (s + 1) % N : s;
      e = (broken[t] || exp_status[t]) ? W'(0) : d[s];
      chk(out_sig[s] == e, $sformatf("line %0d data %h expected %h", s, out_sig[s], e));
      if (exp_status[s]) n_reroute++; else n_normal++;
    end
  endtask


  // Directed case of the functional validation: TSV1 (lane 0) defective,
  // input line 1 = 8'b11111100. Cycle 1 tests TSV1 and switches its nMOS off
  // within the cycle; cycles 2-4 test the others; in cycle 5 the line is
  // rerouted over TSV2 and appears on output line 1 at the end of that cycle.
  task automatic fig7_case();
    int cyc;
    foreach (defect[i]) defect[i] = '0;
    defect[0].r_open_ohm = 32'd50000;
    vref_dmv = 16'd6000;
    frame_start();
    in_sig[0] = 8'b11111100;
    testmode = 1'b1;
    cyc = 1;
    @(negedge clk); #1;          // second half of cycle 1: verdict captured
    chk(nmos_on[0] == 1'b0 && pmos_on_0_off(), "cycle 1: TSV1 nMOS off after capture");
    while (cyc < 4) begin @(posedge clk); cyc++; end
    @(posedge clk); #1;          // end of cycle 4: all four TSVs tested
    chk(status == 4'b0001, "cycle 4: status register complete");
    testmode = 1'b0;
    cyc = 5;
    chk(slot == '0, "cycle 5 is TSV1's slot again");
    @(posedge clk); #1;
    chk(out_vld[0] && out_sig[0] == 8'b11111100, "cycle 5: outsig1 = 11111100 via TSV2");
    n_reroute++;
  endtask

  function automatic bit pmos_on_0_off();
    return dut.pmos_on[0] == 1'b0;
  endfunction

  initial begin
    foreach (in_sig[i]) in_sig[i] = '0;
    foreach (defect[i]) defect[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    en = 1'b1;
    fig7_case();
    for (int r = 0; r < 24; r++) begin
      int a, b, ka, kb, nd;
      foreach (defect[i]) defect[i] = '0;
      broken = '0;
      exp_status = '0;
      vref_dmv = (r % 6 == 5) ? 16'd5000 : 16'd6000;  // lowered V_ref lets small opens escape
      nd = (r == 0) ? 0 : (r % 3 == 0) ? 2 : 1;
      a  = $urandom_range(0, N - 1);
      b  = (a + 2) % N;
      ka = (r % 6 == 5) ? 0 : $urandom_range(0, 6);
      kb = $urandom_range(0, 6);
      if (nd >= 1) begin
        defect[a].r_open_ohm = 32'(dr_open[ka]); defect[a].r_short_ohm = 32'(dr_short[ka]);
        broken[a] = 1'b1; exp_status[a] = (dv[ka] <= int'(vref_dmv));
      end
      if (nd == 2) begin
        defect[b].r_open_ohm = 32'(dr_open[kb]); defect[b].r_short_ohm = 32'(dr_short[kb]);
        broken[b] = 1'b1; exp_status[b] = (dv[kb] <= int'(vref_dmv));
      end
      n_detect += $countones(exp_status);
      n_escape += $countones(broken & ~exp_status);
      // single open in each double-TSV pair on some rounds
      if (r % 4 == 2) begin
        dbl_open_a = CTL_W'($urandom); dbl_open_b = ~dbl_open_a; n_dbl++;
      end else begin
        dbl_open_a = '0; dbl_open_b = '0;
      end
      run_test_frame();
      repeat (3) run_normal_frame();
    end
    $display("detected=%0d rerouted=%0d normal=%0d escaped=%0d cutoff=%0d dbl_single_open=%0d",
             n_detect, n_reroute, n_normal, n_escape, n_cut, n_dbl);
    chk(n_detect > 0 && n_reroute > 0 && n_normal > 0 && n_escape > 0 && n_dbl > 0 && n_cut > 0,
        "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
