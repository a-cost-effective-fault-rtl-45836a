// Shared body of the top-level testbenches (included inside the testbench
// module after NUM_TSV, N, W, G, CW, CTL_W, ROUNDS and the DUT are declared).
// Each round injects defects (at most one per group, or two non-adjacent in a
// group), sets V_ref, runs one test frame and normal frames of random data,
// and compares every output with a reference; some rounds also stop the
// oscillator with En low for a while and check that nothing moves.

  int checks = 0, failures = 0;
  int n_detect_open = 0, n_detect_short = 0, n_reroute = 0, n_normal = 0;
  int n_escape = 0, n_dbl = 0, n_cut = 0, n_stop = 0, n_test_frames = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // characterised defects: {r_open, r_short, V_tsv in 0.1 mV}
  int dr_open  [7] = '{1000, 2000, 5000, 50000, 0,    0,    0};
  int dr_short [7] = '{0,    0,    0,    0,     500,  1000, 2000};
  int dv       [7] = '{5463, 5272, 5064, 4422,  3101, 3800, 4316};

  logic [NUM_TSV-1:0] exp_status, broken;

  function automatic int lane_of(int k); return k % N; endfunction
  function automatic int nbr_of(int k);  return (k / N) * N + (k % N + 1) % N; endfunction

  // All stimulus changes 1 ps after a rising edge of the TDMA clock. Returns
  // at the start of slot 0 (at once if already there).
  task automatic frame_start();
    while (slot != '0) begin @(posedge tdma_clk); #1; end
  endtask

  task automatic run_test_frame();
    frame_start();
    testmode = 1'b1;
    repeat (N) @(posedge tdma_clk);
    #1;
    n_test_frames++;
    chk(status == exp_status, "status register after N test cycles");
    chk(nmos_on == ~exp_status, "signal-path nMOS states");
    n_cut += $countones(exp_status);
    testmode = 1'b0;
  endtask

  task automatic run_normal_frame();
    logic [W-1:0] d [NUM_TSV];
    foreach (d[k]) d[k] = W'($urandom);
    frame_start();
    foreach (in_sig[k]) in_sig[k] = d[k];
    for (int s = 0; s < N; s++) begin
      @(posedge tdma_clk); #1;
      for (int k = 0; k < NUM_TSV; k++) begin
        if (lane_of(k) == s) begin
          int t;
          logic [W-1:0] e;
          t = exp_status[k] ? nbr_of(k) : k;
          // a padded lane of the last group is always intact and never flagged
          e = (t < NUM_TSV && (broken[t] || exp_status[t])) ? W'(0) : d[k];
          chk(out_vld[k] == 1'b1, "output updated one cycle after its slot");
          chk(out_sig[k] == e, $sformatf("line %0d data %h expected %h", k, out_sig[k], e));
          if (exp_status[k]) n_reroute++; else n_normal++;
        end else begin
          chk(out_vld[k] == 1'b0, "no update outside the slot");
        end
      end
    end
  endtask

  task automatic stop_oscillator();
    logic [CW-1:0] s0;
    logic [W-1:0] o0;
    @(posedge tdma_clk); #1;
    s0 = slot; o0 = out_sig[0];
    en = 1'b0;
    #20000;
    chk(slot == s0 && out_sig[0] == o0 && tdma_clk == 1'b0, "everything holds while En is low");
    en = 1'b1;
    @(posedge tdma_clk); #1;
    n_stop++;
  endtask

  initial begin
    foreach (in_sig[k]) in_sig[k] = '0;
    foreach (defect[k]) defect[k] = '0;
    foreach (dbl_open_a[g]) begin dbl_open_a[g] = '0; dbl_open_b[g] = '0; end
    vref_dmv = 16'd6000;
    #1000 rst_n = 1'b0;  // a falling edge: the clock is stopped during reset
    #2000 rst_n = 1'b1;
    #1000 en = 1'b1;
    @(posedge tdma_clk); #1;
    for (int r = 0; r < ROUNDS; r++) begin
      foreach (defect[k]) defect[k] = '0;
      broken = '0;
      exp_status = '0;
      vref_dmv = (r % 4 == 3) ? 16'd5000 : 16'd6000;  // a lowered V_ref lets small opens escape
      for (int g = 0; g < G; g++) begin
        int nd, a, kd;
        nd = (r == 0) ? 0 : $urandom_range(0, 2);
        a  = $urandom_range(0, N - 1);
        for (int x = 0; x < nd; x++) begin
          int k;
          k  = g * N + (a + 2 * x) % N;
          kd = $urandom_range(0, 6);
          if (k < NUM_TSV && !(nd == 2 && N < 4)) begin
            defect[k].r_open_ohm  = 32'(dr_open[kd]);
            defect[k].r_short_ohm = 32'(dr_short[kd]);
            broken[k]     = 1'b1;
            exp_status[k] = (dv[kd] <= int'(vref_dmv));
            if (exp_status[k] && dr_open[kd] != 0) n_detect_open++;
            if (exp_status[k] && dr_short[kd] != 0) n_detect_short++;
            if (!exp_status[k]) n_escape++;
          end
        end
        if ($urandom_range(0, 3) == 0) begin
          dbl_open_a[g] = CTL_W'($urandom);
          dbl_open_b[g] = ~dbl_open_a[g];
          n_dbl++;
        end else begin
          dbl_open_a[g] = '0;
          dbl_open_b[g] = '0;
        end
      end
      run_test_frame();
      run_normal_frame();
      if (r % 3 == 1) stop_oscillator();
      run_normal_frame();
    end
    $display("test_frames=%0d detected_open=%0d detected_short=%0d rerouted=%0d normal=%0d",
             n_test_frames, n_detect_open, n_detect_short, n_reroute, n_normal);
    $display("escaped=%0d nmos_cutoff=%0d double_tsv_single_open=%0d oscillator_stops=%0d",
             n_escape, n_cut, n_dbl, n_stop);
    chk(n_test_frames > 0, "test frame happened");
    chk(n_detect_open > 0, "open defect detected");
    chk(n_detect_short > 0, "short defect detected");
    chk(n_reroute > 0, "reroute happened");
    chk(n_normal > 0, "normal transfer happened");
    chk(n_escape > 0, "small open escaped a lowered V_ref");
    chk(n_cut > 0, "nMOS cut-off happened");
    chk(n_dbl > 0, "double-TSV single open tolerated");
    chk(n_stop > 0, "oscillator stopped and restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
