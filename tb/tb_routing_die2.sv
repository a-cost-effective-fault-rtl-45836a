// Self-checking testbench for routing_die2 (N = 4, W = 8). Each cycle a random
// slot, Testresult and mode are applied; die-1 behaviour is imitated by
// putting the slot's data on the slot's own TSV (Testresult 0) or on its
// neighbour (Testresult 1) and noise on the other TSVs. Checks that only the
// slot's output register loads, one cycle later, with the right data, that
// test mode freezes the outputs and raises the pull-up, and that En gates all.
`timescale 1ps / 1ps
module tb_routing_die2;
  localparam int unsigned N = 4, W = 8, CW = 2;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, testmode = 1'b0, testresult = 1'b0;
  logic [CW-1:0] slot = '0;
  logic [W-1:0] tsv_rx [N];
  logic [W-1:0] out_sig [N];
  logic [N-1:0] out_vld;
  logic pullup_on;
  logic [W-1:0] exp_out [N];
  int checks = 0, failures = 0, n_rr = 0, n_norm = 0;

  routing_die2 #(.N(N), .W(W)) dut (.*);

  always #500 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (tsv_rx[i]) tsv_rx[i] = '0;
    foreach (exp_out[i]) exp_out[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      logic [W-1:0] d;
      logic [N-1:0] exp_vld;
      int s;
      @(negedge clk);
      s          = $urandom_range(0, N - 1);
      slot       = CW'(s);
      en         = ($urandom_range(0, 7) != 0);
      testmode   = ($urandom_range(0, 4) == 0);
      testresult = 1'($urandom);
      d          = W'($urandom);
      foreach (tsv_rx[i]) tsv_rx[i] = W'($urandom);
      // die 1 leaves the slot's own TSV undriven when it reroutes
      if (testresult) begin
        tsv_rx[s] = '0;
        tsv_rx[(s + 1) % N] = d;
      end else begin
        tsv_rx[s] = d;
        tsv_rx[(s + N - 1) % N] = '0;  // previous lane idle
      end
      #1;
      chk(pullup_on == (en && testmode), "pull-up control");
      exp_vld = '0;
      if (en && !testmode) begin
        exp_out[s] = d;
        exp_vld[s] = 1'b1;
        if (testresult) n_rr++; else n_norm++;
      end
      @(posedge clk); #1;
      chk(out_vld == exp_vld, "out_vld");
      for (int i = 0; i < N; i++) chk(out_sig[i] == exp_out[i], $sformatf("out_sig[%0d]", i));
    end
    chk(n_rr > 0 && n_norm > 0, "both paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
