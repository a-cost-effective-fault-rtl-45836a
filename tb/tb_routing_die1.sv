// Self-checking testbench for routing_die1 (N = 4, W = 8). Random slots,
// modes, verdicts and status bits; an independent reference computes, from the
// routing truth table, which TSV must carry the active lane's data, whether
// its pull-down pMOS is on, and which signal-path nMOS transistors are off.
// Counts each of the four truth-table outcomes and fails if one never occurs.
`timescale 1ps / 1ps
module tb_routing_die1;
  localparam int unsigned N = 4, W = 8;
  logic testmode;
  logic [W-1:0] lane_data [N];
  logic lane_act [N], lane_tr [N];
  logic [N-1:0] status;
  logic [W-1:0] tsv_tx [N];
  logic [N-1:0] pmos_on, nmos_on;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  routing_die1 #(.N(N), .W(W)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int a;
      logic [W-1:0] d;
      logic tr;
      logic [W-1:0] exp_tx [N];
      logic [N-1:0] exp_p, exp_n;
      a        = $urandom_range(0, N);     // N means no lane active
      testmode = 1'($urandom);
      status   = N'($urandom);
      d        = testmode ? W'(0) : W'($urandom);
      tr       = (a < N) ? (testmode ? 1'($urandom) : status[a]) : 1'b0;
      for (int i = 0; i < N; i++) begin
        lane_act[i]  = (i == a);
        lane_data[i] = (i == a) ? d : '0;
        lane_tr[i]   = (i == a) ? tr : 1'b0;
      end
      exp_n = ~status;
      exp_p = '0;
      foreach (exp_tx[j]) exp_tx[j] = '0;
      if (a < N) begin
        seen[{testmode, tr}]++;
        case ({testmode, tr})
          2'b00: if (exp_n[a]) exp_tx[a] = d;
          2'b01: if (exp_n[(a + 1) % N]) exp_tx[(a + 1) % N] = d;
          2'b10: exp_p[a] = 1'b1;
          2'b11: exp_n[a] = 1'b0;
        endcase
      end
      #10;
      chk(pmos_on == exp_p, "pull-down pMOS gates");
      chk(nmos_on == exp_n, "signal-path nMOS gates");
      for (int j = 0; j < N; j++) chk(tsv_tx[j] == exp_tx[j], $sformatf("TSV %0d drive", j));
    end
    for (int k = 0; k < 4; k++) chk(seen[k] > 0, $sformatf("routing case %0d exercised", k));
    $display("normal=%0d reroute=%0d pmos_on=%0d nmos_off=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
