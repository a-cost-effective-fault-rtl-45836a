// Self-checking testbench for tdma_module (N = 4, W = 8): checks the slot
// counter sequence and its hold while En is low, that exactly one lane is
// active per cycle, that mux1/mux2/demux1 deliver input line `cnt` in normal
// mode and Testmodebar (all zeros) in test mode, and that demux6 hands
// Testresult to the active lane only. Expected values come from a counter
// kept in the testbench.
`timescale 1ps / 1ps
module tb_tdma_module;
  localparam int unsigned N = 4, W = 8, CW = 2;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, testmode = 1'b0, testresult = 1'b0;
  logic [W-1:0] in_sig [N];
  logic [CW-1:0] cnt;
  logic [W-1:0] lane_data [N];
  logic lane_act [N], lane_tr [N];
  int checks = 0, failures = 0;
  int unsigned exp_cnt = 0;

  tdma_module #(.N(N), .W(W)) dut (.*);

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
    foreach (in_sig[i]) in_sig[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      en         = ($urandom_range(0, 9) != 0);
      testmode   = ($urandom_range(0, 3) == 0);
      testresult = 1'($urandom);
      foreach (in_sig[i]) in_sig[i] = W'($urandom);
      #1;
      chk(cnt == CW'(exp_cnt), "slot counter");
      for (int i = 0; i < N; i++) begin
        bit act;
        act = en && (i == exp_cnt);
        chk(lane_act[i] == act, "lane_act");
        chk(lane_tr[i] == (act && testresult), "demux6");
        if (act) chk(lane_data[i] == (testmode ? W'(0) : in_sig[exp_cnt]), "mux1/mux2/demux1");
        else     chk(lane_data[i] == '0, "idle lane data");
      end
      @(posedge clk);
      if (en) exp_cnt = (exp_cnt + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
