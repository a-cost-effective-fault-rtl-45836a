// Self-checking testbench for tsv_testing_ctrl (N = 4). A comparator stand-in
// reports a fixed set of defective lanes. Checks that a test frame of N
// cycles fills the status register with exactly that set (N cycles for N
// TSVs), that Testresult is 0 in the first half of each test slot and the
// lane's verdict after the mid-slot capture, that in normal mode Testresult
// is status[slot], and that a second test frame with a different defect set
// overwrites the old verdicts.
`timescale 1ps / 1ps
module tb_tsv_testing_ctrl;
  localparam int unsigned N = 4, CW = 2;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, testmode = 1'b0, cmp_out;
  logic [CW-1:0] cnt = '0;
  logic testresult;
  logic [N-1:0] status;
  logic [N-1:0] bad;
  int checks = 0, failures = 0;

  tsv_testing_ctrl #(.N(N)) dut (.*);

  always #500 clk = ~clk;
  always_ff @(posedge clk) if (en) cnt <= (cnt == CW'(N-1)) ? '0 : cnt + 1'b1;
  assign cmp_out = testmode && bad[cnt];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test_frame(logic [N-1:0] mask);
    bad = mask;
    @(negedge clk) testmode = 1'b1;
    for (int s = 0; s < N; s++) begin
      @(posedge clk); #100;
      chk(testresult == 1'b0, "testresult low before capture");
      @(negedge clk); #100;
      chk(testresult == bad[cnt], "testresult after capture");
    end
    @(posedge clk); #100;
    chk(status == mask, "status after N test cycles");
    testmode = 1'b0;
  endtask

  initial begin
    bad = '0;
    repeat (2) @(posedge clk);
    chk(status == '0, "status reset");
    rst_n = 1'b1;
    @(negedge clk) en = 1'b1;
    for (int r = 0; r < 6; r++) begin
      logic [N-1:0] m;
      m = (r == 0) ? 4'b0001 : N'($urandom);
      while (cnt != '0) @(posedge clk);
      test_frame(m);
      for (int c = 0; c < 3 * N; c++) begin
        @(negedge clk);
        chk(testresult == m[cnt], "normal mode testresult = status[slot]");
        chk(status == m, "status holds in normal mode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
