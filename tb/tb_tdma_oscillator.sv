// Self-checking testbench for the oscillator model at its default 500 MHz:
// no edge while En is low, first rising edge half a period after En rises,
// a 2000 ps period and 50 % duty cycle while enabled, and a clean stop (no
// pulse shorter than half a period) when En falls mid-phase.
`timescale 1ps / 1ps
module tb_tdma_oscillator;
  logic en = 1'b0, clk;
  int checks = 0, failures = 0, edges = 0;
  time t_rise, t_prev_rise, t_fall, t_en;

  tdma_oscillator dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) edges++;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    chk(edges == 0 && clk == 1'b0, "no clock while disabled");
    for (int run = 0; run < 3; run++) begin
      en = 1'b1; t_en = $time;
      @(posedge clk) t_rise = $time;
      chk(t_rise - t_en == 1000, "first edge after half a period");
      for (int k = 0; k < 20; k++) begin
        @(negedge clk) t_fall = $time;
        chk(t_fall - t_rise == 1000, "high phase 1000 ps");
        t_prev_rise = t_rise;
        @(posedge clk) t_rise = $time;
        chk(t_rise - t_prev_rise == 2000, "period 2000 ps");
      end
      #(300 + 400 * run);
      en = 1'b0;
      edges = 0;
      if (clk) begin
        @(negedge clk);
        chk($time - t_rise == 1000, "last high phase complete");
      end
      #7000;
      chk(edges == 0 && clk == 1'b0, "stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
