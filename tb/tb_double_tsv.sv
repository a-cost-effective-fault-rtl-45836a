// Self-checking testbench for the double-TSV model: a bit arrives unless both
// TSVs of its pair are open. Exhaustive over one bit's cases, then random.
`timescale 1ps / 1ps
module tb_double_tsv;
  localparam int unsigned WIDTH = 5;
  logic [WIDTH-1:0] tx, open_a, open_b, rx;
  int checks = 0, failures = 0, n_single_open = 0;

  double_tsv #(.WIDTH(WIDTH)) dut (.*);

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
    for (int it = 0; it < 500; it++) begin
      tx = WIDTH'($urandom); open_a = WIDTH'($urandom); open_b = WIDTH'($urandom);
      #10;
      for (int b = 0; b < WIDTH; b++) begin
        chk(rx[b] == ((open_a[b] && open_b[b]) ? 1'b0 : tx[b]), "received bit");
        if (tx[b] && (open_a[b] ^ open_b[b])) n_single_open++;
      end
    end
    chk(n_single_open > 0, "single open pair exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
