// Self-checking testbench for the signal-TSV model: random data and defects;
// a TSV passes its data unless its open resistance reaches 1 kohm or it has a
// short of 2 kohm or less, in which case die 2 reads zero. Checks the
// thresholds at and around their edges.
`timescale 1ps / 1ps
module tb_tsv_link_model;
  import tsv_ft_pkg::*;
  localparam int unsigned N = 4, W = 8;
  logic [W-1:0] tsv_tx [N], tsv_rx [N];
  tsv_defect_t defect [N];
  logic [N-1:0] broken;
  int checks = 0, failures = 0;

  tsv_link_model #(.N(N), .W(W)) dut (.*);

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
    int ro [8] = '{0, 500, 999, 1000, 1001, 5000, 50000, 0};
    int rs [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
    for (int it = 0; it < 400; it++) begin
      bit exp_b [N];
      for (int i = 0; i < N; i++) begin
        tsv_tx[i] = W'($urandom);
        defect[i].r_open_ohm  = 32'(ro[$urandom_range(0, 7)]);
        case ($urandom_range(0, 4))
          0: defect[i].r_short_ohm = 32'd500;
          1: defect[i].r_short_ohm = 32'd2000;
          2: defect[i].r_short_ohm = 32'd2001;
          default: defect[i].r_short_ohm = 32'(rs[0]);
        endcase
        exp_b[i] = (defect[i].r_open_ohm >= 1000) ||
                   (defect[i].r_short_ohm != 0 && defect[i].r_short_ohm <= 2000);
      end
      #10;
      for (int i = 0; i < N; i++) begin
        chk(broken[i] == exp_b[i], "broken flag");
        chk(tsv_rx[i] == (exp_b[i] ? W'(0) : tsv_tx[i]), "die-2 data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
