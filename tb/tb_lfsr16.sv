// tb_lfsr16: steps the LFSR and compares each state with a software model of
// the polynomial x^16 + x^14 + x^13 + x^11 + 1, checks that it returns to
// its seed after exactly 65535 steps (maximal length) and never reaches zero,
// and that it holds while `en` is low.
module tb_lfsr16;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [15:0] st;
  lfsr16 dut (.clk, .rst_n, .en, .state(st));
  int checks = 0, failures = 0;
  initial begin
    logic [15:0] m, seed; int period = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); seed = st; m = st;
    checks++; if (seed != 16'hACE1) begin failures++; $display("FAIL seed"); end
    repeat (3) @(negedge clk);
    checks++; if (st != seed) begin failures++; $display("FAIL moved while disabled"); end
    en = 1;
    do begin
      @(negedge clk); period++;
      m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
      if (period < 300) begin checks++; if (st != m) begin failures++; $display("FAIL step %0d", period); end end
      if (st == 0) begin failures++; $display("FAIL zero state"); break; end
    end while (st != seed && period < 70000);
    checks++; if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
