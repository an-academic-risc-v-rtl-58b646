// tb_clk_div: checks that the divided clock has a period of exactly four core
// cycles with a 50% duty cycle, and that `tick` is high once per period, in
// the core cycle just before the divided clock rises.
module tb_clk_div;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic co, tick;
  clk_div dut (.clk, .rst_n, .clk_out(co), .tick);
  int checks = 0, failures = 0;
  initial begin
    logic prev_co, prev_tick;
    int high = 0, ticks = 0, rises = 0, last_rise = -1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); prev_co = co; prev_tick = tick;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      high += int'(co); ticks += int'(tick);
      if (co && !prev_co) begin
        rises++;
        checks++; if (!prev_tick) begin failures++; $display("FAIL tick not before rise"); end
        if (last_rise >= 0) begin checks++; if (c - last_rise != 4) begin failures++; $display("FAIL period %0d", c - last_rise); end end
        last_rise = c;
      end
      prev_co = co; prev_tick = tick;
    end
    checks++; if (high != 200) begin failures++; $display("FAIL duty %0d", high); end
    checks++; if (ticks != 100) begin failures++; $display("FAIL ticks %0d", ticks); end
    checks++; if (rises != 100) begin failures++; $display("FAIL rises %0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
