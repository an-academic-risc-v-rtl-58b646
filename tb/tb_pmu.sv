// tb_pmu: drives the nine event inputs of the PMU with random patterns,
// counts the events independently and checks every counter through the read
// port, an out-of-range select and the clear input.
module tb_pmu;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear; logic [8:0] ev; logic [3:0] sel; logic [63:0] rdata;
  pmu dut (.clk, .rst_n, .clear, .events(ev), .sel, .rdata);
  int checks = 0, failures = 0;
  longint expc [9];
  initial begin
    clear = 0; ev = 0; sel = 0;
    foreach (expc[i]) expc[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk); ev = 9'($urandom) & 9'($urandom);
      for (int i = 0; i < 9; i++) expc[i] += ev[i];
    end
    @(negedge clk); ev = 0;
    for (int i = 0; i < 9; i++) begin
      sel = 4'(i); #1; checks++;
      if (rdata != 64'(expc[i])) begin failures++; $display("FAIL counter %0d got %0d exp %0d", i, rdata, expc[i]); end
    end
    sel = 4'd12; #1; checks++; if (rdata != 0) begin failures++; $display("FAIL out of range"); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; sel = 4'd3; #1;
    checks++; if (rdata != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
