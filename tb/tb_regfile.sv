// tb_regfile: random writes and reads on both read ports of the register file
// against a reference array; checks that x0 stays zero and that a read in the
// cycle of a write still returns the old value.
module tb_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] ra1, ra2, wa; logic [63:0] rd1, rd2, wd; logic we;
  regfile dut (.clk, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);
  int checks = 0, failures = 0;
  logic [63:0] refr [32];
  initial begin
    we = 1; wd = 0;
    for (int i = 0; i < 32; i++) begin @(negedge clk); wa = 5'(i); wd = {$urandom, $urandom}; refr[i] = (i == 0) ? 0 : wd; end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom % 2; wa = 5'($urandom); wd = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = ($urandom % 3 == 0) ? wa : 5'($urandom); #1;
      checks += 2;
      if (rd1 !== refr[ra1]) begin failures++; $display("FAIL port1 x%0d", ra1); end
      if (rd2 !== refr[ra2]) begin failures++; $display("FAIL port2 x%0d", ra2); end
      if (we && wa != 0) refr[wa] = wd;
    end
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
