// tb_spi_axil: exchanges random bytes with an SPI mode-0 slave model through
// the AXI4-Lite registers. The model samples `mosi` on rising `sck` and shifts
// its own byte out on `miso` at falling edges. The testbench checks both
// directions, the chip select, that each transfer has exactly 8 rising edges,
// and that at the fastest setting (CLKDIV = 4) `sck` has a period of 8 core
// cycles (25 MHz from 200 MHz).
module tb_spi_axil;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_if bus ();
  logic sck, mosi, miso, cs_n;
  spi_axil dut (.clk, .rst_n, .bus, .sck, .mosi, .miso, .cs_n);

  // slave model
  logic [7:0] s_in, s_out;
  int         rises = 0, last_rise = 0, period = 0;
  assign miso = s_out[7];
  always @(posedge sck) begin
    s_in <= {s_in[6:0], mosi}; rises <= rises + 1;
    period <= ($time - last_rise) / 10; last_rise <= $time;
  end
  always @(negedge sck) s_out <= {s_out[6:0], 1'b0};

  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [31:0] g, e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic wr(input logic [31:0] a, d);
    @(negedge clk); bus.awvalid = 1; bus.awaddr = a; bus.wvalid = 1; bus.wdata = d; bus.wstrb = 4'hf;
    do @(posedge clk); while (!bus.awready);
    @(negedge clk); bus.awvalid = 0; bus.wvalid = 0; bus.bready = 1;
    while (!bus.bvalid) @(negedge clk);
    @(negedge clk); bus.bready = 0;
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bus.arvalid = 1; bus.araddr = a;
    do @(posedge clk); while (!bus.arready);
    @(negedge clk); bus.arvalid = 0; bus.rready = 1;
    while (!bus.rvalid) @(negedge clk);
    d = bus.rdata; @(negedge clk); bus.rready = 0;
  endtask

  initial begin
    logic [31:0] r; logic [7:0] m, s; int r0;
    bus.awvalid = 0; bus.wvalid = 0; bus.bready = 0; bus.arvalid = 0; bus.rready = 0;
    bus.awaddr = 0; bus.wdata = 0; bus.wstrb = 0; bus.araddr = 0;
    s_out = 0; s_in = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    chk("cs_n idle high", cs_n, 1);
    wr(32'h0C, 1); chk("cs_n asserted", cs_n, 0);
    wr(32'h10, 4);
    for (int n = 0; n < 20; n++) begin
      m = 8'($urandom); s = 8'($urandom);
      @(negedge clk); s_out = s; r0 = rises;
      wr(32'h00, m);
      do rd(32'h08, r); while (r[0]);
      chk("done flag", r[1], 1);
      rd(32'h04, r);
      chk("miso byte", r[7:0], s);
      chk("mosi byte", s_in, m);
      chk("8 sck edges", rises - r0, 8);
      chk("sck period 8 cycles", period, 8);
    end
    wr(32'h10, 1); rd(32'h10, r); chk("clkdiv floor", r, 4);
    wr(32'h0C, 0); chk("cs_n released", cs_n, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
