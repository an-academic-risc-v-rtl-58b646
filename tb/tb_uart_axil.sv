// tb_uart_axil: programs the UART over AXI4-Lite and checks what appears on
// the serial line and what is received. The testbench decodes the `tx` line
// itself (sampling each bit in its middle at the programmed bit time) and
// checks start bit, data, parity and stop bits and the frame length (11 bits
// with parity and one stop bit). `tx` is looped back to `rx`, so each byte must
// also come back through RXDATA; a frame with a wrong parity bit driven by the
// testbench must raise the parity-error flag.
module tb_uart_axil;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_if bus ();
  logic tx, rx, irq, drive_tb, tb_rx;
  assign rx = drive_tb ? tb_rx : tx;
  uart_axil dut (.clk, .rst_n, .bus, .tx, .rx, .irq_rx(irq));

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

  localparam int BIT = 16;
  // decode one frame from tx: returns data, parity bit, stop level
  task automatic grab(input bit with_par, output logic [7:0] d, output logic p, output logic stop, output int low_len);
    while (tx) @(posedge clk);
    repeat (BIT/2) @(posedge clk);
    chk("start bit", {31'b0, tx}, 0);
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); d[i] = tx; end
    p = 0;
    if (with_par) begin repeat (BIT) @(posedge clk); p = tx; end
    repeat (BIT) @(posedge clk); stop = tx;
    low_len = 0;
  endtask

  task automatic send_bad(input logic [7:0] d);  // even-parity frame with wrong parity
    logic [10:0] f;
    f = {1'b1, ~(^d), d, 1'b0};
    for (int i = 0; i < 11; i++) begin tb_rx = f[i]; repeat (BIT) @(posedge clk); end
    tb_rx = 1;
  endtask

  initial begin
    logic [31:0] r; logic [7:0] d; logic p, s; int ll, t0, t1;
    bus.awvalid = 0; bus.wvalid = 0; bus.bready = 0; bus.arvalid = 0; bus.rready = 0;
    bus.awaddr = 0; bus.wdata = 0; bus.wstrb = 0; bus.araddr = 0;
    drive_tb = 0; tb_rx = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    rd(32'h0C, r); chk("reset ctrl: parity on, even, 1 stop", r, 32'h1);
    wr(32'h10, BIT);
    rd(32'h10, r); chk("baud", r, BIT);
    for (int n = 0; n < 6; n++) begin
      logic [7:0] v; bit odd;
      v = 8'($urandom); odd = n[0];
      wr(32'h0C, {29'b0, 1'b0, odd, 1'b1});
      fork
        wr(32'h00, {24'b0, v});
        grab(1, d, p, s, ll);
      join
      chk("tx data", d, v);
      chk("tx parity", p, (^v) ^ odd);
      chk("tx stop", s, 1);
      while (!irq) @(posedge clk);
      rd(32'h08, r); chk("status received, no errors", r[3:1], 3'b001);
      rd(32'h04, r); chk("rx data", r[7:0], v);
      rd(32'h08, r); chk("rx cleared", r[1], 0);
    end
    // frame length with parity and one stop bit: 11 bit times busy
    wr(32'h0C, 32'h1);
    @(negedge clk); bus.awvalid = 1; bus.awaddr = 0; bus.wvalid = 1; bus.wdata = 32'h55; bus.wstrb = 4'hf;
    do @(posedge clk); while (!bus.awready);
    @(negedge clk); bus.awvalid = 0; bus.wvalid = 0; bus.bready = 1;
    t0 = $time;
    @(negedge clk); bus.bready = 0;
    while (dut.tx_busy) @(negedge clk);
    t1 = $time;
    repeat (2*BIT) @(posedge clk);
    rd(32'h04, r); chk("loopback 0x55", r[7:0], 8'h55);
    chk("frame length 11 bits", (t1 - t0) / 10, 11 * BIT);
    // no parity
    wr(32'h0C, 32'h0);
    fork wr(32'h00, 32'hA7); grab(0, d, p, s, ll); join
    chk("no-parity data", d, 8'hA7); chk("no-parity stop", s, 1);
    while (!irq) @(posedge clk);
    rd(32'h04, r); chk("no-parity rx", r[7:0], 8'hA7);
    // parity error injection
    wr(32'h0C, 32'h1);
    drive_tb = 1; repeat (4*BIT) @(posedge clk);
    send_bad(8'h3C);
    repeat (BIT) @(posedge clk);
    rd(32'h08, r); chk("parity error flagged", r[2:1], 2'b11);
    rd(32'h04, r); chk("byte with bad parity", r[7:0], 8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
