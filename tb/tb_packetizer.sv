// tb_packetizer: connects the SoC-side packetizer to the FPGA-side packetizer
// through a modelled FMC cable and a memory on the FPGA side, runs random
// 128-bit reads and writes with byte strobes, and checks the data against a
// reference model. It also checks that the cable carries 32-bit words only on
// FMC clock ticks (one in four core cycles), that a read moves exactly six
// words and a write seven, and that a read takes at least 6 FMC clocks.
module tb_packetizer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         tick, fclk;
  logic         m_req, m_we, m_ack, f_req, f_we, f_ack;
  logic [31:0]  m_addr, f_addr;
  logic [127:0] m_wdata, m_rdata, f_wdata, f_rdata;
  logic [15:0]  m_strb, f_strb;
  logic         s2f_v, f2s_v;
  logic [31:0]  s2f_d, f2s_d;

  clk_div u_div (.clk, .rst_n, .clk_out(fclk), .tick);
  packetizer dut (.clk, .rst_n, .tick, .m_req, .m_we, .m_addr, .m_wdata, .m_strb, .m_ack, .m_rdata,
                  .tx_valid(s2f_v), .tx_data(s2f_d), .rx_valid(f2s_v), .rx_data(f2s_d));
  fpga_packetizer fdut (.clk, .rst_n, .tick, .rx_valid(s2f_v), .rx_data(s2f_d),
                        .tx_valid(f2s_v), .tx_data(f2s_d), .m_req(f_req), .m_we(f_we),
                        .m_addr(f_addr), .m_wdata(f_wdata), .m_strb(f_strb), .m_ack(f_ack), .m_rdata(f_rdata));

  logic [127:0] mem [256];
  logic [127:0] ref_mem [256];
  int mc = 0;
  always_ff @(posedge clk) begin
    f_ack <= 1'b0;
    if (f_req && !f_ack) begin
      if (mc == 3) begin
        mc <= 0; f_ack <= 1'b1; f_rdata <= mem[f_addr[11:4]];
        if (f_we) for (int b = 0; b < 16; b++) if (f_strb[b]) mem[f_addr[11:4]][8*b +: 8] <= f_wdata[8*b +: 8];
      end else mc <= mc + 1;
    end
  end

  int checks = 0, failures = 0, words = 0, bad_timing = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (tick && s2f_v) words <= words + 1;
    if (tick && f2s_v) words <= words + 1 + int'(s2f_v);
  end
  // cable words change only right after a tick
  logic [31:0] last_s2f;
  logic        last_tick;
  always_ff @(posedge clk) begin
    last_s2f <= s2f_d; last_tick <= tick;
    if (rst_n && s2f_v && !last_tick && s2f_d != last_s2f && $past(s2f_v)) bad_timing <= bad_timing + 1;
  end

  task automatic xfer(input logic w, input logic [31:0] a, input logic [127:0] d, input logic [15:0] s,
                      output logic [127:0] r, output int cyc);
    @(negedge clk); m_req = 1; m_we = w; m_addr = a; m_wdata = d; m_strb = s; cyc = 0;
    while (!m_ack) begin @(negedge clk); cyc++; end
    r = m_rdata; m_req = 0;
  endtask

  initial begin
    logic [127:0] r, d; logic [31:0] a; logic [15:0] s; int cyc, w0;
    m_req = 0; m_we = 0; m_addr = 0; m_wdata = 0; m_strb = 0;
    for (int i = 0; i < 256; i++) begin mem[i] = {$urandom, $urandom, $urandom, $urandom}; ref_mem[i] = mem[i]; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      a = {20'b0, 8'($urandom), 4'b0};
      w0 = words;
      if ($urandom % 2) begin
        d = {$urandom, $urandom, $urandom, $urandom}; s = 16'($urandom);
        xfer(1, a, d, s, r, cyc);
        for (int b = 0; b < 16; b++) if (s[b]) ref_mem[a[11:4]][8*b +: 8] = d[8*b +: 8];
        @(negedge clk);
        checks++; if (words - w0 != 7) begin failures++; $display("FAIL write words %0d", words - w0); end
      end else begin
        xfer(0, a, 0, 0, r, cyc);
        checks++; if (r !== ref_mem[a[11:4]]) begin failures++; $display("FAIL read %h", a); end
        @(negedge clk);
        checks++; if (words - w0 != 6) begin failures++; $display("FAIL read words %0d", words - w0); end
        checks++; if (cyc < 24) begin failures++; $display("FAIL read too fast %0d", cyc); end
      end
    end
    checks++; if (bad_timing != 0) begin failures++; $display("FAIL words changed between ticks"); end
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
