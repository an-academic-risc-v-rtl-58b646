// tb_l2_cache: drives the L2 cache with random 128-bit reads and strobed
// writes over 256 KiB (four times its size) against a reference memory.
// Checks every read value, the 3-cycle hit latency, that a miss refills four
// beats, that dirty lines are written back (after the traffic, a sweep of
// other addresses pushes most lines out, and for every line of the first
// 256 KiB the cache no longer holds the backing memory must equal the
// reference), and that every back-invalidation names a line that was in
// the cache and is no longer there.
module tb_l2_cache;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         req, we, ack, inv, miss, m_req, m_we, m_ack;
  logic [31:0]  addr, inv_addr, m_addr;
  logic [127:0] wdata, rdata, m_wdata, m_rdata;
  logic [15:0]  strb, m_strb;

  l2_cache dut (.clk, .rst_n, .req, .we, .addr, .wdata, .strb, .ack, .rdata,
                .inv, .inv_addr, .miss,
                .m_req, .m_we, .m_addr, .m_wdata, .m_strb, .m_ack, .m_rdata);

  // backing memory: 512 KiB of 128-bit beats, answers after 3 cycles
  localparam int BEATS = 32768;
  logic [127:0] mem     [BEATS];
  logic [127:0] ref_mem [BEATS];
  int mcnt = 0, beats_rd = 0, beats_wr = 0;
  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (mcnt == 3) begin
        mcnt  <= 0;
        m_ack <= 1'b1;
        m_rdata <= mem[m_addr[18:4]];
        if (m_we) begin
          for (int b = 0; b < 16; b++) if (m_strb[b]) mem[m_addr[18:4]][8*b +: 8] <= m_wdata[8*b +: 8];
          beats_wr <= beats_wr + 1;
        end else beats_rd <= beats_rd + 1;
      end else mcnt <= mcnt + 1;
    end
  end

  int checks = 0, failures = 0, misses = 0, invs = 0;
  always_ff @(posedge clk) if (miss) misses <= misses + 1;

  // lines the cache may hold: set on every access, cleared by `inv`
  bit present [BEATS/4];
  always @(posedge clk) if (inv) begin
    invs <= invs + 1;
    checks <= checks + 1;
    if (!present[inv_addr[18:6]] || inv_addr[5:0] != 0) begin
      failures <= failures + 1; $display("FAIL inv of absent line %h", inv_addr);
    end
    present[inv_addr[18:6]] <= 1'b0;
  end

  // level request held until ack, as the L1 arbiter does
  task automatic access(input logic w, input logic [31:0] a, input logic [127:0] d,
                        input logic [15:0] sm, output logic [127:0] r, output int lat);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d; strb = sm; lat = 0;
    do begin @(negedge clk); lat++; end while (!ack);
    req = 0;
    r = rdata;
    present[a[18:6]] = 1'b1;
  endtask

  initial begin
    logic [127:0] r, d;
    logic [31:0]  a;
    logic [15:0]  sm;
    int lat, m0, b0, w0;
    req = 0; we = 0; addr = 0; wdata = 0; strb = 0;
    for (int i = 0; i < BEATS; i++) begin
      mem[i] = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[i] = mem[i];
    end
    repeat (3) @(posedge clk); rst_n = 1;

    // a miss refills four beats; the rest of the line then hits in 3 cycles
    b0 = beats_rd; m0 = misses;
    access(0, 32'h1230, 0, 0, r, lat);
    checks++; if (r !== ref_mem[32'h123]) begin failures++; $display("FAIL first read"); end
    checks++; if (beats_rd - b0 != 4 || misses - m0 != 1) begin failures++; $display("FAIL refill beats %0d", beats_rd - b0); end
    for (int k = 0; k < 4; k++) begin
      access(0, 32'h1200 + 32'(16 * k), 0, 0, r, lat);
      checks++; if (r !== ref_mem[32'h120 + k]) begin failures++; $display("FAIL hit data"); end
      checks++; if (lat != 3) begin failures++; $display("FAIL hit latency %0d", lat); end
    end
    checks++; if (misses - m0 != 1) begin failures++; $display("FAIL hits counted as misses"); end

    // nine lines of one set: the ninth must evict one of the first eight
    m0 = invs;
    for (int k = 0; k < 9; k++) access(0, 32'h4_0000 + 32'(k * 8192), 0, 0, r, lat);
    checks++; if (invs - m0 != 1) begin failures++; $display("FAIL expected one eviction, got %0d", invs - m0); end

    // random traffic over 256 KiB
    for (int n = 0; n < 6000; n++) begin
      a = {14'b0, 14'($urandom), 4'b0};
      if ($urandom % 3 == 0) begin
        d = {$urandom, $urandom, $urandom, $urandom}; sm = 16'($urandom);
        access(1, a, d, sm, r, lat);
        for (int b = 0; b < 16; b++) if (sm[b]) ref_mem[a[18:4]][8*b +: 8] = d[8*b +: 8];
      end else begin
        access(0, a, 0, 0, r, lat);
        checks++;
        if (r !== ref_mem[a[18:4]]) begin
          failures++; $display("FAIL read %h got %h exp %h", a, r, ref_mem[a[18:4]]);
        end
      end
    end
    checks++; if (misses < 1000) begin failures++; $display("FAIL too few misses %0d", misses); end

    // push lines out by reading the upper 256 KiB, then compare memory for
    // every line that has left the cache (random replacement keeps a few)
    w0 = beats_wr; m0 = 0;
    for (int l = 0; l < 4096; l++) access(0, 32'h4_0000 + 32'(l * 64), 0, 0, r, lat);
    checks++; if (beats_wr == 0 || beats_wr % 4 != 0) begin failures++; $display("FAIL write-back beats %0d", beats_wr); end
    for (int i = 0; i < BEATS / 2; i++) if (!present[i / 4]) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin failures++; $display("FAIL memory beat %0d after write-back", i); end
    end else m0++;
    checks++; if (m0 > 4 * 1024) begin failures++; $display("FAIL %0d beats still cached", m0); end
    $display("beats still cached: %0d", m0);
    $display("misses=%0d invalidations=%0d beats read=%0d written=%0d (last sweep %0d)",
             misses, invs, beats_rd, beats_wr, beats_wr - w0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
