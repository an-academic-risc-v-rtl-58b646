// tb_l1_cache: drives the L1 cache with random reads and writes over a small
// address range against a reference memory model, checks every read value,
// the hit latency of 2 cycles (instruction cache configuration), that misses
// refill four 128-bit beats, that evictions happen, that `flush` empties
// the cache and that `inv` drops exactly one line, also during its refill.
module tb_l1_cache;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         req, we, ack, miss, flush, inv, m_req, m_we, m_ack;
  logic [31:0]  inv_addr;
  logic [63:0]  addr, wdata, rdata;
  logic [7:0]   be;
  logic [31:0]  m_addr;
  logic [127:0] m_wdata, m_rdata;
  logic [15:0]  m_strb;

  l1_cache dut (.clk, .rst_n, .flush, .inv, .inv_addr, .req, .we, .addr, .wdata, .be, .ack, .rdata, .miss,
                .m_req, .m_we, .m_addr, .m_wdata, .m_strb, .m_ack, .m_rdata);

  // backing memory: 64 KiB of 128-bit beats, 2-cycle answer
  logic [127:0] mem [4096];
  logic [63:0]  ref_mem [8192];
  int           mcnt = 0;
  int           beats_read = 0;
  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (mcnt == 2) begin
        mcnt  <= 0;
        m_ack <= 1'b1;
        m_rdata <= mem[m_addr[15:4]];
        if (m_we) begin
          for (int b = 0; b < 16; b++) if (m_strb[b]) mem[m_addr[15:4]][8*b +: 8] <= m_wdata[8*b +: 8];
        end else beats_read <= beats_read + 1;
      end else mcnt <= mcnt + 1;
    end
  end

  int checks = 0, failures = 0, misses = 0;
  always_ff @(posedge clk) if (miss) misses <= misses + 1;

  task automatic access(input logic w, input logic [63:0] a, input logic [63:0] d,
                        input logic [7:0] bmask, output logic [63:0] r, output int lat);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d; be = bmask;
    @(negedge clk);
    req = 0; lat = 1;
    while (!ack) begin @(negedge clk); lat++; end
    r = rdata;
  endtask

  initial begin
    logic [63:0] r, a, d, expv;
    logic [7:0]  bm;
    int lat, m0, b0;
    req = 0; we = 0; addr = 0; wdata = 0; be = 0; flush = 0; inv = 0; inv_addr = 0;
    for (int i = 0; i < 4096; i++) begin
      mem[i] = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[2*i] = mem[i][63:0]; ref_mem[2*i+1] = mem[i][127:64];
    end
    repeat (3) @(posedge clk); rst_n = 1;

    // first read misses: 4 beats refilled
    b0 = beats_read;
    access(0, 64'h100, 0, 0, r, lat);
    checks++; if (r !== ref_mem[32'h100 >> 3]) begin failures++; $display("FAIL first read"); end
    checks++; if (beats_read - b0 != 4) begin failures++; $display("FAIL refill beats %0d", beats_read - b0); end
    // same line: hit in exactly 2 cycles
    access(0, 64'h138, 0, 0, r, lat);
    checks++; if (r !== ref_mem[32'h138 >> 3]) begin failures++; $display("FAIL hit data"); end
    checks++; if (lat != 2) begin failures++; $display("FAIL hit latency %0d", lat); end

    // random traffic over 64 KiB: 16 lines per set compete for 4 ways
    for (int n = 0; n < 3000; n++) begin
      a = {48'b0, 13'($urandom) , 3'b000};
      if ($urandom % 4 == 0) begin
        d = {$urandom, $urandom}; bm = 8'($urandom);
        access(1, a, d, bm, r, lat);
        for (int b = 0; b < 8; b++) if (bm[b]) ref_mem[a[15:3]][8*b +: 8] = d[8*b +: 8];
      end else begin
        access(0, a, 0, 0, r, lat);
        checks++;
        if (r !== ref_mem[a[15:3]]) begin
          failures++; $display("FAIL read %h got %h exp %h", a, r, ref_mem[a[15:3]]);
        end
      end
    end
    checks++; if (misses < 100) begin failures++; $display("FAIL too few misses %0d", misses); end

    // flush: a line that was a hit misses again
    access(0, 64'h140, 0, 0, r, lat);
    m0 = misses;
    access(0, 64'h140, 0, 0, r, lat);
    checks++; if (misses != m0) begin failures++; $display("FAIL expected hit"); end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    access(0, 64'h140, 0, 0, r, lat);
    checks++; if (misses != m0 + 1) begin failures++; $display("FAIL flush did not invalidate"); end
    checks++; if (r !== ref_mem[32'h140 >> 3]) begin failures++; $display("FAIL read after flush"); end

    // back-invalidation of one line: 0x180 misses again, 0x140 still hits
    access(0, 64'h180, 0, 0, r, lat);
    access(0, 64'h180, 0, 0, r, lat);
    access(0, 64'h140, 0, 0, r, lat);
    m0 = misses;
    @(negedge clk); inv = 1; inv_addr = 32'h1A8; @(negedge clk); inv = 0;
    access(0, 64'h140, 0, 0, r, lat);
    checks++; if (misses != m0) begin failures++; $display("FAIL inv dropped another line"); end
    access(0, 64'h188, 0, 0, r, lat);
    checks++; if (misses != m0 + 1) begin failures++; $display("FAIL inv did not drop its line"); end
    checks++; if (r !== ref_mem[32'h188 >> 3]) begin failures++; $display("FAIL read after inv"); end

    // invalidation of the line while it is being refilled: the read still
    // answers correctly, but the line is not kept
    m0 = misses;
    fork
      access(0, 64'h1C0, 0, 0, r, lat);
      begin
        repeat (6) @(negedge clk);
        inv = 1; inv_addr = 32'h1C0; @(negedge clk); inv = 0;
      end
    join
    checks++; if (r !== ref_mem[32'h1C0 >> 3]) begin failures++; $display("FAIL read with inv in refill"); end
    access(0, 64'h1C0, 0, 0, r, lat);
    checks++; if (misses != m0 + 2) begin failures++; $display("FAIL refilled line kept after inv %0d", misses - m0); end
    access(0, 64'h1C0, 0, 0, r, lat);
    checks++; if (misses != m0 + 2 || lat != 2) begin failures++; $display("FAIL line not kept on second refill"); end
    $display("misses=%0d", misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
