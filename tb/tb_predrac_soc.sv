// tb_predrac_soc: end-to-end test of the SoC at its default parameters.
//
// The SoC is connected to a model of the FPGA board (FPGA-side Pack/Unpack
// plus memory) over the FMC link; the UART transmit line is looped back to its
// receive line and SPI MOSI to MISO. A host model speaks the debug-ring word
// protocol: it halts the core, which has been spinning on a jump-to-self at
// the boot address, loads a program into memory with WRITE_MEM, points the PC
// at it and resumes. The program configures the UART and sends a byte, runs a
// loopback SPI transfer and polls its status, stores and re-reads five words
// that map to the same 4-way cache set (forcing misses and evictions), runs a
// multiply, a divide and an atomic add, reads PMU counters through CSRs,
// stores its result and then reads 40 lines that share the result's L2 set,
// so the L2 must write the dirty result line back to the FPGA memory.
// The host then halts the core and checks registers and memory through the
// debug ring. Each mechanism of the design is counted and must occur at least
// once: instruction and data cache misses and hits, a cache eviction, L2
// misses, L2 back-invalidations of L1 lines, branch
// mispredictions, pipeline stalls, register bypasses, FMC read and write
// transactions, AXI4-Lite writes and reads, a UART frame received, an SPI
// transfer, the instruction-cache flush and debug-port register and memory
// accesses.
module tb_predrac_soc;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;               // 200 MHz

  logic fmc_clk, f_tx_v, f_rx_v, uart_tx, uart_irq, sck, mosi, cs_n;
  logic [31:0] f_tx_d, f_rx_d;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  int fpga_acc;

  predrac_soc dut (
    .clk, .rst_n, .fmc_clk, .fmc_tx_valid(f_tx_v), .fmc_tx_data(f_tx_d),
    .fmc_rx_valid(f_rx_v), .fmc_rx_data(f_rx_d),
    .uart_tx, .uart_rx(uart_tx), .uart_irq,
    .spi_sck(sck), .spi_mosi(mosi), .spi_miso(mosi), .spi_cs_n(cs_n),
    .dbg_in_valid(in_valid), .dbg_in_ready(in_ready), .dbg_in_data(in_data),
    .dbg_out_valid(out_valid), .dbg_out_ready(out_ready), .dbg_out_data(out_data)
  );
  fpga_board_model #(.MEM_WORDS(32768), .LAT(10)) board (
    .clk, .rst_n, .fmc_clk, .rx_valid(f_tx_v), .rx_data(f_tx_d),
    .tx_valid(f_rx_v), .tx_data(f_rx_d), .accesses(fpga_acc));

  // ---------------------------------------------------------- mechanism counters
  int n_imiss, n_dmiss, n_dhit, n_evict, n_mispred, n_stall, n_bypass, n_fmc_rd, n_fmc_wr;
  int n_l2_miss, n_l2_inv, n_l1_drop, n_axi_wr, n_axi_rd, n_uart_rx, n_spi, n_iflush, n_dbg_reg, n_dbg_mem, n_amo, n_div;
  initial begin
    n_imiss = 0; n_dmiss = 0; n_dhit = 0; n_evict = 0; n_mispred = 0; n_stall = 0; n_bypass = 0;
    n_fmc_rd = 0; n_fmc_wr = 0; n_axi_wr = 0; n_axi_rd = 0; n_uart_rx = 0; n_spi = 0;
    n_l2_miss = 0; n_l2_inv = 0; n_l1_drop = 0;
    n_iflush = 0; n_dbg_reg = 0; n_dbg_mem = 0; n_amo = 0; n_div = 0;
  end
  always_ff @(posedge clk) if (rst_n) begin
    if (dut.ic_miss) n_imiss <= n_imiss + 1;
    if (dut.dc_miss) n_dmiss <= n_dmiss + 1;
    if (dut.u_dcache.st == dut.u_dcache.S_LOOK && dut.u_dcache.cnt <= 1 && !dut.u_dcache.we_q && dut.u_dcache.hit)
      n_dhit <= n_dhit + 1;
    if (dut.dc_miss && dut.u_dcache.valid[int'(dut.u_dcache.rnd[1:0])*64 + int'(dut.u_dcache.idx)])
      n_evict <= n_evict + 1;
    if (dut.ev_mispred) n_mispred <= n_mispred + 1;
    if (dut.u_core.rr_stall && dut.u_core.idrr_v) n_stall <= n_stall + 1;
    if (dut.u_core.rr_fire && dut.u_core.exwb_v && dut.u_core.exwb_we &&
        ((dut.u_core.idrr_d.use_rs1 && dut.u_core.idrr_d.rs1 == dut.u_core.exwb_rd) ||
         (dut.u_core.idrr_d.use_rs2 && dut.u_core.idrr_d.rs2 == dut.u_core.exwb_rd))) n_bypass <= n_bypass + 1;
    if (dut.m_ack && !dut.m_we) n_fmc_rd <= n_fmc_rd + 1;
    if (dut.m_ack && dut.m_we)  n_fmc_wr <= n_fmc_wr + 1;
    if (dut.periph.bvalid && dut.periph.bready) n_axi_wr <= n_axi_wr + 1;
    if (dut.periph.rvalid && dut.periph.rready) n_axi_rd <= n_axi_rd + 1;
    if (dut.u_uart.rx_busy && dut.u_uart.rx_cnt == 0 && dut.u_uart.rx_got == dut.u_uart.rx_need - 1)
      n_uart_rx <= n_uart_rx + 1;
    if (dut.u_spi.busy && dut.u_spi.cnt == 0 && dut.u_spi.sck && dut.u_spi.edges == 0) n_spi <= n_spi + 1;
    if (dut.iflush) n_iflush <= n_iflush + 1;
    if (dut.l2_miss) n_l2_miss <= n_l2_miss + 1;
    if (dut.l2_inv) n_l2_inv <= n_l2_inv + 1;
    // an L2 eviction that hits a line the data L1 holds
    if (dut.l2_inv)
      for (int w = 0; w < 4; w++)
        if (dut.u_dcache.valid[w*64 + int'(dut.l2_inv_addr[11:6])] &&
            dut.u_dcache.tags[w*64 + int'(dut.l2_inv_addr[11:6])] == dut.l2_inv_addr[31:12])
          n_l1_drop <= n_l1_drop + 1;
    if (dut.dreg_we) n_dbg_reg <= n_dbg_reg + 1;
    if (dut.dm_req) n_dbg_mem <= n_dbg_mem + 1;
    if (dut.u_core.ex_fire && dut.u_core.d.cls == predrac_pkg::CL_AMO) n_amo <= n_amo + 1;
    if (dut.u_core.ex_fire && dut.u_core.d.cls == predrac_pkg::CL_MULDIV && dut.u_core.d.funct3[2]) n_div <= n_div + 1;
  end

  // ---------------------------------------------------------- host (debug) model
  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [63:0] g, e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic put(input logic [15:0] w);
    @(negedge clk); in_valid = 1; in_data = w;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
  endtask
  task automatic put64(input logic [63:0] v);
    for (int i = 0; i < 4; i++) put(v[16*i +: 16]);
  endtask
  task automatic get(output logic [15:0] w);
    int t = 0;
    @(negedge clk); out_ready = 1;
    while (!out_valid && t < 5000) begin @(negedge clk); t++; end
    if (t >= 5000) begin failures++; $display("FAIL debug reply timeout"); end
    w = out_data; @(posedge clk); @(negedge clk); out_ready = 0;
  endtask
  task automatic get64(output logic [63:0] v);
    logic [15:0] w;
    for (int i = 0; i < 4; i++) begin get(w); v[16*i +: 16] = w; end
  endtask
  task automatic rreg(input int r, output logic [63:0] v);
    put(16'h3000 | 16'(r)); get64(v);
  endtask

  // ---------------------------------------------------------- program
  localparam logic [63:0] PBASE = 64'h8000_0100;
  logic [31:0] prog [64];
  int np, auipc_idx;
  function automatic logic [31:0] ANDI(input logic [4:0] rd, rs1, input int imm); return i_t(imm, rs1, 3'd7, rd, 7'h13); endfunction
  function automatic logic [31:0] LW(input logic [4:0] rd, rs1, input int imm); return i_t(imm, rs1, 3'd2, rd, 7'h03); endfunction

  initial begin
    np = 0;
    prog[np++] = LUI(10, 32'h40000);          // UART base
    prog[np++] = ADDI(11, 0, 16);
    prog[np++] = SW(11, 10, 16);              // bit time 16 cycles
    prog[np++] = ADDI(12, 0, 32'h4B);
    prog[np++] = SW(12, 10, 0);               // send 'K'
    prog[np++] = LUI(13, 32'h40001);          // SPI base
    prog[np++] = ADDI(14, 0, 4);
    prog[np++] = SW(14, 13, 16);              // sck = clk/8
    prog[np++] = ADDI(14, 0, 1);
    prog[np++] = SW(14, 13, 12);              // chip select
    prog[np++] = ADDI(15, 0, 32'hA5);
    prog[np++] = SW(15, 13, 0);               // transfer 0xA5
    prog[np++] = LW(16, 13, 8);               // poll: busy?
    prog[np++] = ANDI(16, 16, 1);
    prog[np++] = BNE(16, 0, -8);
    prog[np++] = LW(17, 13, 4);               // received byte
    auipc_idx = np;
    prog[np++] = AUIPC(20, 1);                // data area
    prog[np++] = ADDI(21, 0, 5);
    prog[np++] = ADDI(22, 0, 0);
    prog[np++] = ADDI(23, 20, 0);
    prog[np++] = LUI(24, 1);                  // stride 4 KiB: same cache set
    prog[np++] = SD(21, 23, 0);               // loop1: store 5,4,3,2,1
    prog[np++] = ADD(23, 23, 24);
    prog[np++] = ADDI(21, 21, -1);
    prog[np++] = BNE(21, 0, -12);
    prog[np++] = ADDI(25, 0, 2);
    prog[np++] = ADDI(23, 20, 0);             // outer
    prog[np++] = ADDI(21, 0, 5);
    prog[np++] = LD(26, 23, 0);               // inner
    prog[np++] = ADD(22, 22, 26);
    prog[np++] = ADD(23, 23, 24);
    prog[np++] = ADDI(21, 21, -1);
    prog[np++] = BNE(21, 0, -16);
    prog[np++] = ADDI(25, 25, -1);
    prog[np++] = BNE(25, 0, -32);
    prog[np++] = MUL(27, 22, 22);
    prog[np++] = DIV(28, 27, 11);
    prog[np++] = AMOADD_D(29, 11, 20);
    prog[np++] = LD(30, 20, 0);
    prog[np++] = CSRRS(31, 32'hC02, 0);       // instret
    prog[np++] = CSRRS(9, 32'hC0A, 0);        // data-cache misses (counter 7)
    prog[np++] = LW(8, 10, 4);                // UART received byte
    prog[np++] = SD(22, 20, 256);
    prog[np++] = ADDI(5, 0, 40);              // 40 lines, stride 8 KiB: one L2 set
    prog[np++] = ADDI(6, 20, 256);
    prog[np++] = LUI(7, 2);
    prog[np++] = LD(4, 6, 0);
    prog[np++] = ADD(6, 6, 7);
    prog[np++] = ADDI(5, 5, -1);
    prog[np++] = BNE(5, 0, -12);
    prog[np++] = JAL(0, 0);                   // park
    if (np % 2) prog[np++] = ADDI(0, 0, 0);
  end

  initial begin
    logic [15:0] w; logic [63:0] v, x20;
    in_valid = 0; in_data = 0; out_ready = 0;
    foreach (board.mem[i]) board.mem[i] = '0;
    board.mem[0] = {96'b0, JAL(0, 0)};         // boot: spin at 0x8000_0000
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (400) @(posedge clk);
    chk("core spinning at boot address", dut.dpc, 64'h8000_0000);
    put(16'h1000); get(w); chk("halt ack", w, 16'hA001);
    for (int i = 0; i < np; i += 2) begin
      put(16'h5000); put64(PBASE + 64'(4*i)); put64({prog[i+1], prog[i]}); get(w);
      chk("program word ack", w, 16'hA005);
    end
    put(16'h6000); put64(PBASE + 8); get64(v); chk("program read back", v, {prog[3], prog[2]});
    put(16'h4001); put64(64'hDEAD); get(w);
    rreg(1, v); chk("debug register write", v, 64'hDEAD);
    put(16'h7000); put64(PBASE); get(w); chk("set pc ack", w, 16'hA007);
    put(16'h2000); get(w); chk("resume ack", w, 16'hA002);
    repeat (40000) @(posedge clk);
    put(16'h1000); get(w);
    put(16'h9000); get(w); chk("halted", w, 16'h0001);
    x20 = PBASE + 64'(4*auipc_idx) + 64'h1000;
    rreg(10, v); chk("x10", v, 64'h4000_0000);
    rreg(13, v); chk("x13", v, 64'h4000_1000);
    rreg(16, v); chk("x16 spi idle", v, 0);
    rreg(17, v); chk("x17 spi loopback byte", v, 64'hA5);
    rreg(20, v); chk("x20", v, x20);
    rreg(21, v); chk("x21", v, 0);
    rreg(22, v); chk("x22 sum", v, 30);
    rreg(23, v); chk("x23", v, x20 + 5*64'h1000);
    rreg(26, v); chk("x26", v, 1);
    rreg(27, v); chk("x27 mul", v, 900);
    rreg(28, v); chk("x28 div", v, 56);
    rreg(29, v); chk("x29 amo old", v, 5);
    rreg(30, v); chk("x30 amo new", v, 21);
    rreg(31, v); checks++; if (v < 40 || v > 5000) begin failures++; $display("FAIL instret %0d", v); end
    rreg(9, v);  checks++; if (v < 5) begin failures++; $display("FAIL dmiss counter %0d", v); end
    rreg(8, v);  chk("x8 uart loopback byte", v, 64'h4B);
    rreg(5, v);  chk("x5 L2 sweep done", v, 0);
    put(16'h6000); put64(x20 + 256); get64(v); chk("result in memory (debug read)", v, 30);
    chk("result in FPGA memory", board.mem[(x20[15:0] + 256) >> 4][63:0], 30);

    checks++; if (n_imiss == 0)   begin failures++; $display("FAIL no icache miss"); end
    checks++; if (n_dmiss == 0)   begin failures++; $display("FAIL no dcache miss"); end
    checks++; if (n_dhit == 0)    begin failures++; $display("FAIL no dcache hit"); end
    checks++; if (n_evict == 0)   begin failures++; $display("FAIL no eviction"); end
    checks++; if (n_mispred == 0) begin failures++; $display("FAIL no mispredict"); end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    checks++; if (n_bypass == 0)  begin failures++; $display("FAIL no bypass"); end
    checks++; if (n_fmc_rd == 0)  begin failures++; $display("FAIL no FMC read"); end
    checks++; if (n_fmc_wr == 0)  begin failures++; $display("FAIL no FMC write"); end
    checks++; if (n_fmc_rd + n_fmc_wr != fpga_acc) begin failures++; $display("FAIL FMC transactions %0d vs %0d", n_fmc_rd + n_fmc_wr, fpga_acc); end
    checks++; if (n_axi_wr == 0)  begin failures++; $display("FAIL no AXI write"); end
    checks++; if (n_axi_rd == 0)  begin failures++; $display("FAIL no AXI read"); end
    checks++; if (n_uart_rx == 0) begin failures++; $display("FAIL no UART frame"); end
    checks++; if (n_spi == 0)     begin failures++; $display("FAIL no SPI transfer"); end
    checks++; if (n_l2_miss == 0) begin failures++; $display("FAIL no L2 miss"); end
    checks++; if (n_l2_inv == 0)  begin failures++; $display("FAIL no L2 eviction"); end
    checks++; if (n_l1_drop == 0) begin failures++; $display("FAIL no L1 line back-invalidated"); end
    checks++; if (n_iflush == 0)  begin failures++; $display("FAIL no icache flush"); end
    checks++; if (n_dbg_reg == 0) begin failures++; $display("FAIL no debug register write"); end
    checks++; if (n_dbg_mem == 0) begin failures++; $display("FAIL no debug memory access"); end
    checks++; if (n_amo == 0)     begin failures++; $display("FAIL no AMO"); end
    checks++; if (n_div == 0)     begin failures++; $display("FAIL no divide"); end
    $display("imiss=%0d dmiss=%0d dhit=%0d evict=%0d mispred=%0d stall=%0d bypass=%0d fmc_rd=%0d fmc_wr=%0d axi_wr=%0d axi_rd=%0d uart=%0d spi=%0d",
             n_imiss, n_dmiss, n_dhit, n_evict, n_mispred, n_stall, n_bypass, n_fmc_rd, n_fmc_wr, n_axi_wr, n_axi_rd, n_uart_rx, n_spi);
    $display("l2_miss=%0d l2_evict=%0d l1_drop=%0d", n_l2_miss, n_l2_inv, n_l1_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
