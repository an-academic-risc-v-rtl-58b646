// tb_malardalen: runs bare-metal benchmark kernels in the style of the
// Malardalen WCET suite on the whole SoC at its default parameters, with the
// program and its data in the FPGA board's memory, reached over the FMC link
// through both cache levels.
//
// Three kernels are written here with the instruction encoders of
// rv_asm_pkg (each is this testbench's own rendering of the benchmark's
// algorithm):
//   bsort100  bubble sort of 100 doublewords initialised in descending order
//             (the worst case), then a pass that counts misplaced elements;
//   fibcall   fib(30) computed iteratively, 30 times over;
//   matmult   product of two 10x10 integer matrices, then a checksum.
// Each program clears x1, reads `cycle` and `instret` at its start and end, writes a
// sentinel into x1 as its last act and parks on a jump-to-self. The bench
// boots the SoC from reset for each kernel, waits for the sentinel, reads
// the result registers straight from the register file and checks them
// against values computed here. It also reports the measured IPC and checks
// that it lies between 0.15 and 1/3: the fetch of one instruction at a time
// through a 2-cycle instruction cache bounds it by 1/3.
module tb_malardalen;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;               // 200 MHz

  logic fmc_clk, f_tx_v, f_rx_v, uart_tx, uart_irq, sck, mosi, cs_n;
  logic [31:0] f_tx_d, f_rx_d;
  logic in_ready, out_valid;
  logic [15:0] out_data;
  int fpga_acc;

  predrac_soc dut (
    .clk, .rst_n, .fmc_clk, .fmc_tx_valid(f_tx_v), .fmc_tx_data(f_tx_d),
    .fmc_rx_valid(f_rx_v), .fmc_rx_data(f_rx_d),
    .uart_tx, .uart_rx(uart_tx), .uart_irq,
    .spi_sck(sck), .spi_mosi(mosi), .spi_miso(mosi), .spi_cs_n(cs_n),
    .dbg_in_valid(1'b0), .dbg_in_ready(in_ready), .dbg_in_data(16'h0),
    .dbg_out_valid(out_valid), .dbg_out_ready(1'b1), .dbg_out_data(out_data)
  );
  fpga_board_model #(.MEM_WORDS(8192), .LAT(10)) board (
    .clk, .rst_n, .fmc_clk, .rx_valid(f_tx_v), .rx_data(f_tx_d),
    .tx_valid(f_rx_v), .tx_data(f_rx_d), .accesses(fpga_acc));

  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [63:0] g, e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", s, g, e); end
  endtask
  function automatic logic [63:0] xr(input int r);
    return dut.u_core.u_rf.bank0[r];
  endfunction

  localparam logic [63:0] SENTINEL = 64'h5A5;   // fits an ADDI immediate
  logic [31:0] prog [256];
  int np;

  task automatic emit(input logic [31:0] w);
    prog[np] = w;
    np = np + 1;
  endtask

  // common prologue: x1 cleared (it holds the previous kernel's sentinel:
  // reset does not clear the register file), x10 = data area (0x8001_0000),
  // x28/x29 = cycle/instret
  task automatic prologue();
    np = 0;
    emit(AUIPC(10, 32'h10));                  // first, so x10 is line-aligned
    emit(ADDI(1, 0, 0));
    emit(CSRRS(28, 32'hC00, 0));
    emit(CSRRS(29, 32'hC02, 0));
  endtask
  // common epilogue: x30/x31 = cycle/instret, sentinel, park
  task automatic epilogue();
    emit(CSRRS(31, 32'hC02, 0));
    emit(CSRRS(30, 32'hC00, 0));
    emit(ADDI(1, 0, int'(SENTINEL)));
    emit(JAL(0, 0));
  endtask

  task automatic run(input string name, output real ipc);
    int t;
    rst_n = 0;
    foreach (board.mem[i]) board.mem[i] = '0;
    for (int i = 0; i < np; i++) board.mem[i / 4][32 * (i % 4) +: 32] = prog[i];
    repeat (5) @(posedge clk);
    rst_n = 1;
    t = 0;
    while (xr(1) == SENTINEL && t < 100_000) begin @(posedge clk); t++; end
    while (xr(1) != SENTINEL && t < 3_000_000) begin @(posedge clk); t++; end
    checks++; if (t >= 3_000_000) begin failures++; $display("FAIL %s did not finish", name); end
    ipc = real'(xr(31) - xr(29)) / real'(xr(30) - xr(28));
    $display("%-9s cycles=%0d instructions=%0d IPC=%.3f", name, xr(30) - xr(28), xr(31) - xr(29), ipc);
    checks++; if (ipc < 0.15 || ipc > 1.0 / 3.0 + 0.001) begin failures++; $display("FAIL %s IPC %.3f", name, ipc); end
  endtask

  initial begin
    real ipc, sum;
    logic [63:0] fib, a, b, cks;
    sum = 0;

    // ------------------------------------------------ bsort100
    prologue();
    emit(ADDI(11, 0, 100));            // a[i] = 100 - i
    emit(ADDI(12, 10, 0));
    emit(SD(11, 12, 0));               // init:
    emit(ADDI(12, 12, 8));
    emit(ADDI(11, 11, -1));
    emit(BNE(11, 0, -12));
    emit(ADDI(13, 0, 99));             // i = 99 .. 1
    emit(ADDI(12, 10, 0));             // outer:
    emit(ADDI(14, 13, 0));
    emit(LD(15, 12, 0));               // inner:
    emit(LD(16, 12, 8));
    emit(BGE(16, 15, 12));
    emit(SD(16, 12, 0));               // swap
    emit(SD(15, 12, 8));
    emit(ADDI(12, 12, 8));             // next j
    emit(ADDI(14, 14, -1));
    emit(BNE(14, 0, -28));
    emit(ADDI(13, 13, -1));
    emit(BNE(13, 0, -44));
    emit(ADDI(12, 10, 0));             // check a[k] == k + 1
    emit(ADDI(11, 0, 1));
    emit(ADDI(20, 0, 0));
    emit(ADDI(17, 0, 101));
    emit(LD(15, 12, 0));               // verify:
    emit(SUBW(18, 15, 11));
    emit(SLTU(18, 0, 18));
    emit(ADD(20, 20, 18));
    emit(ADDI(12, 12, 8));
    emit(ADDI(11, 11, 1));
    emit(BNE(11, 17, -24));
    emit(LD(21, 10, 0));               // smallest and largest
    emit(LD(22, 10, 792));
    epilogue();
    run("bsort100", ipc); sum += ipc;
    chk("bsort100 misplaced elements", xr(20), 0);
    chk("bsort100 a[0]", xr(21), 1);
    chk("bsort100 a[99]", xr(22), 100);
    // init 2 + 4*100, sort 1 + 4*99 + 8*4950 (every comparison swaps),
    // verify 4 + 7*100, two loads: 41105, give or take the CSR read itself
    checks++;
    if (xr(31) - xr(29) < 41105 || xr(31) - xr(29) > 41106) begin
      failures++; $display("FAIL bsort100 instructions %0d", xr(31) - xr(29));
    end

    // ------------------------------------------------ fibcall
    prologue();
    emit(ADDI(19, 0, 30));             // repeat 30 times
    emit(ADDI(11, 0, 30));             // rep: n = 30
    emit(ADDI(12, 0, 0));              // a = fib(0)
    emit(ADDI(13, 0, 1));              // b = fib(1)
    emit(ADD(14, 12, 13));             // loop: t = a + b
    emit(ADDI(12, 13, 0));
    emit(ADDI(13, 14, 0));
    emit(ADDI(11, 11, -1));
    emit(BNE(11, 0, -16));
    emit(ADDI(19, 19, -1));
    emit(BNE(19, 0, -36));
    epilogue();
    run("fibcall", ipc); sum += ipc;
    a = 0; b = 1;
    for (int i = 0; i < 30; i++) begin fib = a + b; a = b; b = fib; end
    chk("fibcall fib(30)", xr(12), a);
    chk("fibcall fib(31)", xr(13), b);

    // ------------------------------------------------ matmult 10x10
    // A[i][j] = i + j + 1 at x10, B[i][j] = i - j + 2 at x10 + 800,
    // C at x10 + 1600; x20 = sum of all C[i][j] * (i + 1)
    prologue();
    emit(ADDI(5, 0, 0));               // i
    emit(ADDI(12, 10, 0));             // pA
    emit(ADDI(13, 10, 800));           // pB
    emit(ADDI(6, 0, 0));               // fill: j
    emit(ADD(7, 5, 6));
    emit(ADDI(8, 7, 1));
    emit(SD(8, 12, 0));                // A[i][j]
    emit(SUBW(7, 5, 6));
    emit(ADDI(8, 7, 2));
    emit(SD(8, 13, 0));                // B[i][j]
    emit(ADDI(12, 12, 8));
    emit(ADDI(13, 13, 8));
    emit(ADDI(6, 6, 1));
    emit(ADDI(9, 0, 10));
    emit(BNE(6, 9, -40));
    emit(ADDI(5, 5, 1));
    emit(BNE(5, 9, -52));
    emit(ADDI(14, 10, 1600));          // pC
    emit(ADDI(15, 10, 0));             // row of A
    emit(ADDI(5, 0, 0));               // i
    emit(ADDI(20, 0, 0));              // checksum
    emit(ADDI(6, 0, 0));               // rows: j
    emit(ADDI(16, 15, 0));             // cols: pA = row
    emit(ADDI(17, 10, 800));           // pB = B + 8j
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADD(17, 17, 6));
    emit(ADDI(18, 0, 0));              // acc
    emit(ADDI(7, 0, 10));              // k
    emit(LD(21, 16, 0));               // dot:
    emit(LD(22, 17, 0));
    emit(MUL(23, 21, 22));
    emit(ADD(18, 18, 23));
    emit(ADDI(16, 16, 8));
    emit(ADDI(17, 17, 80));
    emit(ADDI(7, 7, -1));
    emit(BNE(7, 0, -28));
    emit(SD(18, 14, 0));               // C[i][j]
    emit(ADDI(14, 14, 8));
    emit(ADDI(24, 5, 1));
    emit(MUL(25, 18, 24));
    emit(ADD(20, 20, 25));
    emit(ADDI(6, 6, 1));
    emit(BNE(6, 9, -104));
    emit(ADDI(15, 15, 80));
    emit(ADDI(5, 5, 1));
    emit(BNE(5, 9, -120));
    emit(LD(26, 14, -8));             // C[9][9], the last one written
    epilogue();
    run("matmult", ipc); sum += ipc;
    cks = 0;
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        logic [63:0] c;
        c = 0;
        for (int k = 0; k < 10; k++) c += 64'(i + k + 1) * 64'($signed(k - j + 2));
        cks += c * 64'(i + 1);
        if (i == 9 && j == 9) chk("matmult C[9][9]", xr(26), c);
      end
    chk("matmult checksum", xr(20), cks);

    $display("mean IPC over the three kernels: %.3f", sum / 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
