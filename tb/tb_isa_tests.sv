// tb_isa_tests: self-checking instruction tests, run on the whole SoC at its
// default parameters, for the instructions add, amoand, bne, mul, ld, jal and
// sd.
//
// As in the usual RISC-V instruction tests, the program checks itself. The
// bench fills a table in the FPGA board's memory with operand pairs (random
// 64-bit values, equal pairs for every fourth case, and the corner values 0,
// -1 and the most negative number) together with the expected results it
// computes here. The program loops over the table. For each case it runs
// every instruction under test and compares the result with the expected
// one by subtraction, adding 1 to the error count in x20 for every mismatch.
// The tests are:
//   add     a + b
//   mul     low 64 bits of a * b
//   sd/ld   a stored and loaded back
//   amoand  returns the old word (a) and leaves a & b in memory
//   bne     taken exactly when a != b
//   jal     skips one instruction and links the address after itself
// After the last case the program writes a sentinel into x1 and parks. The
// bench checks x20 == 0 and that all cases ran (x12 == 0), and reads the
// retired-instruction count.
//
// A second program tests the machine-mode trap path. It installs a handler
// in mtvec, sets mstatus.MIE, then runs ECALL, EBREAK and an all-zero
// (illegal) word. The handler counts the trap, records mstatus, steps mepc
// past the trapping instruction and returns with MRET. The bench checks the
// trap count, mcause after each trap (11, 3, 2), mstatus inside the handler
// (MIE cleared, MPIE set) and after MRET (MIE restored), the final mepc and
// misa.
module tb_isa_tests;
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
  function automatic logic [31:0] SUB(input logic [4:0] rd, rs1, rs2);
    return r_t(7'h20, rs2, rs1, 3'd0, rd, 7'h33);
  endfunction

  localparam int          CASES    = 100;
  localparam logic [63:0] SENTINEL = 64'h5A5;
  localparam int          TABLE    = 32'h1_0000 / 16;   // board word of 0x8001_0000

  logic [31:0] prog [128];
  int np;
  task automatic emit(input logic [31:0] w);
    prog[np] = w;
    np = np + 1;
  endtask
  // x18 = (x[ra] != x[rb]); x20 += x18
  task automatic compare(input logic [4:0] ra, rb);
    emit(SUB(19, ra, rb));
    emit(SLTU(18, 0, 19));
    emit(ADD(20, 20, 18));
  endtask

  // table entry k, 64 bytes: a, b, a+b, a*b, a&b, a==b, scratch, unused
  task automatic put(input int k, input int slot, input logic [63:0] v);
    int byte_addr;
    byte_addr = 64 * k + 8 * slot;
    board.mem[TABLE + byte_addr / 16][64 * ((byte_addr / 8) % 2) +: 64] = v;
  endtask

  initial begin
    logic [63:0] a, b;
    int t;
    foreach (board.mem[i]) board.mem[i] = '0;
    for (int k = 0; k < CASES; k++) begin
      a = {$urandom, $urandom};
      b = (k % 4 == 3) ? a : {$urandom, $urandom};
      if (k == 0) begin a = 0; b = '1; end
      if (k == 1) begin a = '1; b = '1; end
      if (k == 2) begin a = 64'h8000_0000_0000_0000; b = '1; end
      put(k, 0, a); put(k, 1, b); put(k, 2, a + b); put(k, 3, a * b);
      put(k, 4, a & b); put(k, 5, {63'b0, a == b});
    end

    np = 0;
    emit(AUIPC(10, 32'h10));                  // table at 0x8001_0000
    emit(ADDI(1, 0, 0));
    emit(ADDI(20, 0, 0));                     // error count
    emit(ADDI(11, 10, 0));                    // case pointer
    emit(ADDI(12, 0, CASES));
    // loop:
    emit(LD(5, 11, 0));                       // a
    emit(LD(6, 11, 8));                       // b
    emit(ADD(7, 5, 6));                       // add
    emit(LD(8, 11, 16));
    compare(7, 8);
    emit(MUL(7, 5, 6));                       // mul
    emit(LD(8, 11, 24));
    compare(7, 8);
    emit(SD(5, 11, 48));                      // sd / ld
    emit(LD(7, 11, 48));
    compare(7, 5);
    emit(ADDI(9, 11, 48));                    // amoand on the stored a
    emit(AMOAND_D(7, 6, 9));
    compare(7, 5);
    emit(LD(7, 11, 48));
    emit(LD(8, 11, 32));
    compare(7, 8);
    emit(ADDI(7, 0, 0));                      // bne: x7 = (a == b)
    emit(BNE(5, 6, 8));
    emit(ADDI(7, 0, 1));
    emit(LD(8, 11, 40));
    compare(7, 8);
    emit(JAL(7, 8));                          // jal over one instruction
    emit(ADDI(20, 20, 1));                    // must be skipped
    emit(AUIPC(8, 0));                        // x8 = jal + 8
    emit(ADDI(8, 8, -4));
    compare(7, 8);
    emit(ADDI(11, 11, 64));
    emit(ADDI(12, 12, -1));
    emit(BNE(12, 0, -4 * (np - 5)));
    emit(CSRRS(31, 32'hC02, 0));
    emit(ADDI(1, 0, int'(SENTINEL)));
    emit(JAL(0, 0));
    for (int i = 0; i < np; i++) board.mem[i / 4][32 * (i % 4) +: 32] = prog[i];

    repeat (5) @(posedge clk);
    rst_n = 1;
    t = 0;
    while (xr(1) != SENTINEL && t < 2_000_000) begin @(posedge clk); t++; end
    checks++; if (t >= 2_000_000) begin failures++; $display("FAIL program did not finish"); end
    chk("all cases ran", xr(12), 0);
    chk("instruction test errors", xr(20), 0);
    chk("checks per case run (7 each)", (xr(11) - xr(10)) / 64, CASES);
    $display("%0d cases x 7 instruction checks, %0d instructions retired in %0d cycles",
             CASES, xr(31), t);

    // ---------------------------------------------------- trap program
    rst_n = 0;
    foreach (board.mem[i]) board.mem[i] = '0;
    np = 0;
    emit(AUIPC(10, 0));                       // x10 = 0x8000_0000
    emit(ADDI(1, 0, 0));
    emit(ADDI(11, 10, 72));                   // handler at word 18
    emit(CSRRW(0, 32'h305, 11));              // mtvec
    emit(ADDI(20, 0, 0));
    emit(ADDI(5, 0, 8));
    emit(CSRRS(0, 32'h300, 5));               // mstatus.MIE = 1
    emit(32'h0000_0073);                      // ECALL
    emit(CSRRS(21, 32'h342, 0));
    emit(32'h0010_0073);                      // EBREAK
    emit(CSRRS(22, 32'h342, 0));
    emit(32'h0000_0000);                      // illegal
    emit(CSRRS(23, 32'h342, 0));
    emit(CSRRS(24, 32'h300, 0));
    emit(CSRRS(25, 32'h301, 0));
    emit(CSRRS(26, 32'h341, 0));
    emit(ADDI(1, 0, int'(SENTINEL)));
    emit(JAL(0, 0));
    emit(CSRRS(6, 32'h341, 0));               // handler: mepc += 4
    emit(ADDI(6, 6, 4));
    emit(CSRRW(0, 32'h341, 6));
    emit(ADDI(20, 20, 1));
    emit(CSRRS(27, 32'h300, 0));
    emit(32'h3020_0073);                      // MRET
    for (int i = 0; i < np; i++) board.mem[i / 4][32 * (i % 4) +: 32] = prog[i];
    repeat (5) @(posedge clk);
    rst_n = 1;
    t = 0;
    while (xr(1) == SENTINEL && t < 100_000) begin @(posedge clk); t++; end
    t = 0;
    while (xr(1) != SENTINEL && t < 200_000) begin @(posedge clk); t++; end
    checks++; if (t >= 200_000) begin failures++; $display("FAIL trap program did not finish"); end
    chk("traps taken", xr(20), 3);
    chk("mcause after ECALL", xr(21), 11);
    chk("mcause after EBREAK", xr(22), 3);
    chk("mcause after illegal instruction", xr(23), 2);
    chk("mstatus in handler (MPP, MPIE)", xr(27), 64'h1880);
    chk("mstatus after MRET (MPP, MPIE, MIE)", xr(24), 64'h1888);
    chk("misa RV64IMA", xr(25), 64'h8000_0000_0000_1101);
    chk("mepc after the last trap", xr(26), 64'h8000_0030);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
