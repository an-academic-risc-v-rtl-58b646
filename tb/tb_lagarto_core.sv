// tb_lagarto_core: runs a small RV64IMA program on the core against a memory
// model with a few cycles of latency, then halts the core through its debug
// port and compares the architectural registers with values worked out by
// hand. It also checks that the interlock stall, the W-stage bypass, a branch
// misprediction and a predicted-taken loop branch all occurred, and that the
// debug port can write a register and move the PC.
module tb_lagarto_core;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        i_req, i_ack, d_req, d_we, d_ack;
  logic [63:0] i_addr, d_addr, d_wdata, d_rdata;
  logic [31:0] i_rdata;
  logic [7:0]  d_be;
  logic        halt, halted, rwe, pcwe;
  logic [4:0]  raddr;
  logic [63:0] rwdata, rrdata, pcw, pc;
  logic        ev_instret, ev_branch, ev_mispred, ev_load, ev_store, ev_stall;
  logic [3:0]  pmu_sel;

  lagarto_core #(.BOOT_PC(64'h8000_0000)) dut (
    .clk, .rst_n, .i_req, .i_addr, .i_ack, .i_rdata,
    .d_req, .d_we, .d_addr, .d_wdata, .d_be, .d_ack, .d_rdata,
    .dbg_halt_req(halt), .dbg_halted(halted), .dbg_reg_we(rwe), .dbg_reg_addr(raddr),
    .dbg_reg_wdata(rwdata), .dbg_reg_rdata(rrdata), .dbg_pc_we(pcwe), .dbg_pc_wdata(pcw), .dbg_pc(pc),
    .ev_instret, .ev_branch, .ev_mispred, .ev_load, .ev_store, .ev_stall,
    .pmu_sel, .pmu_val(64'h1234 + 64'(pmu_sel))
  );

  // memory model: 8 KiB at 0x8000_0000, fixed latency
  localparam int LAT = 3;
  logic [63:0] mem [1024];
  int          icnt, dcnt;
  logic [63:0] ia, da;
  always_ff @(posedge clk) begin
    i_ack <= 1'b0; d_ack <= 1'b0;
    if (i_req) begin icnt <= LAT; ia <= i_addr; end
    else if (icnt > 0) begin
      icnt <= icnt - 1;
      if (icnt == 1) begin
        i_ack <= 1'b1;
        i_rdata <= ia[2] ? mem[ia[12:3]][63:32] : mem[ia[12:3]][31:0];
      end
    end
    if (d_req) begin
      dcnt <= LAT; da <= d_addr;
      if (d_we) for (int b = 0; b < 8; b++) if (d_be[b]) mem[d_addr[12:3]][8*b +: 8] <= d_wdata[8*b +: 8];
    end else if (dcnt > 0) begin
      dcnt <= dcnt - 1;
      if (dcnt == 1) begin d_ack <= 1'b1; d_rdata <= mem[da[12:3]]; end
    end
  end

  int checks = 0, failures = 0;
  int n_mis = 0, n_stall = 0, n_ret = 0, n_br = 0, n_bypass = 0;
  always_ff @(posedge clk) if (rst_n) begin
    n_mis   <= n_mis + int'(ev_mispred);
    n_stall <= n_stall + int'(ev_stall);
    n_ret   <= n_ret + int'(ev_instret);
    n_br    <= n_br + int'(ev_branch);
    if (dut.rr_fire && dut.exwb_v && dut.exwb_we &&
        ((dut.idrr_d.use_rs1 && dut.idrr_d.rs1 == dut.exwb_rd) ||
         (dut.idrr_d.use_rs2 && dut.idrr_d.rs2 == dut.exwb_rd))) n_bypass <= n_bypass + 1;
  end

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  logic [31:0] prog [32];
  logic [63:0] exp_r [32];
  logic        chk_r [32];

  initial begin
    int n;
    foreach (mem[i]) mem[i] = 64'h0000_0013_0000_0013;  // NOPs
    n = 0;
    prog[n++] = ADDI(1, 0, 10);
    prog[n++] = ADDI(2, 0, 0);
    prog[n++] = ADDI(3, 0, 1);
    prog[n++] = ADD(2, 2, 3);            // loop: sum += i
    prog[n++] = ADDI(3, 3, 1);
    prog[n++] = BGE(1, 3, -8);
    prog[n++] = AUIPC(4, 1);             // x4 = 0x80001018
    prog[n++] = SD(2, 4, 0);
    prog[n++] = LD(5, 4, 0);
    prog[n++] = ADDI(6, 5, 1);           // uses the load result
    prog[n++] = MUL(7, 5, 6);
    prog[n++] = ADDI(8, 0, 7);
    prog[n++] = DIV(9, 7, 8);
    prog[n++] = REM(10, 5, 8);
    prog[n++] = AMOADD_D(11, 8, 4);
    prog[n++] = LD(12, 4, 0);
    prog[n++] = SW(8, 4, 8);
    prog[n++] = LB(13, 4, 8);
    prog[n++] = LR_D(15, 4);
    prog[n++] = SC_D(16, 8, 4);
    prog[n++] = LD(17, 4, 0);
    prog[n++] = CSRRS(18, 32'hC02, 0);
    prog[n++] = JAL(19, 8);
    prog[n++] = ADDI(20, 0, 99);         // skipped
    prog[n++] = ADDI(14, 0, -5);
    prog[n++] = SRAI(22, 14, 1);
    prog[n++] = SLTU(23, 0, 14);
    prog[n++] = SUBW(24, 0, 1);
    prog[n++] = SC_D(25, 8, 4);          // no reservation: fails
    prog[n++] = JAL(0, 0);               // park
    for (int i = 0; i < n; i++)
      if (i % 2 == 0) mem[i/2][31:0] = prog[i]; else mem[i/2][63:32] = prog[i];

    foreach (chk_r[i]) chk_r[i] = 1'b0;
    exp_r[1] = 10; exp_r[2] = 55; exp_r[3] = 11; exp_r[4] = 64'h8000_1018;
    exp_r[5] = 55; exp_r[6] = 56; exp_r[7] = 3080; exp_r[8] = 7; exp_r[9] = 440;
    exp_r[10] = 6; exp_r[11] = 55; exp_r[12] = 62; exp_r[13] = 7; exp_r[15] = 62;
    exp_r[16] = 0; exp_r[17] = 7; exp_r[18] = 64'h1235; exp_r[19] = 64'h8000_0000 + 23*4;
    exp_r[20] = 0; exp_r[14] = -64'sd5; exp_r[22] = -64'sd3; exp_r[23] = 1;
    exp_r[24] = -64'sd10; exp_r[25] = 1;
    for (int i = 1; i <= 25; i++) if (i != 21 && i != 20) chk_r[i] = 1'b1;

    halt = 0; rwe = 0; pcwe = 0; raddr = 0; rwdata = 0; pcw = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1500) @(posedge clk);
    halt = 1;
    wait (halted);
    @(posedge clk);
    for (int i = 1; i < 26; i++) if (chk_r[i]) begin
      raddr = 5'(i); #1;
      check($sformatf("x%0d", i), rrdata, exp_r[i]);
    end
    check("memory word", mem[(32'h1018 >> 3)], 64'd7);
    check("park pc", pc, 64'h8000_0000 + 29*4);
    // debug writes
    @(negedge clk); raddr = 5'd21; rwdata = 64'hDEAD_BEEF; rwe = 1; @(negedge clk); rwe = 0; #1;
    check("debug reg write", rrdata, 64'hDEAD_BEEF);
    // restart at instruction 22 (ADDI x20 ,99 is then executed)
    pcw = 64'h8000_0000 + 23*4; pcwe = 1; @(negedge clk); pcwe = 0;
    halt = 0;
    repeat (300) @(posedge clk);
    halt = 1; wait (halted); @(negedge clk);
    raddr = 5'd20; #1; check("after resume x20", rrdata, 64'd99);
    checks++; if (n_mis == 0) begin failures++; $display("FAIL no mispredict seen"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no stall seen"); end
    checks++; if (n_bypass == 0) begin failures++; $display("FAIL no bypass seen"); end
    checks++; if (n_br < 10) begin failures++; $display("FAIL branch count %0d", n_br); end
    // the loop runs 10 times: the bimodal predictor learns it, so mispredicts
    // stay well below the number of branches
    checks++; if (n_mis >= n_br) begin failures++; $display("FAIL predictor never right"); end
    $display("retired=%0d branches=%0d mispredicts=%0d stalls=%0d bypasses=%0d", n_ret, n_br, n_mis, n_stall, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
