// tb_torture: random-program test of the whole SoC at its default
// parameters, in the manner of a torture test: a generator writes long
// random instruction streams, and a reference model in this bench executes
// each instruction as it is generated, so the expected final register
// contents are known without a second simulator.
//
// A program starts by pointing x10 at a data area in the FPGA board's
// memory (0x8001_0000) and loading random 64-bit start values into every
// register it uses. Then come random instructions drawn from RV64IM:
//   register-register ALU operations, including the 32-bit (W) forms;
//   multiply, the three high-half multiplies, divide and remainder, signed
//   and unsigned, 64- and 32-bit (start values are often 0, -1 or the most
//   negative number, so zero divisors and signed overflow come up);
//   immediate ALU operations and shifts, LUI;
//   LD/LW/LBU and SD/SW/SB on a 256-byte scratch area;
//   the nine AMOs, .W and .D, on the same area (address built in x2);
//   forward conditional branches (all six conditions) that skip one to
//   three instructions.
// The skipped instructions are generated but not applied to the model, so
// the program only ends with the right registers if every branch went the
// right way. The program ends by writing a sentinel into x1 and parks on a
// jump-to-self. The bench boots the SoC from reset for each of several
// programs, waits for the sentinel and compares registers x1-x31 with the
// model (the storage behind x0 is never read). It also counts taken and
// untaken branches, loads, stores, multiplies and divides, and fails if any
// of them never occurred. The instruction mix and program sizes are this
// bench's own; x3-x4 are held at zero and x10 is the data pointer.
module tb_torture;
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
  function automatic logic [63:0] xr(input int r);
    return dut.u_core.u_rf.bank0[r];
  endfunction

  localparam int          PROGRAMS = 16;
  localparam int          LEN      = 900;        // random instructions per program
  localparam logic [63:0] SENTINEL = 64'h5A5;
  localparam int          TABLE    = 32'h1_0000 / 16;
  localparam logic [63:0] MIN64    = 64'h8000_0000_0000_0000;

  logic [31:0] prog [1024];
  int np;
  logic [63:0] x [32];                  // reference register file
  logic [7:0]  scr [256];               // reference scratch area
  // executed branches taken, untaken, loads, stores, multiplies, divides, AMOs
  int seen [7] = '{default: 0};

  task automatic emit(input logic [31:0] w);
    prog[np] = w;
    np = np + 1;
  endtask

  function automatic logic [63:0] sx32(input logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction
  function automatic logic [63:0] sx12(input int v);
    logic [11:0] t; t = 12'(v);
    return {{52{t[11]}}, t};
  endfunction

  // destination registers: all but x0, x1 (sentinel), x2 (AMO address),
  // x3-x4 and x10 (base)
  function automatic logic [4:0] dreg();
    logic [4:0] r;
    do r = 5'($urandom_range(5, 31)); while (r == 10);
    return r;
  endfunction
  function automatic logic [4:0] sreg();
    if ($urandom_range(0, 15) == 0) return 5'd0;
    return dreg();
  endfunction

  function automatic logic [63:0] op64(input logic [2:0] f3, input logic alt, input logic [63:0] a, b);
    case (f3)
      3'd0: return alt ? a - b : a + b;
      3'd1: return a << b[5:0];
      3'd2: return {63'b0, $signed(a) < $signed(b)};
      3'd3: return {63'b0, a < b};
      3'd4: return a ^ b;
      3'd5: return alt ? 64'($signed(a) >>> b[5:0]) : a >> b[5:0];
      3'd6: return a | b;
      default: return a & b;
    endcase
  endfunction

  function automatic logic [63:0] mext(input logic [2:0] f3, input logic [63:0] a, b);
    logic [127:0] p;
    case (f3)
      3'd0: return a * b;
      3'd1: begin p = {{64{a[63]}}, a} * {{64{b[63]}}, b}; return p[127:64]; end
      3'd2: begin p = {{64{a[63]}}, a} * {64'b0, b};       return p[127:64]; end
      3'd3: begin p = {64'b0, a} * {64'b0, b};             return p[127:64]; end
      3'd4: return (b == 0) ? '1 : (a == MIN64 && b == '1) ? MIN64 : 64'($signed(a) / $signed(b));
      3'd5: return (b == 0) ? '1 : a / b;
      3'd6: return (b == 0) ? a : (a == MIN64 && b == '1) ? 64'd0 : 64'($signed(a) % $signed(b));
      default: return (b == 0) ? a : a % b;
    endcase
  endfunction

  function automatic logic [63:0] mext32(input logic [2:0] f3, input logic [31:0] a, b);
    logic [31:0] r;
    case (f3)
      3'd0: r = a * b;
      3'd4: r = (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : 32'($signed(a) / $signed(b));
      3'd5: r = (b == 0) ? '1 : a / b;
      3'd6: r = (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? 32'd0 : 32'($signed(a) % $signed(b));
      default: r = (b == 0) ? a : a % b;
    endcase
    return sx32(r);
  endfunction

  localparam logic [4:0] amo_f5 [9] = '{5'h00, 5'h01, 5'h04, 5'h08, 5'h0c, 5'h10, 5'h14, 5'h18, 5'h1c};
  // new memory value of an AMO from the old value `m` and the operand `b`
  function automatic logic [63:0] amo(input logic [4:0] f5, input bit w, input logic [63:0] m, b);
    logic [63:0] a, c;
    a = w ? sx32(m[31:0]) : m;
    c = w ? sx32(b[31:0]) : b;
    case (f5)
      5'h00: return a + c;
      5'h01: return c;
      5'h04: return a ^ c;
      5'h08: return a | c;
      5'h0c: return a & c;
      5'h10: return ($signed(a) < $signed(c)) ? a : c;
      5'h14: return ($signed(a) < $signed(c)) ? c : a;
      5'h18: return (a < c) ? a : c;
      default: return (a < c) ? c : a;
    endcase
  endfunction

  // one random non-branch instruction; applied to the model when `exec`
  task automatic gen_plain(input bit exec);
    logic [4:0]  rd, rs1, rs2;
    logic [2:0]  f3;
    logic        alt;
    logic [63:0] a, b, v;
    int          imm, off, kind;
    logic [4:0]  f5;
    rd = dreg(); rs1 = sreg(); rs2 = sreg();
    a = x[rs1]; b = x[rs2];
    kind = $urandom_range(0, 9);
    case (kind)
      0: begin                                          // OP
        f3 = 3'($urandom); alt = (f3 == 0 || f3 == 5) && $urandom_range(0, 1) == 1;
        emit(r_t(alt ? 7'h20 : 7'h00, rs2, rs1, f3, rd, 7'h33));
        v = op64(f3, alt, a, b);
      end
      1: begin                                          // M
        f3 = 3'($urandom);
        emit(r_t(7'h01, rs2, rs1, f3, rd, 7'h33));
        v = mext(f3, a, b);
        if (exec) begin if (f3 >= 4) seen[5] = seen[5] + 1; else seen[4] = seen[4] + 1; end
      end
      2: begin                                          // OP-IMM
        f3 = 3'($urandom); imm = $urandom_range(0, 4095);
        alt = 1'b0;
        if (f3 == 1) imm = imm % 64;
        if (f3 == 5) begin alt = $urandom_range(0, 1) == 1; imm = (imm % 64) | (alt ? 32'h400 : 0); end
        emit(i_t(imm, rs1, f3, rd, 7'h13));
        v = (f3 == 1 || f3 == 5) ? op64(f3, alt, a, 64'(imm % 64)) : op64(f3, 1'b0, a, sx12(imm));
      end
      3: begin                                          // OP-32
        case ($urandom_range(0, 4))
          0: begin emit(r_t(7'h00, rs2, rs1, 3'd0, rd, 7'h3b)); v = sx32(a[31:0] + b[31:0]); end
          1: begin emit(r_t(7'h20, rs2, rs1, 3'd0, rd, 7'h3b)); v = sx32(a[31:0] - b[31:0]); end
          2: begin emit(r_t(7'h00, rs2, rs1, 3'd1, rd, 7'h3b)); v = sx32(a[31:0] << b[4:0]); end
          3: begin emit(r_t(7'h00, rs2, rs1, 3'd5, rd, 7'h3b)); v = sx32(a[31:0] >> b[4:0]); end
          default: begin emit(r_t(7'h20, rs2, rs1, 3'd5, rd, 7'h3b)); v = sx32(32'($signed(a[31:0]) >>> b[4:0])); end
        endcase
      end
      4: begin                                          // M, 32-bit
        f3 = 3'($urandom_range(3, 7)); if (f3 == 3) f3 = 3'd0;
        emit(r_t(7'h01, rs2, rs1, f3, rd, 7'h3b));
        v = mext32(f3, a[31:0], b[31:0]);
        if (exec) begin if (f3 >= 4) seen[5] = seen[5] + 1; else seen[4] = seen[4] + 1; end
      end
      5: begin                                          // OP-IMM-32
        imm = $urandom_range(0, 4095);
        case ($urandom_range(0, 3))
          0: begin emit(i_t(imm, rs1, 3'd0, rd, 7'h1b)); v = sx32(a[31:0] + 32'(sx12(imm))); end
          1: begin emit(i_t(imm % 32, rs1, 3'd1, rd, 7'h1b)); v = sx32(a[31:0] << (imm % 32)); end
          2: begin emit(i_t(imm % 32, rs1, 3'd5, rd, 7'h1b)); v = sx32(a[31:0] >> (imm % 32)); end
          default: begin
            emit(i_t((imm % 32) | 32'h400, rs1, 3'd5, rd, 7'h1b));
            v = sx32(32'($signed(a[31:0]) >>> (imm % 32)));
          end
        endcase
      end
      6: begin                                          // loads
        case ($urandom_range(0, 2))
          0: begin
            off = 8 * $urandom_range(0, 31);
            emit(LD(rd, 10, 256 + off));
            for (int k = 0; k < 8; k++) v[8*k +: 8] = scr[off + k];
          end
          1: begin
            off = 4 * $urandom_range(0, 63);
            emit(i_t(256 + off, 10, 3'd2, rd, 7'h03));
            for (int k = 0; k < 4; k++) v[8*k +: 8] = scr[off + k];
            v = sx32(v[31:0]);
          end
          default: begin
            off = $urandom_range(0, 255);
            emit(i_t(256 + off, 10, 3'd4, rd, 7'h03));
            v = {56'b0, scr[off]};
          end
        endcase
        if (exec) seen[2] = seen[2] + 1;
      end
      7: begin                                          // stores
        rd = 0;
        case ($urandom_range(0, 2))
          0: begin
            off = 8 * $urandom_range(0, 31);
            emit(SD(rs2, 10, 256 + off));
            if (exec) for (int k = 0; k < 8; k++) scr[off + k] = b[8*k +: 8];
          end
          1: begin
            off = 4 * $urandom_range(0, 63);
            emit(SW(rs2, 10, 256 + off));
            if (exec) for (int k = 0; k < 4; k++) scr[off + k] = b[8*k +: 8];
          end
          default: begin
            off = $urandom_range(0, 255);
            emit(s_t(256 + off, rs2, 10, 3'd0));
            if (exec) scr[off] = b[7:0];
          end
        endcase
        v = 0;
        if (exec) seen[3] = seen[3] + 1;
      end
      8: begin                                          // AMO, address in x2
        f3 = ($urandom_range(0, 1) == 1) ? 3'd3 : 3'd2;
        off = (f3 == 3) ? 8 * $urandom_range(0, 31) : 4 * $urandom_range(0, 63);
        f5 = amo_f5[$urandom_range(0, 8)];
        emit(ADDI(2, 10, 256 + off));
        emit(r_t({f5, 2'b00}, rs2, 2, f3, rd, 7'h2f));
        v = 0;
        for (int k = 0; k < 8; k++) v[8*k +: 8] = scr[(off + k) % 256];
        if (f3 == 2) v = sx32(v[31:0]);
        if (exec) begin
          x[2] = x[10] + 64'(256 + off);
          for (int k = 0; k < ((f3 == 3) ? 8 : 4); k++)
            scr[off + k] = 8'(amo(f5, f3 == 2, v, b) >> (8 * k));
          seen[6] = seen[6] + 1;
        end
      end
      default: begin                                    // LUI
        imm = $urandom_range(0, 32'hF_FFFF);
        emit(LUI(rd, imm));
        v = sx32({imm[19:0], 12'b0});
      end
    endcase
    if (exec && rd != 0) x[rd] = v;
  endtask

  // a forward branch over one to three instructions
  task automatic gen_branch();
    logic [4:0] rs1, rs2;
    logic [2:0] f3;
    logic       taken;
    int         n, at;
    rs1 = sreg(); rs2 = ($urandom_range(0, 3) == 0) ? rs1 : sreg();
    f3 = 3'($urandom_range(2, 7)); if (f3 < 4) f3 = 3'(f3 - 2);   // 0,1,4..7
    case (f3)
      3'd0: taken = x[rs1] == x[rs2];
      3'd1: taken = x[rs1] != x[rs2];
      3'd4: taken = $signed(x[rs1]) <  $signed(x[rs2]);
      3'd5: taken = $signed(x[rs1]) >= $signed(x[rs2]);
      3'd6: taken = x[rs1] <  x[rs2];
      default: taken = x[rs1] >= x[rs2];
    endcase
    n = $urandom_range(1, 3);
    at = np;
    emit(32'h0);
    if (taken) seen[0] = seen[0] + 1; else seen[1] = seen[1] + 1;
    for (int k = 0; k < n; k++) gen_plain(!taken);
    prog[at] = b_t(4 * (np - at), rs2, rs1, f3);
  endtask

  task automatic build();
    logic [63:0] v;
    np = 0;
    foreach (board.mem[i]) board.mem[i] = '0;
    emit(AUIPC(10, 32'h10));                            // x10 = 0x8001_0000
    emit(ADDI(1, 0, 0));
    x[0] = 0; x[1] = SENTINEL; x[2] = 0; x[3] = 0; x[4] = 0; x[10] = 64'h8001_0000;
    for (int r = 2; r < 32; r++) begin
      if (r == 10) continue;
      case ($urandom_range(0, 5))
        0: v = 0;
        1: v = '1;
        2: v = MIN64;
        3: v = sx32($urandom);
        default: v = {$urandom, $urandom};
      endcase
      if (r < 5) v = 0;
      x[r] = v;
      board.mem[TABLE + r / 2][64 * (r % 2) +: 64] = v;
      emit(LD(5'(r), 10, 8 * r));
    end
    for (int k = 0; k < 256; k++) begin
      scr[k] = 8'($urandom);
      board.mem[TABLE + (256 + k) / 16][8 * ((256 + k) % 16) +: 8] = scr[k];
    end
    while (np < LEN) begin
      if ($urandom_range(0, 5) == 0) gen_branch();
      else gen_plain(1'b1);
    end
    emit(ADDI(1, 0, int'(SENTINEL)));
    emit(JAL(0, 0));
    for (int i = 0; i < np; i++) board.mem[i / 4][32 * (i % 4) +: 32] = prog[i];
  endtask

  initial begin
    int t, bad;
    for (int p = 0; p < PROGRAMS; p++) begin
      rst_n = 0;
      build();
      repeat (5) @(posedge clk);
      rst_n = 1;
      t = 0;
      while (xr(1) == SENTINEL && t < 100_000) begin @(posedge clk); t++; end
      t = 0;
      while (xr(1) != SENTINEL && t < 1_000_000) begin @(posedge clk); t++; end
      checks++; if (t >= 1_000_000) begin failures++; $display("FAIL program %0d did not finish", p); end
      bad = 0;
      for (int r = 1; r < 32; r++) begin    // x0's storage is never read
        checks++;
        if (xr(r) !== x[r]) begin
          failures++; bad++;
          $display("FAIL program %0d x%0d got %h exp %h", p, r, xr(r), x[r]);
        end
      end
      $display("program %0d: %0d instructions, %0d cycles, %0d register mismatches", p, np, t, bad);
    end
    $display("branches taken %0d untaken %0d, loads %0d, stores %0d, multiplies %0d, divides %0d, AMOs %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    checks++; if (seen[6] == 0) begin failures++; $display("FAIL no AMO"); end
    checks++; if (seen[0] == 0)   begin failures++; $display("FAIL no taken branch"); end
    checks++; if (seen[1] == 0) begin failures++; $display("FAIL no untaken branch"); end
    checks++; if (seen[2] == 0 || seen[3] == 0) begin failures++; $display("FAIL no load or store"); end
    checks++; if (seen[4] == 0 || seen[5] == 0)    begin failures++; $display("FAIL no multiply or divide"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
