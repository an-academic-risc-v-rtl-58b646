// lagarto_core: five-stage in-order RV64IMA integer pipeline.
//
// Stages: fetch (F), decode (D), read-registers (R), execution (E) and
// write-back (W), one instruction per stage, single issue, in order.
//  F  sends the PC to the instruction port and, in the same cycle, asks the
//     bimodal predictor for the next PC, so fetch follows predicted branches.
//     One fetch is outstanding at a time.
//  D  decodes the instruction into a `decoded_t` record.
//  R  reads the two-bank register file, bypassing the value that W writes in
//     the same cycle. An instruction whose source is the destination of the
//     instruction now in E waits one cycle in R (interlock), after which the
//     value comes through the W bypass.
//  E  computes ALU results, resolves branches and jumps, runs loads, stores
//     and atomics on the data port (one access at a time, E waits for the
//     answer), multiplies and divides in `muldiv`, and reads CSRs. A resolved
//     next PC that differs from the predicted one flushes F, D and R and
//     restarts fetch there; every resolved branch or jump trains the predictor.
//  W  writes the result to the register file and counts the instruction as
//     retired.
//
// Memory ports (instruction and data) use a pulse protocol: `*_req` is high
// for one cycle with the address (and write data); the memory answers with a
// one-cycle `*_ack` some cycles later, carrying read data. The core never
// issues a request while one is outstanding. The data port carries aligned
// 64-bit words with byte enables.
//
// Atomics: LR/SC keep one reservation; AMOs are a read followed by a write on
// the data port, which is atomic in this single-core system. CSRs: the cycle,
// time and instret counters and hpmcounter3..11 read the nine PMU counters.
//
// Traps (machine mode only): ECALL, EBREAK and an unknown opcode or a
// 16-bit encoding (illegal instruction) trap in E. A trap writes no register
// and does not retire; it saves its PC in mepc and its cause in mcause (11, 3
// or 2; mtval reads 0), moves mstatus.MIE to MPIE, clears MIE, and its next
// PC is mtvec (direct mode), so the ordinary mispredict path flushes and
// redirects fetch. MRET's next PC is mepc and it restores MIE from MPIE.
// Machine CSRs: mstatus (MIE, MPIE; MPP reads as machine), misa (RV64IMA),
// mtvec, mscratch, mepc, mcause, mtval, mhartid (0); others read as 0 and
// ignore writes. There are no interrupts, no other privilege modes and no
// virtual memory. WFI, SRET, SFENCE.VMA, FENCE and FENCE.I are no-ops.
//
// Debug: `dbg_halt_req` stops fetch; once the pipeline has drained,
// `dbg_halted` rises and the debug port may read and write registers (through
// read port 1 and the write port) and set the fetch PC. Dropping
// `dbg_halt_req` resumes fetch.
//
// The document gives the ISA (RV64IMA), the five stages and their names, and
// the bimodal predictor. The hazard handling, the memory protocol, the CSR
// subset, the machine-mode trap subset and the debug port are this design's
// own; interrupts, supervisor and user modes and virtual memory, which a
// Linux boot needs, are not implemented.
module lagarto_core
  import predrac_pkg::*;
#(
  parameter logic [63:0] BOOT_PC    = RESET_PC,
  parameter int unsigned BP_ENTRIES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction port
  output logic        i_req,
  output logic [63:0] i_addr,
  input  logic        i_ack,
  input  logic [31:0] i_rdata,
  // data port
  output logic        d_req,
  output logic        d_we,
  output logic [63:0] d_addr,
  output logic [63:0] d_wdata,
  output logic [7:0]  d_be,
  input  logic        d_ack,
  input  logic [63:0] d_rdata,
  // debug (core control)
  input  logic        dbg_halt_req,
  output logic        dbg_halted,
  input  logic        dbg_reg_we,
  input  logic [4:0]  dbg_reg_addr,
  input  logic [63:0] dbg_reg_wdata,
  output logic [63:0] dbg_reg_rdata,
  input  logic        dbg_pc_we,
  input  logic [63:0] dbg_pc_wdata,
  output logic [63:0] dbg_pc,
  // performance events and counter read-back
  output logic        ev_instret,
  output logic        ev_branch,
  output logic        ev_mispred,
  output logic        ev_load,
  output logic        ev_store,
  output logic        ev_stall,
  output logic [3:0]  pmu_sel,
  input  logic [63:0] pmu_val
);

  // ------------------------------------------------------------------ fetch
  logic [63:0] pc_f, f_pc, f_pnpc;
  logic        i_pend, i_kill;
  logic        bp_taken;
  logic [63:0] bp_npc;

  logic        ifid_v;
  logic [63:0] ifid_pc, ifid_pnpc;
  logic [31:0] ifid_ir;

  logic        idrr_v;
  logic [63:0] idrr_pc, idrr_pnpc;
  decoded_t    idrr_d;

  logic        rrex_v;
  logic [63:0] rrex_pc, rrex_pnpc, rrex_a, rrex_b;
  decoded_t    rrex_d;

  logic        exwb_v, exwb_we;
  logic [4:0]  exwb_rd;
  logic [63:0] exwb_data;

  logic        redirect;
  logic [63:0] redirect_pc;
  logic        id_fire, rr_fire, ex_fire, ex_done, rr_stall;

  logic        bp_upd;
  logic        br_taken;
  logic [63:0] br_target;

  bimodal_bp #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n,
    .pc(pc_f), .pred_taken(bp_taken), .pred_npc(bp_npc),
    .upd_valid(bp_upd), .upd_pc(rrex_pc), .upd_taken(br_taken), .upd_target(br_target)
  );

  logic fetch_issue;
  assign fetch_issue = !dbg_halt_req && !i_pend && !redirect && (!ifid_v || id_fire);
  assign i_req  = fetch_issue;
  assign i_addr = pc_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f <= BOOT_PC; f_pc <= '0; f_pnpc <= '0; i_pend <= 1'b0; i_kill <= 1'b0;
      ifid_v <= 1'b0; ifid_pc <= '0; ifid_pnpc <= '0; ifid_ir <= '0;
    end else begin
      if (fetch_issue) begin
        pc_f   <= bp_npc;
        f_pc   <= pc_f;
        f_pnpc <= bp_npc;
        i_pend <= 1'b1;
      end
      if (i_ack) begin
        i_pend <= 1'b0;
        i_kill <= 1'b0;
      end else if (redirect && i_pend) begin
        i_kill <= 1'b1;
      end
      if (redirect)                 pc_f <= redirect_pc;
      else if (dbg_halted && dbg_pc_we) pc_f <= dbg_pc_wdata;

      if (redirect)                      ifid_v <= 1'b0;
      else if (i_ack && !i_kill) begin
        ifid_v <= 1'b1; ifid_pc <= f_pc; ifid_pnpc <= f_pnpc; ifid_ir <= i_rdata;
      end else if (id_fire)              ifid_v <= 1'b0;
    end
  end

  // ----------------------------------------------------------------- decode
  decoded_t dec;
  always_comb begin
    logic [31:0] ir;
    ir = ifid_ir;
    dec = '0;
    dec.cls = CL_ALU;
    dec.alu = ALU_ADD;
    dec.rs1 = ir[19:15];
    dec.rs2 = ir[24:20];
    dec.rd  = ir[11:7];
    dec.funct3 = ir[14:12];
    dec.funct5 = ir[31:27];
    dec.csr = ir[31:20];
    unique case (ir[6:0])
      OP_LUI: begin
        dec.alu = ALU_PASSB; dec.b_is_imm = 1'b1; dec.rd_we = 1'b1;
        dec.imm = {{32{ir[31]}}, ir[31:12], 12'b0};
      end
      OP_AUIPC: begin
        dec.a_is_pc = 1'b1; dec.b_is_imm = 1'b1; dec.rd_we = 1'b1;
        dec.imm = {{32{ir[31]}}, ir[31:12], 12'b0};
      end
      OP_JAL: begin
        dec.cls = CL_JUMP; dec.rd_we = 1'b1;
        dec.imm = {{43{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      end
      OP_JALR: begin
        dec.cls = CL_JUMP; dec.rd_we = 1'b1; dec.use_rs1 = 1'b1;
        dec.imm = {{52{ir[31]}}, ir[31:20]};
      end
      OP_BRANCH: begin
        dec.cls = CL_BRANCH; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
        dec.imm = {{51{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      end
      OP_LOAD: begin
        dec.cls = CL_LOAD; dec.use_rs1 = 1'b1; dec.rd_we = 1'b1;
        dec.imm = {{52{ir[31]}}, ir[31:20]};
      end
      OP_STORE: begin
        dec.cls = CL_STORE; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
        dec.imm = {{52{ir[31]}}, ir[31:25], ir[11:7]};
      end
      OP_AMO: begin
        dec.cls = CL_AMO; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; dec.rd_we = 1'b1;
      end
      OP_IMM, OP_IMM32: begin
        dec.use_rs1 = 1'b1; dec.b_is_imm = 1'b1; dec.rd_we = 1'b1;
        dec.word = (ir[6:0] == OP_IMM32);
        dec.imm = {{52{ir[31]}}, ir[31:20]};
        unique case (ir[14:12])
          3'd0: dec.alu = ALU_ADD;
          3'd1: dec.alu = ALU_SLL;
          3'd2: dec.alu = ALU_SLT;
          3'd3: dec.alu = ALU_SLTU;
          3'd4: dec.alu = ALU_XOR;
          3'd5: dec.alu = ir[30] ? ALU_SRA : ALU_SRL;
          3'd6: dec.alu = ALU_OR;
          default: dec.alu = ALU_AND;
        endcase
      end
      OP_OP, OP_OP32: begin
        dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; dec.rd_we = 1'b1;
        dec.word = (ir[6:0] == OP_OP32);
        if (ir[31:25] == 7'd1) dec.cls = CL_MULDIV;
        unique case (ir[14:12])
          3'd0: dec.alu = ir[30] ? ALU_SUB : ALU_ADD;
          3'd1: dec.alu = ALU_SLL;
          3'd2: dec.alu = ALU_SLT;
          3'd3: dec.alu = ALU_SLTU;
          3'd4: dec.alu = ALU_XOR;
          3'd5: dec.alu = ir[30] ? ALU_SRA : ALU_SRL;
          3'd6: dec.alu = ALU_OR;
          default: dec.alu = ALU_AND;
        endcase
      end
      OP_SYSTEM: begin
        if (ir[13:12] != 2'b00) begin
          dec.cls = CL_CSR; dec.rd_we = 1'b1; dec.use_rs1 = !ir[14];
          dec.imm = {59'b0, ir[19:15]};   // zimm
        end else if (ir[31:20] == 12'h000) begin
          dec.trap = 1'b1; dec.cause = 4'd11;           // ECALL from M-mode
        end else if (ir[31:20] == 12'h001) begin
          dec.trap = 1'b1; dec.cause = 4'd3;            // EBREAK
        end else if (ir[31:20] == 12'h302) begin
          dec.mret = 1'b1;
        end                                 // WFI, SRET, SFENCE.VMA: no-op
      end
      OP_FENCE: ;                           // FENCE, FENCE.I: no-op
      default: begin
        dec.trap = 1'b1; dec.cause = 4'd2;  // illegal instruction
      end
    endcase
    if (ir[1:0] != 2'b11) begin             // 16-bit encodings are not supported
      dec.trap = 1'b1; dec.cause = 4'd2;
    end
    if (dec.trap) begin
      dec.cls = CL_ALU; dec.rd_we = 1'b0;
    end
    if (dec.rd == 5'd0) dec.rd_we = 1'b0;
  end

  assign id_fire = ifid_v && (!idrr_v || rr_fire) && !redirect;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idrr_v <= 1'b0; idrr_pc <= '0; idrr_pnpc <= '0; idrr_d <= '0;
    end else if (redirect) begin
      idrr_v <= 1'b0;
    end else if (id_fire) begin
      idrr_v <= 1'b1; idrr_pc <= ifid_pc; idrr_pnpc <= ifid_pnpc; idrr_d <= dec;
    end else if (rr_fire) begin
      idrr_v <= 1'b0;
    end
  end

  // --------------------------------------------------------- read registers
  logic [4:0]  ra1;
  logic [63:0] rf1, rf2, rs1v, rs2v;
  logic        rf_we;
  logic [4:0]  rf_wa;
  logic [63:0] rf_wd;

  assign ra1 = dbg_halted ? dbg_reg_addr : idrr_d.rs1;
  assign rf_we = (exwb_v && exwb_we) || (dbg_halted && dbg_reg_we);
  assign rf_wa = exwb_v ? exwb_rd : dbg_reg_addr;
  assign rf_wd = exwb_v ? exwb_data : dbg_reg_wdata;

  regfile #(.XLEN(64), .NREG(32)) u_rf (
    .clk, .ra1(ra1), .rd1(rf1), .ra2(idrr_d.rs2), .rd2(rf2),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );
  assign dbg_reg_rdata = rf1;

  always_comb begin
    rs1v = (exwb_v && exwb_we && exwb_rd == idrr_d.rs1) ? exwb_data : rf1;
    rs2v = (exwb_v && exwb_we && exwb_rd == idrr_d.rs2) ? exwb_data : rf2;
  end

  assign rr_stall = rrex_v && rrex_d.rd_we &&
                    ((idrr_d.use_rs1 && idrr_d.rs1 == rrex_d.rd) ||
                     (idrr_d.use_rs2 && idrr_d.rs2 == rrex_d.rd));
  assign rr_fire  = idrr_v && !rr_stall && (!rrex_v || ex_fire) && !redirect;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rrex_v <= 1'b0; rrex_pc <= '0; rrex_pnpc <= '0; rrex_a <= '0; rrex_b <= '0; rrex_d <= '0;
    end else if (rr_fire) begin
      rrex_v <= 1'b1; rrex_pc <= idrr_pc; rrex_pnpc <= idrr_pnpc; rrex_d <= idrr_d;
      rrex_a <= rs1v; rrex_b <= rs2v;
    end else if (ex_fire || redirect) begin
      rrex_v <= 1'b0;
    end
  end

  // --------------------------------------------------------------- execute
  decoded_t    d;
  assign d = rrex_d;

  logic [63:0] opa, opb, alu_y, alu_w, sra64, sra32;
  always_comb begin
    opa = d.a_is_pc ? rrex_pc : rrex_a;
    opb = d.b_is_imm ? d.imm : rrex_b;
    sra64 = $signed(opa) >>> opb[5:0];
    sra32 = {32'b0, 32'($signed(opa[31:0]) >>> opb[4:0])};
    unique case (d.alu)
      ALU_ADD:  alu_y = opa + opb;
      ALU_SUB:  alu_y = opa - opb;
      ALU_SLL:  alu_y = d.word ? {32'b0, opa[31:0] << opb[4:0]} : opa << opb[5:0];
      ALU_SLT:  alu_y = {63'b0, $signed(opa) < $signed(opb)};
      ALU_SLTU: alu_y = {63'b0, opa < opb};
      ALU_XOR:  alu_y = opa ^ opb;
      ALU_SRL:  alu_y = d.word ? {32'b0, opa[31:0] >> opb[4:0]} : opa >> opb[5:0];
      ALU_SRA:  alu_y = d.word ? sra32 : sra64;
      ALU_OR:   alu_y = opa | opb;
      ALU_AND:  alu_y = opa & opb;
      default:  alu_y = opb;               // ALU_PASSB
    endcase
    alu_w = d.word ? {{32{alu_y[31]}}, alu_y[31:0]} : alu_y;
  end

  // branches and jumps
  logic cond;
  always_comb begin
    unique case (d.funct3)
      3'd0: cond = rrex_a == rrex_b;
      3'd1: cond = rrex_a != rrex_b;
      3'd4: cond = $signed(rrex_a) <  $signed(rrex_b);
      3'd5: cond = $signed(rrex_a) >= $signed(rrex_b);
      3'd6: cond = rrex_a <  rrex_b;
      3'd7: cond = rrex_a >= rrex_b;
      default: cond = 1'b0;
    endcase
    br_taken  = (d.cls == CL_JUMP) || (d.cls == CL_BRANCH && cond);
    br_target = (d.cls == CL_JUMP && d.use_rs1) ? ((rrex_a + d.imm) & ~64'd1)
                                                : rrex_pc + d.imm;
  end

  logic [63:0] actual_npc;
  logic [63:0] mtvec, mepc;
  assign actual_npc  = d.trap ? mtvec : d.mret ? mepc : br_taken ? br_target : rrex_pc + 64'd4;
  assign redirect    = ex_fire && (actual_npc != rrex_pnpc);
  assign redirect_pc = actual_npc;
  assign bp_upd      = ex_fire && (d.cls == CL_BRANCH || d.cls == CL_JUMP);

  // memory access sequencing
  typedef enum logic [1:0] {M_IDLE, M_WAIT1, M_WRITE, M_WAIT2} mstate_e;
  mstate_e     mst;
  logic [63:0] maddr, amo_old, amo_new;
  logic [1:0]  msize;
  logic        resv_v;
  logic [63:0] resv_addr;
  logic        is_mem, sc_ok;

  assign maddr  = rrex_a + ((d.cls == CL_AMO) ? 64'd0 : d.imm);
  assign msize  = d.funct3[1:0];
  assign is_mem = rrex_v && (d.cls == CL_LOAD || d.cls == CL_STORE || d.cls == CL_AMO);
  assign sc_ok  = resv_v && resv_addr == maddr;

  logic [7:0]  be_base;
  logic [63:0] ld_raw, ld_val;
  always_comb begin
    unique case (msize)
      2'd0: be_base = 8'h01;
      2'd1: be_base = 8'h03;
      2'd2: be_base = 8'h0f;
      default: be_base = 8'hff;
    endcase
    ld_raw = d_rdata >> {maddr[2:0], 3'b000};
    unique case (d.funct3)
      3'd0: ld_val = {{56{ld_raw[7]}},  ld_raw[7:0]};
      3'd1: ld_val = {{48{ld_raw[15]}}, ld_raw[15:0]};
      3'd2: ld_val = {{32{ld_raw[31]}}, ld_raw[31:0]};
      3'd4: ld_val = {56'b0, ld_raw[7:0]};
      3'd5: ld_val = {48'b0, ld_raw[15:0]};
      3'd6: ld_val = {32'b0, ld_raw[31:0]};
      default: ld_val = ld_raw;
    endcase
  end

  // AMO arithmetic on the loaded value (word AMOs use the low 32 bits)
  always_comb begin
    logic [63:0] x, y;
    x = amo_old;
    y = (msize == 2'd2) ? {{32{rrex_b[31]}}, rrex_b[31:0]} : rrex_b;
    unique case (d.funct5)
      AMO_SWAP: amo_new = y;
      AMO_ADD:  amo_new = x + y;
      AMO_XOR:  amo_new = x ^ y;
      AMO_AND:  amo_new = x & y;
      AMO_OR:   amo_new = x | y;
      AMO_MIN:  amo_new = ($signed(x) < $signed(y)) ? x : y;
      AMO_MAX:  amo_new = ($signed(x) > $signed(y)) ? x : y;
      AMO_MINU: amo_new = (msize == 2'd2) ? ((x[31:0] < y[31:0]) ? x : y) : ((x < y) ? x : y);
      AMO_MAXU: amo_new = (msize == 2'd2) ? ((x[31:0] > y[31:0]) ? x : y) : ((x > y) ? x : y);
      default:  amo_new = y;               // SC stores rs2
    endcase
  end

  logic first_we;
  assign first_we = (d.cls == CL_STORE) || (d.cls == CL_AMO && d.funct5 == AMO_SC);

  always_comb begin
    d_req   = 1'b0;
    d_we    = 1'b0;
    d_addr  = {maddr[63:3], 3'b000};
    d_be    = be_base << maddr[2:0];
    d_wdata = rrex_b << {maddr[2:0], 3'b000};
    if (is_mem && mst == M_IDLE && !(d.cls == CL_AMO && d.funct5 == AMO_SC && !sc_ok)) begin
      d_req = 1'b1;
      d_we  = first_we;
    end else if (is_mem && mst == M_WRITE) begin
      d_req   = 1'b1;
      d_we    = 1'b1;
      d_wdata = amo_new << {maddr[2:0], 3'b000};
    end
  end

  // multiply / divide
  logic        md_done, md_busy, md_started;
  logic [63:0] md_res;
  muldiv u_md (
    .clk, .rst_n,
    .start(rrex_v && d.cls == CL_MULDIV && !md_started),
    .funct3(d.funct3), .word(d.word), .a(rrex_a), .b(rrex_b),
    .busy(md_busy), .done(md_done), .result(md_res)
  );

  // CSRs
  logic [63:0] mscratch, mtval, csr_rd, csr_src, csr_new;
  logic [3:0]  mcause;
  logic        mcause_int, mie, mpie, csr_we;
  logic        csr_known;
  always_comb begin
    pmu_sel   = 4'd0;
    csr_known = 1'b1;
    csr_rd    = '0;
    if (d.csr == 12'hC00 || d.csr == 12'hC01) pmu_sel = EV_CYCLE;
    else if (d.csr == 12'hC02)                pmu_sel = EV_INSTRET;
    else if (d.csr >= 12'hC03 && d.csr <= 12'hC0B) pmu_sel = 4'(d.csr - 12'hC03);
    else csr_known = 1'b0;
    if (csr_known) csr_rd = pmu_val;
    else unique case (d.csr)
      12'h300: csr_rd = {51'b0, 2'b11, 3'b0, mpie, 3'b0, mie, 3'b0};      // mstatus
      12'h301: csr_rd = {2'b10, 36'b0, 26'b00_0000_0000_0001_0001_0000_0001}; // misa: RV64 I M A
      12'h305: csr_rd = mtvec;
      12'h340: csr_rd = mscratch;
      12'h341: csr_rd = mepc;
      12'h342: csr_rd = {mcause_int, 59'b0, mcause};
      12'h343: csr_rd = mtval;
      default: csr_rd = '0;                                              // incl. mhartid
    endcase
    csr_src = d.use_rs1 ? rrex_a : d.imm;
    // CSRRW always writes; CSRRS/CSRRC only with a non-zero source field
    csr_we  = ex_fire && d.cls == CL_CSR &&
              (d.funct3[1:0] == 2'd1 || (d.use_rs1 ? d.rs1 != 0 : csr_src != 0));
    unique case (d.funct3[1:0])
      2'd1:    csr_new = csr_src;
      2'd2:    csr_new = csr_rd | csr_src;
      default: csr_new = csr_rd & ~csr_src;
    endcase
  end

  // completion
  logic [63:0] ex_result;
  always_comb begin
    ex_done   = 1'b0;
    ex_result = alu_w;
    unique case (d.cls)
      CL_ALU:    ex_done = 1'b1;
      CL_BRANCH: ex_done = 1'b1;
      CL_JUMP:   begin ex_done = 1'b1; ex_result = rrex_pc + 64'd4; end
      CL_CSR:    begin ex_done = 1'b1; ex_result = csr_rd; end
      CL_MULDIV: begin ex_done = md_done; ex_result = md_res; end
      CL_LOAD:   begin ex_done = (mst == M_WAIT1) && d_ack; ex_result = ld_val; end
      CL_STORE:  ex_done = (mst == M_WAIT1) && d_ack;
      CL_AMO: begin
        if (d.funct5 == AMO_SC) begin
          ex_done   = sc_ok ? ((mst == M_WAIT1) && d_ack) : (mst == M_IDLE);
          ex_result = sc_ok ? 64'd0 : 64'd1;
        end else if (d.funct5 == AMO_LR) begin
          ex_done   = (mst == M_WAIT1) && d_ack;
          ex_result = ld_val;
        end else begin
          ex_done   = (mst == M_WAIT2) && d_ack;
          ex_result = (msize == 2'd2) ? {{32{amo_old[31]}}, amo_old[31:0]} : amo_old;
        end
      end
      default:   ex_done = 1'b1;
    endcase
  end
  assign ex_fire = rrex_v && ex_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; amo_old <= '0; resv_v <= 1'b0; resv_addr <= '0;
      md_started <= 1'b0; mscratch <= '0;
      mtvec <= BOOT_PC; mepc <= '0; mcause <= '0; mcause_int <= 1'b0; mtval <= '0;
      mie <= 1'b0; mpie <= 1'b0;
    end else begin
      unique case (mst)
        M_IDLE:  if (d_req) mst <= M_WAIT1;
        M_WAIT1: if (d_ack) begin
          if (d.cls == CL_AMO && d.funct5 != AMO_LR && d.funct5 != AMO_SC) begin
            amo_old <= ld_val; mst <= M_WRITE;
          end else mst <= M_IDLE;
        end
        M_WRITE: mst <= M_WAIT2;
        M_WAIT2: if (d_ack) mst <= M_IDLE;
        default: mst <= M_IDLE;
      endcase
      if (ex_fire && d.cls == CL_AMO && d.funct5 == AMO_LR) begin
        resv_v <= 1'b1; resv_addr <= maddr;
      end else if (ex_fire && d.cls == CL_AMO && d.funct5 == AMO_SC) begin
        resv_v <= 1'b0;
      end
      if (ex_fire) md_started <= 1'b0;
      else if (rrex_v && d.cls == CL_MULDIV) md_started <= 1'b1;
      if (csr_we) begin
        unique case (d.csr)
          12'h300: begin mie <= csr_new[3]; mpie <= csr_new[7]; end
          12'h305: mtvec    <= {csr_new[63:2], 2'b00};   // direct mode only
          12'h340: mscratch <= csr_new;
          12'h341: mepc     <= {csr_new[63:2], 2'b00};
          12'h342: begin mcause <= csr_new[3:0]; mcause_int <= csr_new[63]; end
          12'h343: mtval    <= csr_new;
          default: ;
        endcase
      end
      if (ex_fire && d.trap) begin
        mepc <= rrex_pc; mcause <= d.cause; mcause_int <= 1'b0; mtval <= '0;
        mpie <= mie; mie <= 1'b0;
      end else if (ex_fire && d.mret) begin
        mie <= mpie; mpie <= 1'b1;
      end
    end
  end

  // -------------------------------------------------------------- write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exwb_v <= 1'b0; exwb_we <= 1'b0; exwb_rd <= '0; exwb_data <= '0;
    end else begin
      exwb_v <= ex_fire && !d.trap;      // a trap does not retire
      if (ex_fire) begin
        exwb_we <= d.rd_we; exwb_rd <= d.rd; exwb_data <= ex_result;
      end
    end
  end

  // --------------------------------------------------------- debug and PMU
  assign dbg_halted = dbg_halt_req && !i_pend && !ifid_v && !idrr_v && !rrex_v && !exwb_v;
  assign dbg_pc     = pc_f;

  assign ev_instret = exwb_v;
  assign ev_branch  = bp_upd;
  assign ev_mispred = redirect;
  assign ev_load    = ex_fire && (d.cls == CL_LOAD || (d.cls == CL_AMO && d.funct5 == AMO_LR));
  assign ev_store   = ex_fire && (d.cls == CL_STORE || (d.cls == CL_AMO && d.funct5 == AMO_SC));
  assign ev_stall   = (idrr_v && rr_stall) || (rrex_v && !ex_done);

  // memory protocol: one request at a time on each port
  a_one_ifetch: assert property (@(posedge clk) disable iff (!rst_n) i_req |-> !i_pend);
  a_one_dreq:   assert property (@(posedge clk) disable iff (!rst_n) d_req |-> mst == M_IDLE || mst == M_WRITE);
endmodule
