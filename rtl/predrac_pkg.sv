// predrac_pkg: types and constants shared by the preDRAC SoC blocks.
//
// Holds the RV64 opcode and function encodings used by the Lagarto core, the
// decoded-instruction record that travels down its pipeline, the physical
// address map of the SoC and the event numbering of the performance
// monitoring unit. The RISC-V encodings follow the RISC-V ISA; the address
// map and the choice of PMU events are this design's own.
package predrac_pkg;

  localparam int unsigned XLEN = 64;
  typedef logic [XLEN-1:0] xlen_t;

  // Physical address map (this design's choice).
  localparam logic [63:0] RESET_PC  = 64'h0000_0000_8000_0000;
  localparam logic [63:0] MEM_BASE  = 64'h0000_0000_8000_0000; // cached main memory above,
                                                                 // peripherals below
  localparam logic [31:0] UART_BASE = 32'h4000_0000;
  localparam logic [31:0] SPI_BASE  = 32'h4000_1000;

  typedef enum logic [6:0] {
    OP_LUI    = 7'h37, OP_AUIPC  = 7'h17, OP_JAL   = 7'h6f, OP_JALR  = 7'h67,
    OP_BRANCH = 7'h63, OP_LOAD   = 7'h03, OP_STORE = 7'h23, OP_IMM   = 7'h13,
    OP_IMM32  = 7'h1b, OP_OP     = 7'h33, OP_OP32  = 7'h3b, OP_AMO   = 7'h2f,
    OP_SYSTEM = 7'h73, OP_FENCE  = 7'h0f
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    CL_ALU, CL_BRANCH, CL_JUMP, CL_LOAD, CL_STORE, CL_AMO, CL_MULDIV, CL_CSR
  } iclass_e;

  // AMO funct5 encodings
  typedef enum logic [4:0] {
    AMO_ADD = 5'h00, AMO_SWAP = 5'h01, AMO_LR = 5'h02, AMO_SC = 5'h03,
    AMO_XOR = 5'h04, AMO_OR = 5'h08, AMO_AND = 5'h0c, AMO_MIN = 5'h10,
    AMO_MAX = 5'h14, AMO_MINU = 5'h18, AMO_MAXU = 5'h1c
  } amo_op_e;

  // Decoded instruction, produced in decode and consumed by read-registers
  // and execution.
  typedef struct packed {
    iclass_e     cls;
    alu_op_e     alu;
    logic        word;      // *W instruction: 32-bit operation, sign-extended
    logic        use_rs1;
    logic        use_rs2;
    logic        a_is_pc;   // operand A is the PC (AUIPC, JAL)
    logic        b_is_imm;  // operand B is the immediate
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        rd_we;
    logic [2:0]  funct3;
    logic [4:0]  funct5;    // AMO operation
    logic [11:0] csr;
    xlen_t       imm;
    logic        trap;      // ECALL, EBREAK or an illegal instruction
    logic [3:0]  cause;     // its mcause code
    logic        mret;
  } decoded_t;

  // PMU events: nine counters (event numbering is this design's choice).
  localparam int unsigned PMU_N = 9;
  typedef enum logic [3:0] {
    EV_CYCLE = 4'd0, EV_INSTRET = 4'd1, EV_BRANCH = 4'd2, EV_MISPRED = 4'd3,
    EV_LOAD  = 4'd4, EV_STORE   = 4'd5, EV_IMISS  = 4'd6, EV_DMISS   = 4'd7,
    EV_STALL = 4'd8
  } pmu_event_e;

endpackage
