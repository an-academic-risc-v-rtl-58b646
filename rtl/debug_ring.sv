// debug_ring: debug ring controller with its system-control, core-control and
// memory-access nodes.
//
// A host reaches the SoC through a JTAG-to-FIFO bridge that delivers 16-bit
// words. Incoming words are queued in an input FIFO, decoded by the hardware
// interface manager (the command state machine below) and dispatched to one of
// three nodes; answers go back through an output FIFO:
//   system control - holds the core in reset, or releases it;
//   core control   - halts and resumes the core, reads and writes its
//                    registers and its fetch PC;
//   memory access  - reads and writes 64-bit words of memory through the
//                    data-cache port (which the SoC hands to the debug ring
//                    while the core is halted); this is how a program is
//                    loaded before the core is started.
// On resume the instruction cache is flushed (`icache_flush`), so freshly
// written code is fetched from memory.
//
// Command word {op[3:0], arg[11:0]}; 64-bit operands and results travel as
// four 16-bit words, least significant first:
//   1 HALT            -> ack          2 RESUME         -> ack
//   3 READ_REG  r     -> 4 words      4 WRITE_REG r + 4 words -> ack
//   5 WRITE_MEM + 4 address + 4 data words -> ack
//   6 READ_MEM  + 4 address words     -> 4 words
//   7 SET_PC    + 4 words -> ack      8 CORE_RESET arg[0] (1 = hold) -> ack
//   9 STATUS          -> 1 word {14'b0, core_reset, halted}
// ack is the word 16'hA000 | op. Unknown operations are answered with 16'hE000.
//
// Register and PC accesses are carried out only while the core is halted;
// otherwise they are just acknowledged.
//
// The document gives the three nodes and their tasks (start/stop execution,
// read/write registers, write a program to memory, SoC initialisation) and the
// FIFO-based exchange with the host. The 16-bit word width, the command
// encoding, the FIFO depth and the use of the data-cache port for memory
// access are this design's own.
module debug_ring #(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // host word stream (from / to the JTAG bridge)
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  // system control
  output logic        core_reset,
  // core control
  output logic        halt_req,
  input  logic        halted,
  output logic        reg_we,
  output logic [4:0]  reg_addr,
  output logic [63:0] reg_wdata,
  input  logic [63:0] reg_rdata,
  output logic        pc_we,
  output logic [63:0] pc_wdata,
  output logic        icache_flush,
  // memory access (64-bit words, pulse protocol as the core's data port)
  output logic        mem_req,
  output logic        mem_we,
  output logic [63:0] mem_addr,
  output logic [63:0] mem_wdata,
  input  logic        mem_ack,
  input  logic [63:0] mem_rdata
);
  typedef enum logic [3:0] {
    OP_HALT = 4'd1, OP_RESUME = 4'd2, OP_RREG = 4'd3, OP_WREG = 4'd4, OP_WMEM = 4'd5,
    OP_RMEM = 4'd6, OP_SETPC = 4'd7, OP_CRST = 4'd8, OP_STATUS = 4'd9
  } op_e;
  typedef enum logic [2:0] {S_CMD, S_ARG, S_EXEC, S_MEMW, S_REPLY} state_e;

  logic        cin_v, cin_rdy, cout_v, cout_rdy;
  logic [15:0] cin_d, cout_d;

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(cin_v), .out_ready(cin_rdy), .out_data(cin_d));
  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .in_valid(cout_v), .in_ready(cout_rdy), .in_data(cout_d),
    .out_valid, .out_ready, .out_data);

  state_e      st;
  op_e         op;
  logic [11:0] arg;
  logic [3:0]  nargs, got;       // operand words expected / received
  logic [127:0] args;            // up to two 64-bit operands
  logic [63:0] reply;
  logic [2:0]  nreply, sent;

  assign cin_rdy = (st == S_CMD) || (st == S_ARG);
  assign cout_v  = (st == S_REPLY);
  assign cout_d  = reply[16*sent[1:0] +: 16];

  assign reg_addr  = arg[4:0];
  assign reg_wdata = args[63:0];
  assign pc_wdata  = args[63:0];
  assign mem_addr  = args[63:0];
  assign mem_wdata = args[127:64];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_CMD; op <= OP_HALT; arg <= '0; nargs <= '0; got <= '0; args <= '0;
      reply <= '0; nreply <= '0; sent <= '0;
      core_reset <= 1'b0; halt_req <= 1'b0; reg_we <= 1'b0; pc_we <= 1'b0;
      icache_flush <= 1'b0; mem_req <= 1'b0; mem_we <= 1'b0;
    end else begin
      reg_we <= 1'b0; pc_we <= 1'b0; icache_flush <= 1'b0; mem_req <= 1'b0;
      unique case (st)
        S_CMD: if (cin_v) begin
          op  <= op_e'(cin_d[15:12]);
          arg <= cin_d[11:0];
          got <= '0;
          unique case (cin_d[15:12])
            4'd4, 4'd6, 4'd7: begin nargs <= 4'd4; st <= S_ARG; end
            4'd5:             begin nargs <= 4'd8; st <= S_ARG; end
            default:          st <= S_EXEC;
          endcase
        end
        S_ARG: if (cin_v) begin
          args[16*got +: 16] <= cin_d;
          got <= got + 4'd1;
          if (got == nargs - 4'd1) st <= S_EXEC;
        end
        S_EXEC: begin
          reply  <= {48'b0, 16'hA000 | {12'b0, op}};
          nreply <= 3'd1;
          sent   <= '0;
          st     <= S_REPLY;
          unique case (op)
            OP_HALT:   halt_req <= 1'b1;
            OP_RESUME: begin halt_req <= 1'b0; icache_flush <= 1'b1; end
            OP_RREG:   if (halted) begin reply <= reg_rdata; nreply <= 3'd4; end
            OP_WREG:   reg_we <= halted;
            OP_SETPC:  pc_we <= halted;
            OP_CRST:   core_reset <= arg[0];
            OP_STATUS: reply <= {48'b0, 14'b0, core_reset, halted};
            OP_WMEM, OP_RMEM: begin
              mem_req <= 1'b1; mem_we <= (op == OP_WMEM); st <= S_MEMW;
            end
            default:   reply <= 64'hE000;
          endcase
        end
        S_MEMW: if (mem_ack) begin
          if (op == OP_RMEM) begin reply <= mem_rdata; nreply <= 3'd4; end
          st <= S_REPLY;
        end
        S_REPLY: if (cout_rdy) begin
          sent <= sent + 3'd1;
          if (sent == nreply - 3'd1) st <= S_CMD;
        end
        default: st <= S_CMD;
      endcase
    end
  end
endmodule
