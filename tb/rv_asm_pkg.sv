// rv_asm_pkg: RISC-V instruction encoders for building test programs in
// testbenches. Each function returns the 32-bit encoding of one instruction
// in the standard R/I/S/B/U/J formats.
package rv_asm_pkg;
  function automatic logic [31:0] r_t(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                      input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input logic [4:0] rs1, input logic [2:0] f3,
                                      input logic [4:0] rd, input logic [6:0] op);
    logic [31:0] v; v = imm;
    return {v[11:0], rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input logic [4:0] rs2, rs1, input logic [2:0] f3);
    logic [31:0] v; v = imm;
    return {v[11:5], rs2, rs1, f3, v[4:0], 7'h23};
  endfunction
  function automatic logic [31:0] b_t(input int imm, input logic [4:0] rs2, rs1, input logic [2:0] f3);
    logic [31:0] v; v = imm;
    return {v[12], v[10:5], rs2, rs1, f3, v[4:1], v[11], 7'h63};
  endfunction
  function automatic logic [31:0] u_t(input int imm20, input logic [4:0] rd, input logic [6:0] op);
    logic [31:0] v; v = imm20;
    return {v[19:0], rd, op};
  endfunction
  function automatic logic [31:0] j_t(input int imm, input logic [4:0] rd);
    logic [31:0] v; v = imm;
    return {v[20], v[10:1], v[11], v[19:12], rd, 7'h6f};
  endfunction
  // common mnemonics
  function automatic logic [31:0] ADDI(input logic [4:0] rd, rs1, input int imm); return i_t(imm, rs1, 3'd0, rd, 7'h13); endfunction
  function automatic logic [31:0] SRAI(input logic [4:0] rd, rs1, input int sh);  return i_t(sh | 32'h400, rs1, 3'd5, rd, 7'h13); endfunction
  function automatic logic [31:0] ADD (input logic [4:0] rd, rs1, rs2); return r_t(7'h00, rs2, rs1, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] SUBW(input logic [4:0] rd, rs1, rs2); return r_t(7'h20, rs2, rs1, 3'd0, rd, 7'h3b); endfunction
  function automatic logic [31:0] SLTU(input logic [4:0] rd, rs1, rs2); return r_t(7'h00, rs2, rs1, 3'd3, rd, 7'h33); endfunction
  function automatic logic [31:0] MUL (input logic [4:0] rd, rs1, rs2); return r_t(7'h01, rs2, rs1, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] DIV (input logic [4:0] rd, rs1, rs2); return r_t(7'h01, rs2, rs1, 3'd4, rd, 7'h33); endfunction
  function automatic logic [31:0] REM (input logic [4:0] rd, rs1, rs2); return r_t(7'h01, rs2, rs1, 3'd6, rd, 7'h33); endfunction
  function automatic logic [31:0] LD  (input logic [4:0] rd, rs1, input int imm); return i_t(imm, rs1, 3'd3, rd, 7'h03); endfunction
  function automatic logic [31:0] LB  (input logic [4:0] rd, rs1, input int imm); return i_t(imm, rs1, 3'd0, rd, 7'h03); endfunction
  function automatic logic [31:0] SD  (input logic [4:0] rs2, rs1, input int imm); return s_t(imm, rs2, rs1, 3'd3); endfunction
  function automatic logic [31:0] SW  (input logic [4:0] rs2, rs1, input int imm); return s_t(imm, rs2, rs1, 3'd2); endfunction
  function automatic logic [31:0] BGE (input logic [4:0] rs1, rs2, input int imm); return b_t(imm, rs2, rs1, 3'd5); endfunction
  function automatic logic [31:0] BNE (input logic [4:0] rs1, rs2, input int imm); return b_t(imm, rs2, rs1, 3'd1); endfunction
  function automatic logic [31:0] JAL (input logic [4:0] rd, input int imm); return j_t(imm, rd); endfunction
  function automatic logic [31:0] AUIPC(input logic [4:0] rd, input int imm20); return u_t(imm20, rd, 7'h17); endfunction
  function automatic logic [31:0] LUI (input logic [4:0] rd, input int imm20); return u_t(imm20, rd, 7'h37); endfunction
  function automatic logic [31:0] AMOADD_D(input logic [4:0] rd, rs2, rs1); return r_t({5'h00, 2'b00}, rs2, rs1, 3'd3, rd, 7'h2f); endfunction
  function automatic logic [31:0] AMOAND_D(input logic [4:0] rd, rs2, rs1); return r_t({5'h0c, 2'b00}, rs2, rs1, 3'd3, rd, 7'h2f); endfunction
  function automatic logic [31:0] LR_D(input logic [4:0] rd, rs1);        return r_t({5'h02, 2'b00}, 5'd0, rs1, 3'd3, rd, 7'h2f); endfunction
  function automatic logic [31:0] SC_D(input logic [4:0] rd, rs2, rs1);   return r_t({5'h03, 2'b00}, rs2, rs1, 3'd3, rd, 7'h2f); endfunction
  function automatic logic [31:0] CSRRS(input logic [4:0] rd, input int csr, input logic [4:0] rs1); return i_t(csr, rs1, 3'd2, rd, 7'h73); endfunction
  function automatic logic [31:0] CSRRW(input logic [4:0] rd, input int csr, input logic [4:0] rs1); return i_t(csr, rs1, 3'd1, rd, 7'h73); endfunction
endpackage
