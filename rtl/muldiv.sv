// muldiv: multiply / divide unit for the RV64 M extension of the Lagarto core.
//
// `start` (one cycle) launches the operation selected by `funct3` (RISC-V M
// encoding: MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM, REMU) on `a` and `b`;
// `word` selects the 32-bit *W forms, whose result is sign-extended.
// Multiplication is one 64x64 product and answers with `done` two cycles
// after `start`. Division runs a restoring shift-subtract loop on the operand
// magnitudes, one quotient bit per cycle, so `done` comes 66 cycles after
// `start`; signs and the RISC-V special cases (divide by zero, overflow) are
// applied at the end. `result` is valid while `done` is high. No new `start`
// may arrive while `busy`.
//
// The document only says the core implements RV64IMA; the iterative divider
// and the single-cycle multiplier are this design's choice.
module muldiv (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  funct3,
  input  logic        word,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,
  output logic [63:0] result
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV, S_FIX} state_e;
  state_e st;

  logic [2:0]  f3_q;
  logic        word_q;
  logic [63:0] a_q, b_q;
  logic [63:0] quo, rem, dvs;
  logic [6:0]  cnt;
  logic        neg_q, neg_r, dz;
  logic [63:0] res_q;

  // operand preparation
  logic        is_signed;
  logic [63:0] ax, bx, amag, bmag;
  always_comb begin
    is_signed = !funct3[0];           // DIV/REM signed, DIVU/REMU unsigned
    ax = word ? (is_signed ? {{32{a[31]}}, a[31:0]} : {32'b0, a[31:0]}) : a;
    bx = word ? (is_signed ? {{32{b[31]}}, b[31:0]} : {32'b0, b[31:0]}) : b;
    amag = (is_signed && ax[63]) ? -ax : ax;
    bmag = (is_signed && bx[63]) ? -bx : bx;
  end

  // multiplier (registered operands, product in the S_MUL cycle)
  logic [127:0] p_ss, p_su, p_uu;
  assign p_uu = a_q * b_q;
  assign p_ss = $signed({{64{a_q[63]}}, a_q}) * $signed({{64{b_q[63]}}, b_q});
  assign p_su = $signed({{64{a_q[63]}}, a_q}) * $signed({64'b0, b_q});

  logic [63:0] mul_res;
  always_comb begin
    unique case (f3_q)
      3'd0:    mul_res = word_q ? {{32{p_uu[31]}}, p_uu[31:0]} : p_uu[63:0];
      3'd1:    mul_res = p_ss[127:64];
      3'd2:    mul_res = p_su[127:64];
      default: mul_res = p_uu[127:64];
    endcase
  end

  // one restoring division step
  logic [64:0] trial;
  assign trial = {rem[63:0], quo[63]} - {1'b0, dvs};

  logic [63:0] div_q, div_r, div_res;
  always_comb begin
    div_q = neg_q ? -quo : quo;
    div_r = neg_r ? -rem : rem;
    if (dz) begin
      div_q = '1;
      div_r = a_q;                    // dividend (already width-adjusted)
    end
    div_res = f3_q[1] ? div_r : div_q;
    if (word_q) div_res = {{32{div_res[31]}}, div_res[31:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; f3_q <= '0; word_q <= 1'b0; a_q <= '0; b_q <= '0;
      quo <= '0; rem <= '0; dvs <= '0; neg_q <= 1'b0; neg_r <= 1'b0; dz <= 1'b0;
      res_q <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          f3_q <= funct3; word_q <= word;
          if (!funct3[2]) begin
            a_q <= a; b_q <= b; st <= S_MUL;
          end else begin
            a_q <= ax; b_q <= bx;
            quo <= amag; rem <= '0; dvs <= bmag; cnt <= 7'd64;
            neg_q <= is_signed && (ax[63] ^ bx[63]) && bx != '0;
            neg_r <= is_signed && ax[63];
            dz <= (bx == '0);
            st <= S_DIV;
          end
        end
        S_MUL: begin res_q <= mul_res; st <= S_IDLE; end
        S_DIV: begin
          if (!trial[64]) begin
            rem <= trial[63:0];
            quo <= {quo[62:0], 1'b1};
          end else begin
            rem <= {rem[62:0], quo[63]};
            quo <= {quo[62:0], 1'b0};
          end
          cnt <= cnt - 7'd1;
          if (cnt == 7'd1) st <= S_FIX;
        end
        S_FIX: begin res_q <= div_res; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  logic done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= (st == S_MUL) || (st == S_FIX);
  end
  assign done   = done_q;
  assign result = res_q;
  assign busy   = (st != S_IDLE);
endmodule
