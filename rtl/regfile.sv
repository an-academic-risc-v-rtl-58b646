// regfile: integer register file of the Lagarto core, 32 registers of 64 bits.
//
// Built as two banks of 32x64 (the SoC holds the register file in two 32x64
// memories), each bank serving one read port; every write goes to both banks
// so they always hold the same values. Register x0 reads as zero and writes to
// it are ignored. Reads are combinational; a write takes effect at the clock
// edge, so a read in the same cycle as a write to the same register returns
// the old value (the pipeline bypasses it).
module regfile #(
  parameter int unsigned XLEN = 64,
  parameter int unsigned NREG = 32
) (
  input  logic                    clk,
  input  logic [$clog2(NREG)-1:0] ra1,
  output logic [XLEN-1:0]         rd1,
  input  logic [$clog2(NREG)-1:0] ra2,
  output logic [XLEN-1:0]         rd2,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [XLEN-1:0]         wd
);
  logic [XLEN-1:0] bank0 [NREG];
  logic [XLEN-1:0] bank1 [NREG];

  always_ff @(posedge clk) begin
    if (we && wa != '0) begin
      bank0[wa] <= wd;
      bank1[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : bank0[ra1];
  assign rd2 = (ra2 == '0) ? '0 : bank1[ra2];
endmodule
