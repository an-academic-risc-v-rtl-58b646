// mmio_bridge: connects the core's data port to the AXI4-Lite peripheral bus.
//
// Takes one request at a time in the core's pulse protocol (`req` with
// address, write flag, 64-bit data and byte enables; answered by a one-cycle
// `ack`) and runs it as one 32-bit AXI4-Lite transaction. The byte enables
// pick the 32-bit half: if only the upper four are set, the access goes to
// address+4 with the upper data half. Read data is returned in both halves of
// `rdata`, so the core finds it wherever it looks. Peripheral registers are
// 32 bits wide; 64-bit accesses are not supported.
//
// The bridge stands for the NASTI-Lite (AXI4-Lite) path of the SoC; its
// insides are this design's own.
module mmio_bridge (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [63:0] addr,
  input  logic [63:0] wdata,
  input  logic [7:0]  be,
  output logic        ack,
  output logic [63:0] rdata,
  axil_if.master      bus
);
  typedef enum logic [2:0] {S_IDLE, S_AW, S_B, S_AR, S_R} state_e;
  state_e      st;
  logic [31:0] a_q, d_q;
  logic [3:0]  s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a_q <= '0; d_q <= '0; s_q <= '0; ack <= 1'b0; rdata <= '0;
    end else begin
      ack <= 1'b0;
      unique case (st)
        S_IDLE: if (req) begin
          if (be[3:0] == 4'b0) begin
            a_q <= {addr[31:3], 3'b100}; d_q <= wdata[63:32]; s_q <= be[7:4];
          end else begin
            a_q <= {addr[31:3], 3'b000}; d_q <= wdata[31:0];  s_q <= be[3:0];
          end
          st <= we ? S_AW : S_AR;
        end
        S_AW: if (bus.awready && bus.wready) st <= S_B;
        S_B:  if (bus.bvalid) begin ack <= 1'b1; st <= S_IDLE; end
        S_AR: if (bus.arready) st <= S_R;
        S_R:  if (bus.rvalid) begin ack <= 1'b1; rdata <= {bus.rdata, bus.rdata}; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign bus.awvalid = (st == S_AW);
  assign bus.wvalid  = (st == S_AW);
  assign bus.awaddr  = a_q;
  assign bus.wdata   = d_q;
  assign bus.wstrb   = s_q;
  assign bus.bready  = (st == S_B);
  assign bus.arvalid = (st == S_AR);
  assign bus.araddr  = a_q;
  assign bus.rready  = (st == S_R);
endmodule
