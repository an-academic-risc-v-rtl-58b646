// fpga_packetizer: FPGA side of the Pack/Unpack link.
//
// Receives the 32-bit words the SoC-side `packetizer` sends over the FMC
// cable, rebuilds the 128-bit memory transaction, performs it on the FPGA's
// memory port (the DDR3 controller or the boot RAM) and sends the answer back:
// four data words for a read (bits [31:0] first), one acknowledge word
// (32'h0000_0001) for a write. Words are taken and sent only in cycles where
// `tick` is high, one per FMC clock; the frame format is described in
// `packetizer`.
//
// Memory port: `m_req` stays high until the one-cycle `m_ack`, which carries
// read data.
//
// The document shows this block (Pack/Unpack on the FPGA) and its place in
// front of the DDR3 controller and memory slave; its insides and the framing
// are this design's own. In the prototype the FPGA logic runs in its own clock
// domain; here it shares the link clock enable with the SoC side.
module fpga_packetizer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  // FMC link
  input  logic         rx_valid,
  input  logic [31:0]  rx_data,
  output logic         tx_valid,
  output logic [31:0]  tx_data,
  // FPGA memory port
  output logic         m_req,
  output logic         m_we,
  output logic [31:0]  m_addr,
  output logic [127:0] m_wdata,
  output logic [15:0]  m_strb,
  input  logic         m_ack,
  input  logic [127:0] m_rdata
);
  typedef enum logic [2:0] {S_HDR, S_ADDR, S_DATA, S_MEM, S_REPLY} state_e;
  state_e       st;
  logic [1:0]   idx;
  logic [127:0] rbuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_HDR; idx <= '0; m_we <= 1'b0; m_addr <= '0; m_wdata <= '0; m_strb <= '0;
      rbuf <= '0;
    end else begin
      unique case (st)
        S_HDR: if (tick && rx_valid) begin
          m_we   <= rx_data[31];
          m_strb <= rx_data[15:0];
          st     <= S_ADDR;
        end
        S_ADDR: if (tick && rx_valid) begin
          m_addr <= rx_data;
          idx    <= '0;
          st     <= m_we ? S_DATA : S_MEM;
        end
        S_DATA: if (tick && rx_valid) begin
          m_wdata[32*idx +: 32] <= rx_data;
          idx <= idx + 2'd1;
          if (idx == 2'd3) st <= S_MEM;
        end
        S_MEM: if (m_ack) begin
          rbuf <= m_we ? 128'd1 : m_rdata;
          idx  <= '0;
          st   <= S_REPLY;
        end
        S_REPLY: if (tick) begin
          idx <= idx + 2'd1;
          if (m_we || idx == 2'd3) st <= S_HDR;
        end
        default: st <= S_HDR;
      endcase
    end
  end

  assign m_req    = (st == S_MEM);
  assign tx_valid = (st == S_REPLY);
  assign tx_data  = rbuf[32*idx +: 32];
endmodule
