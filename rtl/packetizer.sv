// packetizer: SoC side of the Pack/Unpack link to the FPGA board.
//
// The SoC has no DDR3 interface of its own; main memory sits on an FPGA board
// reached over a 32-bit FMC cable running at a quarter of the core clock. This
// block turns each 128-bit memory transaction of the SoC into 32-bit words on
// that cable and reassembles the answer. It advances only in core cycles where
// `tick` (from `clk_div`) is high, so one word moves per FMC clock.
//
// Frame sent (tx), one word per tick:
//   word 0  {write, 15'b0, byte strobes[15:0]}
//   word 1  address[31:0]
//   words 2..5 (writes only) write data, bits [31:0] first
// Frame received (rx), sampled on ticks where `rx_valid` is high:
//   reads: four data words, bits [31:0] first; writes: one acknowledge word.
//
// Memory port: `m_req` stays high with address/data until the one-cycle
// `m_ack`, which carries the 128-bit read data. A read takes 6 FMC words of
// link time plus the FPGA's access time; a write 7.
//
// The document gives the split of the 128-bit bus into four 32-bit transfers
// and the 50 MHz link; the header words and the acknowledge word are this
// design's own framing.
module packetizer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  // SoC memory port
  input  logic         m_req,
  input  logic         m_we,
  input  logic [31:0]  m_addr,
  input  logic [127:0] m_wdata,
  input  logic [15:0]  m_strb,
  output logic         m_ack,
  output logic [127:0] m_rdata,
  // FMC link
  output logic         tx_valid,
  output logic [31:0]  tx_data,
  input  logic         rx_valid,
  input  logic [31:0]  rx_data
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_RECV} state_e;
  state_e      st;
  logic [2:0]  idx;
  logic [2:0]  nwords;
  logic [31:0] words [6];
  logic        we_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; nwords <= '0; we_q <= 1'b0; m_ack <= 1'b0; m_rdata <= '0;
      for (int i = 0; i < 6; i++) words[i] <= '0;
    end else begin
      m_ack <= 1'b0;
      unique case (st)
        S_IDLE: if (m_req && !m_ack && tick) begin
          words[0] <= {m_we, 15'b0, m_strb};
          words[1] <= m_addr;
          for (int i = 0; i < 4; i++) words[2+i] <= m_wdata[32*i +: 32];
          nwords <= m_we ? 3'd6 : 3'd2;
          we_q   <= m_we;
          idx    <= '0;
          st     <= S_SEND;
        end
        S_SEND: if (tick) begin
          if (idx == nwords - 3'd1) begin
            idx <= '0;
            st  <= S_RECV;
          end else idx <= idx + 3'd1;
        end
        S_RECV: if (tick && rx_valid) begin
          if (we_q) begin
            m_ack <= 1'b1;
            st    <= S_IDLE;
          end else begin
            m_rdata[32*idx[1:0] +: 32] <= rx_data;
            idx <= idx + 3'd1;
            if (idx == 3'd3) begin
              m_ack <= 1'b1;
              st    <= S_IDLE;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign tx_valid = (st == S_SEND);
  assign tx_data  = words[idx];
endmodule
