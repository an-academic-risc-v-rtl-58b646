// fpga_board_model: behavioural model of the FPGA board at the far end of the
// FMC link, for simulation only. It holds the FPGA-side Pack/Unpack block
// (`fpga_packetizer`, the real RTL) and, behind it, a model of the memory the
// FPGA serves (DDR3 controller and boot RAM): MEM_WORDS 128-bit words from
// address 0x8000_0000 upwards, answering after LAT cycles. `mem` can be
// preloaded and inspected by hierarchical reference.
module fpga_board_model #(
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned LAT       = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fmc_clk,
  input  logic        rx_valid,
  input  logic [31:0] rx_data,
  output logic        tx_valid,
  output logic [31:0] tx_data,
  output int          accesses
);
  logic         m_req, m_we, m_ack;
  logic [31:0]  m_addr;
  logic [127:0] m_wdata, m_rdata;
  logic [15:0]  m_strb;
  logic         fclk_q, link_tick;

  // the link advances in the core-clock cycle before each rising fmc_clk:
  // the second of the two cycles in which fmc_clk is low
  always_ff @(posedge clk) fclk_q <= fmc_clk;
  assign link_tick = !fclk_q && !fmc_clk;

  fpga_packetizer u_fp (.clk, .rst_n, .tick(link_tick), .rx_valid, .rx_data, .tx_valid, .tx_data,
                        .m_req, .m_we, .m_addr, .m_wdata, .m_strb, .m_ack, .m_rdata);

  logic [127:0] mem [MEM_WORDS];
  int cnt = 0;
  initial accesses = 0;
  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (cnt == int'(LAT)) begin
        cnt <= 0; m_ack <= 1'b1; accesses <= accesses + 1;
        m_rdata <= mem[m_addr[$clog2(MEM_WORDS)+3:4]];
        if (m_we) for (int b = 0; b < 16; b++)
          if (m_strb[b]) mem[m_addr[$clog2(MEM_WORDS)+3:4]][8*b +: 8] <= m_wdata[8*b +: 8];
      end else cnt <= cnt + 1;
    end
  end
endmodule
