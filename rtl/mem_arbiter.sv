// mem_arbiter: shares one 128-bit memory port between the two L1 caches.
//
// Both requesters use the level protocol of the caches' memory side (`req`
// held with its address and data until the one-cycle `ack`). When the port is
// free, the data cache wins over the instruction cache; the winner keeps the
// port until its `ack`, which is passed back to it alone. Read data goes to
// both. In the SoC this position is held by the L2 cache and its coherence
// manager; this arbiter only forwards misses to main memory.
module mem_arbiter (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_req, a_we,
  input  logic [31:0]  a_addr,
  input  logic [127:0] a_wdata,
  input  logic [15:0]  a_strb,
  output logic         a_ack,
  input  logic         b_req, b_we,
  input  logic [31:0]  b_addr,
  input  logic [127:0] b_wdata,
  input  logic [15:0]  b_strb,
  output logic         b_ack,
  output logic [127:0] rdata,
  output logic         m_req, m_we,
  output logic [31:0]  m_addr,
  output logic [127:0] m_wdata,
  output logic [15:0]  m_strb,
  input  logic         m_ack,
  input  logic [127:0] m_rdata
);
  logic busy, owner_b, sel_b;
  assign sel_b = busy ? owner_b : !a_req;   // a (data cache) first

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin busy <= 1'b0; owner_b <= 1'b0; end
    else if (m_ack) busy <= 1'b0;
    else if (!busy && (a_req || b_req)) begin busy <= 1'b1; owner_b <= sel_b; end
  end

  assign m_req   = sel_b ? b_req : a_req;
  assign m_we    = sel_b ? b_we : a_we;
  assign m_addr  = sel_b ? b_addr : a_addr;
  assign m_wdata = sel_b ? b_wdata : a_wdata;
  assign m_strb  = sel_b ? b_strb : a_strb;
  assign a_ack   = m_ack && !sel_b;
  assign b_ack   = m_ack && sel_b;
  assign rdata   = m_rdata;
endmodule
