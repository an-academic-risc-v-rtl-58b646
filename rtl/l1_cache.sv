// l1_cache: first-level cache (used as instruction cache and as data cache).
//
// Set-associative, WAYS ways of SIZE_BYTES in total with LINE_BYTES lines
// (defaults 4 ways, 16 KiB, 64 B: 64 sets, a 4 KiB way, 20-bit tags on a
// 32-bit physical address). The way to refill is chosen at random from the
// low bits of the 16-bit LFSR `lfsr16`. Every access, hit or miss, goes
// through a lookup that takes HIT_LAT cycles: a read hit answers HIT_LAT
// cycles after the request. A read miss then fetches the line as four
// 128-bit beats from the memory port, fills it into the chosen way and
// answers. Stores are written through to memory (one 128-bit beat with byte
// strobes); a store hit also updates the cached line, a store miss does not
// allocate. `flush` invalidates every line in one cycle. `inv` drops the one
// line at `inv_addr` (sent by the L2 when it evicts that line); if that line
// is being refilled at the time, the refill still answers but is not kept.
//
// CPU port: one-cycle `req` pulse with address, write flag, 64-bit data and
// byte enables, accepted only while the cache is idle (a second request must
// wait for `ack`); `ack` is a one-cycle pulse with the aligned 64-bit word in
// `rdata`. Memory port: `m_req` stays high with its address/data until the
// one-cycle `m_ack`, which carries the 128-bit read data.
//
// The document gives the organisation (4 ways, 16 KiB, 64 B lines), the hit
// latencies (2 cycles for the instruction cache, 3 for the data cache) and
// the random replacement by LFSR. Write-through without allocation, the
// refill order and the absence of the TLB and of coherence are this design's
// choices; addresses are used untranslated.
module l1_cache #(
  parameter int unsigned WAYS       = 4,
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned HIT_LAT    = 2,
  parameter int unsigned PADDR_W    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          inv,
  input  logic [31:0]   inv_addr,
  // CPU side
  input  logic          req,
  input  logic          we,
  input  logic [63:0]   addr,
  input  logic [63:0]   wdata,
  input  logic [7:0]    be,
  output logic          ack,
  output logic [63:0]   rdata,
  output logic          miss,     // one-cycle pulse per read miss (PMU)
  // memory side
  output logic          m_req,
  output logic          m_we,
  output logic [31:0]   m_addr,
  output logic [127:0]  m_wdata,
  output logic [15:0]   m_strb,
  input  logic          m_ack,
  input  logic [127:0]  m_rdata
);
  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned BEATS = LINE_BYTES / 16;
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = PADDR_W - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned BT_W  = $clog2(BEATS);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_REFILL, S_WRITE, S_RESP} state_e;
  state_e st;

  logic [TAG_W-1:0] tags  [WAYS*SETS];
  logic             valid [WAYS*SETS];
  logic [127:0]     data  [WAYS*SETS*BEATS];

  logic [PADDR_W-1:0] a_q;
  logic               we_q;
  logic [63:0]        wd_q;
  logic [7:0]         be_q;
  logic [7:0]         cnt;
  logic [BT_W-1:0]    beat;
  logic [WAY_W-1:0]   victim, hit_way;
  logic               hit;
  logic [15:0]        rnd;
  logic               kill;       // the line being refilled was invalidated

  lfsr16 u_lfsr (.clk, .rst_n, .en(1'b1), .state(rnd));

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic [BT_W-1:0]  abeat;
  assign idx   = a_q[OFF_W +: IDX_W];
  assign tag   = a_q[PADDR_W-1 -: TAG_W];
  assign abeat = a_q[4 +: BT_W];

  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[w*SETS + int'(idx)] && tags[w*SETS + int'(idx)] == tag) begin
        hit = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  // back-invalidation: which way (if any) holds the line at inv_addr
  logic [IDX_W-1:0] inv_idx;
  logic [TAG_W-1:0] inv_tag;
  logic             inv_refill;
  assign inv_idx    = inv_addr[OFF_W +: IDX_W];
  assign inv_tag    = inv_addr[PADDR_W-1 -: TAG_W];
  assign inv_refill = inv && st == S_REFILL && inv_addr[PADDR_W-1:OFF_W] == a_q[PADDR_W-1:OFF_W];

  // 128-bit beat seen by a store: the 64-bit word in its half, with strobes
  logic [127:0] st_data;
  logic [15:0]  st_strb;
  assign st_data = a_q[3] ? {wd_q, 64'b0} : {64'b0, wd_q};
  assign st_strb = a_q[3] ? {be_q, 8'b0} : {8'b0, be_q};

  function automatic int unsigned dix(input logic [WAY_W-1:0] w, input logic [IDX_W-1:0] i,
                                      input logic [BT_W-1:0] b);
    return (int'(w) * SETS + int'(i)) * BEATS + int'(b);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a_q <= '0; we_q <= 1'b0; wd_q <= '0; be_q <= '0; cnt <= '0;
      beat <= '0; victim <= '0; ack <= 1'b0; rdata <= '0; miss <= 1'b0; kill <= 1'b0;
      for (int i = 0; i < WAYS*SETS; i++) valid[i] <= 1'b0;
    end else begin
      ack  <= 1'b0;
      miss <= 1'b0;
      if (flush) for (int i = 0; i < WAYS*SETS; i++) valid[i] <= 1'b0;
      if (inv)
        for (int w = 0; w < WAYS; w++)
          if (tags[w*SETS + int'(inv_idx)] == inv_tag) valid[w*SETS + int'(inv_idx)] <= 1'b0;
      if (inv_refill) kill <= 1'b1;
      unique case (st)
        S_IDLE: if (req) begin
          a_q <= addr[PADDR_W-1:0]; we_q <= we; wd_q <= wdata; be_q <= be;
          cnt <= 8'(HIT_LAT - 1);
          st  <= S_LOOK;
        end
        S_LOOK: begin
          if (cnt > 1) cnt <= cnt - 8'd1;
          else if (we_q) begin
            st <= S_WRITE;
          end else if (hit) begin
            rdata <= a_q[3] ? data[dix(hit_way, idx, abeat)][127:64]
                            : data[dix(hit_way, idx, abeat)][63:0];
            ack <= 1'b1;
            st  <= S_IDLE;
          end else begin
            miss   <= 1'b1;
            victim <= rnd[WAY_W-1:0];
            beat   <= '0;
            kill   <= 1'b0;
            st     <= S_REFILL;
          end
        end
        S_REFILL: if (m_ack) begin
          data[dix(victim, idx, beat)] <= m_rdata;
          beat <= beat + 1'b1;
          if (beat == BT_W'(BEATS - 1)) begin
            tags[int'(victim)*SETS + int'(idx)]  <= tag;
            valid[int'(victim)*SETS + int'(idx)] <= !(kill || inv_refill);
            st <= S_RESP;
          end
        end
        S_WRITE: if (m_ack) begin
          if (hit) begin
            for (int b = 0; b < 16; b++)
              if (st_strb[b]) data[dix(hit_way, idx, abeat)][8*b +: 8] <= st_data[8*b +: 8];
          end
          ack <= 1'b1;
          st  <= S_IDLE;
        end
        S_RESP: begin
          rdata <= a_q[3] ? data[dix(victim, idx, abeat)][127:64]
                          : data[dix(victim, idx, abeat)][63:0];
          ack <= 1'b1;
          st  <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign m_req   = (st == S_REFILL) || (st == S_WRITE);
  assign m_we    = (st == S_WRITE);
  assign m_addr  = (st == S_WRITE) ? {a_q[31:4], 4'b0} : {a_q[31:OFF_W], beat, 4'b0};
  assign m_wdata = st_data;
  assign m_strb  = st_strb;

  a_req_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> st == S_IDLE);
endmodule
