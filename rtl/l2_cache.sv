// l2_cache: unified second-level cache between the two L1 caches and the
// off-chip memory link.
//
// Set-associative, WAYS ways of SIZE_BYTES with LINE_BYTES lines (defaults
// 8 ways, 64 KiB, 64 B: 128 sets, 19-bit tags on a 32-bit physical address;
// the data array is 4096 x 128 bits). Write-back with allocation on every
// miss: a miss picks a victim way (an invalid way if the set has one,
// otherwise one chosen by the low bits of the 16-bit LFSR), writes it back to
// memory as four 128-bit beats if it is dirty, refills the line as four
// beats, and then serves the request as a hit. A store hit merges the byte
// strobes into the line and marks it dirty.
//
// Inclusion: whenever a valid line leaves the L2, `inv` pulses for one cycle
// with the line's address in `inv_addr`, and both L1 caches drop their copy.
//
// Upstream port (from the L1 arbiter) and downstream port (to the link):
// `req` stays high with address, write flag, 128-bit data and 16 byte
// strobes until the one-cycle `ack`, which carries the 128-bit read data.
// A hit is answered HIT_LAT cycles after `req` is seen. One request at a time.
//
// The document gives the size, ways, 64 B blocks, 3-cycle latency, physical
// indexing and tagging, the 4096 x 128 data array and inclusion with
// invalidation of the first-level copies of every evicted line. Its MESI
// directory has nothing to track with one core and write-through L1 caches
// and is left out; write-back, allocate-on-miss and the victim choice are
// this design's own choices ("not mentioned").
module l2_cache #(
  parameter int unsigned WAYS       = 8,
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned HIT_LAT    = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // upstream
  input  logic          req,
  input  logic          we,
  input  logic [31:0]   addr,
  input  logic [127:0]  wdata,
  input  logic [15:0]   strb,
  output logic          ack,
  output logic [127:0]  rdata,
  // back-invalidation of the L1 copies
  output logic          inv,
  output logic [31:0]   inv_addr,
  output logic          miss,     // one-cycle pulse per miss
  // downstream
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
  localparam int unsigned TAG_W = 32 - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned BT_W  = $clog2(BEATS);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WB, S_FILL} state_e;
  state_e st;

  logic [TAG_W-1:0] tags  [WAYS*SETS];
  logic             valid [WAYS*SETS];
  logic             dirty [WAYS*SETS];
  logic [127:0]     data  [WAYS*SETS*BEATS];

  logic [31:0]      a_q;
  logic             we_q;
  logic [127:0]     wd_q;
  logic [15:0]      sb_q;
  logic [7:0]       cnt;
  logic [BT_W-1:0]  beat;
  logic [WAY_W-1:0] victim, hit_way, free_way;
  logic             hit, has_free;
  logic [15:0]      rnd;

  lfsr16 u_lfsr (.clk, .rst_n, .en(1'b1), .state(rnd));

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic [BT_W-1:0]  abeat;
  assign idx   = a_q[OFF_W +: IDX_W];
  assign tag   = a_q[31 -: TAG_W];
  assign abeat = a_q[4 +: BT_W];

  function automatic int unsigned lix(input logic [WAY_W-1:0] w, input logic [IDX_W-1:0] i);
    return int'(w) * SETS + int'(i);
  endfunction
  function automatic int unsigned dix(input logic [WAY_W-1:0] w, input logic [IDX_W-1:0] i,
                                      input logic [BT_W-1:0] b);
    return lix(w, i) * BEATS + int'(b);
  endfunction

  always_comb begin
    hit = 1'b0; hit_way = '0; has_free = 1'b0; free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid[lix(WAY_W'(w), idx)] && tags[lix(WAY_W'(w), idx)] == tag) begin
        hit = 1'b1; hit_way = WAY_W'(w);
      end
      if (!valid[lix(WAY_W'(w), idx)]) begin
        has_free = 1'b1; free_way = WAY_W'(w);
      end
    end
  end

  logic [WAY_W-1:0] pick;
  assign pick = has_free ? free_way : rnd[WAY_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a_q <= '0; we_q <= 1'b0; wd_q <= '0; sb_q <= '0; cnt <= '0;
      beat <= '0; victim <= '0; ack <= 1'b0; rdata <= '0; inv <= 1'b0; inv_addr <= '0;
      miss <= 1'b0;
      for (int i = 0; i < WAYS*SETS; i++) begin valid[i] <= 1'b0; dirty[i] <= 1'b0; end
    end else begin
      ack  <= 1'b0;
      inv  <= 1'b0;
      miss <= 1'b0;
      unique case (st)
        // `ack` is still high in the cycle the requester drops `req`
        S_IDLE: if (req && !ack) begin
          a_q <= addr; we_q <= we; wd_q <= wdata; sb_q <= strb;
          cnt <= 8'(HIT_LAT - 1);
          st  <= S_LOOK;
        end
        S_LOOK: begin
          if (cnt > 1) cnt <= cnt - 8'd1;
          else if (hit) begin
            if (we_q) begin
              for (int b = 0; b < 16; b++)
                if (sb_q[b]) data[dix(hit_way, idx, abeat)][8*b +: 8] <= wd_q[8*b +: 8];
              dirty[lix(hit_way, idx)] <= 1'b1;
            end
            rdata <= data[dix(hit_way, idx, abeat)];
            ack   <= 1'b1;
            st    <= S_IDLE;
          end else begin
            miss   <= 1'b1;
            victim <= pick;
            beat   <= '0;
            if (valid[lix(pick, idx)]) begin
              inv      <= 1'b1;
              inv_addr <= {tags[lix(pick, idx)], idx, OFF_W'(0)};
              valid[lix(pick, idx)] <= 1'b0;
            end
            st <= (valid[lix(pick, idx)] && dirty[lix(pick, idx)]) ? S_WB : S_FILL;
          end
        end
        S_WB: if (m_ack) begin
          beat <= beat + 1'b1;
          if (beat == BT_W'(BEATS - 1)) begin
            dirty[lix(victim, idx)] <= 1'b0;
            st <= S_FILL;
          end
        end
        S_FILL: if (m_ack) begin
          data[dix(victim, idx, beat)] <= m_rdata;
          beat <= beat + 1'b1;
          if (beat == BT_W'(BEATS - 1)) begin
            tags[lix(victim, idx)]  <= tag;
            valid[lix(victim, idx)] <= 1'b1;
            dirty[lix(victim, idx)] <= 1'b0;
            cnt <= 8'd1;            // look again: the request now hits
            st  <= S_LOOK;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the victim's old tag is still in the array during write-back (only its
  // valid bit was cleared), so the write-back address is rebuilt from it
  assign m_req   = (st == S_WB) || (st == S_FILL);
  assign m_we    = (st == S_WB);
  assign m_addr  = (st == S_WB) ? {tags[lix(victim, idx)], idx, beat, 4'b0}
                                : {a_q[31:OFF_W], beat, 4'b0};
  assign m_wdata = data[dix(victim, idx, beat)];
  assign m_strb  = (st == S_WB) ? 16'hFFFF : 16'h0000;

  a_one_req: assert property (@(posedge clk) disable iff (!rst_n)
                              (req && !ack && st != S_IDLE) |-> $stable(addr));
endmodule
