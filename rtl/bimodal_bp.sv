// bimodal_bp: bimodal branch predictor of the Lagarto core.
//
// A pattern history table (PHT) of ENTRIES 2-bit saturating counters and a
// branch target buffer (BTB) of ENTRIES entries, both indexed by PC bits
// [IDX_W+1:2]. A BTB entry holds the branch PC bits above the index as tag and
// the target address. Fetch looks up its PC combinationally: the prediction
// is "taken" when the BTB hits and the counter is 2 or 3, and `pred_npc` is
// then the stored target, otherwise PC+4.
//
// The execution stage reports each resolved branch or jump on the update port
// one cycle: the counter moves towards the outcome, and a taken outcome writes
// the target and tag into the BTB. Reset sets every counter to 1 (weakly not
// taken) and invalidates the BTB.
//
// The document gives 1024 entries. The widths of tag (28) and target (40) are
// read from the sizes of the predictor memories (1024x28 and 1024x40); the
// update policy and reset values are this design's choice.
module bimodal_bp #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned TAG_W   = 28,
  parameter int unsigned TGT_W   = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup (fetch)
  input  logic [63:0] pc,
  output logic        pred_taken,
  output logic [63:0] pred_npc,
  // update (execution)
  input  logic        upd_valid,
  input  logic [63:0] upd_pc,
  input  logic        upd_taken,
  input  logic [63:0] upd_target
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [1:0]       pht   [ENTRIES];
  logic             btb_v [ENTRIES];
  logic [TAG_W-1:0] btb_tag [ENTRIES];
  logic [TGT_W-1:0] btb_tgt [ENTRIES];

  logic [IDX_W-1:0] li, ui;
  logic [TAG_W-1:0] ltag, utag;
  assign li   = pc[IDX_W+1:2];
  assign ltag = pc[IDX_W+2+TAG_W-1:IDX_W+2];
  assign ui   = upd_pc[IDX_W+1:2];
  assign utag = upd_pc[IDX_W+2+TAG_W-1:IDX_W+2];

  logic hit;
  assign hit        = btb_v[li] && btb_tag[li] == ltag;
  assign pred_taken = hit && pht[li][1];
  assign pred_npc   = pred_taken ? {{(64-TGT_W){btb_tgt[li][TGT_W-1]}}, btb_tgt[li]} : pc + 64'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        pht[i]   <= 2'd1;
        btb_v[i] <= 1'b0;
      end
    end else if (upd_valid) begin
      if (upd_taken && pht[ui] != 2'd3) pht[ui] <= pht[ui] + 2'd1;
      if (!upd_taken && pht[ui] != 2'd0) pht[ui] <= pht[ui] - 2'd1;
      if (upd_taken) btb_v[ui] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid && upd_taken) begin
      btb_tag[ui] <= utag;
      btb_tgt[ui] <= upd_target[TGT_W-1:0];
    end
  end
endmodule
