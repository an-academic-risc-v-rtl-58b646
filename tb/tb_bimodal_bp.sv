// tb_bimodal_bp: trains the bimodal predictor with branch outcomes and checks
// its predictions against a reference model of 1024 2-bit counters and BTB
// entries (tag = PC bits [39:12], target = 40 bits). Also checks the
// hysteresis of the counters: a loop branch stays predicted taken after one
// not-taken outcome.
module tb_bimodal_bp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] pc, npc, upc, utgt; logic taken, uv, ut;
  bimodal_bp dut (.clk, .rst_n, .pc, .pred_taken(taken), .pred_npc(npc),
                  .upd_valid(uv), .upd_pc(upc), .upd_taken(ut), .upd_target(utgt));
  int checks = 0, failures = 0;
  int          cnt [1024];
  bit          v [1024];
  logic [27:0] tg [1024];
  logic [39:0] tt [1024];
  logic [63:0] pcs [16];
  initial begin
    logic [63:0] p, e; int i;
    uv = 0; upc = 0; ut = 0; utgt = 0; pc = 0;
    foreach (cnt[k]) begin cnt[k] = 1; v[k] = 0; end
    for (int k = 0; k < 16; k++) pcs[k] = {24'b0, 26'($urandom), 12'($urandom) & 12'hffc} ;
    pcs[1] = pcs[0] ^ 64'h1000;               // same index, different tag
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      p = pcs[$urandom % 16]; pc = p; #1;
      i = int'(p[11:2]);
      e = (v[i] && tg[i] == p[39:12] && cnt[i] >= 2) ? {{24{tt[i][39]}}, tt[i]} : p + 4;
      checks++; if (npc !== e) begin failures++; $display("FAIL predict %h got %h exp %h", p, npc, e); end
      uv = 1; upc = p; ut = ($urandom % 4) != 0; utgt = {24'b0, 40'($urandom)} & ~64'h3;
      if (ut) begin if (cnt[i] < 3) cnt[i]++; v[i] = 1; tg[i] = p[39:12]; tt[i] = utgt[39:0]; end
      else if (cnt[i] > 0) cnt[i]--;
      @(negedge clk); uv = 0;
    end
    // hysteresis: strongly taken branch survives one not-taken
    p = 64'h8000_0040;
    repeat (3) begin @(negedge clk); uv = 1; upc = p; ut = 1; utgt = 64'h8000_0000; end
    @(negedge clk); ut = 0;
    @(negedge clk); uv = 0; pc = p; #1;
    checks++; if (!taken || npc != 64'h8000_0000) begin failures++; $display("FAIL hysteresis"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
