// tb_debug_ring: sends host command words to the debug ring and checks the
// answers and the actions on the core-control, system-control and memory
// ports. A core model halts one cycle after `halt_req` and holds 32
// registers; a memory model answers after 3 cycles. The testbench checks
// halting, register write and read-back, PC write, memory write and read-back,
// core reset, status, the instruction-cache flush on resume and the answer to
// an unknown command.
module tb_debug_ring;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic core_reset, halt_req, halted, reg_we, pc_we, iflush, mem_req, mem_we, mem_ack;
  logic [4:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata, pc_wdata, mem_addr, mem_wdata, mem_rdata;
  debug_ring dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .core_reset, .halt_req, .halted, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .pc_we, .pc_wdata,
    .icache_flush(iflush), .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  logic [63:0] regs [32]; logic [63:0] pc; logic [63:0] mem [256]; int mc = 0, flushes = 0;
  always_ff @(posedge clk) begin
    halted <= halt_req;
    if (reg_we) regs[reg_addr] <= reg_wdata;
    if (pc_we) pc <= pc_wdata;
    if (iflush) flushes <= flushes + 1;
    mem_ack <= 1'b0;
    if (mem_req) mc <= 3;
    else if (mc > 0) begin
      mc <= mc - 1;
      if (mc == 1) begin
        mem_ack <= 1'b1; mem_rdata <= mem[mem_addr[10:3]];
        if (mem_we) mem[mem_addr[10:3]] <= mem_wdata;
      end
    end
  end
  assign reg_rdata = regs[reg_addr];

  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [63:0] g, e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  task automatic put(input logic [15:0] w);
    @(negedge clk); in_valid = 1; in_data = w;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
  endtask
  task automatic put64(input logic [63:0] v);
    for (int i = 0; i < 4; i++) put(v[16*i +: 16]);
  endtask
  task automatic get(output logic [15:0] w);
    int t = 0;
    @(negedge clk); out_ready = 1;
    while (!out_valid && t < 200) begin @(negedge clk); t++; end
    w = out_data; @(posedge clk); @(negedge clk); out_ready = 0;
  endtask
  task automatic get64(output logic [63:0] v);
    logic [15:0] w;
    for (int i = 0; i < 4; i++) begin get(w); v[16*i +: 16] = w; end
  endtask

  initial begin
    logic [15:0] w; logic [63:0] v;
    in_valid = 0; in_data = 0; out_ready = 0;
    foreach (regs[i]) regs[i] = 64'(i) * 64'h0101;
    foreach (mem[i]) mem[i] = 0;
    pc = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    put(16'h9000); get(w); chk("status running", w, 16'h0000);
    put(16'h1000); get(w); chk("halt ack", w, 16'hA001);
    chk("halt request", halt_req, 1);
    put(16'h9000); get(w); chk("status halted", w, 16'h0001);
    put(16'h4007); put64(64'h0123_4567_89AB_CDEF); get(w); chk("wreg ack", w, 16'hA004);
    chk("x7 written", regs[7], 64'h0123_4567_89AB_CDEF);
    put(16'h3005); get64(v); chk("read x5", v, 64'h0505);
    put(16'h3007); get64(v); chk("read x7", v, 64'h0123_4567_89AB_CDEF);
    put(16'h7000); put64(64'h8000_0100); get(w); chk("setpc ack", w, 16'hA007);
    chk("pc", pc, 64'h8000_0100);
    for (int k = 0; k < 8; k++) begin
      put(16'h5000); put64(64'h8000_0000 + 8*k); put64(64'hFEED_0000 + k); get(w);
      chk("wmem ack", w, 16'hA005);
    end
    chk("mem[3]", mem[3], 64'hFEED_0003);
    put(16'h6000); put64(64'h8000_0028); get64(v); chk("read mem", v, 64'hFEED_0005);
    put(16'h8001); get(w); chk("core reset ack", w, 16'hA008); chk("core in reset", core_reset, 1);
    put(16'h9000); get(w); chk("status reset", w, 16'h0003);
    put(16'h8000); get(w); chk("core reset released", core_reset, 0);
    put(16'h2000); get(w); chk("resume ack", w, 16'hA002);
    chk("resumed", halt_req, 0); chk("icache flushed", flushes, 1);
    put(16'hF000); get(w); chk("unknown op", w, 16'hE000);
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
