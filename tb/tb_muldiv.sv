// tb_muldiv: random and corner-case operands for every RV64 M-extension
// operation, compared with results computed by the testbench from the ISA
// definition (including divide by zero and signed overflow), plus the latency:
// 2 cycles for a multiply, 66 for a divide.
module tb_muldiv;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, word, busy, done; logic [2:0] f3; logic [63:0] a, b, res;
  muldiv dut (.clk, .rst_n, .start, .funct3(f3), .word, .a, .b, .busy, .done, .result(res));
  int checks = 0, failures = 0;

  function automatic logic [63:0] sx32(input logic [31:0] x); return {{32{x[31]}}, x}; endfunction
  function automatic logic [63:0] model(input logic [2:0] f, input logic w, input logic [63:0] x, y);
    logic signed [127:0] ps; logic [127:0] pu; logic signed [63:0] xs, ys;
    logic [31:0] x32, y32;
    xs = x; ys = y; x32 = x[31:0]; y32 = y[31:0];
    if (!w) begin
      unique case (f)
        0: return x * y;
        1: begin ps = 128'(xs) * 128'(ys); return ps[127:64]; end
        2: begin ps = 128'(xs) * $signed({64'b0, y}); return ps[127:64]; end
        3: begin pu = {64'b0, x} * {64'b0, y}; return pu[127:64]; end
        4: return (y == 0) ? '1 : (x == 64'h8000_0000_0000_0000 && y == '1) ? x : 64'(xs / ys);
        5: return (y == 0) ? '1 : x / y;
        6: return (y == 0) ? x : (x == 64'h8000_0000_0000_0000 && y == '1) ? 0 : 64'(xs % ys);
        default: return (y == 0) ? x : x % y;
      endcase
    end else begin
      unique case (f)
        0: return sx32(x32 * y32);
        4: return (y32 == 0) ? '1 : (x32 == 32'h8000_0000 && y32 == '1) ? sx32(x32) : sx32(32'($signed(x32) / $signed(y32)));
        5: return (y32 == 0) ? '1 : sx32(x32 / y32);
        6: return (y32 == 0) ? sx32(x32) : (x32 == 32'h8000_0000 && y32 == '1) ? 0 : sx32(32'($signed(x32) % $signed(y32)));
        default: return (y32 == 0) ? sx32(x32) : sx32(x32 % y32);
      endcase
    end
  endfunction

  task automatic run(input logic [2:0] f, input logic w, input logic [63:0] x, y);
    int lat; logic [63:0] e;
    @(negedge clk); start = 1; f3 = f; word = w; a = x; b = y;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    e = model(f, w, x, y);
    checks++; if (res !== e) begin failures++; $display("FAIL f3=%0d w=%0d %h %h got %h exp %h", f, w, x, y, res, e); end
    checks++; if (lat != (f[2] ? 66 : 2)) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  logic [63:0] corner [6];
  initial begin
    start = 0; f3 = 0; word = 0; a = 0; b = 0;
    corner[0] = 0; corner[1] = 1; corner[2] = '1; corner[3] = 64'h8000_0000_0000_0000;
    corner[4] = 64'h0000_0000_8000_0000; corner[5] = 64'h7fff_ffff_ffff_ffff;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 8; f++)
      foreach (corner[i]) foreach (corner[j]) begin
        run(3'(f), 0, corner[i], corner[j]);
        if (f == 0 || f >= 4) run(3'(f), 1, corner[i], corner[j]);
      end
    for (int n = 0; n < 300; n++) begin
      logic [2:0] f; f = 3'($urandom);
      run(f, (f == 0 || f >= 4) ? 1'($urandom) : 1'b0, {$urandom, $urandom}, ($urandom % 3 == 0) ? 64'($urandom % 100) : {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
