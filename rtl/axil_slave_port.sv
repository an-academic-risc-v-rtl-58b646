// axil_slave_port: AXI4-Lite slave front end that turns bus transactions into
// single-cycle register accesses.
//
// A write is taken when both the address and the data channel are valid and
// no response is pending: `wr_en` is high for that one cycle with `wr_addr`,
// `wr_data` and `wr_strb`, and the OKAY response is offered in the next cycle
// until accepted. A read is taken when its address is valid and no read data
// is pending: `rd_en` pulses with `rd_addr`, and `rd_data`, which the register
// block must drive combinationally, is captured and returned on R in the next
// cycle. Protocol rules are checked by assertions: a valid with its payload
// stays steady until ready.
module axil_slave_port (
  input  logic        clk,
  input  logic        rst_n,
  axil_if.slave       bus,
  output logic        wr_en,
  output logic [31:0] wr_addr,
  output logic [31:0] wr_data,
  output logic [3:0]  wr_strb,
  output logic        rd_en,
  output logic [31:0] rd_addr,
  input  logic [31:0] rd_data
);
  logic bvalid_q, rvalid_q;
  logic [31:0] rdata_q;

  assign wr_en   = bus.awvalid && bus.wvalid && !bvalid_q;
  assign wr_addr = bus.awaddr;
  assign wr_data = bus.wdata;
  assign wr_strb = bus.wstrb;
  assign rd_en   = bus.arvalid && !rvalid_q;
  assign rd_addr = bus.araddr;

  assign bus.awready = wr_en;
  assign bus.wready  = wr_en;
  assign bus.bvalid  = bvalid_q;
  assign bus.bresp   = 2'b00;
  assign bus.arready = rd_en;
  assign bus.rvalid  = rvalid_q;
  assign bus.rdata   = rdata_q;
  assign bus.rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0; rvalid_q <= 1'b0; rdata_q <= '0;
    end else begin
      if (wr_en) bvalid_q <= 1'b1;
      else if (bus.bready) bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1; rdata_q <= rd_data;
      end else if (bus.rready) rvalid_q <= 1'b0;
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bus.awvalid && !bus.awready |=> bus.awvalid && $stable(bus.awaddr));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bus.arvalid && !bus.arready |=> bus.arvalid && $stable(bus.araddr));
endmodule
