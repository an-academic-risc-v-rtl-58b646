// axil_demux: routes one AXI4-Lite master to two slaves by one address bit.
//
// Address bit SEL_BIT of the write or read address selects slave 0 or 1. The
// choice is remembered from the address handshake until the response has been
// delivered, and a new address is held back (ready low) while a response of
// that kind is outstanding, so responses always come from the right slave.
module axil_demux #(
  parameter int unsigned SEL_BIT = 12
) (
  input  logic   clk,
  input  logic   rst_n,
  axil_if.slave  m,
  axil_if.master s0,
  axil_if.master s1
);
  logic wsel, rsel, wbusy, rbusy, wsel_q, rsel_q;
  assign wsel = m.awaddr[SEL_BIT];
  assign rsel = m.araddr[SEL_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbusy <= 1'b0; rbusy <= 1'b0; wsel_q <= 1'b0; rsel_q <= 1'b0;
    end else begin
      if (m.awvalid && m.awready) begin wbusy <= 1'b1; wsel_q <= wsel; end
      else if (m.bvalid && m.bready) wbusy <= 1'b0;
      if (m.arvalid && m.arready) begin rbusy <= 1'b1; rsel_q <= rsel; end
      else if (m.rvalid && m.rready) rbusy <= 1'b0;
    end
  end

  // write address and data go together to the selected slave
  assign s0.awvalid = m.awvalid && !wbusy && !wsel;
  assign s1.awvalid = m.awvalid && !wbusy &&  wsel;
  assign s0.wvalid  = m.wvalid  && !wbusy && !wsel;
  assign s1.wvalid  = m.wvalid  && !wbusy &&  wsel;
  assign s0.awaddr = m.awaddr;  assign s1.awaddr = m.awaddr;
  assign s0.wdata  = m.wdata;   assign s1.wdata  = m.wdata;
  assign s0.wstrb  = m.wstrb;   assign s1.wstrb  = m.wstrb;
  assign m.awready = !wbusy && (wsel ? s1.awready : s0.awready);
  assign m.wready  = !wbusy && (wsel ? s1.wready  : s0.wready);
  assign s0.bready = m.bready && wbusy && !wsel_q;
  assign s1.bready = m.bready && wbusy &&  wsel_q;
  assign m.bvalid  = wbusy && (wsel_q ? s1.bvalid : s0.bvalid);
  assign m.bresp   = wsel_q ? s1.bresp : s0.bresp;

  assign s0.arvalid = m.arvalid && !rbusy && !rsel;
  assign s1.arvalid = m.arvalid && !rbusy &&  rsel;
  assign s0.araddr = m.araddr;  assign s1.araddr = m.araddr;
  assign m.arready = !rbusy && (rsel ? s1.arready : s0.arready);
  assign s0.rready = m.rready && rbusy && !rsel_q;
  assign s1.rready = m.rready && rbusy &&  rsel_q;
  assign m.rvalid  = rbusy && (rsel_q ? s1.rvalid : s0.rvalid);
  assign m.rdata   = rsel_q ? s1.rdata : s0.rdata;
  assign m.rresp   = rsel_q ? s1.rresp : s0.rresp;
endmodule
