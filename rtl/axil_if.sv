// axil_if: AXI4-Lite bus bundle (32-bit address, 32-bit data).
//
// The five AXI4-Lite channels (write address, write data, write response,
// read address, read data) with their valid/ready handshakes. A transfer on a
// channel happens in a cycle where its valid and ready are both high; a
// source keeps valid and the payload steady until then. The `master` and
// `slave` modports give the directions for each side.
interface axil_if;
  logic        awvalid, awready;
  logic [31:0] awaddr;
  logic        wvalid, wready;
  logic [31:0] wdata;
  logic [3:0]  wstrb;
  logic        bvalid, bready;
  logic [1:0]  bresp;
  logic        arvalid, arready;
  logic [31:0] araddr;
  logic        rvalid, rready;
  logic [31:0] rdata;
  logic [1:0]  rresp;

  modport master (output awvalid, awaddr, wvalid, wdata, wstrb, bready, arvalid, araddr, rready,
                  input  awready, wready, bvalid, bresp, arready, rvalid, rdata, rresp);
  modport slave  (input  awvalid, awaddr, wvalid, wdata, wstrb, bready, arvalid, araddr, rready,
                  output awready, wready, bvalid, bresp, arready, rvalid, rdata, rresp);
endinterface
