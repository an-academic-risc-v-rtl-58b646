// predrac_soc: the preDRAC system on chip, a single-core RV64IMA SoC.
//
// The chip has no DDR3 interface of its own: main memory (DDR3 and a boot RAM)
// sits on an FPGA board reached over a 32-bit FMC cable at a quarter of the
// core clock. Inside the chip:
//   lagarto_core   five-stage in-order RV64IMA pipeline with a bimodal
//                  branch predictor, its register file and a PMU;
//   icache/dcache  two 4-way 16 KiB L1 caches (hit latency 2 and 3 cycles)
//                  with random replacement;
//   mem_arbiter    joins the two caches' misses (and write-through stores);
//   l2_cache       8-way 64 KiB write-back L2 (hit latency 3 cycles),
//                  inclusive: each line it evicts is dropped from both L1s;
//   packetizer     sends each 128-bit memory transaction as 32-bit words over
//                  the FMC link, one word per divided clock (`clk_div`);
//   mmio_bridge,   the core's accesses below MEM_BASE go over AXI4-Lite to the
//   axil_demux     UART (UART_BASE) and the SPI controller (SPI_BASE);
//   debug_ring     host access through a 16-bit word stream: halt/resume,
//                  register and PC access, memory writes and reads (program
//                  loading), core reset.
// While the core is halted, the debug ring owns the data-cache port.
//
// Ports: `clk` is the 200 MHz core clock, `rst_n` an active-low asynchronous
// reset. `fmc_*` is the memory link (`fmc_clk` = clk/4, words valid around its
// rising edge), `uart_*` and `spi_*` the peripheral pins, `dbg_*` the word
// stream from and to the JTAG bridge, which is not part of this design.
//
// Departures from the SoC described for preDRAC: there is no coherence
// directory and no TLB; the L1 caches are write-through; the TileLink and
// NASTI interconnect is replaced by the arbiter and the AXI4-Lite bridge; the
// FMC link framing is this design's own.
module predrac_soc
  import predrac_pkg::*;
#(
  parameter int unsigned IC_HIT_LAT = 2,
  parameter int unsigned DC_HIT_LAT = 3,
  parameter int unsigned L1_BYTES   = 16384,
  parameter int unsigned L1_WAYS    = 4,
  parameter int unsigned L2_BYTES   = 65536,
  parameter int unsigned L2_WAYS    = 8,
  parameter int unsigned L2_HIT_LAT = 3,
  parameter int unsigned BP_ENTRIES = 1024,
  parameter int unsigned FMC_DIV    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // FMC link to the FPGA board
  output logic        fmc_clk,
  output logic        fmc_tx_valid,
  output logic [31:0] fmc_tx_data,
  input  logic        fmc_rx_valid,
  input  logic [31:0] fmc_rx_data,
  // UART
  output logic        uart_tx,
  input  logic        uart_rx,
  output logic        uart_irq,
  // SPI (SD card)
  output logic        spi_sck,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        spi_cs_n,
  // debug word stream (from / to the JTAG bridge)
  input  logic        dbg_in_valid,
  output logic        dbg_in_ready,
  input  logic [15:0] dbg_in_data,
  output logic        dbg_out_valid,
  input  logic        dbg_out_ready,
  output logic [15:0] dbg_out_data
);
  // ------------------------------------------------------------ clocking
  logic tick;
  clk_div #(.DIV(FMC_DIV)) u_clkdiv (.clk, .rst_n, .clk_out(fmc_clk), .tick);

  // ------------------------------------------------------------ debug ring
  logic        core_reset, halt_req, halted, dreg_we, dpc_we, iflush;
  logic [4:0]  dreg_addr;
  logic [63:0] dreg_wdata, dreg_rdata, dpc_wdata, dpc;
  logic        dm_req, dm_we, dm_ack;
  logic [63:0] dm_addr, dm_wdata, dm_rdata;

  debug_ring u_dbg (
    .clk, .rst_n,
    .in_valid(dbg_in_valid), .in_ready(dbg_in_ready), .in_data(dbg_in_data),
    .out_valid(dbg_out_valid), .out_ready(dbg_out_ready), .out_data(dbg_out_data),
    .core_reset, .halt_req, .halted,
    .reg_we(dreg_we), .reg_addr(dreg_addr), .reg_wdata(dreg_wdata), .reg_rdata(dreg_rdata),
    .pc_we(dpc_we), .pc_wdata(dpc_wdata), .icache_flush(iflush),
    .mem_req(dm_req), .mem_we(dm_we), .mem_addr(dm_addr), .mem_wdata(dm_wdata),
    .mem_ack(dm_ack), .mem_rdata(dm_rdata)
  );

  // ------------------------------------------------------------ core
  logic        core_rst_n;
  assign core_rst_n = rst_n && !core_reset;

  logic        i_req, i_ack;
  logic [63:0] i_addr;
  logic [31:0] i_rdata;
  logic        c_req, c_we, d_ack;
  logic [63:0] c_addr, c_wdata, d_rdata;
  logic [7:0]  c_be;
  logic        ev_instret, ev_branch, ev_mispred, ev_load, ev_store, ev_stall;
  logic [3:0]  pmu_sel;
  logic [63:0] pmu_val;

  lagarto_core #(.BOOT_PC(RESET_PC), .BP_ENTRIES(BP_ENTRIES)) u_core (
    .clk, .rst_n(core_rst_n),
    .i_req, .i_addr, .i_ack, .i_rdata,
    .d_req(c_req), .d_we(c_we), .d_addr(c_addr), .d_wdata(c_wdata), .d_be(c_be),
    .d_ack, .d_rdata,
    .dbg_halt_req(halt_req), .dbg_halted(halted),
    .dbg_reg_we(dreg_we), .dbg_reg_addr(dreg_addr), .dbg_reg_wdata(dreg_wdata),
    .dbg_reg_rdata(dreg_rdata), .dbg_pc_we(dpc_we), .dbg_pc_wdata(dpc_wdata), .dbg_pc(dpc),
    .ev_instret, .ev_branch, .ev_mispred, .ev_load, .ev_store, .ev_stall,
    .pmu_sel, .pmu_val
  );

  // ------------------------------------------------------------ data-side mux
  // The debug ring drives the data port while the core is halted.
  logic        d_req, d_we;
  logic [63:0] d_addr, d_wdata;
  logic [7:0]  d_be;
  assign d_req   = halted ? dm_req : c_req;
  assign d_we    = halted ? dm_we : c_we;
  assign d_addr  = halted ? dm_addr : c_addr;
  assign d_wdata = halted ? dm_wdata : c_wdata;
  assign d_be    = halted ? 8'hff : c_be;
  assign dm_ack  = d_ack;
  assign dm_rdata = d_rdata;

  logic is_mem;
  assign is_mem = d_addr >= MEM_BASE;

  // ------------------------------------------------------------ L1 caches
  logic         ic_mreq, ic_mwe, ic_mack, ic_ack, ic_miss;
  logic [31:0]  ic_maddr;
  logic [127:0] ic_mwdata, mem_rdata;
  // arbiter to L2, and the L2's back-invalidation of both L1 caches
  logic         l2_req, l2_we, l2_ack, l2_inv, l2_miss;
  logic [31:0]  l2_addr, l2_inv_addr;
  logic [127:0] l2_wdata, l2_rdata;
  logic [15:0]  l2_strb;
  logic [15:0]  ic_mstrb;
  logic [63:0]  ic_rdata;
  logic         i_hi;

  l1_cache #(.WAYS(L1_WAYS), .SIZE_BYTES(L1_BYTES), .LINE_BYTES(64), .HIT_LAT(IC_HIT_LAT)) u_icache (
    .clk, .rst_n, .flush(iflush), .inv(l2_inv), .inv_addr(l2_inv_addr),
    .req(i_req), .we(1'b0), .addr(i_addr), .wdata(64'b0), .be(8'b0),
    .ack(ic_ack), .rdata(ic_rdata), .miss(ic_miss),
    .m_req(ic_mreq), .m_we(ic_mwe), .m_addr(ic_maddr), .m_wdata(ic_mwdata), .m_strb(ic_mstrb),
    .m_ack(ic_mack), .m_rdata(mem_rdata)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     i_hi <= 1'b0;
    else if (i_req) i_hi <= i_addr[2];
  end
  assign i_ack   = ic_ack;
  assign i_rdata = i_hi ? ic_rdata[63:32] : ic_rdata[31:0];

  logic         dc_mreq, dc_mwe, dc_mack, dc_ack, dc_miss;
  logic [31:0]  dc_maddr;
  logic [127:0] dc_mwdata;
  logic [15:0]  dc_mstrb;
  logic [63:0]  dc_rdata;

  l1_cache #(.WAYS(L1_WAYS), .SIZE_BYTES(L1_BYTES), .LINE_BYTES(64), .HIT_LAT(DC_HIT_LAT)) u_dcache (
    .clk, .rst_n, .flush(1'b0), .inv(l2_inv), .inv_addr(l2_inv_addr),
    .req(d_req && is_mem), .we(d_we), .addr(d_addr), .wdata(d_wdata), .be(d_be),
    .ack(dc_ack), .rdata(dc_rdata), .miss(dc_miss),
    .m_req(dc_mreq), .m_we(dc_mwe), .m_addr(dc_maddr), .m_wdata(dc_mwdata), .m_strb(dc_mstrb),
    .m_ack(dc_mack), .m_rdata(mem_rdata)
  );

  // ------------------------------------------------------------ memory path
  logic         m_req, m_we, m_ack;
  logic [31:0]  m_addr;
  logic [127:0] m_wdata, m_rdata;
  logic [15:0]  m_strb;

  mem_arbiter u_arb (
    .clk, .rst_n,
    .a_req(dc_mreq), .a_we(dc_mwe), .a_addr(dc_maddr), .a_wdata(dc_mwdata), .a_strb(dc_mstrb), .a_ack(dc_mack),
    .b_req(ic_mreq), .b_we(ic_mwe), .b_addr(ic_maddr), .b_wdata(ic_mwdata), .b_strb(ic_mstrb), .b_ack(ic_mack),
    .rdata(mem_rdata),
    .m_req(l2_req), .m_we(l2_we), .m_addr(l2_addr), .m_wdata(l2_wdata), .m_strb(l2_strb),
    .m_ack(l2_ack), .m_rdata(l2_rdata)
  );

  l2_cache #(.WAYS(L2_WAYS), .SIZE_BYTES(L2_BYTES), .LINE_BYTES(64), .HIT_LAT(L2_HIT_LAT)) u_l2 (
    .clk, .rst_n,
    .req(l2_req), .we(l2_we), .addr(l2_addr), .wdata(l2_wdata), .strb(l2_strb),
    .ack(l2_ack), .rdata(l2_rdata),
    .inv(l2_inv), .inv_addr(l2_inv_addr), .miss(l2_miss),
    .m_req, .m_we, .m_addr, .m_wdata, .m_strb, .m_ack, .m_rdata
  );

  packetizer u_pack (
    .clk, .rst_n, .tick,
    .m_req, .m_we, .m_addr, .m_wdata, .m_strb, .m_ack, .m_rdata,
    .tx_valid(fmc_tx_valid), .tx_data(fmc_tx_data),
    .rx_valid(fmc_rx_valid), .rx_data(fmc_rx_data)
  );

  // ------------------------------------------------------------ peripherals
  axil_if periph ();
  axil_if uart_bus ();
  axil_if spi_bus ();
  logic        mm_ack;
  logic [63:0] mm_rdata;

  mmio_bridge u_mmio (
    .clk, .rst_n, .req(d_req && !is_mem), .we(d_we), .addr(d_addr), .wdata(d_wdata), .be(d_be),
    .ack(mm_ack), .rdata(mm_rdata), .bus(periph)
  );
  axil_demux #(.SEL_BIT(12)) u_demux (.clk, .rst_n, .m(periph), .s0(uart_bus), .s1(spi_bus));
  uart_axil u_uart (.clk, .rst_n, .bus(uart_bus), .tx(uart_tx), .rx(uart_rx), .irq_rx(uart_irq));
  spi_axil  u_spi  (.clk, .rst_n, .bus(spi_bus), .sck(spi_sck), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n));

  assign d_ack   = dc_ack || mm_ack;
  assign d_rdata = dc_ack ? dc_rdata : mm_rdata;

  // ------------------------------------------------------------ PMU
  logic [PMU_N-1:0] events;
  always_comb begin
    events = '0;
    events[EV_CYCLE]   = 1'b1;
    events[EV_INSTRET] = ev_instret;
    events[EV_BRANCH]  = ev_branch;
    events[EV_MISPRED] = ev_mispred;
    events[EV_LOAD]    = ev_load;
    events[EV_STORE]   = ev_store;
    events[EV_IMISS]   = ic_miss;
    events[EV_DMISS]   = dc_miss;
    events[EV_STALL]   = ev_stall;
  end
  pmu #(.N(PMU_N)) u_pmu (.clk, .rst_n(core_rst_n), .clear(1'b0), .events, .sel(pmu_sel), .rdata(pmu_val));
endmodule
