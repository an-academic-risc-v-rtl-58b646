// spi_axil: SPI master with an AXI4-Lite slave interface, used for the SD card.
//
// Each transfer exchanges 8 bits: the byte written to TXDATA goes out on
// `mosi` MSB first while 8 bits are shifted in from `miso`. SPI mode 0: `sck`
// idles low, `mosi` changes on the falling edge (the first bit is set up before
// the first rising edge) and `miso` is sampled on the rising edge. Each half
// period of `sck` lasts CLKDIV core cycles; the minimum of 4 gives 25 MHz
// `sck` from a 200 MHz clock, the 25 Mbps of the SD interface. The chip select
// `cs_n` is driven directly from the CTRL register.
//
// Registers (byte offsets, 32-bit):
//   0x00 TXDATA  write: start a transfer of the low byte (ignored while busy)
//   0x04 RXDATA  read: byte received by the last transfer; clears "done"
//   0x08 STATUS  bit0 busy, bit1 done (a received byte is waiting)
//   0x0C CTRL    bit0 chip select (1 drives cs_n low)
//   0x10 CLKDIV  half period of sck in core cycles (8 bits, at least 4)
//
// The document gives the AXI4-Lite slave interface, the 8-bit MISO/MOSI
// transfers and the 25 Mbps rate; the SPI mode, the register map and the reset
// values are this design's choice.
module spi_axil #(
  parameter logic [7:0] CLKDIV_RESET = 8'd250     // 400 kHz, SD card start-up
) (
  input  logic clk,
  input  logic rst_n,
  axil_if.slave bus,
  output logic sck,
  output logic mosi,
  input  logic miso,
  output logic cs_n
);
  logic        wr_en, rd_en;
  logic [31:0] wr_addr, wr_data, rd_addr, rd_data;
  logic [3:0]  wr_strb;

  axil_slave_port u_port (.clk, .rst_n, .bus, .wr_en, .wr_addr, .wr_data, .wr_strb,
                          .rd_en, .rd_addr, .rd_data);

  logic       busy, done, cs;
  logic [7:0] clkdiv, cnt, tx_sr, rx_sr, rx_byte;
  logic [3:0] edges;                // rising edges still to come

  assign cs_n = !cs;
  assign mosi = tx_sr[7];

  always_comb begin
    unique case (rd_addr[4:2])
      3'd1: rd_data = {24'b0, rx_byte};
      3'd2: rd_data = {30'b0, done, busy};
      3'd3: rd_data = {31'b0, cs};
      3'd4: rd_data = {24'b0, clkdiv};
      default: rd_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cs <= 1'b0; clkdiv <= CLKDIV_RESET; cnt <= '0;
      tx_sr <= '0; rx_sr <= '0; rx_byte <= '0; edges <= '0; sck <= 1'b0;
    end else begin
      if (wr_en) begin
        unique case (wr_addr[4:2])
          3'd0: if (!busy) begin
            tx_sr <= wr_data[7:0]; busy <= 1'b1; edges <= 4'd8; cnt <= clkdiv - 8'd1; sck <= 1'b0;
          end
          3'd3: cs <= wr_data[0];
          3'd4: clkdiv <= (wr_data[7:0] < 8'd4) ? 8'd4 : wr_data[7:0];
          default: ;
        endcase
      end
      if (rd_en && rd_addr[4:2] == 3'd1) done <= 1'b0;

      if (busy) begin
        if (cnt == 0) begin
          cnt <= clkdiv - 8'd1;
          if (!sck) begin                 // rising edge: sample miso
            sck   <= 1'b1;
            rx_sr <= {rx_sr[6:0], miso};
            edges <= edges - 4'd1;
          end else begin                  // falling edge: next bit out
            sck   <= 1'b0;
            tx_sr <= {tx_sr[6:0], 1'b0};
            if (edges == 4'd0) begin
              busy    <= 1'b0;
              done    <= 1'b1;
              rx_byte <= rx_sr;
            end
          end
        end else cnt <= cnt - 8'd1;
      end
    end
  end
endmodule
