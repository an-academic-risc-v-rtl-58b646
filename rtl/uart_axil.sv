// uart_axil: UART with an AXI4-Lite slave interface.
//
// Sends and receives asynchronous serial frames of 11 bits: a start bit, 8
// data bits (LSB first), a parity bit and a stop bit. Parity can be switched
// off (10-bit frame), set to even or odd, and a second stop bit can be added
// (12-bit frame). The bit time is `baud_div` core cycles (at 200 MHz a divisor
// of 67 gives 3 MBaud). The receiver waits for a falling edge on `rx`, checks
// the start bit half a bit later and then samples every bit in its middle.
//
// Registers (byte offsets, 32-bit):
//   0x00 TXDATA  write: send the low byte (ignored while the transmitter is busy)
//   0x04 RXDATA  read: last received byte; reading clears "received"
//   0x08 STATUS  read: bit0 transmitter busy, bit1 byte received,
//                bit2 parity error, bit3 framing error (of the last byte)
//   0x0C CTRL    bit0 parity enable, bit1 odd parity, bit2 two stop bits
//   0x10 BAUD    bit time in core cycles (16 bits, at least 4)
// Reset: parity enabled, even, one stop bit (the 11-bit frame), BAUD_RESET.
//
// The document gives the AXI4-Lite slave interface, the 11-bit packet, the
// configurable baud rate, parity and stop bits and the 3 MBaud maximum; the
// register map and the receiver's sampling scheme are this design's own.
module uart_axil #(
  parameter logic [15:0] BAUD_RESET = 16'd1736   // 115200 Bd at 200 MHz
) (
  input  logic clk,
  input  logic rst_n,
  axil_if.slave bus,
  output logic tx,
  input  logic rx,
  output logic irq_rx          // a received byte is waiting
);
  logic        wr_en, rd_en;
  logic [31:0] wr_addr, wr_data, rd_addr, rd_data;
  logic [3:0]  wr_strb;

  axil_slave_port u_port (.clk, .rst_n, .bus, .wr_en, .wr_addr, .wr_data, .wr_strb,
                          .rd_en, .rd_addr, .rd_data);

  logic        par_en, par_odd, two_stop;
  logic [15:0] baud_div;

  // ------------------------------------------------------------ transmitter
  logic        tx_busy;
  logic [11:0] tx_shift;
  logic [3:0]  tx_left;
  logic [15:0] tx_cnt;

  function automatic logic [11:0] frame(input logic [7:0] d, input logic pe, po);
    // bits leave LSB first: start, data, [parity], stop; the second stop bit
    // (if enabled) is the 1 shifted in behind them
    logic p;
    p = ^d ^ po;
    if (pe) return {2'b11, p, d, 1'b0};
    else    return {3'b111, d, 1'b0};
  endfunction

  assign tx = tx_busy ? tx_shift[0] : 1'b1;

  // --------------------------------------------------------------- receiver
  logic [1:0]  rx_sync;
  logic        rx_busy, rx_have, rx_perr, rx_ferr, rx_par;
  logic [10:0] rx_bits;
  logic [3:0]  rx_got, rx_need;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_byte;

  assign irq_rx = rx_have;

  always_comb begin
    unique case (rd_addr[4:2])
      3'd1: rd_data = {24'b0, rx_byte};
      3'd2: rd_data = {28'b0, rx_ferr, rx_perr, rx_have, tx_busy};
      3'd3: rd_data = {29'b0, two_stop, par_odd, par_en};
      3'd4: rd_data = {16'b0, baud_div};
      default: rd_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_en <= 1'b1; par_odd <= 1'b0; two_stop <= 1'b0; baud_div <= BAUD_RESET;
      tx_busy <= 1'b0; tx_shift <= '1; tx_left <= '0; tx_cnt <= '0;
      rx_sync <= 2'b11; rx_busy <= 1'b0; rx_par <= 1'b0; rx_have <= 1'b0; rx_perr <= 1'b0; rx_ferr <= 1'b0;
      rx_bits <= '0; rx_got <= '0; rx_need <= '0; rx_cnt <= '0; rx_byte <= '0;
    end else begin
      // register writes
      if (wr_en) begin
        unique case (wr_addr[4:2])
          3'd0: if (!tx_busy) begin
            tx_shift <= frame(wr_data[7:0], par_en, par_odd);
            tx_left  <= 4'd9 + 4'(par_en) + 4'(two_stop) + 4'd1;
            tx_cnt   <= baud_div - 16'd1;
            tx_busy  <= 1'b1;
          end
          3'd3: begin par_en <= wr_data[0]; par_odd <= wr_data[1]; two_stop <= wr_data[2]; end
          3'd4: baud_div <= (wr_data[15:0] < 16'd4) ? 16'd4 : wr_data[15:0];
          default: ;
        endcase
      end
      if (rd_en && rd_addr[4:2] == 3'd1) rx_have <= 1'b0;

      // transmit: one bit per baud_div cycles
      if (tx_busy) begin
        if (tx_cnt == 0) begin
          tx_cnt   <= baud_div - 16'd1;
          tx_shift <= {1'b1, tx_shift[11:1]};
          tx_left  <= tx_left - 4'd1;
          if (tx_left == 4'd1) tx_busy <= 1'b0;
        end else tx_cnt <= tx_cnt - 16'd1;
      end

      // receive
      rx_sync <= {rx_sync[0], rx};
      if (!rx_busy) begin
        if (rx_sync == 2'b10) begin              // falling edge: start bit
          rx_busy <= 1'b1;
          rx_cnt  <= {1'b0, baud_div[15:1]};     // to the middle of the start bit
          rx_got  <= '0;
          rx_need <= 4'd10 + 4'(par_en);         // start, 8 data, [parity], stop
          rx_par  <= par_en;                     // frame format fixed at its start
        end
      end else if (rx_cnt == 0) begin
        rx_cnt  <= baud_div - 16'd1;
        rx_bits <= {rx_sync[1], rx_bits[10:1]};
        rx_got  <= rx_got + 4'd1;
        if (rx_got == 4'd0 && rx_sync[1]) rx_busy <= 1'b0;   // false start
        if (rx_got == rx_need - 4'd1) begin
          rx_busy <= 1'b0;
          rx_have <= 1'b1;
          if (rx_par) begin
            rx_byte <= rx_bits[9:2];
            rx_perr <= (^rx_bits[10:2]) ^ par_odd;
          end else begin
            rx_byte <= rx_bits[10:3];
            rx_perr <= 1'b0;
          end
          rx_ferr <= !rx_sync[1];
        end
      end else rx_cnt <= rx_cnt - 16'd1;
    end
  end
endmodule
