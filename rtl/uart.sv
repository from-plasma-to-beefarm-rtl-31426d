// uart: memory-mapped serial port of the BeeFarm I/O region.
//
// 8 data bits, no parity, one stop bit, CLKS_PER_BIT clock cycles per bit
// (217 gives 115200 baud from the 25 MHz system clock). Registers, at byte
// offsets of the I/O region: 0x0 TX data (write a byte to send it),
// 0x4 status (bit 0 transmitter busy, bit 1 received byte waiting),
// 0x8 RX data (reading it takes the byte). Accesses complete in one cycle;
// a write to TX while busy is dropped, so software polls bit 0 first. The
// register map and baud rate are this design's own.
module uart #(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        we,
  input  logic [15:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        tx,
  input  logic        rx
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // transmitter
  logic [9:0]    tx_shift;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;
  logic          tx_busy;
  assign tx_busy = (tx_bits != 0);
  assign tx      = tx_busy ? tx_shift[0] : 1'b1;

  // receiver
  logic [1:0]    rx_sync;
  logic [8:0]    rx_shift;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_data;
  logic          rx_valid;

  always_comb begin
    unique case (addr[3:2])
      2'd1:    rdata = {30'b0, rx_valid, tx_busy};
      2'd2:    rdata = {24'b0, rx_data};
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      rx_sync  <= 2'b11;
      rx_shift <= '0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      // transmit
      if (en && we && addr[3:2] == 2'd0 && !tx_busy) begin
        tx_shift <= {1'b1, wdata[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= CW'(CLKS_PER_BIT - 1);
      end else if (tx_busy) begin
        if (tx_cnt == 0) begin
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 4'd1;
          tx_cnt   <= CW'(CLKS_PER_BIT - 1);
        end else begin
          tx_cnt <= tx_cnt - 1'b1;
        end
      end

      // receive: find the start bit, then sample each bit in its middle
      rx_sync <= {rx_sync[0], rx};
      if (rx_bits == 0) begin
        if (!rx_sync[1]) begin
          rx_bits <= 4'd10;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_cnt == 0) begin
        rx_cnt   <= CW'(CLKS_PER_BIT - 1);
        rx_bits  <= rx_bits - 4'd1;
        rx_shift <= {rx_sync[1], rx_shift[8:1]};
        if (rx_bits == 4'd10 && rx_sync[1]) rx_bits <= '0;   // false start
        if (rx_bits == 4'd1) begin
          rx_data  <= rx_shift[8:1];
          rx_valid <= 1'b1;
        end
      end else begin
        rx_cnt <= rx_cnt - 1'b1;
      end
      if (en && !we && addr[3:2] == 2'd2) rx_valid <= 1'b0;
    end
  end
endmodule
