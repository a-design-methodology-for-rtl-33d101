// uart_rs232: the RS232 interface on the peripheral bus, a UART with 8 data bits, no
// parity and one stop bit (8N1). CLKS_PER_BIT clock cycles make one bit: 868 gives
// 115200 baud at the assumed 100 MHz clock. The receiver samples each bit in its
// middle and keeps one received byte.
// Registers (offset from the UART base), acknowledged one cycle after the request:
//   0x00 RX      read: received byte (clears "received")
//   0x04 TX      write: byte to send (ignored while the transmitter is busy)
//   0x08 STATUS  [0] byte received  [1] transmitter busy  [2] overrun (a byte was lost)
// irq is high while a received byte waits. The source design only names this
// interface; its details are this design's choice.
module uart_rs232
  import caronte_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp,
  input  logic     rx,
  output logic     tx,
  output logic     irq
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          acc;
  logic [7:0]    ofs;
  // transmitter
  logic          tx_busy;
  logic [9:0]    tx_shift;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;
  // receiver
  logic [1:0]    rx_sync;
  logic          rx_busy, rx_valid, rx_ovr;
  logic [7:0]    rx_shift, rx_byte;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;

  assign acc = bus_req.req && !bus_rsp.ack;
  assign ofs = bus_req.addr[7:0];
  assign irq = rx_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp  <= '0;
      tx       <= 1'b1;
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      rx_sync  <= 2'b11;
      rx_busy  <= 1'b0;
      rx_valid <= 1'b0;
      rx_ovr   <= 1'b0;
      rx_shift <= '0;
      rx_byte  <= '0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
    end else begin
      bus_rsp.ack <= acc;
      if (acc && !bus_req.we) begin
        unique case (ofs)
          8'h00:   bus_rsp.rdata <= 32'(rx_byte);
          8'h08:   bus_rsp.rdata <= {29'h0, rx_ovr, tx_busy, rx_valid};
          default: bus_rsp.rdata <= '0;
        endcase
      end

      // transmitter: start bit, 8 data bits LSB first, stop bit
      if (!tx_busy) begin
        if (acc && bus_req.we && ofs == 8'h04) begin
          tx       <= 1'b0;                           // start bit
          tx_shift <= {1'b1, 1'b1, bus_req.wdata[7:0]}; // data, then stop bit
          tx_busy  <= 1'b1;
          tx_bits  <= 4'd9;
          tx_cnt   <= '0;
        end
      end else if (tx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        tx_cnt <= '0;
        if (tx_bits == 4'd0) begin
          tx_busy <= 1'b0;
        end else begin
          tx       <= tx_shift[0];
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 4'd1;
        end
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end

      // receiver
      rx_sync <= {rx_sync[0], rx};
      if (!rx_busy) begin
        if (!rx_sync[1]) begin            // start bit seen
          rx_busy <= 1'b1;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
          rx_bits <= '0;
        end
      end else if (rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        rx_cnt <= '0;
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
      if (rx_busy && rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        // middle of a bit: 0 = start bit, 1..8 data bits, 9 stop bit
        rx_bits <= rx_bits + 4'd1;
        if (rx_bits == 4'd0 && rx_sync[1]) begin
          rx_busy <= 1'b0;                // false start
        end else if (rx_bits >= 4'd1 && rx_bits <= 4'd8) begin
          rx_shift <= {rx_sync[1], rx_shift[7:1]};
        end else if (rx_bits == 4'd9) begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            rx_byte  <= rx_shift;
            rx_valid <= 1'b1;
            if (rx_valid) rx_ovr <= 1'b1;
          end
        end
      end
      if (acc && !bus_req.we && ofs == 8'h00) rx_valid <= 1'b0;
    end
  end

endmodule
