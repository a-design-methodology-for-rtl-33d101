// tb_uart_rs232: self-checking testbench of the RS232 interface (8N1 UART).
// With 16 clocks per bit, bytes written to TX are decoded from the tx line by the
// testbench, which checks the start bit, the data bits (LSB first), the stop bit and
// the length of each bit. Bytes sent by the testbench on rx must appear in the RX
// register with the received flag and the interrupt; a second byte sent before the
// first is read sets the overrun flag.
`timescale 1ns/1ps
module tb_uart_rs232;
  import caronte_pkg::*;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic rx, tx, irq;
  int checks = 0, failures = 0;

  uart_rs232 #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_xfer(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] rd);
    @(negedge clk);
    while (bus_rsp.ack) @(negedge clk);
    bus_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    forever begin @(posedge clk); #1; if (bus_rsp.ack) break; end
    rd = bus_rsp.rdata;
    bus_req.req = 1'b0;
  endtask

  task automatic send_rx(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  // tx decoder running in parallel: waits for a falling edge, samples mid-bit
  logic [7:0] tx_bytes [$];
  int         tx_frame_errs = 0;
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      if (tx != 0) tx_frame_errs++;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      if (tx != 1) tx_frame_errs++;
      tx_bytes.push_back(b);
    end
  end

  logic [31:0] d;
  logic [7:0] sent [4] = '{8'hA5, 8'h3C, 8'h00, 8'hFF};
  int t0, t1;
  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req = '0; rx = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(tx == 1'b1, "tx idles high");
    // transmit
    for (int i = 0; i < 4; i++) begin
      bus_xfer(1, UART_BASE + 32'h04, 32'(sent[i]), d);
      t0 = $time;
      bus_xfer(0, UART_BASE + 32'h08, 0, d);
      check(d[1] == 1'b1, "tx busy");
      do bus_xfer(0, UART_BASE + 32'h08, 0, d); while (d[1]);
      t1 = $time;
      // 10 bits of CPB cycles each, within the polling slack
      check((t1 - t0) / 10 >= 10 * CPB - 2 && (t1 - t0) / 10 <= 10 * CPB + 6,
            $sformatf("frame took %0d cycles", (t1 - t0) / 10));
    end
    repeat (2 * CPB) @(posedge clk);
    check(tx_bytes.size() == 4, $sformatf("%0d bytes decoded", tx_bytes.size()));
    for (int i = 0; i < 4 && i < tx_bytes.size(); i++)
      check(tx_bytes[i] == sent[i], $sformatf("tx byte %h exp %h", tx_bytes[i], sent[i]));
    check(tx_frame_errs == 0, "tx framing");
    // receive
    for (int i = 0; i < 4; i++) begin
      send_rx(sent[i] ^ 8'h5A);
      repeat (4) @(posedge clk);
      check(irq, "rx interrupt");
      bus_xfer(0, UART_BASE + 32'h08, 0, d);
      check(d[0] == 1'b1 && d[2] == 1'b0, $sformatf("rx status %h", d));
      bus_xfer(0, UART_BASE + 32'h00, 0, d);
      check(d[7:0] == (sent[i] ^ 8'h5A), $sformatf("rx byte %h exp %h", d[7:0], sent[i] ^ 8'h5A));
      bus_xfer(0, UART_BASE + 32'h08, 0, d);
      check(d[0] == 1'b0, "rx flag cleared by read");
    end
    // overrun
    send_rx(8'h11);
    send_rx(8'h22);
    repeat (4) @(posedge clk);
    bus_xfer(0, UART_BASE + 32'h08, 0, d);
    check(d[2] == 1'b1, "overrun flag");
    bus_xfer(0, UART_BASE + 32'h00, 0, d);
    check(d[7:0] == 8'h22, "latest byte kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
