// tb_icap_ctrl: self-checking testbench of the ICAP module.
// Random words are written into the module's block RAM over the bus and read back;
// then the module is started and a stub configuration port collects the bytes it
// sends, raising busy at random. The bytes must be the words in order, most
// significant byte first, with nothing taken while busy is high. The test checks the
// busy/done status, the one-cycle interrupt and, with busy never raised, the rate of
// five cycles per word. A readback run sends a short command, after which the stub
// returns random words byte by byte (with busy at random); they must land in the RAM
// right after the command, and no read byte may be taken before the last write byte.
`timescale 1ns/1ps
module tb_icap_ctrl;
  import caronte_pkg::*;
  localparam int BW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic icap_ce_n, icap_write_n, icap_busy, irq;
  logic [7:0] icap_data, icap_o;
  int checks = 0, failures = 0, irqs = 0, busy_hits = 0;

  icap_ctrl #(.BRAM_WORDS(BW)) dut (.*);

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

  // stub configuration port
  logic [7:0] got [$];
  int   busy_rate = 0;
  logic [7:0] held;
  logic held_valid = 0;
  logic [31:0] rb_words [8];
  int   rb_pos = 0, early_reads = 0, cmd_len = 0;
  assign icap_o = rb_words[(rb_pos / 4) % 8][8 * (3 - rb_pos % 4) +: 8];
  always @(posedge clk) begin
    if (rst_n) begin
      if (!icap_ce_n && icap_write_n && !icap_busy) begin
        rb_pos++;
        if (got.size() != 4 * cmd_len) early_reads++;
      end
      if (!icap_ce_n && !icap_write_n) begin
        if (!icap_busy) got.push_back(icap_data);
        else begin
          busy_hits++;
          // the byte offered while busy must be offered again
          held = icap_data; held_valid = 1;
        end
      end
      if (irq) irqs++;
    end
    icap_busy <= (busy_rate > 0) && ($urandom_range(0, 99) < busy_rate);
  end

  logic [31:0] words [BW];
  logic [31:0] d;
  int t0, t1, len;

  task automatic run(input int n, input int rate, output int cycles);
    got.delete();
    busy_rate = rate;
    bus_xfer(1, ICAP_BASE + 32'(ICAP_REG_LEN), 32'(n), d);
    bus_xfer(1, ICAP_BASE + 32'(ICAP_REG_CTRL), 32'h1, d);
    t0 = $time;
    bus_xfer(0, ICAP_BASE + 32'(ICAP_REG_STATUS), 0, d);
    check(d[0] == 1'b1, "busy after start");
    do begin @(posedge clk); end while (irqs == 0 || dut.state != 0);
    t1 = $time;
    cycles = (t1 - t0) / 10;
    bus_xfer(0, ICAP_BASE + 32'(ICAP_REG_STATUS), 0, d);
    check(d[1:0] == 2'b10, $sformatf("status after end %h", d));
    check(got.size() == 4 * n, $sformatf("%0d bytes for %0d words", got.size(), n));
    for (int i = 0; i < 4 * n && i < got.size(); i++)
      check(got[i] == words[i / 4][8 * (3 - i % 4) +: 8], $sformatf("byte %0d = %h", i, got[i]));
  endtask

  int cyc;
  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < BW; i++) begin
      words[i] = $urandom;
      bus_xfer(1, ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * i), words[i], d);
    end
    for (int i = 0; i < BW; i += 7) begin
      bus_xfer(0, ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * i), 0, d);
      check(d == words[i], $sformatf("BRAM read back %0d", i));
    end
    irqs = 0;
    run(20, 0, cyc);
    check(irqs == 1, "one interrupt");
    // no busy: 5 cycles per word, measured from the start acknowledge to the end
    check(cyc >= 5 * 20 && cyc <= 5 * 20 + 3, $sformatf("20 words took %0d cycles", cyc));
    irqs = 0;
    run(BW, 30, cyc);
    check(busy_hits > 0, "busy was exercised");
    check(cyc > 5 * BW, "busy slowed the transfer");
    // readback: send 5 command words, then read 6 words into RAM words 5..10
    for (int i = 0; i < 8; i++) rb_words[i] = $urandom;
    rb_pos = 0;
    bus_xfer(1, ICAP_BASE + 32'(ICAP_REG_RBLEN), 32'd6, d);
    bus_xfer(0, ICAP_BASE + 32'(ICAP_REG_RBLEN), 0, d);
    check(d == 32'd6, "RBLEN reads back");
    irqs = 0;
    cmd_len = 5;
    run(5, 30, cyc);
    check(irqs == 1, "one interrupt after readback");
    check(rb_pos == 24, $sformatf("%0d bytes read back", rb_pos));
    check(early_reads == 0, "no read before the command was sent");
    for (int i = 0; i < 6; i++) begin
      bus_xfer(0, ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * (5 + i)), 0, d);
      check(d == rb_words[i], $sformatf("read-back word %0d = %h", i, d));
    end
    bus_xfer(0, ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * 4), 0, d);
    check(d == words[4], "command word kept");
    bus_xfer(0, ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * 11), 0, d);
    check(d == words[11], "word after the read-back area kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
