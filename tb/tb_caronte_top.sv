// tb_caronte_top: end-to-end test of the Caronte system at its default sizes.
// The testbench plays the processor: a bus master with the controller's program.
// It stores seven partial bitstreams in the system memory, then computes the MD5
// digest of "abc" by walking through the sequence of static system photos
//   SSP0 (both areas empty), SSP1 A/B, SSP2 C/B, SSP3 C/D, SSP4 E/D, SSP5 E/F,
//   SSP6 empty/F
// with two BlackBoxes. For every reconfiguration it copies the bitstream from memory
// into the ICAP module's RAM, puts the BlackBox that keeps running into spool mode,
// starts the ICAP module, waits for its interrupt, and releases the spool mode. The
// packet is moved from each element's output to the next element's input over the
// bus; the end of each element's execution is taken from its interrupt. Finally the
// digest is sent over the RS232 interface, looped back, and read again, and the
// configuration of the area holding PE-F is read back through the ICAP module.
// It checks the digest, the contents of the areas at every photo, and counts each
// mechanism: reconfigurations, spooling with logic lock, ICAP busy stalls, the
// interrupts of both kinds, the memory wait states, an unmapped access and the UART.
`timescale 1ns/1ps
module tb_caronte_top;
  import caronte_pkg::*;
  import md5_pkg::*;

  localparam int NB      = 2;
  localparam int PAYLOAD = 64;   // payload words of each test bitstream

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t cpu_req;
  bus_rsp_t cpu_rsp;
  logic     cpu_irq, uart_rx, uart_tx, cfg_err, bus_miss;
  pe_id_t   cfg_pe [NB];
  logic [NB-1:0] cfg_reconf;
  logic [15:0]   cfg_loads;

  caronte_top dut (.*);
  assign uart_rx = uart_tx;     // RS232 loopback

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_lock = 0, n_spool_drain = 0, n_icap_busy = 0, n_reconf_cycles = 0;
  int n_bb_irq = 0, n_icap_irq = 0, n_uart_irq = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_bb[0].u_bb.lock || dut.g_bb[1].u_bb.lock) n_lock++;
    if (dut.u_icap.icap_busy && !dut.u_icap.icap_ce_n) n_icap_busy++;
    if (|cfg_reconf) n_reconf_cycles++;
  end

  // ---------------- processor bus tasks ----------------
  int last_lat;
  task automatic bus_xfer(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] rd);
    int lat = 0;
    @(negedge clk);
    while (cpu_rsp.ack) @(negedge clk);
    cpu_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    forever begin @(posedge clk); lat++; #1; if (cpu_rsp.ack) break; end
    rd = cpu_rsp.rdata;
    cpu_req.req = 1'b0;
    last_lat = lat;
  endtask

  logic [31:0] d;
  task automatic wr(input logic [31:0] a, input logic [31:0] v); bus_xfer(1, a, v, d); endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] v); bus_xfer(0, a, 0, v); endtask

  function automatic logic [31:0] bb_addr(input int i, input logic [7:0] reg_ofs);
    return BB_BASE + BB_STRIDE * 32'(i) + 32'(reg_ofs);
  endfunction

  // wait for an interrupt source, acknowledge it
  task automatic wait_irq(input int src);
    logic [31:0] isr;
    forever begin
      while (!cpu_irq) @(posedge clk);
      rd(INTC_BASE + 32'h00, isr);
      if (isr[src]) break;
      @(posedge clk);
    end
    wr(INTC_BASE + 32'h08, 32'(1) << src);
    if (src < NB) n_bb_irq++;
    else if (src == NB) n_icap_irq++;
    else n_uart_irq++;
  endtask

  // ---------------- bitstreams in memory ----------------
  // bitstream k (k = 0..6) at word address k*128: SYNC, HEADER, COUNT, payload, CHECK
  localparam int BS_WORDS = PAYLOAD + 4;
  function automatic logic [31:0] bs_addr(input int k);
    return MEM_BASE + 32'(k * 128 * 4);
  endfunction

  task automatic store_bitstream(input int k, input int area, input pe_id_t pe);
    logic [31:0] x = '0, w;
    wr(bs_addr(k) + 0, BS_SYNC);
    check(last_lat == 14, $sformatf("memory write took %0d cycles", last_lat));
    wr(bs_addr(k) + 4, bs_header(8'(area), pe));
    wr(bs_addr(k) + 8, 32'(PAYLOAD));
    for (int i = 0; i < PAYLOAD; i++) begin
      w = {8'(k), 8'(area), 16'(i)} ^ 32'h5A5A_0000;
      x ^= w;
      wr(bs_addr(k) + 32'(4 * (3 + i)), w);
    end
    wr(bs_addr(k) + 32'(4 * (3 + PAYLOAD)), x);
  endtask

  // ---------------- the controller's actions ----------------
  int t_start, t_end;
  task automatic reconfigure(input int k, input int keep_running);
    logic [31:0] w, st;
    // copy the partial bitstream from memory into the ICAP module's RAM
    for (int i = 0; i < BS_WORDS; i++) begin
      rd(bs_addr(k) + 32'(4 * i), w);
      if (i == 0) check(last_lat == 2 + 0, $sformatf("memory read took %0d cycles", last_lat));
      wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * i), w);
    end
    // the BlackBox that keeps running holds its output in its spooler
    if (keep_running >= 0) wr(bb_addr(keep_running, BB_REG_CTRL), 32'h1);
    wr(ICAP_BASE + 32'(ICAP_REG_LEN), 32'(BS_WORDS));
    t_start = $time;
    wr(ICAP_BASE + 32'(ICAP_REG_CTRL), 32'h1);
    wait_irq(NB);
    t_end = $time;
    $display("reconfiguration %0d: %0d cycles from start to end interrupt", k, (t_end - t_start) / 10);
    if (keep_running >= 0) begin
      rd(bb_addr(keep_running, BB_REG_STATUS), st);
      check(st[2] == 1'b1, "spool mode on during reconfiguration");
      if (st[3] && st[15:8] == 8'(SPOOL)) n_spool_drain++;
      check(st[3] == 1'b1 && st[15:8] == 8'(SPOOL), $sformatf("BlackBox %0d spooled and locked: status %h", keep_running, st));
      wr(bb_addr(keep_running, BB_REG_CTRL), 32'h0);
    end
  endtask

  localparam int SPOOL = 16;

  logic [31:0] pkt [PKT_WORDS];
  task automatic send_packet(input int bb);
    logic [31:0] st;
    rd(bb_addr(bb, BB_REG_STATUS), st);
    check(st[0] == 1'b1, $sformatf("BlackBox %0d ready for a packet", bb));
    for (int i = 0; i < PKT_WORDS; i++) wr(bb_addr(bb, BB_REG_DATA), pkt[i]);
  endtask

  task automatic receive_packet(input int bb);
    logic [31:0] st;
    for (int i = 0; i < PKT_WORDS; i++) begin
      do rd(bb_addr(bb, BB_REG_STATUS), st); while (!st[1]);
      rd(bb_addr(bb, BB_REG_DATA), pkt[i]);
    end
    wait_irq(bb);   // end of this element's execution
  endtask

  task automatic expect_ssp(input int ssp, input pe_id_t a0, input pe_id_t a1);
    check(cfg_pe[0] == a0 && cfg_pe[1] == a1,
          $sformatf("HW-SSP %0d: areas hold %s/%s", ssp, cfg_pe[0].name(), cfg_pe[1].name()));
  endtask

  // ---------------- test ----------------
  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, rb_x;
    logic [7:0]  digest [16];
    cpu_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(INTC_BASE + 32'h04, 32'hF);            // enable all interrupt sources
    expect_ssp(0, PE_EMPTY, PE_EMPTY);

    // partial bitstreams: A, B, C, D, E, F and an empty area 0
    store_bitstream(0, 0, PE_A);
    store_bitstream(1, 1, PE_B);
    store_bitstream(2, 0, PE_C);
    store_bitstream(3, 1, PE_D);
    store_bitstream(4, 0, PE_E);
    store_bitstream(5, 1, PE_F);
    store_bitstream(6, 0, PE_EMPTY);

    // message block: "abc" padded
    for (int i = 0; i < PKT_WORDS; i++) pkt[i] = '0;
    for (int i = 0; i < 4; i++) pkt[i] = IV[i];
    pkt[8]  = 32'h80636261;
    pkt[22] = 32'd24;

    reconfigure(0, -1);
    reconfigure(1, -1);
    expect_ssp(1, PE_A, PE_B);
    send_packet(0);    receive_packet(0);     // PE-A
    send_packet(1);                           // PE-B runs ...
    reconfigure(2, 1);                        // ... while area 0 becomes PE-C
    expect_ssp(2, PE_C, PE_B);
    receive_packet(1); send_packet(0);        // PE-B -> PE-C
    reconfigure(3, 0);
    expect_ssp(3, PE_C, PE_D);
    receive_packet(0); send_packet(1);        // PE-C -> PE-D
    reconfigure(4, 1);
    expect_ssp(4, PE_E, PE_D);
    receive_packet(1); send_packet(0);        // PE-D -> PE-E
    reconfigure(5, 0);
    expect_ssp(5, PE_E, PE_F);
    receive_packet(0); send_packet(1);        // PE-E -> PE-F
    reconfigure(6, 1);
    expect_ssp(6, PE_EMPTY, PE_F);
    receive_packet(1);                        // digest

    check(pkt[0] == 32'h98500190 && pkt[1] == 32'hb04fd23c &&
          pkt[2] == 32'h7d3f96d6 && pkt[3] == 32'h727fe128,
          $sformatf("digest %h %h %h %h", pkt[0], pkt[1], pkt[2], pkt[3]));
    check(cfg_loads == 16'd7 && !cfg_err, "seven clean reconfigurations");

    // read back the configuration of area 1 (PE-F, loaded from bitstream 5)
    wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 0, BS_SYNC);
    wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 4, bs_read_header(8'd1));
    wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 8, 32'd3);
    wr(ICAP_BASE + 32'(ICAP_REG_LEN), 32'd3);
    wr(ICAP_BASE + 32'(ICAP_REG_RBLEN), 32'd3);
    wr(ICAP_BASE + 32'(ICAP_REG_CTRL), 32'h1);
    wait_irq(NB);
    wr(ICAP_BASE + 32'(ICAP_REG_RBLEN), 32'd0);
    rb_x = '0;
    for (int i = 0; i < PAYLOAD; i++) rb_x ^= {8'd5, 8'd1, 16'(i)} ^ 32'h5A5A_0000;
    rd(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 12, v);
    check(v == {16'h0, 8'd1, 8'(PE_F)}, $sformatf("readback: area/element word %h", v));
    rd(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 16, v);
    check(v == 32'(PAYLOAD), $sformatf("readback: length %0d", v));
    rd(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 20, v);
    check(v == rb_x, $sformatf("readback: check word %h", v));
    check(cfg_pe[0] == PE_EMPTY && cfg_pe[1] == PE_F && !cfg_err, "readback leaves the areas alone");

    // report the first bytes of the digest over RS232 (looped back)
    for (int i = 0; i < 4; i++) begin
      digest[i] = pkt[0][8 * i +: 8];
      do rd(UART_BASE + 32'h08, v); while (v[1]);   // transmitter free
      wr(UART_BASE + 32'h04, 32'(digest[i]));
      wait_irq(NB + 1);
      rd(UART_BASE + 32'h00, v);
      check(v[7:0] == digest[i], $sformatf("RS232 byte %0d: %h", i, v[7:0]));
    end

    // an access to an unmapped address is answered and flagged
    rd(32'h2000_0000, v);
    check(bus_miss, "unmapped access flagged");

    // mechanisms
    check(n_icap_irq == 8, $sformatf("%0d end-of-reconfiguration interrupts", n_icap_irq));
    check(n_bb_irq == 6, $sformatf("%0d end-of-execution interrupts", n_bb_irq));
    check(n_uart_irq == 4, $sformatf("%0d RS232 interrupts", n_uart_irq));
    check(n_lock > 0, "logic lock never happened");
    check(n_spool_drain == 5, $sformatf("%0d spooled packets", n_spool_drain));
    check(n_icap_busy > 0, "ICAP busy never happened");
    check(n_reconf_cycles > 0, "area reconfiguration flag never seen");
    $display("mechanisms: lock cycles %0d, spooled packets %0d, ICAP busy stalls %0d, reconfiguring cycles %0d",
             n_lock, n_spool_drain, n_icap_busy, n_reconf_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
