// tb_caronte_three: the Caronte system with three BlackBoxes, the size of the
// architecture overview (the MD5 system itself uses two). The testbench plays the
// processor. It loads PE-A, PE-B and PE-C into the three areas, runs the padded
// message "abc" through A and B, then starts C (area 2) and a second packet in B
// (area 1) and rewrites area 0 with PE-D while both keep running in spool mode: both
// must fill their spoolers and lock, and give their words back in order afterwards.
// Areas 1 and 2 then become PE-E and PE-F and the chain ends with the MD5 digest,
// which is compared with the known value. Finally the configuration of area 2 is read
// back through the ICAP module. Interrupt sources are at their N_BB = 3 positions
// (BlackBoxes 0..2, ICAP module 3). Other parameters are at their defaults.
`timescale 1ns/1ps
module tb_caronte_three;
  import caronte_pkg::*;
  import md5_pkg::*;

  localparam int NB      = 3;
  localparam int PAYLOAD = 40;
  localparam int BS_WORDS = PAYLOAD + 4;
  localparam int SPOOL   = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t cpu_req;
  bus_rsp_t cpu_rsp;
  logic     cpu_irq, uart_rx, uart_tx, cfg_err, bus_miss;
  pe_id_t   cfg_pe [NB];
  logic [NB-1:0] cfg_reconf;
  logic [15:0]   cfg_loads;

  caronte_top #(.N_BB(NB)) dut (.*);
  assign uart_rx = uart_tx;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_lock [NB];
  int n_icap_irq = 0, n_bb_irq = 0;
  initial for (int i = 0; i < NB; i++) n_lock[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_bb[0].u_bb.lock) n_lock[0]++;
    if (dut.g_bb[1].u_bb.lock) n_lock[1]++;
    if (dut.g_bb[2].u_bb.lock) n_lock[2]++;
  end

  task automatic bus_xfer(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] rd);
    @(negedge clk);
    while (cpu_rsp.ack) @(negedge clk);
    cpu_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    forever begin @(posedge clk); #1; if (cpu_rsp.ack) break; end
    rd = cpu_rsp.rdata;
    cpu_req.req = 1'b0;
  endtask

  logic [31:0] d;
  task automatic wr(input logic [31:0] a, input logic [31:0] v); bus_xfer(1, a, v, d); endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] v); bus_xfer(0, a, 0, v); endtask

  function automatic logic [31:0] bb_addr(input int i, input logic [7:0] reg_ofs);
    return BB_BASE + BB_STRIDE * 32'(i) + 32'(reg_ofs);
  endfunction

  task automatic wait_irq(input int src);
    logic [31:0] isr;
    forever begin
      while (!cpu_irq) @(posedge clk);
      rd(INTC_BASE + 32'h00, isr);
      if (isr[src]) break;
      @(posedge clk);
    end
    wr(INTC_BASE + 32'h08, 32'(1) << src);
    if (src == NB) n_icap_irq++;
    else if (src < NB) n_bb_irq++;
  endtask

  function automatic logic [31:0] bs_addr(input int k);
    return MEM_BASE + 32'(k * 128 * 4);
  endfunction

  function automatic logic [31:0] payload(input int k, input int area, input int i);
    return {8'(k), 8'(area), 16'(i)} ^ 32'h3C3C_0000;
  endfunction

  task automatic store_bitstream(input int k, input int area, input pe_id_t pe);
    logic [31:0] x = '0;
    wr(bs_addr(k) + 0, BS_SYNC);
    wr(bs_addr(k) + 4, bs_header(8'(area), pe));
    wr(bs_addr(k) + 8, 32'(PAYLOAD));
    for (int i = 0; i < PAYLOAD; i++) begin
      x ^= payload(k, area, i);
      wr(bs_addr(k) + 32'(4 * (3 + i)), payload(k, area, i));
    end
    wr(bs_addr(k) + 32'(4 * (3 + PAYLOAD)), x);
  endtask

  // reconfigure with bitstream k; the BlackBoxes in keep (bit mask) are spooled
  task automatic reconfigure(input int k, input logic [NB-1:0] keep);
    logic [31:0] w, st;
    for (int i = 0; i < BS_WORDS; i++) begin
      rd(bs_addr(k) + 32'(4 * i), w);
      wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 32'(4 * i), w);
    end
    for (int b = 0; b < NB; b++) if (keep[b]) wr(bb_addr(b, BB_REG_CTRL), 32'h1);
    wr(ICAP_BASE + 32'(ICAP_REG_LEN), 32'(BS_WORDS));
    wr(ICAP_BASE + 32'(ICAP_REG_CTRL), 32'h1);
    wait_irq(NB);
    for (int b = 0; b < NB; b++) if (keep[b]) begin
      rd(bb_addr(b, BB_REG_STATUS), st);
      check(st[3] == 1'b1 && st[15:8] == 8'(SPOOL),
            $sformatf("BlackBox %0d spooled and locked: status %h", b, st));
      wr(bb_addr(b, BB_REG_CTRL), 32'h0);
    end
  endtask

  typedef logic [31:0] pkt_t [PKT_WORDS];

  task automatic send_packet(input int bb, input pkt_t p);
    logic [31:0] st;
    rd(bb_addr(bb, BB_REG_STATUS), st);
    check(st[0] == 1'b1, $sformatf("BlackBox %0d ready for a packet", bb));
    for (int i = 0; i < PKT_WORDS; i++) wr(bb_addr(bb, BB_REG_DATA), p[i]);
  endtask

  task automatic receive_packet(input int bb, output pkt_t p);
    logic [31:0] st;
    for (int i = 0; i < PKT_WORDS; i++) begin
      do rd(bb_addr(bb, BB_REG_STATUS), st); while (!st[1]);
      rd(bb_addr(bb, BB_REG_DATA), p[i]);
    end
    wait_irq(bb);
  endtask

  task automatic expect_areas(input string what, input pe_id_t a0, input pe_id_t a1,
                              input pe_id_t a2);
    check(cfg_pe[0] == a0 && cfg_pe[1] == a1 && cfg_pe[2] == a2,
          $sformatf("%s: areas hold %s/%s/%s", what, cfg_pe[0].name(), cfg_pe[1].name(),
                    cfg_pe[2].name()));
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t msg, pa, pb, pb2, pc, pd, pe, pf;
    logic [31:0] v, x;
    cpu_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(INTC_BASE + 32'h04, 32'h1F);
    expect_areas("after reset", PE_EMPTY, PE_EMPTY, PE_EMPTY);

    store_bitstream(0, 0, PE_A);
    store_bitstream(1, 1, PE_B);
    store_bitstream(2, 2, PE_C);
    store_bitstream(3, 0, PE_D);
    store_bitstream(4, 1, PE_E);
    store_bitstream(5, 2, PE_F);

    for (int i = 0; i < PKT_WORDS; i++) msg[i] = '0;
    for (int i = 0; i < 4; i++) msg[i] = IV[i];
    msg[8]  = 32'h80636261;
    msg[22] = 32'd24;

    reconfigure(0, '0);
    reconfigure(1, '0);
    reconfigure(2, '0);
    expect_areas("A/B/C", PE_A, PE_B, PE_C);

    send_packet(0, msg); receive_packet(0, pa);
    send_packet(1, pa);  receive_packet(1, pb);
    // C and a second B run while area 0 is rewritten
    send_packet(2, pb);
    send_packet(1, pa);
    reconfigure(3, 3'b110);
    expect_areas("D/B/C", PE_D, PE_B, PE_C);
    check(n_lock[1] > 0 && n_lock[2] > 0 && n_lock[0] == 0,
          $sformatf("lock cycles per area %0d %0d %0d", n_lock[0], n_lock[1], n_lock[2]));
    receive_packet(2, pc);
    receive_packet(1, pb2);
    check(pb2 == pb, "second run of PE-B gives the same words, in order");

    send_packet(0, pc);  receive_packet(0, pd);
    reconfigure(4, '0);
    reconfigure(5, '0);
    expect_areas("D/E/F", PE_D, PE_E, PE_F);
    send_packet(1, pd);  receive_packet(1, pe);
    send_packet(2, pe);  receive_packet(2, pf);
    check(pf[0] == 32'h98500190 && pf[1] == 32'hb04fd23c &&
          pf[2] == 32'h7d3f96d6 && pf[3] == 32'h727fe128,
          $sformatf("digest %h %h %h %h", pf[0], pf[1], pf[2], pf[3]));
    check(cfg_loads == 16'd6 && !cfg_err, "six clean reconfigurations");

    // read back area 2
    wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 0, BS_SYNC);
    wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 4, bs_read_header(8'd2));
    wr(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 8, 32'd3);
    wr(ICAP_BASE + 32'(ICAP_REG_LEN), 32'd3);
    wr(ICAP_BASE + 32'(ICAP_REG_RBLEN), 32'd3);
    wr(ICAP_BASE + 32'(ICAP_REG_CTRL), 32'h1);
    wait_irq(NB);
    x = '0;
    for (int i = 0; i < PAYLOAD; i++) x ^= payload(5, 2, i);
    rd(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 12, v);
    check(v == {16'h0, 8'd2, 8'(PE_F)}, $sformatf("readback: area/element word %h", v));
    rd(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 16, v);
    check(v == 32'(PAYLOAD), $sformatf("readback: length %0d", v));
    rd(ICAP_BASE + 32'(ICAP_BRAM_OFS) + 20, v);
    check(v == x, $sformatf("readback: check word %h", v));

    check(n_icap_irq == 7, $sformatf("%0d ICAP end interrupts", n_icap_irq));
    check(n_bb_irq == 7, $sformatf("%0d end-of-execution interrupts", n_bb_irq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
