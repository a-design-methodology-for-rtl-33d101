// tb_caronte_batch: the iterated execution model of the MD5 system.
// Because a reconfiguration takes far longer than one execution of an element, each
// element is run on a batch of data sets before its area is reconfigured; the batch
// must exceed 8 iterations. This test plays the processor for NSETS = 9 message
// blocks: every element of the HW-SSP sequence A/B, C/B, C/D, E/D, E/F, -/F processes
// all nine packets, and the next reconfiguration of the other area overlaps the
// element's first packet (held in its spooler). Each result is compared with an MD5
// compression computed by a reference model in this testbench; block 0 is the padded
// message "abc", whose digest is also compared with its published value. The test
// reports the cycles spent in reconfiguration and in execution.
`timescale 1ns/1ps
module tb_caronte_batch;
  import caronte_pkg::*;
  import md5_pkg::*;

  localparam int NB      = 2;
  localparam int PAYLOAD = 64;
  localparam int NSETS   = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t cpu_req;
  bus_rsp_t cpu_rsp;
  logic     cpu_irq, uart_rx, uart_tx, cfg_err, bus_miss;
  pe_id_t   cfg_pe [NB];
  logic [NB-1:0] cfg_reconf;
  logic [15:0]   cfg_loads;

  caronte_top dut (.*);
  assign uart_rx = uart_tx;

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
  int t_start, t_end, reconf_cycles = 0;
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
    reconf_cycles += (t_end - t_start) / 10;
    if (keep_running >= 0) begin
      rd(bb_addr(keep_running, BB_REG_STATUS), st);
      check(st[2] == 1'b1, "spool mode on during reconfiguration");
      if (st[3] && st[15:8] == 8'(SPOOL)) n_spool_drain++;
      wr(bb_addr(keep_running, BB_REG_CTRL), 32'h0);
    end
  endtask

  localparam int SPOOL = 16;

  logic [31:0] pkt [PKT_WORDS];
  task automatic send_packet(input int bb);
    logic [31:0] st;
    do rd(bb_addr(bb, BB_REG_STATUS), st); while (!st[0]);
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


  // reference MD5 compression of one block
  function automatic void md5_ref(input logic [31:0] h_in [4], input logic [31:0] m [16],
                                  output logic [31:0] h_out [4]);
    logic [31:0] a, b, c, d, f, t;
    int g, sh;
    int unsigned sv [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};
    a = h_in[0]; b = h_in[1]; c = h_in[2]; d = h_in[3];
    for (int i = 0; i < 64; i++) begin
      if (i < 16)      begin f = (b & c) | (~b & d); g = i; end
      else if (i < 32) begin f = (d & b) | (~d & c); g = (5 * i + 1) % 16; end
      else if (i < 48) begin f = b ^ c ^ d;          g = (3 * i + 5) % 16; end
      else             begin f = c ^ (b | ~d);       g = (7 * i) % 16; end
      t  = a + f + 32'(longint'($floor($sin(real'(i + 1)) < 0 ? -$sin(real'(i + 1)) * 4294967296.0
                                                            :  $sin(real'(i + 1)) * 4294967296.0))) + m[g];
      sh = int'(sv[i / 16][i % 4]);
      a = d; d = c; c = b;
      b = b + ((t << sh) | (t >> (32 - sh)));
    end
    h_out[0] = h_in[0] + a; h_out[1] = h_in[1] + b;
    h_out[2] = h_in[2] + c; h_out[3] = h_in[3] + d;
  endfunction

  logic [31:0] sets [NSETS][PKT_WORDS];
  int exec_cycles = 0, runs [7];

  // run every set through the element in area `bb`; the first set's output is left
  // in the element so the caller can overlap a reconfiguration with it
  task automatic run_rest(input int bb, input int stage);
    int t0;
    for (int p = 1; p < NSETS; p++) begin
      pkt = sets[p];
      t0 = $time;
      send_packet(bb);
      receive_packet(bb);
      exec_cycles += ($time - t0) / 10;
      sets[p] = pkt;
      runs[stage]++;
    end
  endtask

  task automatic first_set(input int bb, input int stage);
    pkt = sets[0];
    send_packet(bb);
    runs[stage]++;
  endtask

  task automatic collect_first(input int bb);
    receive_packet(bb);
    sets[0] = pkt;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] h [4], m [16], exp_h [NSETS][4];
    cpu_req = '0;
    for (int s = 0; s < 7; s++) runs[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(INTC_BASE + 32'h04, 32'hF);

    store_bitstream(0, 0, PE_A);
    store_bitstream(1, 1, PE_B);
    store_bitstream(2, 0, PE_C);
    store_bitstream(3, 1, PE_D);
    store_bitstream(4, 0, PE_E);
    store_bitstream(5, 1, PE_F);
    store_bitstream(6, 0, PE_EMPTY);

    // data sets: block 0 is "abc" padded, the others random blocks
    for (int p = 0; p < NSETS; p++) begin
      for (int i = 0; i < PKT_WORDS; i++) sets[p][i] = '0;
      for (int i = 0; i < 4; i++) begin sets[p][i] = IV[i]; h[i] = IV[i]; end
      for (int i = 0; i < 16; i++) sets[p][8 + i] = (p == 0) ? 32'(0) : $urandom;
      if (p == 0) begin sets[p][8] = 32'h80636261; sets[p][22] = 32'd24; end
      for (int i = 0; i < 16; i++) m[i] = sets[p][8 + i];
      md5_ref(h, m, exp_h[p]);
    end

    reconfigure(0, -1);
    reconfigure(1, -1);
    // stage A (area 0): no overlap, B is already loaded
    first_set(0, 0); collect_first(0); run_rest(0, 0);
    // stages B..F: the other area is rewritten while this one runs its first set
    for (int s = 1; s <= 5; s++) begin
      first_set(s % 2, s);
      reconfigure(s + 1, s % 2);
      collect_first(s % 2);
      run_rest(s % 2, s);
    end

    for (int p = 0; p < NSETS; p++)
      for (int i = 0; i < 4; i++)
        check(sets[p][i] == exp_h[p][i], $sformatf("set %0d word %0d: %h exp %h", p, i, sets[p][i], exp_h[p][i]));
    check(sets[0][0] == 32'h98500190 && sets[0][3] == 32'h727fe128, "digest of abc");
    for (int s = 0; s <= 5; s++) check(runs[s] == NSETS, $sformatf("element %0d ran %0d times", s, runs[s]));
    check(NSETS > 8, "more than 8 iterations per configuration");
    check(n_spool_drain > 0 && n_lock > 0, "spooling during reconfiguration");
    check(cfg_loads == 16'd7 && !cfg_err, "seven reconfigurations");
    $display("cycles: reconfiguration %0d (7 loads), execution incl. bus transfers %0d (%0d runs)",
             reconf_cycles, exec_cycles, 6 * (NSETS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
