// tb_blackbox: self-checking testbench of a BlackBox (communication interface plus
// MD5 processing element). The configuration inputs are driven as the configuration
// logic would: the area is loaded with PE-A..PE-F in turn, with cfg_reconf pulsed
// during each load. The packet of the empty message is pushed through all six
// elements over the bus and the result is compared with the known MD5 digest of "".
// Spool mode is turned on for one element so that its output is held in the spooler
// and the logic lock stops it. A reconfiguration in the middle of a computation is
// checked to clear the element while the interface keeps its state.
`timescale 1ns/1ps
module tb_blackbox;
  import caronte_pkg::*;
  import md5_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  pe_id_t   cfg_pe;
  logic     cfg_reconf, irq;
  int checks = 0, failures = 0, irqs = 0, locks = 0;

  blackbox #(.SPOOL_DEPTH(16)) dut (.*);

  always @(posedge clk) if (rst_n && irq) irqs++;

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

  task automatic reconfigure(input pe_id_t pe);
    @(negedge clk);
    cfg_reconf = 1; cfg_pe = PE_EMPTY;
    repeat (5) @(negedge clk);
    cfg_reconf = 0; cfg_pe = pe;
  endtask

  logic [31:0] pkt [PKT_WORDS];
  logic [31:0] d;

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req = '0; cfg_pe = PE_EMPTY; cfg_reconf = 0;
    for (int i = 0; i < PKT_WORDS; i++) pkt[i] = '0;
    for (int i = 0; i < 4; i++) pkt[i] = IV[i];
    pkt[8] = 32'h0000_0080;    // empty message, padded
    repeat (2) @(posedge clk);
    rst_n = 1;

    // reconfiguration in the middle of a computation clears the element
    reconfigure(PE_B);
    for (int i = 0; i < 10; i++) bus_xfer(1, BB_REG_DATA, 32'(i), d);
    bus_xfer(0, BB_REG_STATUS, 0, d);
    check(d[5] == 1'b1, "element busy after partial packet");
    reconfigure(PE_A);
    bus_xfer(0, BB_REG_STATUS, 0, d);
    check(d[5] == 1'b0 && d[0] == 1'b1 && d[23:16] == 8'(PE_A), $sformatf("element cleared by reconfiguration %h", d));

    for (int e = 1; e <= 6; e++) begin
      if (e > 1) reconfigure(pe_id_t'(e));
      for (int i = 0; i < PKT_WORDS; i++) bus_xfer(1, BB_REG_DATA, pkt[i], d);
      if (e == 4) begin
        bus_xfer(1, BB_REG_CTRL, 32'h1, d);       // spool mode on
        repeat (60) @(posedge clk);
        bus_xfer(0, BB_REG_STATUS, 0, d);
        check(d[3] == 1'b1 && d[15:8] == 8'd16, $sformatf("spooler full and locked %h", d));
        if (d[3]) locks++;
        bus_xfer(1, BB_REG_CTRL, 32'h0, d);       // spool mode off
      end
      for (int i = 0; i < PKT_WORDS; i++) begin
        do bus_xfer(0, BB_REG_STATUS, 0, d); while (!d[1]);
        bus_xfer(0, BB_REG_DATA, 0, d);
        pkt[i] = d;
      end
    end
    repeat (3) @(posedge clk);
    check(pkt[0] == 32'hd98c1dd4, "digest word 0");
    check(pkt[1] == 32'h04b2008f, "digest word 1");
    check(pkt[2] == 32'h980980e9, "digest word 2");
    check(pkt[3] == 32'h7e42f8ec, "digest word 3");
    check(irqs == 6, $sformatf("%0d end-of-execution interrupts, expected 6", irqs));
    check(locks == 1, "logic lock happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
