// tb_bb_comm_if: self-checking testbench of the BlackBox communication interface.
// A stub processing element on the element side produces numbered output words and
// records input words. The test writes input words over the bus, reads output words
// directly, then turns spool mode on so that the output fills the spooler until the
// logic lock stops the element, turns it off and reads everything back in order. It
// also checks the error flag, the interrupt and the one-cycle bus acknowledge.
`timescale 1ns/1ps
module tb_bb_comm_if;
  import caronte_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    bus_req;
  bus_rsp_t    bus_rsp;
  pe_id_t      pe_id;
  logic        pe_lock, pe_in_valid, pe_in_ready, pe_out_valid, pe_out_ready, pe_busy, pe_done, irq;
  logic [31:0] pe_in_data, pe_out_data;
  int checks = 0, failures = 0;

  bb_comm_if #(.SPOOL_DEPTH(16)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // stub processing element
  int          produced = 0, to_produce = 0, lock_cycles = 0;
  logic [31:0] inbox [$];
  assign pe_out_valid = (produced < to_produce) && !pe_lock;
  assign pe_out_data  = 32'h1000 + 32'(produced);
  assign pe_busy      = pe_out_valid;
  always @(posedge clk) begin
    if (pe_out_valid && pe_out_ready) produced <= produced + 1;
    if (pe_in_valid && pe_in_ready) inbox.push_back(pe_in_data);
    if (pe_lock) lock_cycles++;
  end

  task automatic bus_xfer(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] rd);
    int lat = 0;
    @(negedge clk);
    while (bus_rsp.ack) @(negedge clk);   // no new request in the acknowledge cycle
    bus_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    forever begin @(posedge clk); lat++; #1; if (bus_rsp.ack) break; end
    rd = bus_rsp.rdata;
    bus_req.req = 1'b0;
    check(lat == 1, $sformatf("ack latency %0d", lat));
  endtask

  logic [31:0] d;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req = '0; pe_id = PE_B; pe_in_ready = 1; pe_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // input words reach the element
    for (int i = 0; i < 3; i++) bus_xfer(1, BB_BASE + BB_REG_DATA, 32'hA0 + i, d);
    @(posedge clk);
    check(inbox.size() == 3, "three input words");
    for (int i = 0; i < 3 && i < inbox.size(); i++) check(inbox[i] == 32'hA0 + i, "input word");
    // status shows the loaded element
    bus_xfer(0, BB_BASE + BB_REG_STATUS, 0, d);
    check(d[23:16] == 8'(PE_B), "status pe_id");
    check(d[0] == 1'b1, "status ready");
    // direct path
    to_produce = 5;
    for (int i = 0; i < 5; i++) begin
      bus_xfer(0, BB_BASE + BB_REG_DATA, 0, d);
      check(d == 32'h1000 + i, $sformatf("direct word %0d = %h", i, d));
    end
    bus_xfer(0, BB_BASE + BB_REG_STATUS, 0, d);
    check(d[1] == 1'b0, "nothing available");
    // spool mode: 20 words, spooler holds 16, lock stops the element
    bus_xfer(1, BB_BASE + BB_REG_CTRL, 32'h1, d);
    to_produce = 25;
    repeat (40) @(posedge clk);
    #1;
    check(produced == 21, $sformatf("element produced %0d words while spooling", produced));
    check(pe_lock, "lock while spooler full");
    bus_xfer(0, BB_BASE + BB_REG_STATUS, 0, d);
    check(d[15:8] == 8'd16 && d[3] && d[2], $sformatf("spool status %h", d));
    bus_xfer(1, BB_BASE + BB_REG_CTRL, 32'h0, d);
    for (int i = 5; i < 25; i++) begin
      bus_xfer(0, BB_BASE + BB_REG_DATA, 0, d);
      check(d == 32'h1000 + i, $sformatf("word %0d after spooling = %h", i, d));
    end
    check(lock_cycles > 0, "lock never seen");
    // error flag on a write the element cannot take
    pe_in_ready = 0;
    bus_xfer(1, BB_BASE + BB_REG_DATA, 32'h55, d);
    bus_xfer(0, BB_BASE + BB_REG_STATUS, 0, d);
    check(d[4] == 1'b1, "error flag set");
    bus_xfer(1, BB_BASE + BB_REG_CTRL, 32'h2, d);
    bus_xfer(0, BB_BASE + BB_REG_STATUS, 0, d);
    check(d[4] == 1'b0, "error flag cleared");
    // interrupt follows done
    @(negedge clk); pe_done = 1; @(negedge clk); pe_done = 0;
    check(irq == 1'b1, "irq after done");
    @(negedge clk);
    check(irq == 1'b0, "irq one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
