// tb_bit_mem: self-checking testbench of the bitstream memory.
// Random word writes and reads are compared with a model array, and every access must
// take the measured access time: 14 cycles for a write (0.135 us) and 2 cycles for a
// read (0.020 us) at a 100 MHz clock.
`timescale 1ns/1ps
module tb_bit_mem;
  import caronte_pkg::*;
  localparam int WORDS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  int checks = 0, failures = 0;

  bit_mem #(.WORDS(WORDS)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] model [WORDS];
  logic        valid [WORDS];
  logic we;
  logic [31:0] wd;
  int idx, lat, nrd = 0;
  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req = '0;
    for (int i = 0; i < WORDS; i++) valid[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      idx = (t < 100) ? $urandom_range(0, 31) : $urandom_range(0, WORDS - 1);
      if (t < 100) idx = idx;
      we = (t < 60) || !valid[idx] || ($urandom_range(0, 2) == 0);
      wd = $urandom;
      @(negedge clk);
      while (bus_rsp.ack) @(negedge clk);
      bus_req = '{req: 1'b1, we: we, addr: 32'(idx) << 2, wdata: wd};
      lat = 0;
      forever begin @(posedge clk); lat++; #1; if (bus_rsp.ack) break; end
      bus_req.req = 1'b0;
      if (we) begin
        model[idx] = wd; valid[idx] = 1;
        check(lat == 14, $sformatf("write took %0d cycles", lat));
      end else begin
        nrd++;
        check(lat == 2, $sformatf("read took %0d cycles", lat));
        check(bus_rsp.rdata == model[idx], $sformatf("read %h at %0d exp %h", bus_rsp.rdata, idx, model[idx]));
      end
    end
    check(nrd > 50, "enough reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
