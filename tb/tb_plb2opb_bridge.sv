// tb_plb2opb_bridge: self-checking testbench of the PLB-to-OPB bridge.
// A stub OPB slave with a random latency of 1 to 4 cycles stores writes in a small
// array and answers reads from it. Random writes and reads through the bridge are
// compared with a model of that array, and every PLB access must take the slave's
// latency plus the bridge's two cycles.
`timescale 1ns/1ps
module tb_plb2opb_bridge;
  import caronte_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t plb_req, opb_req;
  bus_rsp_t plb_rsp, opb_rsp;
  int checks = 0, failures = 0;

  plb2opb_bridge dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] store [16];
  logic [31:0] model [16];
  int slave_lat = 1, cnt = 0, opb_reqs = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin opb_rsp <= '0; cnt <= 0; end
    else begin
      opb_rsp.ack <= 1'b0;
      if (opb_req.req && !opb_rsp.ack) begin
        if (cnt == slave_lat - 1) begin
          opb_rsp.ack <= 1'b1;
          if (opb_req.we) store[opb_req.addr[5:2]] <= opb_req.wdata;
          else opb_rsp.rdata <= store[opb_req.addr[5:2]];
          cnt <= 0;
          opb_reqs++;
        end else cnt <= cnt + 1;
      end
    end
  end

  logic we;
  logic [31:0] a, wd;
  int lat;
  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    plb_req = '0;
    for (int i = 0; i < 16; i++) begin store[i] = 32'(i); model[i] = 32'(i); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      we = $urandom_range(0, 1);
      a = 32'h8000_0000 | (32'($urandom_range(0, 15)) << 2);
      wd = $urandom;
      slave_lat = $urandom_range(1, 4);
      @(negedge clk);
      while (plb_rsp.ack) @(negedge clk);
      plb_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
      lat = 0;
      forever begin @(posedge clk); lat++; #1; if (plb_rsp.ack) break; end
      plb_req.req = 1'b0;
      check(lat == slave_lat + 2, $sformatf("latency %0d, slave %0d", lat, slave_lat));
      if (we) model[a[5:2]] = wd;
      else check(plb_rsp.rdata == model[a[5:2]], $sformatf("read %h exp %h", plb_rsp.rdata, model[a[5:2]]));
    end
    repeat (3) @(posedge clk);
    check(opb_reqs == 200, $sformatf("%0d OPB transfers for 200 PLB transfers", opb_reqs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
