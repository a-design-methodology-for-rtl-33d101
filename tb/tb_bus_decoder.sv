// tb_bus_decoder: self-checking testbench of the bus address decoder.
// Three stub slaves answer after 1, 2 and 3 cycles with read data that names the slave
// and echoes the address. Random accesses (including unmapped addresses) are checked
// for the read data, for the latency, for reaching only the addressed slave, and for
// the miss flag and the 1-cycle answer to an unmapped address.
`timescale 1ns/1ps
module tb_bus_decoder;
  import caronte_pkg::*;
  localparam int N = 3;
  localparam logic [N-1:0][31:0] BASE = {32'h8000_0000, 32'h4000_0000, 32'h0000_0000};
  localparam logic [N-1:0][31:0] MASK = {32'hF000_0000, 32'hFFFF_E000, 32'hFFFF_0000};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req;
  bus_rsp_t m_rsp;
  bus_req_t s_req [N];
  bus_rsp_t s_rsp [N];
  logic     miss;
  int checks = 0, failures = 0;
  int hits [N];
  int misses = 0;

  bus_decoder #(.N(N), .BASE(BASE), .MASK(MASK)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // stub slaves: slave i answers i+1 cycles after it first sees the request
  for (genvar i = 0; i < N; i++) begin : g_s
    int cnt;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin cnt <= 0; s_rsp[i] <= '0; end
      else begin
        s_rsp[i].ack <= 1'b0;
        if (s_req[i].req && !s_rsp[i].ack) begin
          if (cnt == i) begin
            s_rsp[i].ack   <= 1'b1;
            s_rsp[i].rdata <= {8'(i), 8'h00, s_req[i].addr[15:0]};
            cnt <= 0;
            hits[i]++;
          end else cnt <= cnt + 1;
        end
      end
    end
  end

  function automatic int expect_slave(input logic [31:0] a);
    for (int i = 0; i < N; i++) if ((a & MASK[i]) == BASE[i]) return i;
    return -1;
  endfunction

  logic [31:0] a;
  int lat, exp_s;
  int exp_hits [N];
  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_req = '0;
    for (int i = 0; i < N; i++) begin hits[i] = 0; exp_hits[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!miss, "no miss after reset");
    for (int t = 0; t < 300; t++) begin
      case ($urandom_range(0, 3))
        0: a = {16'h0000, 16'($urandom)};
        1: a = 32'h4000_0000 | 32'($urandom_range(0, 32'h1FFF));
        2: a = 32'h8000_0000 | 32'($urandom_range(0, 32'h0FFF_FFFF));
        default: a = 32'h2000_0000 | 32'($urandom_range(0, 32'h0FFF_FFFF));
      endcase
      a[1:0] = 2'b00;
      exp_s = expect_slave(a);
      @(negedge clk);
      while (m_rsp.ack) @(negedge clk);
      m_req = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
      lat = 0;
      forever begin @(posedge clk); lat++; #1; if (m_rsp.ack) break; end
      m_req.req = 1'b0;
      if (exp_s >= 0) begin
        exp_hits[exp_s]++;
        check(m_rsp.rdata == {8'(exp_s), 8'h00, a[15:0]}, $sformatf("read %h from %h", m_rsp.rdata, a));
        check(lat == exp_s + 1, $sformatf("latency %0d for slave %0d", lat, exp_s));
      end else begin
        misses++;
        check(m_rsp.rdata == 0 && lat == 1, "unmapped address answer");
        check(miss, "miss flag");
      end
    end
    for (int i = 0; i < N; i++) check(hits[i] == exp_hits[i] && hits[i] > 0, $sformatf("slave %0d saw %0d requests, expected %0d", i, hits[i], exp_hits[i]));
    check(misses > 0, "no unmapped access tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
