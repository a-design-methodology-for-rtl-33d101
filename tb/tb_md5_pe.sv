// tb_md5_pe: self-checking testbench of the MD5 processing element.
// It runs the six elements PE-A..PE-F one after the other on a one-block message
// ("abc", padded) by reloading pe_id between packets, as the reconfiguration does in
// the full system, and compares the final chaining value with the known MD5 digest of
// "abc". After every element it also compares the packet with a reference model of
// the same step written here. It checks the cycle counts (24 load, 16 compute for a
// round, 24 emit), that an empty element accepts nothing and that lock freezes it.
`timescale 1ns/1ps
module tb_md5_pe;
  import caronte_pkg::*;
  import md5_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pe_id_t      pe_id;
  logic        lock, in_valid, in_ready, out_valid, out_ready, busy, done;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;

  md5_pe dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference: one processing element applied to a packet
  function automatic void ref_pe(input pe_id_t id, ref logic [31:0] p [PKT_WORDS]);
    logic [31:0] a, b, c, d, f, t;
    int r, g;
    if (id == PE_A) for (int i = 0; i < 4; i++) p[4+i] = p[i];
    else if (id == PE_F) for (int i = 0; i < 4; i++) p[i] = p[i] + p[4+i];
    else begin
      r = int'(id) - 2;
      a = p[4]; b = p[5]; c = p[6]; d = p[7];
      for (int j = 0; j < 16; j++) begin
        case (r)
          0: begin f = (b & c) | (~b & d); g = j; end
          1: begin f = (d & b) | (~d & c); g = (5*j + 1) % 16; end
          2: begin f = b ^ c ^ d;          g = (3*j + 5) % 16; end
          default: begin f = c ^ (b | ~d); g = (7*j) % 16; end
        endcase
        t = a + f + K[16*r + j] + p[8+g];
        a = d; d = c; c = b;
        b = b + ((t << S[r][j%4]) | (t >> (32 - S[r][j%4])));
      end
      p[4] = a; p[5] = b; p[6] = c; p[7] = d;
    end
  endfunction

  logic [31:0] pkt [PKT_WORDS];
  logic [31:0] exp_pkt [PKT_WORDS];
  logic [31:0] got [PKT_WORDS];
  int t0, t1, t2;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_id = PE_EMPTY; lock = 0; in_valid = 0; in_data = 0; out_ready = 0;
    // packet: H = IV, working = 0, M = "abc" padded to one 512-bit block
    for (int i = 0; i < PKT_WORDS; i++) pkt[i] = '0;
    for (int i = 0; i < 4; i++) pkt[i] = IV[i];
    pkt[8]  = 32'h80636261;    // 'a','b','c',0x80 little-endian
    pkt[22] = 32'd24;          // message length in bits
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!in_ready, "empty element must not accept input");

    for (int e = 1; e <= 6; e++) begin
      pe_id = pe_id_t'(e);
      exp_pkt = pkt;
      ref_pe(pe_id_t'(e), exp_pkt);
      // load
      @(negedge clk);
      t0 = cyc;
      for (int i = 0; i < PKT_WORDS; i++) begin
        in_valid = 1; in_data = pkt[i];
        @(posedge clk); #1;
        while (!in_ready && i == 0) begin @(posedge clk); #1; end
      end
      in_valid = 0;
      t1 = cyc;
      // lock in the middle of a round freezes the element
      if (e == 3) begin
        repeat (4) @(posedge clk); #1;
        lock = 1;
        repeat (10) @(posedge clk);
        #1; check(!out_valid, "locked element must not offer output");
        lock = 0;
      end
      while (!out_valid) begin @(posedge clk); #1; end
      t2 = cyc;
      if (e >= 2 && e <= 5 && e != 3) check(t2 - t1 == 16, $sformatf("round PE %0d took %0d cycles", e, t2 - t1));
      if (e == 3) check(t2 - t1 == 16 + 10, $sformatf("locked round took %0d cycles", t2 - t1));
      if (e == 1 || e == 6) check(t2 - t1 == 1, $sformatf("PE %0d took %0d cycles", e, t2 - t1));
      // emit, with a stall of one cycle every 5 words
      for (int i = 0; i < PKT_WORDS; ) begin
        out_ready = (i % 5 != 4) || ($urandom_range(0, 1) == 1);
        #1;
        if (out_valid && out_ready) begin got[i] = out_data; i++; end
        @(posedge clk); #1;
        out_ready = 0;
      end
      out_ready = 0;
      @(posedge clk);
      for (int i = 0; i < PKT_WORDS; i++)
        check(got[i] == exp_pkt[i], $sformatf("PE %0d word %0d got %h exp %h", e, i, got[i], exp_pkt[i]));
      pkt = got;
    end
    // known digest of "abc": 900150983cd24fb0d6963f7d28e17f72 (little-endian words)
    check(pkt[0] == 32'h98500190, "digest word 0");
    check(pkt[1] == 32'hb04fd23c, "digest word 1");
    check(pkt[2] == 32'h7d3f96d6, "digest word 2");
    check(pkt[3] == 32'h727fe128, "digest word 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
