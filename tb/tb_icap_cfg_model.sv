// tb_icap_cfg_model: self-checking testbench of the configuration-port model.
// Bytes are fed as the ICAP module would, honouring busy. A correct partial bitstream
// preceded by noise must load the named element into the named area only, with that
// area's reconfiguration flag high while its payload is written; a wrong check word
// must leave the area empty and set the error flag, as must a header that names an
// area that does not exist. A readback command must return the area index, the loaded
// element, the payload length and the check word of the area's last good load.
`timescale 1ns/1ps
module tb_icap_cfg_model;
  import caronte_pkg::*;
  localparam int NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ce_n, write_n, busy, cfg_err;
  logic [7:0] din, dout;
  logic [31:0] last_x;
  pe_id_t cfg_pe [NB];
  logic [NB-1:0] cfg_reconf;
  logic [15:0] cfg_loads;
  int checks = 0, failures = 0, busy_seen = 0, reconf_seen [NB];

  icap_cfg_model #(.N_BB(NB), .BUSY_PERIOD(8)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_seen++;
    for (int i = 0; i < NB; i++) if (cfg_reconf[i]) reconf_seen[i]++;
  end

  task automatic send_byte(input logic [7:0] b);
    logic was_busy;
    @(negedge clk);
    ce_n = 0; write_n = 0; din = b;
    forever begin
      was_busy = busy;
      @(posedge clk);
      if (!was_busy) break;
      @(negedge clk);
    end
    @(negedge clk);
    ce_n = 1; write_n = 1;
  endtask

  task automatic send_word(input logic [31:0] w);
    for (int i = 3; i >= 0; i--) send_byte(w[8*i +: 8]);
  endtask

  task automatic send_stream(input logic [7:0] bb, input pe_id_t pe, input int n,
                             input logic corrupt);
    logic [31:0] x = '0, w;
    send_word(BS_SYNC);
    send_word(bs_header(bb, pe));
    send_word(32'(n));
    for (int i = 0; i < n; i++) begin
      w = $urandom;
      x ^= w;
      send_word(w);
    end
    send_word(corrupt ? ~x : x);
    last_x = x;
  endtask

  task automatic read_byte(output logic [7:0] b);
    logic was_busy;
    @(negedge clk);
    ce_n = 0; write_n = 1;
    forever begin
      was_busy = busy;
      b = dout;
      @(posedge clk);
      if (!was_busy) break;
      @(negedge clk);
    end
    @(negedge clk);
    ce_n = 1;
  endtask

  task automatic read_back(input logic [7:0] bb, input int n, output logic [31:0] w [4]);
    logic [7:0] b;
    send_word(BS_SYNC);
    send_word(bs_read_header(bb));
    send_word(32'(n));
    for (int i = 0; i < n; i++)
      for (int j = 3; j >= 0; j--) begin
        read_byte(b);
        w[i][8*j +: 8] = b;
      end
  endtask

  logic [31:0] rb [4];
  logic [31:0] x_d;

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_n = 1; write_n = 1; din = 0;
    for (int i = 0; i < NB; i++) reconf_seen[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg_pe[0] == PE_EMPTY && cfg_pe[1] == PE_EMPTY, "areas empty after reset");
    // noise, then a good stream for area 1
    send_byte(8'hFF); send_byte(8'hAA); send_byte(8'h12);
    send_stream(8'd1, PE_C, 10, 1'b0);
    @(negedge clk);
    check(cfg_pe[1] == PE_C, "area 1 holds PE-C");
    check(cfg_pe[0] == PE_EMPTY, "area 0 untouched");
    check(cfg_loads == 16'd1 && !cfg_err, "one load, no error");
    check(reconf_seen[1] > 40 && reconf_seen[0] == 0, $sformatf("reconf flags %0d %0d", reconf_seen[0], reconf_seen[1]));
    // good stream for area 0
    send_stream(8'd0, PE_D, 3, 1'b0);
    @(negedge clk);
    check(cfg_pe[0] == PE_D && cfg_pe[1] == PE_C, "area 0 holds PE-D");
    check(cfg_loads == 16'd2, "two loads");
    x_d = last_x;
    // read back area 0
    read_back(8'd0, 4, rb);
    check(rb[0] == {16'h0, 8'd0, 8'(PE_D)}, $sformatf("readback word 0 %h", rb[0]));
    check(rb[1] == 32'd3, $sformatf("readback length %h", rb[1]));
    check(rb[2] == x_d, $sformatf("readback check word %h", rb[2]));
    check(rb[3] == 32'd0, "readback padding");
    check(cfg_pe[0] == PE_D && cfg_pe[1] == PE_C && !cfg_err, "readback changes nothing");
    // corrupted stream for area 1
    send_stream(8'd1, PE_E, 4, 1'b1);
    @(negedge clk);
    check(cfg_pe[1] == PE_EMPTY, "area 1 empty after bad check word");
    check(cfg_err, "error after bad check word");
    check(cfg_loads == 16'd2, "bad stream not counted");
    // after reset, a header naming a missing area
    rst_n = 0; @(negedge clk); rst_n = 1;
    send_stream(8'd5, PE_A, 2, 1'b0);
    @(negedge clk);
    check(cfg_err, "error for a missing area");
    check(cfg_pe[0] == PE_EMPTY && cfg_pe[1] == PE_EMPTY, "no area loaded");
    check(busy_seen > 0, "busy was raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
