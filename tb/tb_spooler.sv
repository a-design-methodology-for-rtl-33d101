// tb_spooler: self-checking testbench of the BlackBox spooler (FIFO).
// Random pushes and pops are compared with a queue model: head word, empty, full and
// count after every cycle, including simultaneous push and pop at full and empty.
`timescale 1ns/1ps
module tb_spooler;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [31:0] push_data, head;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int n_full = 0;

  spooler #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, balanced
      case ((cyc / 300) % 3)
        0: begin push = ($urandom_range(0, 3) != 0); pop = ($urandom_range(0, 3) == 0); end
        1: begin push = ($urandom_range(0, 3) == 0); pop = ($urandom_range(0, 3) != 0); end
        default: begin push = $urandom_range(0, 1); pop = $urandom_range(0, 1); end
      endcase
      if (full && !pop) push = 0;     // the interface never pushes into a full spooler
      push_data = $urandom;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(count == 5'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      if (q.size() > 0) check(head == q[0], $sformatf("head %h exp %h", head, q[0]));
      if (full) n_full++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && (q.size() < DEPTH)) q.push_back(push_data);
    end
    check(n_full > 0, "spooler never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
