// tb_intc: self-checking testbench of the interrupt controller.
// Random pulses and levels on the sources are compared with a model of the status
// register (set on a rising edge, cleared by writes to IAR); enable, pending and the
// processor interrupt line are checked against it.
`timescale 1ns/1ps
module tb_intc;
  import caronte_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic [N-1:0] src;
  logic irq;
  int checks = 0, failures = 0, n_irq = 0;

  intc #(.N_SRC(N)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [N-1:0] isr_m = '0, ier_m = '0, src_prev = '0;
  // model: a rising edge seen at a clock edge sets the bit
  always @(posedge clk) if (rst_n) begin
    isr_m    <= isr_m | (src & ~src_prev);
    src_prev <= src;
    if (irq) n_irq++;
  end

  task automatic bus_xfer(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] rd);
    @(negedge clk);
    while (bus_rsp.ack) @(negedge clk);
    bus_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    forever begin @(posedge clk); #1; if (bus_rsp.ack) break; end
    rd = bus_rsp.rdata;
    bus_req.req = 1'b0;
  endtask

  logic [31:0] d, clr;
  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req = '0; src = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      src = N'($urandom);
      @(negedge clk);
      if ($urandom_range(0, 1)) src = '0;
      case ($urandom_range(0, 3))
        0: begin
          ier_m = N'($urandom);
          bus_xfer(1, INTC_BASE + 32'h04, 32'(ier_m), d);
        end
        1: begin
          clr = 32'($urandom);
          // the model applies the clear in the acknowledge cycle
          bus_xfer(1, INTC_BASE + 32'h08, clr, d);
          isr_m = isr_m & ~N'(clr);
        end
        2: begin
          bus_xfer(0, INTC_BASE + 32'h00, 0, d);
          check(N'(d) == isr_m, $sformatf("ISR %h exp %h", d, isr_m));
        end
        default: begin
          bus_xfer(0, INTC_BASE + 32'h0C, 0, d);
          check(N'(d) == (isr_m & ier_m), $sformatf("IPR %h exp %h", d, isr_m & ier_m));
        end
      endcase
      @(negedge clk);
      @(negedge clk);    // the line is registered: one cycle after the status
      check(irq == |(isr_m & ier_m), "interrupt line");
    end
    check(n_irq > 0, "interrupt never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
