// intc: the interrupt controller through which the BlackBoxes and the ICAP module
// signal events to the processor (end of a processing element's execution, end of a
// reconfiguration). A rising edge on src[i] sets status bit i; the processor
// interrupt is high while any enabled status bit is set.
// Registers (offset from the controller base), all acknowledged one cycle after the
// request:
//   0x00 ISR  read: status bits
//   0x04 IER  read/write: enable bits
//   0x08 IAR  write: 1s clear the matching status bits
//   0x0C IPR  read: ISR & IER
// The register set is this design's choice, in the style of common bus interrupt
// controllers; the source design gives only the controller's role.
module intc
  import caronte_pkg::*;
#(
  parameter int unsigned N_SRC = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         bus_req,
  output bus_rsp_t         bus_rsp,
  input  logic [N_SRC-1:0] src,
  output logic             irq
);

  logic [N_SRC-1:0] src_q, isr, ier, rise;
  logic             acc;
  logic [7:0]       ofs;

  assign acc  = bus_req.req && !bus_rsp.ack;
  assign ofs  = bus_req.addr[7:0];
  assign rise = src & ~src_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q   <= '0;
      isr     <= '0;
      ier     <= '0;
      irq     <= 1'b0;
      bus_rsp <= '0;
    end else begin
      src_q       <= src;
      bus_rsp.ack <= acc;
      if (acc && bus_req.we && ofs == 8'h08)
        isr <= (isr & ~bus_req.wdata[N_SRC-1:0]) | rise;
      else
        isr <= isr | rise;
      if (acc && bus_req.we && ofs == 8'h04) ier <= bus_req.wdata[N_SRC-1:0];
      if (acc && !bus_req.we) begin
        unique case (ofs)
          8'h00:   bus_rsp.rdata <= 32'(isr);
          8'h04:   bus_rsp.rdata <= 32'(ier);
          8'h0C:   bus_rsp.rdata <= 32'(isr & ier);
          default: bus_rsp.rdata <= '0;
        endcase
      end
      irq <= |(isr & ier);
    end
  end

endmodule
