// plb2opb_bridge: connects the processor bus (PLB) to the peripheral bus (OPB).
// It is a slave on the PLB side and the only master on the OPB side. A PLB request is
// registered and issued on the OPB in the next cycle; the OPB acknowledge and read
// data are registered and returned to the PLB one cycle later. The bridge therefore
// adds two cycles to every peripheral access and handles one transfer at a time.
// The bridge is only named by the source design; this structure is this design's own.
module plb2opb_bridge
  import caronte_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t plb_req,
  output bus_rsp_t plb_rsp,
  output bus_req_t opb_req,
  input  bus_rsp_t opb_rsp
);

  logic busy;   // a transfer is in flight on the OPB or being returned

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      opb_req <= '0;
      plb_rsp <= '0;
    end else begin
      plb_rsp.ack <= 1'b0;
      if (!busy) begin
        if (plb_req.req && !plb_rsp.ack) begin
          opb_req <= plb_req;
          busy    <= 1'b1;
        end
      end else if (opb_req.req) begin
        if (opb_rsp.ack) begin
          opb_req.req   <= 1'b0;
          plb_rsp.ack   <= 1'b1;
          plb_rsp.rdata <= opb_rsp.rdata;
        end
      end else begin
        busy <= 1'b0;   // the cycle of the PLB acknowledge
      end
    end
  end

endmodule
