// bus_decoder: the address decoder and read-data multiplexer of a single-master bus.
// One instance forms the processor bus (PLB: memory, ICAP module, bridge) and another
// the peripheral bus (OPB: BlackBoxes, RS232 interface, interrupt controller).
// The defaults give the processor bus map.
// Slave i is selected when (addr & MASK[i]) == BASE[i]; the lowest matching index
// wins. The request goes only to the selected slave and its response is returned to
// the master. The decoder adds no latency. An address that selects no slave is
// acknowledged one cycle later with read data 0 and counted in the sticky miss flag,
// so the master never hangs. The CoreConnect buses named by the source design are
// replaced by this simple request/acknowledge transfer (see caronte_pkg).
module bus_decoder
  import caronte_pkg::*;
#(
  parameter int unsigned           N    = 3,
  parameter logic [N-1:0][31:0]    BASE = {BRIDGE_BASE, ICAP_BASE, MEM_BASE},
  parameter logic [N-1:0][31:0]    MASK = {BRIDGE_MASK, ICAP_MASK, MEM_MASK}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [N],
  input  bus_rsp_t s_rsp [N],
  output logic     miss
);

  logic [N-1:0] hit;
  logic         any_hit, miss_ack;

  always_comb begin
    hit     = '0;
    any_hit = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (!any_hit && ((m_req.addr & MASK[i]) == BASE[i])) begin
        hit[i]  = 1'b1;
        any_hit = 1'b1;
      end
    end
  end

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < int'(N); i++) begin
      s_req[i]     = m_req;
      s_req[i].req = m_req.req && hit[i];
      if (hit[i]) m_rsp = s_rsp[i];
    end
    if (miss_ack) m_rsp = '{ack: 1'b1, rdata: '0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_ack <= 1'b0;
      miss     <= 1'b0;
    end else begin
      miss_ack <= m_req.req && !any_hit && !miss_ack;
      if (m_req.req && !any_hit) miss <= 1'b1;
    end
  end

  // A master keeps its request stable until the cycle in which it is acknowledged.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      m_req.req && !m_rsp.ack |=> m_rsp.ack || (m_req.req && $stable(m_req.addr) && $stable(m_req.we)))
    else $error("bus_decoder: request changed before acknowledge");

endmodule
