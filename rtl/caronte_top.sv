// caronte_top: the Caronte embedded-reconfiguration system. A processor reconfigures
// parts of the same FPGA it runs on: reconfigurable areas (BlackBoxes) receive new
// processing elements from partial bitstreams kept in on-chip memory, written through
// the device's internal configuration access port, while the fixed part keeps running.
//
// Structure:
//   processor port (cpu_req/cpu_rsp, cpu_irq) -- PLB bus_decoder
//       PLB: bit_mem (partial bitstreams), icap_ctrl (ICAP module), plb2opb_bridge
//       OPB (behind the bridge): N_BB blackbox instances, uart_rs232, intc
//   icap_ctrl drives icap_cfg_model, the model of the device configuration logic,
//   whose per-area outputs (cfg_pe, cfg_reconf) set what each BlackBox holds; the
//   model's read port (icap_o) lets the ICAP module read a configuration back.
// The processor itself (a hard PowerPC core running the controller and scheduler) is
// not part of this RTL; its bus master port and interrupt input are the top's ports.
//
// Interrupt sources at the interrupt controller: bit i (i < N_BB) end of execution of
// BlackBox i, bit N_BB end of a reconfiguration (ICAP module), bit N_BB+1 byte
// received on the RS232 interface.
// Addresses: see caronte_pkg. Two BlackBoxes are the configuration used for the MD5
// test system; all other sizes are this design's choices, as given in the parameters.
module caronte_top
  import caronte_pkg::*;
#(
  parameter int unsigned N_BB              = 2,
  parameter int unsigned SPOOL_DEPTH       = 16,
  parameter int unsigned MEM_WORDS         = 16384,
  parameter int unsigned MEM_READ_WAIT     = 2,
  parameter int unsigned MEM_WRITE_WAIT    = 14,
  parameter int unsigned ICAP_BRAM_WORDS   = 512,
  parameter int unsigned ICAP_BUSY_PERIOD  = 30,
  parameter int unsigned UART_CLKS_PER_BIT = 868
) (
  input  logic            clk,
  input  logic            rst_n,
  // processor bus master and interrupt input
  input  bus_req_t        cpu_req,
  output bus_rsp_t        cpu_rsp,
  output logic            cpu_irq,
  // RS232
  input  logic            uart_rx,
  output logic            uart_tx,
  // configuration state of the BlackBox areas, for observation
  output pe_id_t          cfg_pe     [N_BB],
  output logic [N_BB-1:0] cfg_reconf,
  output logic            cfg_err,
  output logic [15:0]     cfg_loads,
  output logic            bus_miss
);

  localparam int unsigned N_OPB = N_BB + 2;
  localparam int unsigned N_IRQ = N_BB + 2;

  function automatic logic [N_OPB-1:0][31:0] opb_base();
    logic [N_OPB-1:0][31:0] b;
    for (int i = 0; i < int'(N_BB); i++) b[i] = BB_BASE + BB_STRIDE * 32'(i);
    b[N_BB]     = UART_BASE;
    b[N_BB + 1] = INTC_BASE;
    return b;
  endfunction

  function automatic logic [N_OPB-1:0][31:0] opb_mask();
    logic [N_OPB-1:0][31:0] m;
    for (int i = 0; i < int'(N_BB); i++) m[i] = BB_MASK;
    m[N_BB]     = UART_MASK;
    m[N_BB + 1] = INTC_MASK;
    return m;
  endfunction

  // ---------------- processor bus (PLB) ----------------
  bus_req_t plb_s_req [3];
  bus_rsp_t plb_s_rsp [3];
  logic     plb_miss, opb_miss;

  bus_decoder #(
    .N(3),
    .BASE({BRIDGE_BASE, ICAP_BASE, MEM_BASE}),
    .MASK({BRIDGE_MASK, ICAP_MASK, MEM_MASK})
  ) u_plb (
    .clk, .rst_n, .m_req(cpu_req), .m_rsp(cpu_rsp),
    .s_req(plb_s_req), .s_rsp(plb_s_rsp), .miss(plb_miss)
  );

  bit_mem #(
    .WORDS(MEM_WORDS), .READ_WAIT(MEM_READ_WAIT), .WRITE_WAIT(MEM_WRITE_WAIT)
  ) u_mem (
    .clk, .rst_n, .bus_req(plb_s_req[0]), .bus_rsp(plb_s_rsp[0])
  );

  logic       icap_ce_n, icap_write_n, icap_busy, icap_irq;
  logic [7:0] icap_data, icap_o;

  icap_ctrl #(.BRAM_WORDS(ICAP_BRAM_WORDS)) u_icap (
    .clk, .rst_n, .bus_req(plb_s_req[1]), .bus_rsp(plb_s_rsp[1]),
    .icap_ce_n, .icap_write_n, .icap_data, .icap_o, .icap_busy, .irq(icap_irq)
  );

  icap_cfg_model #(.N_BB(N_BB), .BUSY_PERIOD(ICAP_BUSY_PERIOD)) u_cfg (
    .clk, .rst_n, .ce_n(icap_ce_n), .write_n(icap_write_n), .din(icap_data), .dout(icap_o),
    .busy(icap_busy), .cfg_pe, .cfg_reconf, .cfg_err, .cfg_loads
  );

  bus_req_t opb_m_req;
  bus_rsp_t opb_m_rsp;

  plb2opb_bridge u_bridge (
    .clk, .rst_n, .plb_req(plb_s_req[2]), .plb_rsp(plb_s_rsp[2]),
    .opb_req(opb_m_req), .opb_rsp(opb_m_rsp)
  );

  // ---------------- peripheral bus (OPB) ----------------
  bus_req_t opb_s_req [N_OPB];
  bus_rsp_t opb_s_rsp [N_OPB];

  bus_decoder #(.N(N_OPB), .BASE(opb_base()), .MASK(opb_mask())) u_opb (
    .clk, .rst_n, .m_req(opb_m_req), .m_rsp(opb_m_rsp),
    .s_req(opb_s_req), .s_rsp(opb_s_rsp), .miss(opb_miss)
  );

  logic [N_IRQ-1:0] irq_src;

  for (genvar i = 0; i < int'(N_BB); i++) begin : g_bb
    blackbox #(.SPOOL_DEPTH(SPOOL_DEPTH)) u_bb (
      .clk, .rst_n, .bus_req(opb_s_req[i]), .bus_rsp(opb_s_rsp[i]),
      .cfg_pe(cfg_pe[i]), .cfg_reconf(cfg_reconf[i]), .irq(irq_src[i])
    );
  end

  uart_rs232 #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .bus_req(opb_s_req[N_BB]), .bus_rsp(opb_s_rsp[N_BB]),
    .rx(uart_rx), .tx(uart_tx), .irq(irq_src[N_BB + 1])
  );

  assign irq_src[N_BB] = icap_irq;

  intc #(.N_SRC(N_IRQ)) u_intc (
    .clk, .rst_n, .bus_req(opb_s_req[N_BB + 1]), .bus_rsp(opb_s_rsp[N_BB + 1]),
    .src(irq_src), .irq(cpu_irq)
  );

  assign bus_miss = plb_miss || opb_miss;

endmodule
