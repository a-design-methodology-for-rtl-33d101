// caronte_pkg: types and constants shared by the Caronte reconfigurable system.
//
// The system is built around two on-chip buses: a processor-side bus (PLB) and a
// peripheral bus (OPB) behind a bridge. Both use the same simple request/acknowledge
// transfer defined here, which stands in for the CoreConnect protocols: a master raises
// req with addr/we/wdata and holds them stable until a slave answers with a one-cycle
// ack (carrying rdata on reads). A slave ignores req in the cycle it acks, so a master
// can start the next transfer in the cycle after the ack.
//
// The address map, processing-element identifiers and the format of the simplified
// partial bitstream are this design's own choices; the processing-element names PE-A to
// PE-F and the two-BlackBox configuration follow the MD5 test system.
package caronte_pkg;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } bus_rsp_t;

  // Processing element loaded into a BlackBox area.
  typedef enum logic [7:0] {
    PE_EMPTY = 8'd0,
    PE_A     = 8'd1,   // working state := chaining value
    PE_B     = 8'd2,   // MD5 round 1 (16 steps)
    PE_C     = 8'd3,   // MD5 round 2
    PE_D     = 8'd4,   // MD5 round 3
    PE_E     = 8'd5,   // MD5 round 4
    PE_F     = 8'd6    // chaining value += working state
  } pe_id_t;

  // Packet passed from one processing element to the next:
  // words 0-3 chaining value H0..H3, words 4-7 working state a,b,c,d,
  // words 8-23 the 512-bit message block M0..M15.
  localparam int unsigned PKT_WORDS = 24;

  // Processor-side bus (PLB) map.
  localparam logic [31:0] MEM_BASE    = 32'h0000_0000;
  localparam logic [31:0] MEM_MASK    = 32'hFFFF_0000;
  localparam logic [31:0] ICAP_BASE   = 32'h4000_0000;
  localparam logic [31:0] ICAP_MASK   = 32'hFFFF_E000;
  localparam logic [31:0] BRIDGE_BASE = 32'h8000_0000;
  localparam logic [31:0] BRIDGE_MASK = 32'hF000_0000;

  // Peripheral bus (OPB) map, behind the bridge.
  localparam logic [31:0] BB_BASE     = 32'h8000_0000;  // BlackBox i at BB_BASE + i*BB_STRIDE
  localparam logic [31:0] BB_STRIDE   = 32'h0000_0100;
  localparam logic [31:0] BB_MASK     = 32'hFFFF_FF00;
  localparam logic [31:0] UART_BASE   = 32'h8000_1000;
  localparam logic [31:0] UART_MASK   = 32'hFFFF_FF00;
  localparam logic [31:0] INTC_BASE   = 32'h8000_2000;
  localparam logic [31:0] INTC_MASK   = 32'hFFFF_FF00;

  // BlackBox register offsets.
  localparam logic [7:0] BB_REG_DATA   = 8'h00;
  localparam logic [7:0] BB_REG_STATUS = 8'h04;
  localparam logic [7:0] BB_REG_CTRL   = 8'h08;

  // ICAP module register offsets; its BRAM is mapped from ICAP_BRAM_OFS on.
  localparam logic [12:0] ICAP_REG_CTRL   = 13'h0000;
  localparam logic [12:0] ICAP_REG_LEN    = 13'h0004;
  localparam logic [12:0] ICAP_REG_STATUS = 13'h0008;
  localparam logic [12:0] ICAP_REG_RBLEN  = 13'h000C;
  localparam logic [12:0] ICAP_BRAM_OFS   = 13'h1000;

  // Simplified partial bitstream: SYNC, HEADER, COUNT, COUNT payload words, CHECK.
  // HEADER = {BS_CMD_WRITE, 8'h00, BlackBox index, pe_id}; CHECK = XOR of the payload.
  // Readback command: SYNC, {BS_CMD_READ, 8'h00, BlackBox index, 8'h00}, COUNT; the port
  // then returns COUNT words: {16'h0, index, pe_id}, payload length of the last good
  // load of that area, its CHECK word, then zeros.
  localparam logic [31:0] BS_SYNC      = 32'hAA99_5566;
  localparam logic [7:0]  BS_CMD_WRITE = 8'h30;
  localparam logic [7:0]  BS_CMD_READ  = 8'h28;

  function automatic logic [31:0] bs_header(input logic [7:0] bb, input pe_id_t pe);
    return {BS_CMD_WRITE, 8'h00, bb, pe};
  endfunction

  function automatic logic [31:0] bs_read_header(input logic [7:0] bb);
    return {BS_CMD_READ, 8'h00, bb, 8'h00};
  endfunction

endpackage
