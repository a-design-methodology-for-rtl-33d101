// blackbox: one reconfigurable BlackBox, a fixed area of the device that can be
// rewritten without disturbing the rest of the system. It pairs the fixed
// communication interface (bus slave, spooler, output multiplexer) with the
// processing-element logic that partial reconfiguration replaces.
//
// The configuration inputs come from the device configuration logic: cfg_pe names the
// element the area currently holds, and cfg_reconf is high while the area is being
// rewritten, during which the element is held in reset while the interface keeps
// working. In a real device the element would be a separate partial design reached
// through bus macros; here all elements are present and cfg_pe selects one, which
// models the effect of reconfiguration on the system's behaviour.
module blackbox
  import caronte_pkg::*;
#(
  parameter int unsigned SPOOL_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp,
  input  pe_id_t   cfg_pe,
  input  logic     cfg_reconf,
  output logic     irq
);

  logic        pe_rst_n, lock, in_valid, in_ready, out_valid, out_ready, busy, done;
  logic [31:0] in_data, out_data;

  assign pe_rst_n = rst_n && !cfg_reconf;

  bb_comm_if #(.SPOOL_DEPTH(SPOOL_DEPTH)) u_if (
    .clk, .rst_n, .bus_req, .bus_rsp,
    .pe_id(cfg_pe), .pe_lock(lock),
    .pe_in_valid(in_valid), .pe_in_ready(in_ready), .pe_in_data(in_data),
    .pe_out_valid(out_valid), .pe_out_ready(out_ready), .pe_out_data(out_data),
    .pe_busy(busy), .pe_done(done), .irq
  );

  md5_pe u_pe (
    .clk, .rst_n(pe_rst_n), .pe_id(cfg_pe), .lock,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .busy, .done
  );

endmodule
