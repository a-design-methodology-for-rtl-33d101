// bb_comm_if: the fixed communication interface of a BlackBox. It stays unchanged when
// the processing element inside the BlackBox is reconfigured.
//
// It holds the three parts of the BlackBox shell:
//  * the IPIF/PSelect bus slave, which the processor uses to send words to the
//    processing element, read its results, read the status and set the spool mode;
//  * the spooler, which stores the element's output while spool mode is on;
//  * the output multiplexer, driven by the spooler management signal, which gives the
//    bus either a spooled word or the element's output directly.
// While spool mode is on, or while spooled words remain, the element's output goes into
// the spooler, so the order of the words is kept. When the spooler is full, the
// logic-lock signal freezes the processing element. The element's done pulse is passed
// on as the BlackBox interrupt.
//
// Registers (offset from the BlackBox base):
//   0x00 DATA   write: word to the element (dropped, and ERR set, if it is not ready)
//               read:  next output word (spooler first); 0 if none is available
//   0x04 STATUS [0] element ready for input  [1] output word available
//               [2] spool mode  [3] logic lock  [4] ERR  [5] element busy
//               [15:8] words in spooler  [23:16] loaded element (pe_id)
//   0x08 CTRL   [0] spool mode (read/write)  write [1]=1 clears ERR
// Every access is acknowledged one cycle after the request. The register map and the
// bus protocol are this design's choices.
module bb_comm_if
  import caronte_pkg::*;
#(
  parameter int unsigned SPOOL_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // bus slave
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp,
  // processing element side
  input  pe_id_t      pe_id,
  output logic        pe_lock,
  output logic        pe_in_valid,
  input  logic        pe_in_ready,
  output logic [31:0] pe_in_data,
  input  logic        pe_out_valid,
  output logic        pe_out_ready,
  input  logic [31:0] pe_out_data,
  input  logic        pe_busy,
  input  logic        pe_done,
  // interrupt to the interrupt controller
  output logic        irq
);

  localparam int unsigned CW = $clog2(SPOOL_DEPTH + 1);

  logic          spool_mode, err;
  logic          acc;            // a new access is accepted this cycle
  logic [7:0]    ofs;
  logic          rd_data, wr_data, wr_ctrl;
  logic          sp_push, sp_pop, sp_empty, sp_full;
  logic [31:0]   sp_head;
  logic [CW-1:0] sp_count;
  logic          to_spooler;     // spooler management signal
  logic          avail;
  logic [31:0]   rdata_d;

  assign acc     = bus_req.req && !bus_rsp.ack;
  assign ofs     = bus_req.addr[7:0];
  assign rd_data = acc && !bus_req.we && (ofs == BB_REG_DATA);
  assign wr_data = acc &&  bus_req.we && (ofs == BB_REG_DATA);
  assign wr_ctrl = acc &&  bus_req.we && (ofs == BB_REG_CTRL);

  // Output path: into the spooler while spooling or while it still holds words.
  assign to_spooler   = spool_mode || !sp_empty;
  assign sp_push      = to_spooler && pe_out_valid && !sp_full;
  assign sp_pop       = rd_data && !sp_empty;
  assign pe_out_ready = to_spooler ? !sp_full : (rd_data && sp_empty);
  assign pe_lock      = to_spooler && sp_full;
  assign avail        = !sp_empty || pe_out_valid;

  assign pe_in_valid = wr_data;
  assign pe_in_data  = bus_req.wdata;

  spooler #(.WIDTH(32), .DEPTH(SPOOL_DEPTH)) u_spooler (
    .clk, .rst_n,
    .push(sp_push), .push_data(pe_out_data),
    .pop(sp_pop), .head(sp_head),
    .empty(sp_empty), .full(sp_full), .count(sp_count)
  );

  always_comb begin
    rdata_d = '0;
    unique case (ofs)
      BB_REG_DATA:   rdata_d = !sp_empty ? sp_head : (pe_out_valid ? pe_out_data : '0);
      BB_REG_STATUS: rdata_d = {8'h00, 8'(pe_id), 8'(sp_count),
                                2'b00, pe_busy, err, pe_lock, spool_mode, avail, pe_in_ready};
      BB_REG_CTRL:   rdata_d = {31'h0, spool_mode};
      default:       rdata_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp    <= '0;
      spool_mode <= 1'b0;
      err        <= 1'b0;
      irq        <= 1'b0;
    end else begin
      bus_rsp.ack <= acc;
      if (acc && !bus_req.we) bus_rsp.rdata <= rdata_d;
      if (wr_ctrl) begin
        spool_mode <= bus_req.wdata[0];
        if (bus_req.wdata[1]) err <= 1'b0;
      end
      if (wr_data && !pe_in_ready) err <= 1'b1;
      irq <= pe_done;
    end
  end

  // The processing element must never offer a word while it is locked.
  a_lock_holds: assert property (@(posedge clk) disable iff (!rst_n) pe_lock |-> !sp_push || sp_pop)
    else $error("bb_comm_if: push into a full spooler");

endmodule
