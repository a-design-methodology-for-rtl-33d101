// icap_ctrl: the ICAP module on the processor bus. It owns a block RAM into which the
// processor copies a partial bitstream from the system memory, and a controller that,
// once started, writes the first LEN words of that RAM into the device's internal
// configuration access port (ICAP) one byte per transfer, most significant byte first,
// over the 8-bit SelectMAP-style port (active-low ce_n and write_n, busy from the
// port). A byte is taken at a clock edge where ce_n is low and busy is low; while busy
// is high the byte is held. Each word costs one RAM read cycle plus four byte
// transfers.
// Readback: if RBLEN is not zero, the LEN words sent are a read command, and the module
// then turns the port round (one cycle with ce_n high), holds ce_n low with write_n
// high, and collects RBLEN words from icap_o, most significant byte first, one byte at
// each edge where busy is low. They are stored in the RAM from word LEN on
// (LEN + RBLEN must not exceed BRAM_WORDS), where the processor reads them.
// When the last byte has been moved the module raises a one-cycle interrupt to tell
// the processor that the reconfiguration (or readback) has ended.
// Registers (offset from the module base), acknowledged one cycle after the request:
//   0x0000 CTRL    write [0]=1: start (ignored while busy)
//   0x0004 LEN     read/write: number of words to send, 1..BRAM_WORDS (written only
//                  while idle, like RBLEN)
//   0x0008 STATUS  [0] busy  [1] done (cleared by start)
//   0x000C RBLEN   read/write: number of words to read back after sending (0: none)
//   0x1000+4*i     word i of the block RAM (read/write)
// The source gives the module's role (RAM filled by the processor, transfer through
// the ICAP, end-of-reconfiguration signal to the processor). The RAM size of one
// 18-kbit block RAM (512 x 32 bits), the register map, the byte order and the readback
// protocol are this design's choices.
module icap_ctrl
  import caronte_pkg::*;
#(
  parameter int unsigned BRAM_WORDS = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   bus_req,
  output bus_rsp_t   bus_rsp,
  // ICAP port
  output logic       icap_ce_n,
  output logic       icap_write_n,
  output logic [7:0] icap_data,
  input  logic [7:0] icap_o,
  input  logic       icap_busy,
  // end of reconfiguration
  output logic       irq
);

  localparam int unsigned AW = $clog2(BRAM_WORDS);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_SEND, C_TURN, C_RECV} cstate_t;

  logic [31:0]   bram [BRAM_WORDS];
  logic [31:0]   bram_q;
  logic [AW-1:0] rd_idx;
  logic [AW:0]   len, rblen, rb_cnt;
  logic [AW-1:0] wr_idx;
  logic [23:0]   rb_sr;
  logic          rb_we;
  logic [1:0]    byte_sel;
  logic          done;
  cstate_t       state;

  logic          acc, is_bram;
  logic [12:0]   ofs;
  logic [AW-1:0] bus_idx;
  logic          take;

  assign acc     = bus_req.req && !bus_rsp.ack;
  assign ofs     = bus_req.addr[12:0];
  assign is_bram = ofs >= ICAP_BRAM_OFS;
  assign bus_idx = AW'((ofs - ICAP_BRAM_OFS) >> 2);

  assign icap_ce_n    = !(state == C_SEND || state == C_RECV);
  assign icap_write_n = (state != C_SEND);
  assign icap_data    = bram_q[8*(32'd3 - 32'(byte_sel)) +: 8];
  assign take         = (state == C_SEND || state == C_RECV) && !icap_busy;
  assign rb_we        = (state == C_RECV) && take && byte_sel == 2'd3;

  // Port A: processor access. Port B: the controller reads the words to send and
  // writes the words read back.
  always_ff @(posedge clk) begin
    if (acc && bus_req.we && is_bram) bram[bus_idx] <= bus_req.wdata;
    if (rb_we) bram[wr_idx] <= {rb_sr, icap_o};
    bram_q <= bram[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp  <= '0;
      state    <= C_IDLE;
      rd_idx   <= '0;
      len      <= '0;
      rblen    <= '0;
      rb_cnt   <= '0;
      wr_idx   <= '0;
      rb_sr    <= '0;
      byte_sel <= '0;
      done     <= 1'b0;
      irq      <= 1'b0;
    end else begin
      bus_rsp.ack <= acc;
      irq         <= 1'b0;
      if (acc && !bus_req.we) begin
        if (is_bram)                     bus_rsp.rdata <= bram[bus_idx];
        else if (ofs == ICAP_REG_LEN)    bus_rsp.rdata <= 32'(len);
        else if (ofs == ICAP_REG_STATUS) bus_rsp.rdata <= {30'h0, done, state != C_IDLE};
        else if (ofs == ICAP_REG_RBLEN)  bus_rsp.rdata <= 32'(rblen);
        else                             bus_rsp.rdata <= '0;
      end
      if (acc && bus_req.we && ofs == ICAP_REG_LEN && state == C_IDLE)
        len <= (AW+1)'(bus_req.wdata);
      if (acc && bus_req.we && ofs == ICAP_REG_RBLEN && state == C_IDLE)
        rblen <= (AW+1)'(bus_req.wdata);

      unique case (state)
        C_IDLE: if (acc && bus_req.we && ofs == ICAP_REG_CTRL && bus_req.wdata[0] && len != 0) begin
          rd_idx   <= '0;
          byte_sel <= '0;
          done     <= 1'b0;
          state    <= C_FETCH;
        end
        C_FETCH: state <= C_SEND;
        C_SEND: if (take) begin
          byte_sel <= byte_sel + 2'd1;
          if (byte_sel == 2'd3) begin
            if ((AW+1)'(rd_idx) == len - 1'b1) begin
              if (rblen != 0) begin
                wr_idx <= AW'(len);
                rb_cnt <= '0;
                state  <= C_TURN;
              end else begin
                state <= C_IDLE;
                done  <= 1'b1;
                irq   <= 1'b1;
              end
            end else begin
              rd_idx <= rd_idx + 1'b1;
              state  <= C_FETCH;
            end
          end
        end
        C_TURN: begin
          byte_sel <= '0;
          state    <= C_RECV;
        end
        C_RECV: if (take) begin
          byte_sel <= byte_sel + 2'd1;
          rb_sr    <= {rb_sr[15:0], icap_o};
          if (byte_sel == 2'd3) begin
            wr_idx <= wr_idx + 1'b1;
            rb_cnt <= rb_cnt + 1'b1;
            if (rb_cnt == rblen - 1'b1) begin
              state <= C_IDLE;
              done  <= 1'b1;
              irq   <= 1'b1;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
