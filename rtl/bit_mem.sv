// bit_mem: the system memory that holds the partial bitstreams (and any other data of
// the processor), a word-addressed RAM on the processor bus.
// Its access times follow the measured ones of the source design: writing 32 bits takes
// 0.135 us and reading them 0.020 us. At the assumed 100 MHz bus clock that is
// WRITE_WAIT = 14 cycles (13.5 rounded up) and READ_WAIT = 2 cycles from the cycle in
// which the request is first seen to the cycle in which ack is high. The size,
// 64 KiB, is this design's choice; the memory is not initialised.
module bit_mem
  import caronte_pkg::*;
#(
  parameter int unsigned WORDS      = 16384,
  parameter int unsigned READ_WAIT  = 2,
  parameter int unsigned WRITE_WAIT = 14
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [7:0]  wait_cnt;
  logic        active;
  logic [AW-1:0] widx;

  assign widx = bus_req.addr[AW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      wait_cnt <= '0;
      bus_rsp  <= '0;
    end else begin
      bus_rsp.ack <= 1'b0;
      if (!active) begin
        if (bus_req.req && !bus_rsp.ack) begin
          active   <= 1'b1;
          wait_cnt <= 8'(bus_req.we ? WRITE_WAIT : READ_WAIT) - 8'd1;
        end
      end else if (wait_cnt > 8'd1) begin
        wait_cnt <= wait_cnt - 8'd1;
      end else begin
        active      <= 1'b0;
        bus_rsp.ack <= 1'b1;
        if (!bus_req.we) bus_rsp.rdata <= mem[widx];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (active && wait_cnt <= 8'd1 && bus_req.we) mem[widx] <= bus_req.wdata;
  end

endmodule
