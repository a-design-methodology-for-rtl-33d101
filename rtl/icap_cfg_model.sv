// icap_cfg_model: behavioural model of the device side of the internal configuration
// access port (ICAP) together with the configuration memory of the BlackBox areas.
// The real part is a hard primitive of the FPGA whose bitstream format is the vendor's;
// this model replaces it with a simplified, word-oriented partial bitstream (see
// caronte_pkg) so that reconfiguration can be simulated:
//   SYNC (0xAA995566), HEADER {0x30, 0x00, area, pe_id}, COUNT, COUNT payload words,
//   CHECK = XOR of the payload words.
// Bytes arrive most significant first on an 8-bit port (ce_n, write_n low) and are
// taken at a clock edge where busy is low. The model raises busy for one cycle after
// every BUSY_PERIOD accepted bytes, to exercise the port's flow control.
// While the payload of an area is being written, cfg_reconf of that area is high and
// its contents read as PE_EMPTY. A correct CHECK word loads the new element (cfg_pe);
// a wrong one leaves the area empty and sets the sticky cfg_err. A bad header or an area
// index out of range also sets cfg_err. All areas start empty after reset.
// Readback: SYNC, {0x28, 0x00, area, 0x00}, COUNT makes the port return COUNT words on
// dout, most significant byte first, one byte at each edge where ce_n is low, write_n
// is high and busy is low: {16'h0, area, pe_id}, the payload length of the area's last
// good load, that load's CHECK word, then zeros. A write byte during a readback ends
// it. The model has no frame memory; these words stand for the configuration data.
// It is written in synthesizable style but stands for a vendor macro.
module icap_cfg_model
  import caronte_pkg::*;
#(
  parameter int unsigned N_BB        = 2,
  parameter int unsigned BUSY_PERIOD = 30
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce_n,
  input  logic            write_n,
  input  logic [7:0]      din,
  output logic [7:0]      dout,
  output logic            busy,
  output pe_id_t          cfg_pe     [N_BB],
  output logic [N_BB-1:0] cfg_reconf,
  output logic            cfg_err,
  output logic [15:0]     cfg_loads
);

  localparam int unsigned IW = (N_BB > 1) ? $clog2(N_BB) : 1;

  typedef enum logic [2:0] {M_HUNT, M_HDR, M_CNT, M_DATA, M_CHK, M_RD} mstate_t;

  mstate_t     state;
  logic [23:0] sr;
  logic [31:0] word;
  logic [1:0]  bcnt;
  logic [IW-1:0] area;
  pe_id_t      pe_sel;
  logic [31:0] remain, xsum;
  logic [7:0]  bytes_seen;
  logic        take, rtake, rd_cmd;
  logic [31:0] load_len [N_BB];
  logic [31:0] load_sum [N_BB];
  logic [31:0] rd_word;
  logic [31:0] rd_idx, count;

  assign take  = !ce_n && !write_n && !busy;
  assign rtake = !ce_n && write_n && !busy && state == M_RD;
  assign word  = {sr[23:0], din};

  always_comb begin
    unique case (rd_idx)
      32'd0:   rd_word = {16'h0, 8'(area), 8'(cfg_pe[area])};
      32'd1:   rd_word = load_len[area];
      32'd2:   rd_word = load_sum[area];
      default: rd_word = '0;
    endcase
  end
  assign dout = rd_word[8*(32'd3 - 32'(bcnt)) +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_HUNT;
      sr         <= '0;
      bcnt       <= '0;
      area       <= '0;
      pe_sel     <= PE_EMPTY;
      remain     <= '0;
      xsum       <= '0;
      bytes_seen <= '0;
      busy       <= 1'b0;
      cfg_reconf <= '0;
      cfg_err    <= 1'b0;
      cfg_loads  <= '0;
      rd_cmd     <= 1'b0;
      rd_idx     <= '0;
      count      <= '0;
      for (int i = 0; i < int'(N_BB); i++) begin
        cfg_pe[i]   <= PE_EMPTY;
        load_len[i] <= '0;
        load_sum[i] <= '0;
      end
    end else begin
      busy <= 1'b0;
      if (take || rtake) begin
        if (bytes_seen == 8'(BUSY_PERIOD - 1)) begin
          bytes_seen <= '0;
          busy       <= 1'b1;
        end else begin
          bytes_seen <= bytes_seen + 8'd1;
        end
      end
      if (rtake) begin
        bcnt <= bcnt + 2'd1;
        if (bcnt == 2'd3) begin
          rd_idx <= rd_idx + 1'b1;
          remain <= remain - 1'b1;
          if (remain == 32'd1) state <= M_HUNT;
        end
      end
      if (take) begin
        sr <= word[23:0];
        if (state == M_HUNT || state == M_RD) begin
          state <= M_HUNT;
          if (word == BS_SYNC) begin
            state <= M_HDR;
            bcnt  <= '0;
          end
        end else begin
          bcnt <= bcnt + 2'd1;
          if (bcnt == 2'd3) begin
            unique case (state)
              M_HDR: begin
                if ((word[31:24] == BS_CMD_WRITE || word[31:24] == BS_CMD_READ) &&
                    word[15:8] < 8'(N_BB)) begin
                  area   <= IW'(word[15:8]);
                  pe_sel <= pe_id_t'(word[7:0]);
                  rd_cmd <= (word[31:24] == BS_CMD_READ);
                  state  <= M_CNT;
                end else begin
                  cfg_err <= 1'b1;
                  state   <= M_HUNT;
                end
              end
              M_CNT: begin
                remain <= word;
                count  <= word;
                xsum   <= '0;
                rd_idx <= '0;
                if (rd_cmd) begin
                  state <= (word == 0) ? M_HUNT : M_RD;
                end else begin
                  cfg_pe[area]     <= PE_EMPTY;
                  cfg_reconf[area] <= 1'b1;
                  state            <= (word == 0) ? M_CHK : M_DATA;
                end
              end
              M_DATA: begin
                xsum   <= xsum ^ word;
                remain <= remain - 1'b1;
                if (remain == 32'd1) state <= M_CHK;
              end
              M_CHK: begin
                cfg_reconf[area] <= 1'b0;
                if (word == xsum) begin
                  cfg_pe[area]   <= pe_sel;
                  cfg_loads      <= cfg_loads + 16'd1;
                  load_len[area] <= count;
                  load_sum[area] <= xsum;
                end else begin
                  cfg_err <= 1'b1;
                end
                state <= M_HUNT;
              end
              default: state <= M_HUNT;
            endcase
          end
        end
      end
    end
  end

endmodule
