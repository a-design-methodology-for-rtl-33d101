// md5_pe: the processing-element logic that fills a BlackBox area in the MD5 system.
//
// The MD5 hardware is split into six processing elements, PE-A to PE-F, which are loaded
// in turn into two BlackBoxes (HW-SSP sequence A/B, C/B, C/D, E/D, E/F). Which element
// this instance behaves as is given by pe_id, which models the contents of the
// reconfigurable area: changing it stands for loading a different partial bitstream.
// How the MD5 work is divided over the six elements is this design's choice:
//   PE-A  working state a,b,c,d := chaining value H        (1 cycle)
//   PE-B..PE-E  MD5 rounds 1..4, one step per clock        (16 cycles)
//   PE-F  H := H + working state (end of the compression)  (1 cycle)
// Every element receives and sends the same 24-word packet (H0..H3, a,b,c,d, M0..M15)
// over valid/ready streams of 32-bit words, so the elements can be chained through the
// bus by the processor. An element loads 24 words, computes and sends 24 words; done is
// high in the cycle in which its last word is taken. The empty area (PE_EMPTY) accepts nothing.
// lock is the spooler's logic-lock signal: while it is high the element is frozen
// (no word accepted or offered, no computation step). rst_n is also driven low by the
// shell while the area is being reconfigured.
module md5_pe
  import caronte_pkg::*;
  import md5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pe_id_t      pe_id,
  input  logic        lock,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_LOAD, S_PROC, S_EMIT} state_t;

  state_t      state;
  logic [4:0]  cnt;         // word counter in LOAD/EMIT, step counter in PROC
  logic [31:0] pkt [PKT_WORDS];

  logic        is_round;
  logic [1:0]  rnd;
  assign is_round = (pe_id inside {PE_B, PE_C, PE_D, PE_E});
  assign rnd      = 2'(pe_id - PE_B);

  // One MD5 step on the working state held in pkt[4..7].
  logic [31:0] a, b, c, d, tmp, b_new;
  logic [3:0]  j;
  assign j     = cnt[3:0];
  assign a     = pkt[4];
  assign b     = pkt[5];
  assign c     = pkt[6];
  assign d     = pkt[7];
  assign tmp   = a + f_round(rnd, b, c, d) + K[{rnd, j}] + pkt[8 + 32'(g_index(rnd, j))];
  assign b_new = b + rotl(tmp, S[rnd][j[1:0]]);

  assign in_ready  = (state == S_LOAD) && (pe_id != PE_EMPTY) && !lock;
  assign out_valid = (state == S_EMIT) && !lock;
  assign out_data  = pkt[cnt];
  assign busy      = (state != S_LOAD) || (cnt != 0);
  assign done      = (state == S_EMIT) && out_valid && out_ready && (cnt == 5'(PKT_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      for (int i = 0; i < PKT_WORDS; i++) pkt[i] <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid && in_ready) begin
          pkt[cnt] <= in_data;
          if (cnt == 5'(PKT_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_PROC;
          end else begin
            cnt <= cnt + 5'd1;
          end
        end
        S_PROC: if (!lock) begin
          if (pe_id == PE_A) begin
            for (int i = 0; i < 4; i++) pkt[4 + i] <= pkt[i];
            state <= S_EMIT;
          end else if (pe_id == PE_F) begin
            for (int i = 0; i < 4; i++) pkt[i] <= pkt[i] + pkt[4 + i];
            state <= S_EMIT;
          end else if (is_round) begin
            pkt[4] <= d;
            pkt[5] <= b_new;
            pkt[6] <= b;
            pkt[7] <= c;
            if (cnt == 5'd15) begin
              cnt   <= '0;
              state <= S_EMIT;
            end else begin
              cnt <= cnt + 5'd1;
            end
          end
        end
        S_EMIT: if (out_valid && out_ready) begin
          if (cnt == 5'(PKT_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 5'd1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
