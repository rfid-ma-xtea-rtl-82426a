// xtea_core: iterative XTEA block cipher (Algorithm 1), encryption or
// decryption selected by `ed` (0 = encrypt, 1 = decrypt).
//
// A four-phase counter steps each XTEA cycle (two Feistel rounds):
//   00: Rin <= I1, key schedule makes the first round key
//   01: I0 <= I0 +/- Rout
//   10: Rin <= I0, key schedule makes the second round key
//   11: I1 <= I1 +/- Rout
// with Rout from xtea_round_fn and the key from xtea_key_sched.
// Word order follows Algorithm 1: for encryption I1 = din[63:32] and
// I0 = din[31:0], output {I1, I0}; for decryption the words are swapped on
// the way in and out, so one datapath serves both directions.
//
// Interface: pulse `start` for one clock while `busy` is low, with `ed`,
// `key` and `din` valid in that clock. `done` pulses one clock, 4*CYCLES
// clocks after the start clock (128 clocks for the document's 64 rounds),
// and `dout` holds the result until the next start. Inputs are sampled at
// start only, except `key`, which must stay stable while busy.
// The phase scheme and round count follow the document; the handshake is
// this design's choice.
module xtea_core
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS = 64   // Feistel rounds (two per cycle)
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   ed,
  input  key_t   key,
  input  block_t din,
  output block_t dout,
  output logic   busy,
  output logic   done
);

  localparam int unsigned CYCLES = ROUNDS / 2;
  localparam int unsigned CW = (CYCLES > 1) ? $clog2(CYCLES) : 1;

  word_t   i0, i1, rin, kout, rout;
  phase_e  phase;
  logic    ed_q;
  logic [CW-1:0] cyc;

  xtea_key_sched #(.CYCLES(CYCLES)) u_ks (
    .clk   (clk),
    .rst (rst),
    .init  (start && !busy),
    .ed    (busy ? ed_q : ed),
    .en    (busy),
    .phase (phase),
    .key   (key),
    .kout  (kout)
  );

  xtea_round_fn u_rf (
    .rin  (rin),
    .kout (kout),
    .rout (rout)
  );

  word_t i1_next;
  always_comb i1_next = ed_q ? (i1 - rout) : (i1 + rout);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      i0    <= '0;
      i1    <= '0;
      rin   <= '0;
      phase <= PH_KEY0;
      cyc   <= '0;
      ed_q  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          ed_q  <= ed;
          busy  <= 1'b1;
          phase <= PH_KEY0;
          cyc   <= '0;
          if (!ed) begin
            i1 <= din[63:32];
            i0 <= din[31:0];
          end else begin
            i0 <= din[63:32];
            i1 <= din[31:0];
          end
        end
      end else begin
        phase <= phase_e'(phase + 2'd1);
        unique case (phase)
          PH_KEY0: rin <= i1;
          PH_UPD0: i0  <= ed_q ? (i0 - rout) : (i0 + rout);
          PH_KEY1: rin <= i0;
          PH_UPD1: begin
            i1 <= i1_next;
            if (cyc == CW'(CYCLES - 1)) begin
              busy <= 1'b0;
              done <= 1'b1;
              dout <= ed_q ? {i0, i1_next} : {i1_next, i0};
            end
            cyc <= cyc + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
