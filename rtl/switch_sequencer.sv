// switch_sequencer: control of the switches S1, S2 and S3 of the terminated
// turbo encoder, one block at a time.
//
// A block runs through four phases (turbo_pkg::phase_e):
//   DATA  N information bits, taken from the input whenever in_valid is high
//         (a low in_valid stalls the encoder for that cycle);
//   TAIL  N_T tail bits from the tail logic (S1 switched to the tail input);
//   ZERO  N0 = i*l - (N + N_T) zero bits (S3 switched to zero), i the smallest
//         integer making N0 >= 0; the interleaver is halted and the encoder
//         output is discarded. A mod-l counter that runs during DATA and TAIL
//         gives (N + N_T) mod l, so no division is needed; N0 may be zero;
//   INTL  N + N_T interleaved bits (S2 switched to the interleaver output).
// The phases, the zero-bit count and the halted interleaver follow the published scheme;
// the handshake and the counters are this design's choices.
//
// Interface and timing: start with a legal blk_len (1..N_MAX) is accepted in
// IDLE only (an illegal length is ignored); that cycle pulses clr. adv marks
// every cycle in which the encoder takes a step, pos is the position of that
// step inside its pass (DATA+TAIL form pass 0, INTL pass 1). done is high for
// the one cycle after the last interleaved bit; a new start is accepted in that
// same cycle, so blocks can follow back to back with one idle cycle.
module switch_sequencer #(
  parameter int unsigned N_MAX   = turbo_pkg::N_MAX,
  parameter int unsigned N_T     = turbo_pkg::N_T,
  parameter int unsigned L_RESET = turbo_pkg::L_RESET,
  localparam int unsigned NW     = $clog2(N_MAX + N_T + 1),
  localparam int unsigned CW     = $clog2(L_RESET)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NW-1:0]     blk_len,   // N, information bits of the block
  input  logic              in_valid,
  output logic              in_ready,
  output turbo_pkg::phase_e phase,
  output logic              clr,       // block accepted: clear encoder and interleaver
  output logic              adv,       // the encoder takes a step this cycle
  output logic              il_wr,     // write the present S1 output into the interleaver
  output logic              il_rd,     // consume one interleaver output
  output logic [NW-1:0]     pos,       // position of this step in its pass
  output logic [NW-1:0]     n_len,     // latched N
  output logic              busy,
  output logic              done
);
  import turbo_pkg::*;

  logic [CW-1:0] modl;          // steps so far modulo l
  logic          modl_wrap;     // this step brings modl back to 0
  logic          legal;

  always_comb begin
    legal     = (blk_len != '0) && (32'(blk_len) <= N_MAX);
    clr       = (phase == PH_IDLE) && start && legal;
    in_ready  = (phase == PH_DATA);
    adv       = ((phase == PH_DATA) && in_valid) || (phase == PH_TAIL) ||
                (phase == PH_ZERO) || (phase == PH_INTL);
    il_wr     = ((phase == PH_DATA) && in_valid) || (phase == PH_TAIL);
    il_rd     = (phase == PH_INTL);
    busy      = (phase != PH_IDLE);
    modl_wrap = (32'(modl) == L_RESET - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      modl  <= '0;
      pos   <= '0;
      n_len <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (adv && phase != PH_INTL) modl <= modl_wrap ? '0 : modl + 1'b1;
      unique case (phase)
        PH_IDLE: if (clr) begin
          phase <= PH_DATA;
          n_len <= blk_len;
          pos   <= '0;
          modl  <= '0;
        end
        PH_DATA: if (in_valid) begin
          pos <= pos + 1'b1;
          if (pos == n_len - 1'b1) phase <= PH_TAIL;
        end
        PH_TAIL: begin
          pos <= pos + 1'b1;
          if (32'(pos) == 32'(n_len) + N_T - 1) begin
            if (modl_wrap) begin
              phase <= PH_INTL;
              pos   <= '0;
            end else begin
              phase <= PH_ZERO;
            end
          end
        end
        PH_ZERO: if (modl_wrap) begin
          phase <= PH_INTL;
          pos   <= '0;
        end
        PH_INTL: begin
          pos <= pos + 1'b1;
          if (32'(pos) == 32'(n_len) + N_T - 1) begin
            phase <= PH_IDLE;
            done  <= 1'b1;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
