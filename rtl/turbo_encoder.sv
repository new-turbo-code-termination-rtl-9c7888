// turbo_encoder: turbo encoder whose trellis is terminated in both passes for
// any block length N up to N_MAX.
//
// A single RSC encoder is used twice per block. Pass 0 encodes the N
// information bits followed by N_T tail bits from the tail logic, which bring
// the encoder back to the zero state; data and tail are written into the
// interleaver as they go by. Then N0 zero bits are fed to the encoder (its
// output discarded, the interleaver halted) so that N + N_T + N0 is a multiple
// of the reset-polynomial length l = 7. Pass 1 encodes the interleaved data and
// tail. Because the interleaver keeps every position modulo l, the interleaved
// block is, like the direct one, divisible by the recursion polynomial, and the
// encoder ends pass 1 in the zero state too: both decoder trellises start and
// end in state zero. The three switches S1 (data/tail), S2 (direct/
// interleaved) and S3 (encoder input/zero) are the multiplexers below, driven
// by switch_sequencer. The structure follows the published scheme; the handshake, the port
// layout and the puncturing patterns are this design's own.
//
// Interface and timing: pulse start with blk_len = N in IDLE, then offer N
// information bits on in_bit/in_valid; a bit is taken in every cycle with
// in_valid and in_ready high. Outputs come in the cycle a step is taken, with
// no back-pressure: sys_valid/sys_bit is the systematic stream X (N + N_T bits),
// par_valid/par_bit the punctured redundancy Y, par_pass telling which pass it
// comes from. With in_valid always high a block takes N + N_T + N0 + N + N_T
// cycles plus one idle cycle; done pulses after the last step, with term_ok
// high if the encoder is in the zero state.
module turbo_encoder #(
  parameter int unsigned N_MAX   = turbo_pkg::N_MAX,
  parameter int unsigned M       = turbo_pkg::M,
  parameter logic [M:0]  G_FB    = turbo_pkg::G_FB,
  parameter logic [M:0]  G_FF    = turbo_pkg::G_FF,
  parameter int unsigned L_RESET = turbo_pkg::L_RESET,
  parameter int unsigned IL_STEP = turbo_pkg::IL_STEP,
  localparam int unsigned N_T    = M,
  localparam int unsigned NW     = $clog2(N_MAX + N_T + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NW-1:0]     blk_len,
  input  turbo_pkg::rate_e  rate,
  input  logic              in_valid,
  input  logic              in_bit,
  output logic              in_ready,
  output turbo_pkg::phase_e phase,
  output logic              busy,
  output logic              sys_valid,
  output logic              sys_bit,
  output logic              par_valid,
  output logic              par_bit,
  output logic              par_pass,
  output logic              done,
  output logic              term_ok
);
  import turbo_pkg::*;

  logic          clr, adv, il_wr, il_rd, keep;
  logic [NW-1:0] pos, n_len;
  logic [M-1:0]  rsc_state;
  logic          tail_bit, il_bit, s1_out, s2_out, s3_out, y;

  switch_sequencer #(.N_MAX(N_MAX), .N_T(N_T), .L_RESET(L_RESET)) u_seq (
    .clk, .rst_n, .start, .blk_len, .in_valid, .in_ready, .phase, .clr, .adv,
    .il_wr, .il_rd, .pos, .n_len, .busy, .done
  );

  tail_logic #(.M(M), .G_FB(G_FB)) u_tail (.state(rsc_state), .tail_bit);

  interleaver #(.LMAX(N_MAX + N_T), .L_RESET(L_RESET), .IL_STEP(IL_STEP)) u_il (
    .clk, .rst_n, .clr, .wr_en(il_wr), .wr_bit(s1_out), .rd_en(il_rd),
    .rd_bit(il_bit), .rd_addr()
  );

  // Switches S1, S2, S3.
  always_comb begin
    s1_out = (phase == PH_TAIL) ? tail_bit : in_bit;
    s2_out = (phase == PH_INTL) ? il_bit : s1_out;
    s3_out = (phase == PH_ZERO) ? 1'b0 : s2_out;
  end

  rsc_encoder #(.M(M), .G_FB(G_FB), .G_FF(G_FF)) u_rsc (
    .clk, .rst_n, .clr, .en(adv), .u(s3_out), .y, .state(rsc_state)
  );

  puncturer #(.N_MAX(N_MAX), .N_T(N_T)) u_punct (
    .rate, .pass(phase == PH_INTL), .pos, .n_len, .keep
  );

  always_comb begin
    sys_valid = il_wr;
    sys_bit   = s1_out;
    par_valid = adv && (phase != PH_ZERO) && keep;
    par_bit   = y;
    par_pass  = (phase == PH_INTL);
    term_ok   = done && (rsc_state == '0);
  end

  // Pass 0 is terminated by the tail bits, pass 1 by the residue-preserving
  // interleaver together with the zero padding.
  a_tail_terminates: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_INTL && pos == '0) |-> (rsc_state == '0));
  a_pass1_terminates: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (rsc_state == '0));

endmodule
