// turbo_codec: the complete terminated turbo coding scheme, transmitter and
// receiver side by side.
//
// turbo_encoder turns a block of N information bits (N up to N_MAX, chosen per
// block) into the systematic stream X and the punctured redundancy stream Y,
// with both encoder passes terminated in the zero state. turbo_decoder takes
// the received soft values of such a block and decodes it iteratively, with
// two SOVA decoders per iteration whose trellises both start and end in the
// zero state. The channel between them is outside this design, so the two
// halves have separate ports: enc_* for the encoder, dec_* for the decoder.
// A looped-back system connects enc_sys/enc_par (after modulation, channel and
// demodulation) to dec_rx_llr, sending each X bit followed by its pass-0 Y bit
// and then the pass-1 Y bits, the order in which the encoder produces them.
// Timing is that of the two halves (see turbo_encoder and turbo_decoder).
module turbo_codec #(
  parameter int unsigned N_MAX   = turbo_pkg::N_MAX,
  parameter int unsigned IL_STEP = turbo_pkg::IL_STEP,
  parameter int unsigned N_ITER  = turbo_pkg::N_ITER,
  parameter int unsigned U_OBS   = turbo_pkg::U_OBS,
  localparam int unsigned LLR_W  = turbo_pkg::LLR_W,
  localparam int unsigned NW     = $clog2(N_MAX + turbo_pkg::N_T + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // encoder
  input  logic                    enc_start,
  input  logic [NW-1:0]           enc_blk_len,
  input  turbo_pkg::rate_e        enc_rate,
  input  logic                    enc_in_valid,
  input  logic                    enc_in_bit,
  output logic                    enc_in_ready,
  output turbo_pkg::phase_e       enc_phase,
  output logic                    enc_busy,
  output logic                    enc_sys_valid,
  output logic                    enc_sys_bit,
  output logic                    enc_par_valid,
  output logic                    enc_par_bit,
  output logic                    enc_par_pass,
  output logic                    enc_done,
  output logic                    enc_term_ok,
  // decoder
  input  logic                    dec_start,
  input  logic [NW-1:0]           dec_blk_len,
  input  turbo_pkg::rate_e        dec_rate,
  input  logic                    dec_rx_valid,
  input  logic signed [LLR_W-1:0] dec_rx_llr,
  output logic                    dec_rx_ready,
  output logic                    dec_busy,
  output logic                    dec_done,
  output logic [1:0]              dec_iter,
  input  logic [NW-1:0]           dec_idx,
  output logic                    dec_bit
);

  turbo_encoder #(.N_MAX(N_MAX), .IL_STEP(IL_STEP)) u_enc (
    .clk, .rst_n, .start(enc_start), .blk_len(enc_blk_len), .rate(enc_rate),
    .in_valid(enc_in_valid), .in_bit(enc_in_bit), .in_ready(enc_in_ready),
    .phase(enc_phase), .busy(enc_busy), .sys_valid(enc_sys_valid),
    .sys_bit(enc_sys_bit), .par_valid(enc_par_valid), .par_bit(enc_par_bit),
    .par_pass(enc_par_pass), .done(enc_done), .term_ok(enc_term_ok)
  );

  turbo_decoder #(.N_MAX(N_MAX), .IL_STEP(IL_STEP), .N_ITER(N_ITER), .U_OBS(U_OBS)) u_dec (
    .clk, .rst_n, .start(dec_start), .blk_len(dec_blk_len), .rate(dec_rate),
    .rx_valid(dec_rx_valid), .rx_llr(dec_rx_llr), .rx_ready(dec_rx_ready),
    .busy(dec_busy), .done(dec_done), .iter(dec_iter), .dec_idx, .dec_bit
  );

endmodule
