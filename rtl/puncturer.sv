// puncturer: decides which redundancy bits Y of the terminated turbo encoder
// are transmitted. The systematic part X (data and tail bits) is always sent.
//
// Only parity bits at information positions (pos < N) of each pass are kept,
// alternately from the two passes:
//   rate 1/2: pass 0 keeps even positions, pass 1 odd ones
//             -> N parity bits, N + N_T + N bits per block (883 for N = 440);
//   rate 5/7: pass 0 keeps pos mod 5 = 0, pass 1 keeps pos mod 5 = 2
//             -> 2N/5 parity bits (619 for N = 440).
// The block sizes [440;883] and [440;619] are those of the reference
// configuration; the patterns that reach them are this design's choice.
// Purely combinational: keep applies to the parity bit of the present step.
module puncturer #(
  parameter int unsigned N_MAX = turbo_pkg::N_MAX,
  parameter int unsigned N_T   = turbo_pkg::N_T,
  localparam int unsigned NW   = $clog2(N_MAX + N_T + 1)
) (
  input  turbo_pkg::rate_e rate,
  input  logic             pass,    // 0: direct pass, 1: interleaved pass
  input  logic [NW-1:0]    pos,     // position of the bit in its pass
  input  logic [NW-1:0]    n_len,   // N
  output logic             keep
);
  import turbo_pkg::*;

  logic [2:0] pos_mod5;

  always_comb begin
    pos_mod5 = 3'(pos % NW'(5));
    if (pos >= n_len)          keep = 1'b0;
    else if (rate == RATE_1_2) keep = (pos[0] == pass);
    else                       keep = (pos_mod5 == (pass ? 3'd2 : 3'd0));
  end

endmodule
