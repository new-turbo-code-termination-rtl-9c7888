// tail_logic: the "logic circuit" that terminates the first encoder pass.
//
// It looks at the present RSC state and outputs the input bit that makes the
// recursion feedback zero, i.e. the XOR of the state bits tapped by the
// recursion polynomial. Feeding this bit for M consecutive steps shifts zeros
// into every register, so the encoder reaches the zero state after exactly
// M = N_T tail bits whatever state it started from. Purely combinational.
// The published scheme gives the purpose of this circuit; the XOR form is the standard way
// to realise it and is this design's choice.
module tail_logic #(
  parameter int unsigned M    = turbo_pkg::M,
  parameter logic [M:0]  G_FB = turbo_pkg::G_FB
) (
  input  logic [M-1:0] state,     // RSC state, state[0] = newest
  output logic         tail_bit   // input bit that zeroes the feedback
);

  always_comb tail_bit = ^(state & G_FB[M:1]);

endmodule
