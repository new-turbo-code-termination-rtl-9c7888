// rsc_encoder: recursive systematic convolutional encoder, parity output only.
//
// A shift register of M bits holds the state; state[0] is the most recent
// register bit. Each enabled cycle the feedback bit a = u ^ (taps of G_FB on
// the state) is shifted in and the parity y = (taps of G_FF on a and the state)
// is produced. The systematic bit is the input itself and is taken by the
// caller. y is combinational from u and the present state; the state updates on
// the rising clock edge when en is high. clr returns the register to the zero
// state synchronously (every block starts in the zero state). The default
// polynomials are the {13,15} pair the code is built on; the register
// arrangement is this design's own, as the published scheme gives only the polynomials.
module rsc_encoder #(
  parameter int unsigned M    = turbo_pkg::M,
  parameter logic [M:0]  G_FB = turbo_pkg::G_FB,
  parameter logic [M:0]  G_FF = turbo_pkg::G_FF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,     // synchronous return to the zero state
  input  logic         en,      // advance one trellis step
  input  logic         u,       // input bit
  output logic         y,       // parity bit for this step
  output logic [M-1:0] state    // present state, state[0] = newest
);

  logic a;

  always_comb begin
    a = u ^ (^(state & G_FB[M:1]));
    y = (G_FF[0] & a) ^ (^(state & G_FF[M:1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= '0;
    else if (clr)    state <= '0;
    else if (en)     state <= {state[M-2:0], a};
  end

endmodule
