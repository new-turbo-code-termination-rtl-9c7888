// turbo_pkg: constants and types shared by the terminated turbo encoder.
//
// The code is the rate-1/2 recursive systematic code {13,15} (octal) with
// memory 3. Its recursion polynomial 13 divides the reset polynomial
// 1 + D^7, so any input sequence that is a multiple of 1 + D^(n*7) returns the
// encoder to the zero state. Polynomials are stored with bit i holding the
// coefficient of D^i; the octal digits are read with the leading digit as the
// D^0 end (13 -> 1 + D^2 + D^3, 15 -> 1 + D + D^3), the usual convention for
// this code pair. The block length N is variable at run time up to N_MAX; the
// code memory fixes the number of tail bits N_T = M.
package turbo_pkg;

  localparam int unsigned M       = 3;            // encoder memory
  localparam logic [3:0]  G_FB    = 4'b1101;      // 13 octal: 1 + D^2 + D^3
  localparam logic [3:0]  G_FF    = 4'b1011;      // 15 octal: 1 + D   + D^3
  localparam int unsigned L_RESET = 7;            // length l of reset polynomial 1 + D^7
  localparam int unsigned N_MAX   = 440;          // largest block (ATM cell + 2 bytes)
  localparam int unsigned N_T     = M;            // tail bits
  localparam int unsigned IL_STEP = 67;           // interleaver row stride, a prime above every column height

  // Decoder. Soft values are two's-complement log-likelihood ratios, positive
  // meaning bit 1. Widths are this design's choice; the observation length and
  // the number of iterations are those of the reference configuration.
  localparam int unsigned LLR_W   = 6;            // channel value width
  localparam int unsigned EXT_W   = 8;            // a-priori / extrinsic / soft output width
  localparam int unsigned PM_W    = 16;           // path metric width
  localparam int unsigned DLT_W   = 9;            // metric difference width (saturated)
  localparam int unsigned U_OBS   = 56;           // SOVA observation (update) length
  localparam int unsigned N_ITER  = 2;            // decoder iterations
  localparam int unsigned K_MAX   = ((N_MAX + N_T + L_RESET - 1) / L_RESET) * L_RESET;  // 448

  // Position of the switches S1/S2/S3 of the encoder, one phase per block section.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,   // waiting for a block
    PH_DATA = 3'd1,   // S1 = d, S2 = direct, S3 = through: information bits
    PH_TAIL = 3'd2,   // S1 = tail, S2 = direct, S3 = through: N_T tail bits
    PH_ZERO = 3'd3,   // S3 = zero: N0 padding zeros, output ignored, interleaver halted
    PH_INTL = 3'd4    // S2 = interleaver: interleaved data and tail
  } phase_e;

  typedef enum logic {
    RATE_1_2 = 1'b0,
    RATE_5_7 = 1'b1
  } rate_e;

endpackage
