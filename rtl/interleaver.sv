// interleaver: block interleaver of variable size L = N + N_T whose permutation
// keeps every bit's position modulo the reset-polynomial length l.
//
// Why: the second encoder pass encodes the interleaved block. If each bit
// leaves the interleaver at a position q with q = p (mod l), p being its input
// position, the interleaved block equals the direct block modulo 1 + D^l, so
// it is also divisible by the recursion polynomial and the second pass ends in
// the zero state just as the tail-terminated first pass does.
//
// How: bits are written row by row into a one-bit memory seen as a matrix with
// l columns, so column c holds exactly the positions p = c (mod l). Counting
// the writes in rows and columns gives L div l and L mod l. They are read back
// in the order il_addr_gen produces: row by row, with the row order shuffled
// inside each column. Shuffling only inside a column is what keeps the
// residue; the stride rule and reading by rows are this design's choices.
//
// Interface and timing: clr empties the interleaver (one cycle). Each wr_en
// cycle stores wr_bit at the next input position. After the last write, each
// rd_en cycle consumes the output bit rd_bit, which with rd_addr is valid
// combinationally for the present read position; reading must not pass the
// number of bits written. Writes and reads are not mixed within a block.
module interleaver #(
  parameter int unsigned LMAX    = turbo_pkg::N_MAX + turbo_pkg::N_T,
  parameter int unsigned L_RESET = turbo_pkg::L_RESET,
  parameter int unsigned IL_STEP = turbo_pkg::IL_STEP,
  localparam int unsigned AW     = $clog2(LMAX),
  localparam int unsigned RMAX   = (LMAX + L_RESET - 1) / L_RESET,
  localparam int unsigned RW     = $clog2(RMAX + 1),
  localparam int unsigned CW     = $clog2(L_RESET)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          wr_en,
  input  logic          wr_bit,
  input  logic          rd_en,
  output logic          rd_bit,
  output logic [AW-1:0] rd_addr    // input position of the bit now read
);

  logic          mem [LMAX];
  logic [RW-1:0] wr_row;
  logic [CW-1:0] wr_col;

  il_addr_gen #(.LMAX(LMAX), .L_RESET(L_RESET), .IL_STEP(IL_STEP)) u_gen (
    .clk, .rst_n, .clr, .adv(rd_en), .rows(wr_row), .cols(wr_col), .addr(rd_addr)
  );

  always_comb rd_bit = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[AW'(32'(wr_row) * L_RESET + 32'(wr_col))] <= wr_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row <= '0;
      wr_col <= '0;
    end else if (clr) begin
      wr_row <= '0;
      wr_col <= '0;
    end else if (wr_en) begin
      if (32'(wr_col) == L_RESET - 1) begin
        wr_col <= '0;
        wr_row <= wr_row + 1'b1;
      end else begin
        wr_col <= wr_col + 1'b1;
      end
    end
  end

endmodule
