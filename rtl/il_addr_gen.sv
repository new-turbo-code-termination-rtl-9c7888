// il_addr_gen: read-address generator of the residue-preserving interleaver.
//
// For a block of L = rows*l + cols positions written row by row into a matrix
// of l columns, it produces for output position q = r*l + c (r = row, c =
// column) the input position p = ((c + r*IL_STEP) mod R_c)*l + c, where R_c is
// the height of column c (rows, plus one if c < cols). Reading row by row with
// the rows shuffled inside each column keeps p = q (mod l), the condition for
// the interleaved block to terminate the encoder in the zero state. The modulo
// is computed incrementally: one register per column holds the next source
// row and advances by IL_STEP mod R_c with a single conditional subtraction.
// IL_STEP must be a prime larger than every column height.
//
// Interface and timing: clr restarts at q = 0. addr is combinational for the
// present q; each cycle with adv high moves to q + 1. rows and cols must stay
// stable while the block is read.
module il_addr_gen #(
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
  input  logic          adv,
  input  logic [RW-1:0] rows,    // L div l
  input  logic [CW-1:0] cols,    // L mod l
  output logic [AW-1:0] addr     // input position p of the present output position q
);

  if (IL_STEP <= RMAX) begin : g_bad_step
    $error("IL_STEP must be a prime larger than the column height");
  end

  logic [RW-1:0] rd_row;
  logic [CW-1:0] rd_col;
  logic [RW-1:0] ptr [L_RESET];          // next source row of each column
  logic [RW-1:0] rows_cur, step_cur, init_cur, src_row, nxt_row;
  logic [RW:0]   nxt_sum;

  always_comb begin
    rows_cur = rows + RW'(rd_col < cols);
    if (rows_cur == '0) begin
      step_cur = '0;
      init_cur = '0;
    end else begin
      step_cur = RW'(IL_STEP % 32'(rows_cur));
      init_cur = RW'(32'(rd_col) % 32'(rows_cur));
    end
    src_row = (rd_row == '0) ? init_cur : ptr[rd_col];
    nxt_sum = {1'b0, src_row} + {1'b0, step_cur};
    nxt_row = (nxt_sum >= {1'b0, rows_cur}) ? RW'(nxt_sum - {1'b0, rows_cur}) : nxt_sum[RW-1:0];
    addr    = AW'(32'(src_row) * L_RESET + 32'(rd_col));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_row <= '0;
      rd_col <= '0;
      for (int c = 0; c < L_RESET; c++) ptr[c] <= '0;
    end else if (clr) begin
      rd_row <= '0;
      rd_col <= '0;
    end else if (adv) begin
      ptr[rd_col] <= nxt_row;
      if (32'(rd_col) == L_RESET - 1) begin
        rd_col <= '0;
        rd_row <= rd_row + 1'b1;
      end else begin
        rd_col <= rd_col + 1'b1;
      end
    end
  end

endmodule
