// turbo_decoder: iterative decoder for blocks from turbo_encoder, using the
// fact that both encoder passes start and end in the zero state.
//
// Each iteration runs two SOVA decodings in series. Decoder 1 works on the
// direct order over K1 = L + N0 trellis steps (L = N + N_T): the N0 padding
// zeros that were not transmitted are put back as values that say "certainly
// 0", so its trellis ends in the zero state through the tail bits exactly as
// the encoder's first pass did. Decoder 2 works on the interleaved order over
// L steps and ends in the zero state through the residue-preserving
// interleaver. Between them only extrinsic information travels: decoder 1's
// output minus its systematic and a-priori input becomes decoder 2's a-priori
// input (read through the interleaver), and decoder 2's extrinsic output is
// written back through the same permutation as decoder 1's a-priori input for
// the next iteration. After N_ITER iterations the hard decisions of decoder 2,
// de-interleaved, are the decoded block. Two iterations, SOVA decoding, the
// zero-state start and end of both decoders and the padding zeros inserted
// before decoding follow the published scheme. One SOVA core serving both decoders in
// turn, the permutation table and the absence of extrinsic scaling are this
// design's choices.
//
// Interface and timing: pulse start with blk_len = N and rate in IDLE, then
// deliver the block's soft values on rx_llr/rx_valid/rx_ready in transmission
// order (see depuncturer). The decoder then builds the permutation table (L
// cycles) and runs 2*N_ITER SOVA passes of about 3K cycles plus the update
// walk each. done pulses once the decisions are ready; dec_bit then gives
// information (or tail) bit dec_idx, combinationally, until the next start.
module turbo_decoder #(
  parameter int unsigned N_MAX   = turbo_pkg::N_MAX,
  parameter int unsigned M       = turbo_pkg::M,
  parameter logic [M:0]  G_FB    = turbo_pkg::G_FB,
  parameter logic [M:0]  G_FF    = turbo_pkg::G_FF,
  parameter int unsigned L_RESET = turbo_pkg::L_RESET,
  parameter int unsigned IL_STEP = turbo_pkg::IL_STEP,
  parameter int unsigned LLR_W   = turbo_pkg::LLR_W,
  parameter int unsigned EXT_W   = turbo_pkg::EXT_W,
  parameter int unsigned U_OBS   = turbo_pkg::U_OBS,
  parameter int unsigned N_ITER  = turbo_pkg::N_ITER,
  localparam int unsigned N_T    = M,
  localparam int unsigned LMAX   = N_MAX + N_T,
  localparam int unsigned K_MAX  = ((LMAX + L_RESET - 1) / L_RESET) * L_RESET,
  localparam int unsigned NW     = $clog2(LMAX + 1),
  localparam int unsigned KW     = $clog2(K_MAX + 1),
  localparam int unsigned AW     = $clog2(LMAX),
  localparam int unsigned RW     = $clog2((LMAX + L_RESET - 1) / L_RESET + 1),
  localparam int unsigned CW     = $clog2(L_RESET)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [NW-1:0]           blk_len,
  input  turbo_pkg::rate_e        rate,
  input  logic                    rx_valid,
  input  logic signed [LLR_W-1:0] rx_llr,
  output logic                    rx_ready,
  output logic                    busy,
  output logic                    done,
  output logic [1:0]              iter,      // iteration now running
  input  logic [NW-1:0]           dec_idx,
  output logic                    dec_bit
);
  import turbo_pkg::*;

  typedef enum logic [2:0] {TD_IDLE, TD_RX, TD_PERM, TD_RUN1, TD_WAIT1, TD_RUN2, TD_WAIT2} td_state_e;
  typedef logic signed [EXT_W-1:0] ext_t;

  localparam ext_t EXT_MAX  = ext_t'((1 << (EXT_W - 1)) - 1);
  localparam ext_t KNOWN_0  = -EXT_MAX;      // soft value of a padding zero

  td_state_e     st;
  logic [NW-1:0] lq;                         // L = N + N_T
  logic [KW-1:0] k1;                         // trellis steps of decoder 1
  logic [NW-1:0] q;

  // Block memories.
  logic signed [LLR_W-1:0] lx  [LMAX];
  logic signed [LLR_W-1:0] ly1 [LMAX];
  logic signed [LLR_W-1:0] ly2 [LMAX];
  ext_t                    le1 [LMAX];       // extrinsic of decoder 1, direct order
  ext_t                    la1 [LMAX];       // extrinsic of decoder 2, direct order
  logic [AW-1:0]           perm[LMAX];       // interleaved position -> direct position
  logic                    hard[LMAX];

  // Depuncturer.
  logic                    dp_start, dp_wr, dp_done;
  logic [1:0]              dp_sel;
  logic [NW-1:0]           dp_idx;
  logic signed [LLR_W-1:0] dp_llr;

  assign dp_start = (st == TD_IDLE) && start && (blk_len != '0) && (32'(blk_len) <= N_MAX);

  depuncturer #(.N_MAX(N_MAX), .N_T(N_T), .LLR_W(LLR_W)) u_depunct (
    .clk, .rst_n, .start(dp_start), .n_len(blk_len), .rate, .rx_valid, .rx_llr,
    .rx_ready, .wr_en(dp_wr), .wr_sel(dp_sel), .wr_idx(dp_idx), .wr_llr(dp_llr),
    .busy(), .done(dp_done)
  );

  // Permutation table.
  logic [AW-1:0] ig_addr;
  logic          ig_clr;
  assign ig_clr = dp_done;

  il_addr_gen #(.LMAX(LMAX), .L_RESET(L_RESET), .IL_STEP(IL_STEP)) u_ig (
    .clk, .rst_n, .clr(ig_clr), .adv(st == TD_PERM),
    .rows(RW'(lq / NW'(L_RESET))), .cols(CW'(lq % NW'(L_RESET))), .addr(ig_addr)
  );

  // SOVA core, shared by decoder 1 and decoder 2.
  logic          sv_start, sv_out_valid, sv_out_bit, sv_done, second;
  logic [KW-1:0] sv_klen, sv_in_idx, sv_out_idx;
  ext_t          sv_sys, sv_par, sv_apr, sv_out_llr;

  sova_decoder #(.K_MAX(K_MAX), .M(M), .G_FB(G_FB), .G_FF(G_FF), .EXT_W(EXT_W),
                 .U_OBS(U_OBS)) u_sova (
    .clk, .rst_n, .start(sv_start), .k_len(sv_klen), .in_idx(sv_in_idx),
    .in_sys(sv_sys), .in_par(sv_par), .in_apr(sv_apr), .out_valid(sv_out_valid),
    .out_idx(sv_out_idx), .out_llr(sv_out_llr), .out_bit(sv_out_bit),
    .busy(), .done(sv_done)
  );

  function automatic ext_t sat(input logic signed [EXT_W+1:0] v);
    if (v > (EXT_W+2)'(EXT_MAX))       return EXT_MAX;
    else if (v < -(EXT_W+2)'(EXT_MAX)) return -EXT_MAX;
    else                               return ext_t'(v);
  endfunction

  // Soft inputs requested by the SOVA core.
  logic [AW-1:0] in_p, out_p;
  always_comb begin
    second   = (st == TD_RUN2) || (st == TD_WAIT2);
    sv_start = (st == TD_RUN1) || (st == TD_RUN2);
    sv_klen  = second ? KW'(lq) : k1;
    in_p     = second ? perm[AW'(sv_in_idx)] : AW'(sv_in_idx);
    if (!second && 32'(sv_in_idx) >= 32'(lq)) begin
      sv_sys = KNOWN_0;                       // re-inserted padding zero
      sv_par = '0;
      sv_apr = '0;
    end else begin
      sv_sys = ext_t'(lx[in_p]);
      sv_par = second ? ext_t'(ly2[AW'(sv_in_idx)]) : ext_t'(ly1[in_p]);
      if (second)          sv_apr = le1[in_p];
      else if (iter == '0) sv_apr = '0;
      else                 sv_apr = la1[in_p];
    end
    out_p   = second ? perm[AW'(sv_out_idx)] : AW'(sv_out_idx);
    busy    = (st != TD_IDLE);
    dec_bit = hard[AW'(dec_idx)];
  end

  // Memory writes.
  always_ff @(posedge clk) begin
    if (dp_wr) begin
      unique case (dp_sel)
        2'd0:    lx [AW'(dp_idx)] <= dp_llr;
        2'd1:    ly1[AW'(dp_idx)] <= dp_llr;
        default: ly2[AW'(dp_idx)] <= dp_llr;
      endcase
    end
    if (st == TD_PERM) perm[AW'(q)] <= ig_addr;
    if (sv_out_valid && !second && 32'(sv_out_idx) < 32'(lq))
      le1[out_p] <= sat((EXT_W+2)'(sv_out_llr) - (EXT_W+2)'(lx[out_p]) -
                        (EXT_W+2)'((iter == '0) ? ext_t'(0) : la1[out_p]));
    if (sv_out_valid && second) begin
      la1[out_p]  <= sat((EXT_W+2)'(sv_out_llr) - (EXT_W+2)'(lx[out_p]) -
                         (EXT_W+2)'(le1[out_p]));
      hard[out_p] <= sv_out_bit;
    end
  end

  // Sequencing of receive, permutation table and iterations.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= TD_IDLE;
      lq   <= '0;
      k1   <= '0;
      q    <= '0;
      iter <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        TD_IDLE: if (dp_start) begin
          lq   <= blk_len + NW'(N_T);
          k1   <= KW'(((32'(blk_len) + N_T + L_RESET - 1) / L_RESET) * L_RESET);
          iter <= '0;
          st   <= TD_RX;
        end
        TD_RX: if (dp_done) begin
          q  <= '0;
          st <= TD_PERM;
        end
        TD_PERM: begin
          q <= q + 1'b1;
          if (q == lq - 1'b1) st <= TD_RUN1;
        end
        TD_RUN1:  st <= TD_WAIT1;
        TD_WAIT1: if (sv_done) st <= TD_RUN2;
        TD_RUN2:  st <= TD_WAIT2;
        TD_WAIT2: if (sv_done) begin
          if (32'(iter) == N_ITER - 1) begin
            st   <= TD_IDLE;
            done <= 1'b1;
          end else begin
            iter <= iter + 1'b1;
            st   <= TD_RUN1;
          end
        end
        default: st <= TD_IDLE;
      endcase
    end
  end

endmodule
