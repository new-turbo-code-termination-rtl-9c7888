// sova_decoder: soft-output Viterbi (SOVA) decoder for one terminated pass of
// the RSC code, producing a soft value for every information bit.
//
// How it works, in four phases:
//   FWD  One trellis step per cycle. Branch metrics are correlations of the
//        hypothesised bits (+1/-1) with the soft inputs: u * (sys + apr) +
//        p * par. Each of the 2^M states keeps the better of its two
//        predecessors (add-compare-select); the decision bit and the metric
//        difference (saturated to DLT_W bits) are stored for every step and
//        state. The zero state starts with a metric INIT_PEN above all others,
//        because every pass starts in state zero; metrics are renormalised
//        each step by subtracting the new metric of state 0.
//   TB   The trellis is terminated, so the survivor path is traced back from
//        state zero at the end of the block, one step per cycle. This gives
//        the hard decisions, the path's states, and at every step the
//        competing path's predecessor and its metric difference.
//   UPD  Soft-output update: for every step k the competitor that merged into
//        the survivor at k is followed backwards (one step per cycle) for at
//        most U_OBS steps or until it meets the survivor again; wherever its
//        information bit differs from the survivor's, the reliability there is
//        lowered to the metric difference of step k.
//   OUT  One soft output per cycle: sign from the decision, magnitude half the
//        reliability (metrics are in units of twice the log-likelihood).
// The algorithm, the zero-state start bonus, the termination at the zero
// state and the observation length 56 follow the published scheme. The whole-block
// traceback (instead of a sliding window) and all widths are this design's
// choices.
//
// Interface and timing: pulse start with k_len = K trellis steps in IDLE. The
// decoder requests soft inputs by index: in_idx is valid during FWD and the
// parent answers combinationally on in_sys, in_par and in_apr. During OUT,
// out_valid marks out_idx with out_llr and the hard decision out_bit. done
// pulses after the last output. Latency is about 3K cycles plus the update
// walk, at most K*U_OBS cycles.
module sova_decoder #(
  parameter int unsigned K_MAX = turbo_pkg::K_MAX,
  parameter int unsigned M     = turbo_pkg::M,
  parameter logic [M:0]  G_FB  = turbo_pkg::G_FB,
  parameter logic [M:0]  G_FF  = turbo_pkg::G_FF,
  parameter int unsigned EXT_W = turbo_pkg::EXT_W,
  parameter int unsigned PM_W  = turbo_pkg::PM_W,
  parameter int unsigned DLT_W = turbo_pkg::DLT_W,
  parameter int unsigned U_OBS = turbo_pkg::U_OBS,
  localparam int unsigned KW   = $clog2(K_MAX + 1),
  localparam int unsigned S    = 1 << M
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [KW-1:0]           k_len,
  output logic [KW-1:0]           in_idx,
  input  logic signed [EXT_W-1:0] in_sys,
  input  logic signed [EXT_W-1:0] in_par,
  input  logic signed [EXT_W-1:0] in_apr,
  output logic                    out_valid,
  output logic [KW-1:0]           out_idx,
  output logic signed [EXT_W-1:0] out_llr,
  output logic                    out_bit,
  output logic                    busy,
  output logic                    done
);

  typedef enum logic [2:0] {S_IDLE, S_FWD, S_TB, S_UPD, S_WALK, S_OUT} sova_state_e;
  typedef logic signed [PM_W-1:0] pm_t;
  typedef logic [DLT_W-1:0]       dlt_t;

  localparam pm_t  INIT_PEN = pm_t'(1 << (PM_W - 4));
  localparam dlt_t DLT_MAX  = '1;

  sova_state_e   st;
  logic [KW-1:0] klen, k, j, cnt;
  pm_t           pm [S];
  logic [M-1:0]  tst;           // traceback state (state after step k)
  logic [M-1:0]  cs;            // competitor state after step j
  dlt_t          dl;            // metric difference of the competitor being walked

  // Per-step memories.
  logic [S-1:0]  dec_mem [K_MAX];
  dlt_t          dlt_mem [K_MAX][S];
  logic          uhat    [K_MAX];
  logic [M-1:0]  mlst    [K_MAX];   // survivor state before step k
  logic [M-1:0]  cst     [K_MAX];   // competitor state before step k
  dlt_t          dml     [K_MAX];
  dlt_t          rel     [K_MAX];

  // ---------------------------------------------------------------- ACS
  logic signed [EXT_W:0]   lu;
  pm_t                     m0, m1, new_pm [S], dif;
  logic [S-1:0]            new_dec;
  dlt_t                    new_dlt [S];

  // Input bit that moves state s to the state whose newest bit is a.
  function automatic logic fb_in(input logic a, input logic [M-1:0] s);
    return a ^ (^(s & G_FB[M:1]));
  endfunction

  function automatic logic par_out(input logic a, input logic [M-1:0] s);
    return (G_FF[0] & a) ^ (^(s & G_FF[M:1]));
  endfunction

  function automatic pm_t bm(input logic u, input logic p,
                             input logic signed [EXT_W:0] lu_i,
                             input logic signed [EXT_W-1:0] lp_i);
    pm_t a, b;
    a = u ? pm_t'(lu_i) : -pm_t'(lu_i);
    b = p ? pm_t'(lp_i) : -pm_t'(lp_i);
    return a + b;
  endfunction

  always_comb begin
    lu = (EXT_W+1)'(in_sys) + (EXT_W+1)'(in_apr);
    for (int ns = 0; ns < S; ns++) begin
      logic [M-1:0] s0, s1, nsv;
      nsv = M'(ns);
      s0  = {1'b0, nsv[M-1:1]};
      s1  = {1'b1, nsv[M-1:1]};
      m0  = pm[s0] + bm(fb_in(nsv[0], s0), par_out(nsv[0], s0), lu, in_par);
      m1  = pm[s1] + bm(fb_in(nsv[0], s1), par_out(nsv[0], s1), lu, in_par);
      new_dec[ns] = (m1 > m0);
      new_pm[ns]  = (m1 > m0) ? m1 : m0;
      dif         = (m1 > m0) ? (m1 - m0) : (m0 - m1);
      new_dlt[ns] = (dif > pm_t'(DLT_MAX)) ? DLT_MAX : dlt_t'(dif);
    end
  end

  // ---------------------------------------------------- traceback / update
  logic          tb_b, wk_b, wk_u;
  logic [M-1:0]  tb_s, wk_s;

  always_comb begin
    tb_b = dec_mem[k][tst];
    tb_s = {tb_b, tst[M-1:1]};
    wk_b = dec_mem[j][cs];
    wk_s = {wk_b, cs[M-1:1]};
    wk_u = fb_in(cs[0], wk_s);
  end

  // ---------------------------------------------------------------- outputs
  logic [DLT_W-1:0] half;
  always_comb begin
    in_idx    = k;
    busy      = (st != S_IDLE);
    out_valid = (st == S_OUT);
    out_idx   = k;
    out_bit   = uhat[k];
    half      = rel[k] >> 1;
    if (32'(half) > (1 << (EXT_W - 1)) - 1) out_llr = {1'b0, {(EXT_W-1){1'b1}}};
    else                                    out_llr = EXT_W'(half);
    if (!uhat[k]) out_llr = -out_llr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      klen <= '0;
      k    <= '0;
      j    <= '0;
      cnt  <= '0;
      tst  <= '0;
      cs   <= '0;
      dl   <= '0;
      done <= 1'b0;
      for (int s = 0; s < S; s++) pm[s] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start && k_len != '0) begin
          klen <= k_len;
          k    <= '0;
          for (int s = 0; s < S; s++) pm[s] <= (s == 0) ? pm_t'(0) : -INIT_PEN;
          st   <= S_FWD;
        end
        S_FWD: begin
          for (int s = 0; s < S; s++) pm[s] <= new_pm[s] - new_pm[0];
          dec_mem[k] <= new_dec;
          for (int s = 0; s < S; s++) dlt_mem[k][s] <= new_dlt[s];
          if (k == klen - 1'b1) begin
            tst <= '0;                      // terminated: end in the zero state
            st  <= S_TB;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_TB: begin
          uhat[k] <= fb_in(tst[0], tb_s);
          mlst[k] <= tb_s;
          cst[k]  <= {~tb_b, tst[M-1:1]};
          dml[k]  <= dlt_mem[k][tst];
          rel[k]  <= DLT_MAX;
          tst     <= tb_s;
          if (k == '0) begin
            k  <= klen - 1'b1;
            st <= S_UPD;
          end else begin
            k <= k - 1'b1;
          end
        end
        S_UPD: begin
          // The competitor's bit at step k is always the opposite one.
          if (dml[k] < rel[k]) rel[k] <= dml[k];
          if (k == '0) begin
            st <= S_OUT;
          end else begin
            cs  <= cst[k];
            dl  <= dml[k];
            j   <= k - 1'b1;
            cnt <= KW'(1);
            st  <= S_WALK;
          end
        end
        S_WALK: begin
          if (wk_u != uhat[j] && dl < rel[j]) rel[j] <= dl;
          cs <= wk_s;
          if (wk_s == mlst[j] || j == '0 || 32'(cnt) == U_OBS - 1) begin
            k  <= k - 1'b1;
            st <= S_UPD;
          end else begin
            j   <= j - 1'b1;
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: begin
          if (k == klen - 1'b1) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
