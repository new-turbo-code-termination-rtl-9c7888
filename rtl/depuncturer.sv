// depuncturer: takes the received soft values of one block in transmission
// order and writes them, position by position, into the decoder's three
// input memories, putting a neutral value (0) where a redundancy bit was
// punctured.
//
// Transmission order, the same as the encoder's output order: pass 0 sends,
// for k = 0 .. L-1 (L = N + N_T), the systematic value X[k] followed by the
// parity Y1[k] if the puncturing pattern keeps it; pass 1 then sends Y2[q]
// for every kept q = 0 .. L-1. The pattern comes from the same puncturer
// block the encoder uses, so the two always agree. Re-inserting the punctured
// positions follows the published scheme; the serial order and the handshake are this
// design's choices.
//
// Interface and timing: pulse start with n_len and rate in IDLE. A value is
// consumed in every cycle with rx_valid and rx_ready high; a punctured
// position is written with 0 in one cycle without consuming input. Each cycle
// with wr_en high writes wr_llr into memory wr_sel at wr_idx. done pulses in
// the cycle after the last write.
module depuncturer #(
  parameter int unsigned N_MAX = turbo_pkg::N_MAX,
  parameter int unsigned N_T   = turbo_pkg::N_T,
  parameter int unsigned LLR_W = turbo_pkg::LLR_W,
  localparam int unsigned NW   = $clog2(N_MAX + N_T + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [NW-1:0]           n_len,
  input  turbo_pkg::rate_e        rate,
  input  logic                    rx_valid,
  input  logic signed [LLR_W-1:0] rx_llr,
  output logic                    rx_ready,
  output logic                    wr_en,
  output logic [1:0]              wr_sel,    // 0: X, 1: Y1, 2: Y2
  output logic [NW-1:0]           wr_idx,
  output logic signed [LLR_W-1:0] wr_llr,
  output logic                    busy,
  output logic                    done
);
  import turbo_pkg::*;

  typedef enum logic [1:0] {DP_IDLE, DP_X, DP_Y1, DP_Y2} dp_state_e;

  dp_state_e     st;
  logic [NW-1:0] pos, nl;
  rate_e         rt;
  logic          keep, last;

  puncturer #(.N_MAX(N_MAX), .N_T(N_T)) u_punct (
    .rate(rt), .pass(st == DP_Y2), .pos, .n_len(nl), .keep
  );

  always_comb begin
    last     = (32'(pos) == 32'(nl) + N_T - 1);
    rx_ready = (st == DP_X) || ((st == DP_Y1 || st == DP_Y2) && keep);
    wr_en    = (st != DP_IDLE) && (!rx_ready || rx_valid);
    wr_idx   = pos;
    wr_llr   = rx_ready ? rx_llr : '0;
    busy     = (st != DP_IDLE);
    unique case (st)
      DP_Y1:   wr_sel = 2'd1;
      DP_Y2:   wr_sel = 2'd2;
      default: wr_sel = 2'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= DP_IDLE;
      pos  <= '0;
      nl   <= '0;
      rt   <= RATE_1_2;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        DP_IDLE: if (start) begin
          st  <= DP_X;
          pos <= '0;
          nl  <= n_len;
          rt  <= rate;
        end
        DP_X: if (wr_en) st <= DP_Y1;
        DP_Y1: if (wr_en) begin
          st  <= last ? DP_Y2 : DP_X;
          pos <= last ? '0 : pos + 1'b1;
        end
        DP_Y2: if (wr_en) begin
          pos <= pos + 1'b1;
          if (last) begin
            st   <= DP_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= DP_IDLE;
      endcase
    end
  end

endmodule
