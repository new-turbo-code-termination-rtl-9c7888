// tb_switch_sequencer: runs blocks of several lengths, with and without input
// stalls, and checks cycle by cycle that the switch phases come in order with
// the right lengths: N accepted data bits, 3 tail bits, N0 = (7 - (N+3) mod 7)
// mod 7 zero bits, N+3 interleaved bits; that adv, il_wr, il_rd and in_ready
// follow the phase; that pos counts each pass from 0; that clr pulses once per
// accepted start and done once per block; and that illegal lengths are ignored.
module tb_switch_sequencer;
  import turbo_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [8:0] blk_len = '0;
  logic in_ready, clr, adv, il_wr, il_rd, busy, done;
  phase_e phase;
  logic [8:0] pos, n_len;

  switch_sequencer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_pad = 0, n_nopad = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input int stall_pct);
    int L, n0, nd, nt, nz, ni, guard;
    L = n + 3; n0 = (7 - L % 7) % 7;
    nd = 0; nt = 0; nz = 0; ni = 0;
    start = 1; blk_len = 9'(n);
    #1;
    check(clr, "clr on accepted start");
    @(negedge clk);
    start = 0;
    guard = 0;
    while (!done && guard < 5000) begin
      in_valid = ($urandom_range(99) >= stall_pct);
      #1;
      check(in_ready == (phase == PH_DATA), "in_ready");
      check(!clr, "stray clr");
      case (phase)
        PH_DATA: begin
          check(adv == in_valid && il_wr == in_valid && !il_rd, "DATA controls");
          if (in_valid) begin check(int'(pos) == nd, "DATA pos"); nd++; end
          else n_stall++;
          check(nt == 0 && nz == 0 && ni == 0, "DATA order");
        end
        PH_TAIL: begin
          check(adv && il_wr && !il_rd, "TAIL controls");
          check(int'(pos) == n + nt, "TAIL pos");
          check(nd == n && nz == 0 && ni == 0, "TAIL order");
          nt++;
        end
        PH_ZERO: begin
          check(adv && !il_wr && !il_rd, "ZERO controls");
          check(nt == 3 && ni == 0, "ZERO order");
          nz++;
        end
        PH_INTL: begin
          check(adv && !il_wr && il_rd, "INTL controls");
          check(int'(pos) == ni, "INTL pos");
          check(nt == 3 && nz == n0, "INTL order");
          ni++;
        end
        default: check(0, "idle while busy");
      endcase
      @(negedge clk);
      guard++;
    end
    check(done && !busy, "done");
    check(nd == n && nt == 3 && nz == n0 && ni == L,
          $sformatf("N=%0d phase lengths %0d %0d %0d %0d", n, nd, nt, nz, ni));
    if (n0 > 0) n_pad++; else n_nopad++;
    in_valid = 0;
    @(negedge clk);
    check(!done, "done is one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; blk_len = 9'd0; @(negedge clk);
    check(!busy, "zero length ignored");
    blk_len = 9'd441; @(negedge clk);
    check(!busy, "length above maximum ignored");
    start = 0;
    run(440, 0); run(438, 25); run(1, 0); run(4, 50); run(5, 0); run(200, 10);
    for (int i = 0; i < 7; i++) run(10 + i, 0);
    check(n_stall > 0 && n_pad > 0 && n_nopad > 0, "mechanisms covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
