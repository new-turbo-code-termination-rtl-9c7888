// tb_depuncturer: sends numbered soft values for blocks of several lengths
// and both rates, with random gaps in rx_valid, and checks where each one is
// written: X[k] and the kept Y1[k] interleaved in pass 0, the kept Y2[q] in
// pass 1, 0 at every punctured position, every position of the three memories
// written exactly once, and the number of values consumed (N + 3 + N at rate
// 1/2, N + 3 + 2N/5 at rate 5/7).
module tb_depuncturer;
  import turbo_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rx_valid = 0;
  logic [8:0] n_len = '0;
  rate_e rate = RATE_1_2;
  logic signed [5:0] rx_llr = '0;
  logic rx_ready, wr_en, busy, done;
  logic [1:0] wr_sel;
  logic [8:0] wr_idx;
  logic signed [5:0] wr_llr;

  depuncturer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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

  function automatic bit kept(int k, int n, int pass, rate_e rt);
    if (k >= n) return 0;
    if (rt == RATE_1_2) return (k % 2) == pass;
    return (k % 5) == (pass ? 2 : 0);
  endfunction

  task automatic run(input int n, input rate_e rt);
    int L, sent, exp_sent, cnt[3][443];
    int val[3][443];
    int expv[3][443];
    int v;
    L = n + 3;
    // Expected contents: value = 1 + (index of the value in the sequence) mod 31.
    v = 0; exp_sent = 0;
    for (int k = 0; k < L; k++) begin
      expv[0][k] = 1 + (v++ % 31);
      if (kept(k, n, 0, rt)) expv[1][k] = 1 + (v++ % 31);
      else                   expv[1][k] = 0;
    end
    for (int q = 0; q < L; q++) begin
      if (kept(q, n, 1, rt)) expv[2][q] = 1 + (v++ % 31);
      else                   expv[2][q] = 0;
    end
    exp_sent = v;
    for (int s = 0; s < 3; s++) for (int k = 0; k < 443; k++) cnt[s][k] = 0;
    start = 1; n_len = 9'(n); rate = rt;
    @(negedge clk);
    start = 0;
    sent = 0;
    while (!done) begin
      rx_valid = ($urandom_range(3) != 0);
      rx_llr   = rx_valid ? 6'(1 + (sent % 31)) : 6'(-7);
      #1;
      if (wr_en) begin
        cnt[wr_sel][wr_idx]++;
        val[wr_sel][wr_idx] = int'(wr_llr);
      end
      @(posedge clk);
      if (rx_valid && rx_ready) sent++;
      @(negedge clk);
    end
    rx_valid = 0;
    check(sent == exp_sent, $sformatf("N=%0d consumed %0d, expected %0d", n, sent, exp_sent));
    if (n == 440) check(sent == ((rt == RATE_1_2) ? 883 : 619), "reference block size");
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < L; k++) begin
        check(cnt[s][k] == 1, $sformatf("memory %0d position %0d written %0d times", s, k, cnt[s][k]));
        check(val[s][k] == expv[s][k],
              $sformatf("N=%0d memory %0d position %0d: %0d expected %0d", n, s, k, val[s][k], expv[s][k]));
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(440, RATE_1_2); run(440, RATE_5_7); run(1, RATE_1_2); run(1, RATE_5_7);
    run(17, RATE_5_7); run(22, RATE_1_2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
