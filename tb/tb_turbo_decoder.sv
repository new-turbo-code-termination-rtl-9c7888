// tb_turbo_decoder: drives the iterative decoder with blocks produced by a
// reference model of the terminated turbo encoder written here (tail bits,
// zero padding to a multiple of 7, the interleaver formula, puncturing), sent
// as noisy soft values. Decoded bits must equal the information bits, also
// when the channel flipped some signs. The testbench also checks that the
// decoder runs exactly two iterations, that busy falls with done, and the
// decoding time against the bound of the four SOVA passes.
module tb_turbo_decoder;
  import turbo_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rx_valid = 0;
  logic [8:0] blk_len = '0, dec_idx = '0;
  rate_e rate = RATE_1_2;
  logic signed [5:0] rx_llr = '0;
  logic rx_ready, busy, done, dec_bit;
  logic [1:0] iter;

  turbo_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, corrected = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void enc(inout bit [3:1] r, input bit u, output bit p);
    bit fb;
    fb = u ^ r[2] ^ r[3];
    p  = fb ^ r[1] ^ r[3];
    r  = {r[2], r[1], fb};
  endfunction

  function automatic bit kept(int k, int n, int pass, rate_e rt);
    if (k >= n) return 0;
    if (rt == RATE_1_2) return (k % 2) == pass;
    return (k % 5) == (pass ? 2 : 0);
  endfunction

  task automatic run(input int n, input rate_e rt, input int amp, input int sig);
    bit d[$], blk[$], tx[$];
    bit [3:1] r;
    bit p;
    int L, n0, errs, chan, v, cycles, max_iter;
    L = n + 3; n0 = (7 - L % 7) % 7;
    r = 0;
    for (int k = 0; k < L; k++) begin
      bit u;
      u = (k < n) ? 1'($urandom) : (r[2] ^ r[3]);
      if (k < n) d.push_back(u);
      blk.push_back(u);
      enc(r, u, p);
      tx.push_back(u);
      if (kept(k, n, 0, rt)) tx.push_back(p);
    end
    for (int i = 0; i < n0; i++) enc(r, 0, p);
    for (int q = 0; q < L; q++) begin
      int c, R, src;
      c = q % 7; R = (L - c + 6) / 7;
      src = 7 * ((c + (q / 7) * 67) % R) + c;
      enc(r, blk[src], p);
      if (kept(q, n, 1, rt)) tx.push_back(p);
    end
    check(r == 0, "reference encoder not terminated");
    start = 1; blk_len = 9'(n); rate = rt;
    @(negedge clk);
    start = 0;
    chan = 0;
    for (int i = 0; i < tx.size(); ) begin
      rx_valid = ($urandom_range(4) != 0);
      v = (tx[i] ? amp : -amp);
      for (int j = 0; j < 4; j++) v += (int'($urandom_range(2 * sig)) - sig) / 2;
      if (v > 31) v = 31;
      if (v < -31) v = -31;
      rx_llr = 6'(v);
      @(posedge clk);
      if (rx_valid && rx_ready) begin
        if ((v > 0) != tx[i]) chan++;
        i++;
      end
      @(negedge clk);
    end
    rx_valid = 0;
    cycles = 0; max_iter = 0;
    while (!done && cycles < 4 * (3 * (L + 7) + (L + 7) * 56) + L + 20) begin
      if (int'(iter) > max_iter) max_iter = int'(iter);
      @(negedge clk);
      cycles++;
    end
    check(done, "no done");
    check(max_iter == 1, $sformatf("highest iteration index %0d", max_iter));
    @(negedge clk);
    check(!busy, "busy after done");
    errs = 0;
    for (int i = 0; i < n; i++) begin
      dec_idx = 9'(i);
      #1;
      if (dec_bit != d[i]) errs++;
    end
    check(errs == 0, $sformatf("N=%0d: %0d decoded errors, %0d channel errors", n, errs, chan));
    if (errs == 0) corrected += chan;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(440, RATE_1_2, 12, 0);
    run(440, RATE_1_2, 10, 10);
    run(440, RATE_5_7, 12, 8);
    run(200, RATE_5_7, 12, 9);
    run(4, RATE_1_2, 12, 0);
    check(corrected > 0, "no channel error corrected");
    $display("channel errors corrected: %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
