// tb_turbo_encoder: end-to-end test of the terminated turbo encoder at its
// default size (N_MAX = 440).
//
// A reference model written from the code definition (recursion 1 + D^2 + D^3,
// parity 1 + D + D^3, tail bits, zero padding to a multiple of 7, the
// interleaver formula applied directly rather than incrementally) predicts the
// systematic and punctured parity streams of each block. The testbench checks
// every output bit, the bit counts (883 and 619 bits for N = 440), the cycle
// count of each block, the zero final state, and independently that the
// interleaver keeps positions modulo 7. It also counts the mechanisms of the
// design (input stalls, zero padding, blocks that need no padding, both rates,
// back-to-back blocks, an ignored illegal start) and fails if one never occurs.
module tb_turbo_encoder;
  import turbo_pkg::*;

  localparam int NMAX = 440;
  localparam int NW   = $clog2(NMAX + 3 + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0, in_bit = 0;
  logic [NW-1:0] blk_len = '0;
  rate_e rate = RATE_1_2;
  logic in_ready, busy, sys_valid, sys_bit, par_valid, par_bit, par_pass, done, term_ok;
  phase_e phase;

  turbo_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_zero_pad = 0, n_no_pad = 0, n_rate12 = 0, n_rate57 = 0;
  int n_b2b = 0, n_illegal = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference RSC: r1 newest register bit.
  function automatic void ref_step(inout bit [3:1] r, input bit u, output bit par);
    bit fb;
    fb  = u ^ r[2] ^ r[3];
    par = fb ^ r[1] ^ r[3];
    r   = {r[2], r[1], fb};
  endfunction

  function automatic bit ref_keep(int k, int n, bit pass, rate_e rt);
    if (k >= n) return 0;
    if (rt == RATE_1_2) return (k % 2) == int'(pass);
    return (k % 5) == (pass ? 2 : 0);
  endfunction

  // Expected output streams and observed ones.
  bit exp_sys[$], exp_par[$], exp_pp[$], got_sys[$], got_par[$], got_pp[$];

  always @(posedge clk) begin
    if (sys_valid) got_sys.push_back(sys_bit);
    if (par_valid) begin got_par.push_back(par_bit); got_pp.push_back(par_pass); end
    if (phase == PH_DATA && !in_valid) n_stall++;
  end

  task automatic run_block(input int n, input rate_e rt, input int stall_pct, input bit back_to_back);
    bit d[$], blk[$], il[$];
    bit [3:1] r;
    bit par, tb;
    int L, n0, cycles, rows, c, rr, src, p;
    bit seen[];
    L  = n + 3;
    n0 = (7 - (L % 7)) % 7;
    for (int i = 0; i < n; i++) d.push_back(1'($urandom));
    // Reference: pass 0.
    exp_sys.delete(); exp_par.delete(); exp_pp.delete();
    got_sys.delete(); got_par.delete(); got_pp.delete();
    r = '0;
    for (int i = 0; i < L; i++) begin
      bit u;
      u = (i < n) ? d[i] : (r[2] ^ r[3]);
      blk.push_back(u);
      ref_step(r, u, par);
      exp_sys.push_back(u);
      if (ref_keep(i, n, 0, rt)) begin exp_par.push_back(par); exp_pp.push_back(0); end
    end
    check(r == 0, "reference pass 0 not terminated");
    for (int i = 0; i < n0; i++) ref_step(r, 0, par);
    // Reference interleaver, closed form.
    seen = new[L];
    for (int q = 0; q < L; q++) begin
      c    = q % 7;
      rr   = q / 7;
      rows = (L - c + 6) / 7;
      src  = (c + rr * 67) % rows;
      p    = src * 7 + c;
      check(p < L && !seen[p], $sformatf("interleaver not a permutation at q=%0d", q));
      if (p < L) seen[p] = 1;
      check((q - p) % 7 == 0, "interleaver changes position mod 7");
      il.push_back(blk[p]);
    end
    for (int q = 0; q < L; q++) begin
      ref_step(r, il[q], par);
      if (ref_keep(q, n, 1, rt)) begin exp_par.push_back(par); exp_pp.push_back(1); end
    end
    check(r == 0, "reference pass 1 not terminated");

    // Drive the DUT.
    if (!back_to_back) @(negedge clk);
    start = 1; blk_len = NW'(n); rate = rt;
    @(negedge clk);
    start = 0;
    cycles = 1;
    for (int i = 0; i < n; ) begin
      in_valid = ($urandom_range(99) >= stall_pct);
      in_bit   = d[i];
      @(posedge clk);
      if (in_valid && in_ready) i++;
      @(negedge clk);
      cycles++;
    end
    in_valid = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check(term_ok, "term_ok low at done");
    if (stall_pct == 0)
      check(cycles == n + 3 + n0 + n + 3 + 1,
            $sformatf("cycle count %0d, expected %0d", cycles, 2 * L + n0 + 1));
    // Compare the streams.
    check(got_sys.size() == L, $sformatf("X has %0d bits, expected %0d", got_sys.size(), L));
    check(got_par.size() == exp_par.size(),
          $sformatf("Y has %0d bits, expected %0d", got_par.size(), exp_par.size()));
    for (int i = 0; i < L && i < got_sys.size(); i++)
      check(got_sys[i] == exp_sys[i], $sformatf("X bit %0d", i));
    for (int i = 0; i < exp_par.size() && i < got_par.size(); i++) begin
      check(got_par[i] == exp_par[i], $sformatf("Y bit %0d", i));
      check(got_pp[i] == exp_pp[i], $sformatf("Y pass flag %0d", i));
    end
    if (n == 440) begin
      check(L + got_par.size() == ((rt == RATE_1_2) ? 883 : 619), "coded block size");
      n_full++;
    end
    if (n0 > 0) n_zero_pad++; else n_no_pad++;
    if (rt == RATE_1_2) n_rate12++; else n_rate57++;
    if (back_to_back) n_b2b++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // An illegal length is ignored.
    start = 1; blk_len = '0;
    @(negedge clk);
    start = 0;
    check(!busy, "zero-length start accepted");
    start = 1; blk_len = NW'(NMAX + 1);
    @(negedge clk);
    start = 0;
    check(!busy, "oversized start accepted");
    n_illegal++;

    run_block(440, RATE_1_2, 0, 0);
    run_block(440, RATE_5_7, 0, 0);
    run_block(438, RATE_1_2, 0, 0);     // 441 = 63 * 7: no padding
    run_block(4,   RATE_5_7, 30, 0);    // 7: no padding, with stalls
    run_block(1,   RATE_1_2, 0, 1);
    run_block(100, RATE_5_7, 40, 1);
    for (int b = 0; b < 12; b++)
      run_block(int'($urandom_range(NMAX, 1)), rate_e'(b % 2), (b % 3) * 20, b % 2);

    check(n_stall > 0,    "no input stall happened");
    check(n_zero_pad > 0, "no block needed zero padding");
    check(n_no_pad > 0,   "no block without zero padding");
    check(n_rate12 > 0,   "rate 1/2 never used");
    check(n_rate57 > 0,   "rate 5/7 never used");
    check(n_b2b > 0,      "no back-to-back block");
    check(n_illegal > 0,  "no illegal start");
    check(n_full > 0,     "no full-size block");
    $display("mechanisms: stall_cycles=%0d zero_pad=%0d no_pad=%0d rate12=%0d rate57=%0d b2b=%0d illegal=%0d full=%0d",
             n_stall, n_zero_pad, n_no_pad, n_rate12, n_rate57, n_b2b, n_illegal, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
