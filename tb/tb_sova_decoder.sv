// tb_sova_decoder: checks the SOVA decoder on terminated blocks of the {13,15}
// code. Short blocks (9 data + 3 tail bits) are compared with an exhaustive
// search over all 512 terminated input sequences: the hard decisions must be
// the maximum-likelihood sequence, and every soft output must carry the
// decision's sign and a magnitude at least the max-log value (the SOVA
// reliability bounds the max-log one from above). Long blocks (up to 448
// steps) are checked noiseless (all bits right) and with noise against a
// reference Viterbi search written here. The cycle count of each run is checked
// against the bound 3K + K*U_OBS.
module tb_sova_decoder;
  localparam int KMAX = 448;
  logic clk = 0, rst_n = 0, start = 0;
  logic [8:0] k_len = '0, in_idx, out_idx;
  logic signed [7:0] in_sys, in_par, in_apr, out_llr;
  logic out_valid, out_bit, busy, done;

  sova_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_err_channel = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sys_v[KMAX], par_v[KMAX], apr_v[KMAX];
  bit data[KMAX];
  bit got_bit[KMAX];
  int got_llr[KMAX];

  always_comb begin
    in_sys = 8'(sys_v[in_idx]);
    in_par = 8'(par_v[in_idx]);
    in_apr = 8'(apr_v[in_idx]);
  end

  always @(posedge clk) if (out_valid) begin
    got_bit[out_idx] <= out_bit;
    got_llr[out_idx] <= int'(out_llr);
  end

  // Reference encoder step: r[1] newest.
  function automatic void enc(inout bit [3:1] r, input bit u, output bit p);
    bit fb;
    fb = u ^ r[2] ^ r[3];
    p  = fb ^ r[1] ^ r[3];
    r  = {r[2], r[1], fb};
  endfunction

  // Encode data[0..nd-1] plus 3 tail bits and make soft values.
  task automatic make_block(input int nd, input int amp, input int noise);
    bit [3:1] r;
    bit p, u;
    r = 0;
    for (int k = 0; k < nd + 3; k++) begin
      u = (k < nd) ? data[k] : (r[2] ^ r[3]);
      data[k] = u;
      enc(r, u, p);
      sys_v[k] = (u ? amp : -amp) + (noise ? $urandom_range(2 * noise) - noise : 0);
      par_v[k] = (p ? amp : -amp) + (noise ? $urandom_range(2 * noise) - noise : 0);
      apr_v[k] = 0;
      if ((sys_v[k] > 0) != u) n_err_channel++;
    end
    check(r == 0, "reference tail");
  endtask

  function automatic int path_metric(bit [3:1] r0, int k, bit u);
    bit [3:1] r;
    bit p;
    r = r0;
    enc(r, u, p);
    return (u ? 1 : -1) * (sys_v[k] + apr_v[k]) + (p ? 1 : -1) * par_v[k];
  endfunction

  task automatic run_dut(input int K);
    int cycles;
    k_len = 9'(K);
    start = 1; @(negedge clk); start = 0;
    cycles = 0;
    while (!done && cycles < 3 * K + K * 56 + 10) begin @(negedge clk); cycles++; end
    check(done, $sformatf("no done within %0d cycles", cycles));
    check(cycles >= 3 * K, "finished faster than three passes");
  endtask

  // Exhaustive max-log reference for short blocks.
  task automatic short_block(input int noise);
    int nd, K, best, b1[12], b0[12], met;
    bit [3:1] r;
    bit seq[12], bestseq[12];
    nd = 9; K = 12;
    for (int i = 0; i < nd; i++) data[i] = 1'($urandom);
    make_block(nd, 6, noise);
    for (int j = 0; j < K; j++) begin b1[j] = -1000000; b0[j] = -1000000; end
    best = -1000000;
    for (int v = 0; v < (1 << nd); v++) begin
      r = 0; met = 0;
      for (int k = 0; k < K; k++) begin
        bit u, p;
        u = (k < nd) ? 1'((v >> k) & 1) : (r[2] ^ r[3]);
        seq[k] = u;
        met += path_metric(r, k, u);
        enc(r, u, p);
      end
      for (int j = 0; j < K; j++)
        if (seq[j]) begin if (met > b1[j]) b1[j] = met; end
        else        begin if (met > b0[j]) b0[j] = met; end
      if (met > best) begin best = met; bestseq = seq; end
    end
    run_dut(K);
    for (int j = 0; j < K; j++) begin
      int d, lim;
      d = b1[j] - b0[j];
      if (d < 0) d = -d;
      if (d > 511) d = 511;
      lim = d >> 1;
      if (lim > 127) lim = 127;
      if (b1[j] != b0[j]) begin
        check(got_bit[j] == bestseq[j], $sformatf("short block bit %0d not ML", j));
        check((got_llr[j] > 0) == got_bit[j], "soft sign");
        check((got_llr[j] < 0 ? -got_llr[j] : got_llr[j]) >= lim,
              $sformatf("bit %0d |L|=%0d below max-log %0d", j, got_llr[j], lim));
      end
    end
  endtask

  // Reference Viterbi for long blocks (start and end in state 0).
  task automatic viterbi_ref(input int K, output bit dec[KMAX]);
    int pm[8], npm[8];
    bit [2:0] pred[KMAX][8];
    bit inb[KMAX][8];
    for (int s = 0; s < 8; s++) pm[s] = (s == 0) ? 0 : -100000;
    for (int k = 0; k < K; k++) begin
      for (int s = 0; s < 8; s++) npm[s] = -1000000;
      for (int s = 0; s < 8; s++) for (int u = 0; u < 2; u++) begin
        bit [3:1] r;
        bit p;
        int m, ns;
        r = 3'(s);
        m = pm[s] + path_metric(r, k, 1'(u));
        enc(r, 1'(u), p);
        ns = int'(r);
        if (m > npm[ns]) begin npm[ns] = m; pred[k][ns] = 3'(s); inb[k][ns] = 1'(u); end
      end
      pm = npm;
    end
    begin
      int s;
      s = 0;
      for (int k = K - 1; k >= 0; k--) begin dec[k] = inb[k][s]; s = int'(pred[k][s]); end
    end
  endtask

  task automatic long_block(input int nd, input int noise);
    bit ref_dec[KMAX];
    int K;
    K = nd + 3;
    for (int i = 0; i < nd; i++) data[i] = 1'($urandom);
    make_block(nd, 8, noise);
    viterbi_ref(K, ref_dec);
    run_dut(K);
    for (int k = 0; k < K; k++) begin
      if (noise == 0) check(got_bit[k] == data[k], $sformatf("noiseless bit %0d", k));
      check(got_bit[k] == ref_dec[k], $sformatf("K=%0d bit %0d differs from reference Viterbi", K, k));
      check((got_llr[k] > 0) == got_bit[k], "soft sign (long)");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 6; t++) short_block(t < 2 ? 0 : 9);
    long_block(445, 0);
    long_block(445, 11);
    long_block(100, 12);
    check(n_err_channel > 0, "no channel errors were injected");
    $display("channel sign errors injected: %0d", n_err_channel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
