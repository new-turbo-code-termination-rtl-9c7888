// tb_turbo_codec: end-to-end test of the coding scheme at its default size.
//
// Blocks of random information bits go through the encoder. The testbench
// collects X and Y in the order they appear, maps every bit to a soft value
// (+A for 1, -A for 0) plus approximately Gaussian noise (a sum of four
// uniform variables), clips it to the 6-bit channel range, and feeds the
// decoder, sometimes with gaps in rx_valid. The decoded bits must equal the
// information bits. It checks the coded block sizes of the reference
// configuration (883 bits at rate 1/2 and 619 at rate 5/7 for N = 440), that
// the encoder ends every block in the zero state, and counts how often each
// mechanism occurred: zero padding, no padding, both rates, input and receive
// stalls, both decoder iterations, and channel errors that the decoder
// corrected. A mechanism that never occurred counts as a failure.
module tb_turbo_codec;
  import turbo_pkg::*;

  localparam int NW = 9;

  logic clk = 0, rst_n = 0;
  logic enc_start = 0, enc_in_valid = 0, enc_in_bit = 0;
  logic [NW-1:0] enc_blk_len = '0, dec_blk_len = '0, dec_idx = '0;
  rate_e enc_rate = RATE_1_2, dec_rate = RATE_1_2;
  logic enc_in_ready, enc_busy, enc_sys_valid, enc_sys_bit, enc_par_valid, enc_par_bit;
  logic enc_par_pass, enc_done, enc_term_ok;
  phase_e enc_phase;
  logic dec_start = 0, dec_rx_valid = 0;
  logic signed [5:0] dec_rx_llr = '0;
  logic dec_rx_ready, dec_busy, dec_done, dec_bit;
  logic [1:0] dec_iter;

  turbo_codec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pad = 0, n_nopad = 0, n_r12 = 0, n_r57 = 0, n_in_stall = 0, n_rx_stall = 0;
  int n_iter2 = 0, n_corrected = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tx[$];
  always @(posedge clk) begin
    if (enc_sys_valid) tx.push_back(enc_sys_bit);
    if (enc_par_valid) tx.push_back(enc_par_bit);
    if (dec_iter == 2'd1) n_iter2++;
  end

  function automatic int noise(int sigma4);
    // sum of four uniforms in [-sigma4, sigma4]: mean 0, sigma about 1.15*sigma4
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(2 * sigma4)) - sigma4;
    return s / 2;
  endfunction

  task automatic run_block(input int n, input rate_e rt, input int amp, input int sig,
                           input int stall_pct);
    bit d[$];
    int chan_err, dec_err, v, guard, expect_len;
    for (int i = 0; i < n; i++) d.push_back(1'($urandom));
    tx.delete();
    // Encode.
    @(negedge clk);
    enc_start = 1; enc_blk_len = NW'(n); enc_rate = rt;
    @(negedge clk);
    enc_start = 0;
    for (int i = 0; i < n; ) begin
      enc_in_valid = ($urandom_range(99) >= stall_pct);
      enc_in_bit   = d[i];
      if (!enc_in_valid) n_in_stall++;
      @(posedge clk);
      if (enc_in_valid && enc_in_ready) i++;
      @(negedge clk);
    end
    enc_in_valid = 0;
    while (!enc_done) @(negedge clk);
    check(enc_term_ok, "encoder not terminated");
    expect_len = n + 3 + ((rt == RATE_1_2) ? n : (n / 5) * 2 + ((n % 5) > 0) + ((n % 5) > 2));
    check(tx.size() == expect_len, $sformatf("coded size %0d expected %0d", tx.size(), expect_len));
    if (n == 440) begin
      check(tx.size() == ((rt == RATE_1_2) ? 883 : 619), "reference block size");
      n_full++;
    end
    // Channel and decoder.
    dec_start = 1; dec_blk_len = NW'(n); dec_rate = rt;
    @(negedge clk);
    dec_start = 0;
    chan_err = 0;
    for (int i = 0; i < tx.size(); ) begin
      dec_rx_valid = ($urandom_range(99) >= stall_pct);
      v = (tx[i] ? amp : -amp) + ((sig > 0) ? noise(sig) : 0);
      if (v > 31) v = 31;
      if (v < -31) v = -31;
      dec_rx_llr = 6'(v);
      if (!dec_rx_valid) n_rx_stall++;
      @(posedge clk);
      if (dec_rx_valid && dec_rx_ready) begin
        if ((v > 0) != tx[i]) chan_err++;
        i++;
      end
      @(negedge clk);
    end
    dec_rx_valid = 0;
    guard = 0;
    while (!dec_done && guard < 400000) begin @(negedge clk); guard++; end
    check(dec_done, "decoder did not finish");
    dec_err = 0;
    for (int i = 0; i < n; i++) begin
      dec_idx = NW'(i);
      #1;
      if (dec_bit != d[i]) dec_err++;
    end
    check(dec_err == 0, $sformatf("N=%0d rate=%0d: %0d decoded errors (%0d channel errors)",
                                  n, rt, dec_err, chan_err));
    if (dec_err == 0) n_corrected += chan_err;
    $display("block N=%0d rate=%s sigma=%0d: channel errors %0d, decoded errors %0d, decode cycles %0d",
             n, (rt == RATE_1_2) ? "1/2" : "5/7", sig, chan_err, dec_err, guard);
    if ((7 - (n + 3) % 7) % 7 > 0) n_pad++; else n_nopad++;
    if (rt == RATE_1_2) n_r12++; else n_r57++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(440, RATE_1_2, 12, 0, 0);
    run_block(440, RATE_1_2, 10, 10, 10);
    run_block(440, RATE_5_7, 12, 8, 0);
    run_block(438, RATE_1_2, 10, 10, 20);
    run_block(53, RATE_5_7, 12, 8, 0);
    run_block(1, RATE_1_2, 12, 0, 0);
    check(n_pad > 0 && n_nopad > 0, "padding / no padding both seen");
    check(n_r12 > 0 && n_r57 > 0, "both rates seen");
    check(n_in_stall > 0 && n_rx_stall > 0, "stalls seen");
    check(n_iter2 > 0, "second iteration never ran");
    check(n_corrected > 0, "no channel error was corrected");
    check(n_full > 0, "no full-size block");
    $display("mechanisms: pad=%0d nopad=%0d rate12=%0d rate57=%0d in_stall=%0d rx_stall=%0d iter2_cycles=%0d corrected=%0d",
             n_pad, n_nopad, n_r12, n_r57, n_in_stall, n_rx_stall, n_iter2, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
