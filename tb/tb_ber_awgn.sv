// tb_ber_awgn: bit-error-rate run of the coding scheme over an AWGN channel
// with BPSK, for the two reference configurations: N = 440 at rate 1/2
// (883-bit blocks) and at rate 5/7 (619-bit blocks), both trellises
// terminated, two decoder iterations.
//
// For each Eb/N0 point it encodes BLOCKS random blocks, adds Gaussian noise
// (Box-Muller) with variance 1/(2 R Eb/N0), R being the block's true rate
// 440/883 or 440/619, quantises the received value y to the 6-bit soft value
// round(8*y) clipped to +-31, decodes and counts bit errors. It prints the BER
// table and checks that the BER falls as Eb/N0 rises, that the highest point
// of each rate is below 1e-2, and that every decoded block returns to the
// zero state at the encoder. Short runs give coarse estimates only.
module tb_ber_awgn;
  import turbo_pkg::*;

  localparam int NW     = 9;
  localparam int N      = 440;
  localparam int BLOCKS = 12;

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
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tx[$];
  always @(posedge clk) begin
    if (enc_sys_valid) tx.push_back(enc_sys_bit);
    if (enc_par_valid) tx.push_back(enc_par_bit);
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1))) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Encode, transmit and decode one block; returns the bit errors.
  task automatic one_block(input rate_e rt, input real sigma, output int errs);
    bit d[N];
    real y;
    int v;
    for (int i = 0; i < N; i++) d[i] = 1'($urandom);
    tx.delete();
    @(negedge clk);
    enc_start = 1; enc_blk_len = NW'(N); enc_rate = rt;
    @(negedge clk);
    enc_start = 0;
    enc_in_valid = 1;
    for (int i = 0; i < N; i++) begin
      enc_in_bit = d[i];
      @(negedge clk);
    end
    enc_in_valid = 0;
    while (!enc_done) @(negedge clk);
    check(enc_term_ok, "encoder not terminated");
    dec_start = 1; dec_blk_len = NW'(N); dec_rate = rt;
    @(negedge clk);
    dec_start = 0;
    dec_rx_valid = 1;
    for (int i = 0; i < tx.size(); ) begin
      y = (tx[i] ? 1.0 : -1.0) + sigma * gauss();
      v = int'(8.0 * y);
      if (v > 31) v = 31;
      if (v < -31) v = -31;
      dec_rx_llr = 6'(v);
      @(posedge clk);
      if (dec_rx_ready) i++;
      @(negedge clk);
    end
    dec_rx_valid = 0;
    while (!dec_done) @(negedge clk);
    errs = 0;
    for (int i = 0; i < N; i++) begin
      dec_idx = NW'(i);
      #1;
      if (dec_bit != d[i]) errs++;
    end
  endtask

  task automatic sweep(input rate_e rt, input real ebn0_db[3]);
    real rate_true, sigma, ber[3];
    int errs, total;
    rate_true = (rt == RATE_1_2) ? 440.0 / 883.0 : 440.0 / 619.0;
    for (int p = 0; p < 3; p++) begin
      sigma = $sqrt(1.0 / (2.0 * rate_true * $pow(10.0, ebn0_db[p] / 10.0)));
      total = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        one_block(rt, sigma, errs);
        total += errs;
      end
      ber[p] = real'(total) / real'(BLOCKS * N);
      $display("rate %s  Eb/N0 %4.1f dB  bits %0d  errors %0d  BER %e",
               (rt == RATE_1_2) ? "1/2" : "5/7", ebn0_db[p], BLOCKS * N, total, ber[p]);
    end
    check(ber[2] <= ber[0], "BER does not fall with Eb/N0");
    check(ber[0] > 0.0, "no errors at the lowest Eb/N0: the channel model is too weak");
    check(ber[2] < 1.0e-2, $sformatf("BER %e at the highest Eb/N0", ber[2]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    sweep(RATE_1_2, '{0.5, 1.5, 3.0});
    sweep(RATE_5_7, '{1.0, 2.5, 4.0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
