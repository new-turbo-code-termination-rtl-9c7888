// tb_rsc_encoder: checks the {13,15} RSC encoder against a reference written
// as the two recursions a(k) = u(k) + a(k-2) + a(k-3) and
// y(k) = a(k) + a(k-1) + a(k-3) (mod 2). It also checks the reset-polynomial
// property the termination relies on: from the zero state, the inputs
// 1 + D^7 and 1 + D^14 bring the encoder back to zero, 1 + D^5 does not, and
// that clr and a low enable behave.
module tb_rsc_encoder;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, u = 0;
  logic y;
  logic [2:0] state;

  rsc_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit a_hist[$];   // a(k-1), a(k-2), ... at the front

  function automatic bit hist(int i);
    return (i < a_hist.size()) ? a_hist[i] : 1'b0;
  endfunction

  task automatic step(input bit ub, input bit ena);
    bit a, ye;
    a  = ub ^ hist(1) ^ hist(2);
    ye = a ^ hist(0) ^ hist(2);
    u = ub; en = ena;
    #1;
    check(y == ye, "parity");
    @(negedge clk);
    if (ena) a_hist.push_front(a);
    check(state == {hist(2), hist(1), hist(0)}, "state");
  endtask

  task automatic impulse_pair(input int gap, input bit expect_zero);
    clr = 1; @(negedge clk); clr = 0; a_hist.delete();
    check(state == 3'b000, "clr");
    for (int k = 0; k <= gap; k++) step((k == 0 || k == gap), 1);
    check((state == 3'b000) == expect_zero, $sformatf("1 + D^%0d termination", gap));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 300; k++) step(1'($urandom), ($urandom_range(3) != 0));
    impulse_pair(7, 1);
    impulse_pair(14, 1);
    impulse_pair(5, 0);
    impulse_pair(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
