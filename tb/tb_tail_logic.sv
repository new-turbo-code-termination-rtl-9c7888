// tb_tail_logic: for each of the 8 encoder states, follows three steps of the
// {13,15} recursion driven by the tail bit the block produces and checks that
// the encoder reaches the zero state, and that each tail bit is the one that
// makes the feedback 1 + D^2 + D^3 zero.
module tb_tail_logic;
  logic [2:0] state;
  logic tail_bit;

  tail_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s0 = 0; s0 < 8; s0++) begin
      bit [2:0] s;
      s = 3'(s0);
      for (int k = 0; k < 3; k++) begin
        bit fb;
        state = s;
        #1;
        fb = tail_bit ^ s[1] ^ s[2];      // a = u + a(k-2) + a(k-3)
        check(fb == 1'b0, $sformatf("feedback not zero in state %0d", s));
        s = {s[1:0], fb};
      end
      check(s == 3'b000, $sformatf("state %0d not terminated", s0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
