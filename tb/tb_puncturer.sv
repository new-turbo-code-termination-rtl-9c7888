// tb_puncturer: walks every position of both passes for several block lengths
// and both rates, compares keep with the puncturing rule, and checks the
// parity totals: N bits per block at rate 1/2 and 2N/5 at rate 5/7 (440 and
// 176 for N = 440, giving the 883- and 619-bit blocks).
module tb_puncturer;
  import turbo_pkg::*;
  rate_e rate;
  logic pass;
  logic [8:0] pos, n_len;
  logic keep;

  puncturer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens[4] = '{440, 1, 13, 200};
    foreach (lens[li]) begin
      for (int rt = 0; rt < 2; rt++) begin
        int total;
        total = 0;
        for (int ps = 0; ps < 2; ps++) begin
          for (int k = 0; k < lens[li] + 3; k++) begin
            bit e;
            rate = rate_e'(rt); pass = 1'(ps); pos = 9'(k); n_len = 9'(lens[li]);
            #1;
            if (k >= lens[li]) e = 0;
            else if (rt == 0) e = ((k & 1) == ps);
            else e = (k % 5) == (ps ? 2 : 0);
            check(keep == e, $sformatf("N=%0d rate=%0d pass=%0d pos=%0d", lens[li], rt, ps, k));
            total += int'(keep);
          end
        end
        if (lens[li] == 440)
          check(total == ((rt == 0) ? 440 : 176), $sformatf("parity total %0d", total));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
