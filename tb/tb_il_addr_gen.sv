// tb_il_addr_gen: checks the interleaver address sequence for every block
// length 1 .. 443 against the closed form p = 7*((c + r*67) mod R_c) + c, and
// independently that each sequence is a permutation of 0 .. L-1 that keeps
// every position modulo 7.
module tb_il_addr_gen;
  logic clk = 0, rst_n = 0, clr = 0, adv = 0;
  logic [6:0] rows;
  logic [2:0] cols;
  logic [8:0] addr;

  il_addr_gen dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int L = 1; L <= 443; L++) begin
      bit seen[];
      seen = new[L];
      rows = 7'(L / 7); cols = 3'(L % 7);
      clr = 1; @(negedge clk); clr = 0;
      for (int q = 0; q < L; q++) begin
        int c, r, R, p;
        c = q % 7; r = q / 7; R = (L - c + 6) / 7;
        p = 7 * ((c + r * 67) % R) + c;
        adv = 1;
        #1;
        check(int'(addr) == p, $sformatf("L=%0d q=%0d addr=%0d expected %0d", L, q, addr, p));
        check(addr < L && !seen[addr] && (q - int'(addr)) % 7 == 0, "permutation / residue");
        if (addr < L) seen[addr] = 1;
        @(negedge clk);
      end
      adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
