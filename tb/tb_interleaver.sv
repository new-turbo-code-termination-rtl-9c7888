// tb_interleaver: writes blocks of random bits of many lengths (1 .. 443) into
// the interleaver and reads them back. Each read is compared with the closed
// form of the permutation, q -> p = 7*((c + r*67) mod R_c) + c with c = q mod 7,
// r = q div 7 and R_c the number of positions p < L with p = c (mod 7). The
// testbench also checks on its own that the order read is a permutation and
// that every bit keeps its position modulo 7.
module tb_interleaver;
  localparam int LMAX = 443;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, wr_bit = 0, rd_en = 0;
  logic rd_bit;
  logic [8:0] rd_addr;

  interleaver dut (.*);

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

  task automatic run(input int L);
    bit d[];
    bit seen[];
    int c, r, rows, p;
    d = new[L];
    seen = new[L];
    clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < L; i++) begin
      d[i] = 1'($urandom);
      wr_en = 1; wr_bit = d[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int q = 0; q < L; q++) begin
      c = q % 7; r = q / 7;
      rows = (L - c + 6) / 7;
      p = 7 * ((c + r * 67) % rows) + c;
      rd_en = 1;
      #1;
      check(int'(rd_addr) == p, $sformatf("L=%0d q=%0d addr %0d expected %0d", L, q, rd_addr, p));
      check(rd_addr < L && !seen[rd_addr], "not a permutation");
      if (rd_addr < L) begin
        seen[rd_addr] = 1;
        check(rd_bit == d[rd_addr], $sformatf("data L=%0d q=%0d", L, q));
      end
      check((q - int'(rd_addr)) % 7 == 0, "position mod 7 changed");
      @(negedge clk);
    end
    rd_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int L = 1; L <= 20; L++) run(L);
    run(443); run(441); run(442); run(100); run(436);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
