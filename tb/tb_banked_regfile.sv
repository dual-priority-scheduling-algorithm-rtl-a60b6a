// tb_banked_regfile: random check of the per-task register banks against a
// two-dimensional model array. Writes go to random banks and registers; reads
// come from random banks. It checks bank isolation, register 0 reading as
// zero, and the write-through read of a register written in the same cycle.
module tb_banked_regfile;
  localparam int N = 5, W = 32, NR = 32;
  logic clk = 1'b0;
  logic [2:0] rbank, wbank;
  logic [4:0] ra1, ra2, wa;
  logic [W-1:0] rd1, rd2, wd;
  logic we;
  int checks = 0, failures = 0;
  logic [W-1:0] m [N][NR];

  always #5 clk = ~clk;

  banked_regfile dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expect_rd(input int a);
    if (a == 0) return '0;
    if (we && wbank == rbank && int'(wa) == a) return wd;
    return m[rbank][a];
  endfunction

  initial begin
    // Fill every register of every bank first.
    for (int b = 0; b < N; b++)
      for (int r = 0; r < NR; r++) begin
        @(negedge clk);
        we = 1; wbank = 3'(b); wa = 5'(r); wd = $urandom; rbank = '0; ra1 = '0; ra2 = '0;
        m[b][r] = (r == 0) ? '0 : wd;
      end
    @(negedge clk);
    for (int t = 0; t < 20000; t++) begin
      we = 1'($urandom); wbank = 3'($urandom_range(0, N - 1)); wa = 5'($urandom); wd = $urandom;
      rbank = 3'($urandom_range(0, N - 1));
      ra1 = 5'($urandom); ra2 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(int'(ra1))) begin failures++; $display("FAIL rd1 b%0d r%0d", rbank, ra1); end
      if (rd2 !== expect_rd(int'(ra2))) begin failures++; $display("FAIL rd2 b%0d r%0d", rbank, ra2); end
      @(negedge clk);
      if (we && wa != 0) m[wbank][wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
