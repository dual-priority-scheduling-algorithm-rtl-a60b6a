// tb_prio_select: exhaustive check of the priority dispatcher.
// For every queue mask it compares the chosen task with the smallest task
// number found by a separate scan (task 0 is the highest priority).
module tb_prio_select;
  localparam int N = 5;
  logic [N-1:0] mask;
  logic valid;
  logic [2:0] id;
  int checks = 0, failures = 0;

  prio_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    for (int m = 0; m < (1 << N); m++) begin
      mask = N'(m);
      #1;
      best = -1;
      for (int i = 0; i < N; i++) if (best < 0 && ((m >> i) & 1) == 1) best = i;
      checks++;
      if (valid !== (best >= 0) || (best >= 0 && int'(id) != best)) begin
        failures++;
        $display("FAIL mask=%b valid=%0b id=%0d expected %0d", mask, valid, id, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
