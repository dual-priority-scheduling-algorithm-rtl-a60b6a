// tb_rr_select: exhaustive check of the round-robin dispatcher, plus a
// rotation check. For every mask and every `last` it compares the choice with
// the first member met when stepping upwards from last+1 modulo N. It then
// feeds the choice back as `last` and checks that a full mask is served in
// the order 0,1,2,3,4,0,...
module tb_rr_select;
  localparam int N = 5;
  logic [N-1:0] mask;
  logic [2:0] last, id;
  logic valid;
  int checks = 0, failures = 0;

  rr_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_id, k;
    for (int l = 0; l < N; l++) begin
      for (int m = 0; m < (1 << N); m++) begin
        mask = N'(m); last = 3'(l);
        #1;
        exp_id = -1;
        k = l;
        for (int s = 0; s < N; s++) begin
          k = (k + 1) % N;
          if (exp_id < 0 && ((m >> k) & 1) == 1) exp_id = k;
        end
        checks++;
        if (valid !== (exp_id >= 0) || (exp_id >= 0 && int'(id) != exp_id)) begin
          failures++;
          $display("FAIL mask=%b last=%0d id=%0d expected %0d", mask, last, id, exp_id);
        end
      end
    end
    mask = '1; last = 3'(N - 1);
    for (int s = 0; s < 12; s++) begin
      #1;
      checks++;
      if (int'(id) != s % N) begin
        failures++;
        $display("FAIL rotation step %0d id=%0d", s, id);
      end
      last = id;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
