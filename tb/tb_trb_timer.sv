// tb_trb_timer: checks the TRB timer against a counted expectation.
// For random reload values and random gaps in `enable`, it counts the enabled
// cycles after each load and checks that `expired` rises exactly on the
// enabled cycle whose number equals the reload value (a zero reload counts as
// one), never earlier, and that a new load restarts the count.
module tb_trb_timer;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, enable, expired;
  logic [W-1:0] reload_value, count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trb_timer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned v, n;
    load = 0; enable = 0; reload_value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      v = (t % 17 == 0) ? 0 : $urandom_range(1, 40);
      @(negedge clk);
      load = 1; enable = 0; reload_value = W'(v);
      @(negedge clk);
      load = 0;
      n = 0;
      // Run until expiry; enable has random gaps.
      while (1) begin
        enable = ($urandom_range(0, 3) != 0);
        #1;
        if (enable) begin
          n++;
          checks++;
          if (expired !== (n == ((v == 0) ? 1 : v))) begin
            failures++;
            $display("FAIL reload=%0d enabled cycle %0d expired=%0b", v, n, expired);
          end
          if (expired) break;
        end else begin
          checks++;
          if (expired) begin failures++; $display("FAIL expired without enable"); end
        end
        if (n > 300) break;
        @(negedge clk);
      end
      @(negedge clk);
      enable = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
