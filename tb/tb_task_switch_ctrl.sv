// tb_task_switch_ctrl: checks the task-switch sequence cycle by cycle.
// For random old/new task pairs (and switches to no task) it issues a request
// in cycle t0 and checks: stall of the old task alone in t0+1; busy through
// the sequence; processactive = new task from t0+3; resetstall and startagain
// of the new task alone in t0+4; run from t0+5, i.e. a switch of five
// cycles; the low-power flags; and that requests during a switch are ignored.
module tb_task_switch_ctrl;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req, prev_valid, next_valid, busy, run;
  logic [2:0] prev_id, next_id, processactive;
  logic [N-1:0] stall, resetstall, startagain, lowpower;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task_switch_ctrl dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [2:0] cur, nxt, old_active;
    bit cur_v, nv;
    logic [N-1:0] lp;
    int lat;
    req = 0; prev_valid = 0; prev_id = '0; next_valid = 0; next_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(lowpower == '1 && !run && !busy, "reset state");
    cur_v = 0; cur = '0; lp = '1; old_active = '0;
    for (int t = 0; t < 500; t++) begin
      nv  = ($urandom_range(0, 5) != 0);
      nxt = 3'($urandom_range(0, N - 1));
      // cycle t0
      req = 1; prev_valid = cur_v; prev_id = cur; next_valid = nv; next_id = nxt;
      #1;
      chk(!busy, "idle before request");
      @(negedge clk);  // t0+1
      req = ($urandom_range(0, 1) == 1);  // must be ignored while busy
      prev_id = 3'($urandom); next_id = 3'($urandom);
      chk(busy && !run, "busy in stall");
      chk(stall == (cur_v ? N'(1) << cur : '0), "stall of old task");
      chk(resetstall == '0 && startagain == '0, "no release in stall");
      chk(processactive == old_active, "processactive held in stall");
      if (cur_v) lp[cur] = 1'b1;
      if (nv) begin
        @(negedge clk);  // t0+2
        chk(busy && stall == '0 && resetstall == '0, "wait cycle");
        chk(processactive == old_active, "processactive held in wait");
        chk(lowpower == lp, "old task in low power");
        @(negedge clk);  // t0+3
        chk(busy && processactive == nxt, "processactive selects new task");
        chk(resetstall == '0, "no release before select");
        @(negedge clk);  // t0+4
        chk(busy && resetstall == N'(1) << nxt && startagain == N'(1) << nxt,
            "resetstall+startagain of new task");
        chk(stall == '0, "no stall with release");
        req = 0;
        @(negedge clk);  // t0+5
        lp[nxt] = 1'b0;
        chk(!busy && run, "new task runs five cycles after the event");
        chk(lowpower == lp, "new task out of low power");
        old_active = nxt;
        cur = nxt; cur_v = 1;
      end else begin
        req = 0;
        @(negedge clk);  // t0+2
        chk(!busy && !run, "switch to no task ends after stall");
        chk(lowpower == lp, "low power after going idle");
        cur_v = 0;
      end
      // Let the task run a few cycles.
      req = 0;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        chk(run == cur_v && !busy, "steady run");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
