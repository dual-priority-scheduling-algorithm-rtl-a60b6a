// tb_periodic_tasks: five periodic tasks on the scheduler, default sizes.
//
// Task i is activated every PERIOD[i] cycles and its job needs JOB[i] cycles
// of execution; shorter periods have higher priority, and the load (about
// 60 % including switch overhead) leaves room for every job. A pipeline
// stand-in executes the running task and signals the end of its job. The
// testbench checks that:
//   - no activation is lost (a task is never still busy with its previous job
//     when its next activation arrives) and every job completes;
//   - the TRB, set well above every job, never expires;
//   - task 0, the highest priority, starts executing 5 cycles after its event
//     when no switch is under way, and at most 4 cycles later when one is
//     (a switch in progress is not interrupted).
// It prints the measured minimum and maximum latency of task 0.
module tb_periodic_tasks;
  import nmpra_pkg::*;
  localparam int N = 5;
  localparam int PERIOD [N] = '{60, 90, 150, 210, 330};
  localparam int JOB    [N] = '{6, 8, 10, 12, 15};
  localparam int OFFSET [N] = '{7, 3, 11, 0, 5};
  localparam int CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] event_i;
  logic bus_sel, bus_we;
  logic [1:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic task_finished_i, pc_we_i, run_o;
  logic [31:0] pc_next_i, fetch_pc_o;
  logic [2:0] processactive_o, sched_task_o;
  logic [N-1:0] stall_o, resetstall_o, startagain_o, ready_o;
  sched_state_e state_o;
  logic [N-1:0] atq_o, itq_o, ltq_o, lowpower_o;
  logic sched_task_valid_o;
  logic [15:0] trb_count_o;
  logic ev_preempt_o, ev_expire_o, ev_finish_o, ev_dispatch_o;
  task_src_e ev_src_o;
  logic [N-1:0][31:0] task_pc_o;
  logic [4:0] rf_ra1, rf_ra2, rf_wa;
  logic [31:0] rf_rd1, rf_rd2, rf_wd;
  logic rf_we;
  logic [2:0] rf_wbank;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nmpra_sched_top dut (.*);

  initial begin
    repeat (CYCLES + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int job_left [N];
  int n_act [N], n_done [N], n_lost, n_expire, n_preempt;
  int lat0_min = 1 << 30, lat0_max = 0, n_lat0 = 0;
  int ev0_cyc;
  bit ev0_pend;

  initial begin
    bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    event_i = '0; task_finished_i = 0; pc_we_i = 0; pc_next_i = '0;
    rf_ra1 = '0; rf_ra2 = '0; rf_we = 0; rf_wa = '0; rf_wd = '0; rf_wbank = '0;
    n_lost = 0; n_expire = 0; n_preempt = 0; ev0_pend = 0;
    for (int i = 0; i < N; i++) begin job_left[i] = 0; n_act[i] = 0; n_done[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // TRB time stamp well above every job.
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = 2'd0; bus_wdata = 32'd200;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
    for (int c = 0; c < CYCLES + 500; c++) begin
      // Stimulus and pipeline stand-in, applied at the falling edge.
      for (int i = 0; i < N; i++) begin
        event_i[i] = (c < CYCLES) && (c % PERIOD[i] == OFFSET[i]);
        if (event_i[i]) begin
          if (ready_o[i]) n_lost++;
          else begin n_act[i]++; job_left[i] = JOB[i]; end
        end
      end
      if (event_i[0] && !ready_o[0]) begin ev0_pend = 1; ev0_cyc = c; end
      pc_we_i = run_o; pc_next_i = fetch_pc_o + 32'd4;
      task_finished_i = run_o && job_left[processactive_o] == 1;
      #1;
      if (run_o) begin
        if (processactive_o == 3'd0 && ev0_pend) begin
          ev0_pend = 0;
          if (c - ev0_cyc < lat0_min) lat0_min = c - ev0_cyc;
          if (c - ev0_cyc > lat0_max) lat0_max = c - ev0_cyc;
          n_lat0++;
        end
        if (job_left[processactive_o] > 0) job_left[processactive_o]--;
        if (task_finished_i) n_done[processactive_o]++;
      end
      if (ev_expire_o) n_expire++;
      if (ev_preempt_o) n_preempt++;
      @(negedge clk);
    end
    $display("task0 latency: min=%0d max=%0d cycles over %0d jobs; preemptions=%0d lost=%0d expiries=%0d",
             lat0_min, lat0_max, n_lat0, n_preempt, n_lost, n_expire);
    for (int i = 0; i < N; i++) begin
      $display("task%0d: activations=%0d completed=%0d", i, n_act[i], n_done[i]);
      chk(n_act[i] > 0 && n_done[i] == n_act[i], "every job of the task completed");
    end
    chk(n_lost == 0, "no activation lost");
    chk(n_expire == 0, "TRB never expired");
    chk(n_preempt > 0, "preemption happened");
    chk(n_lat0 > 0 && lat0_min == SWITCH_CYCLES, "task 0 starts five cycles after its event");
    chk(lat0_max <= SWITCH_CYCLES + 4, "task 0 waits at most for one switch in progress");
    chk(ready_o == '0, "all tasks idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
