// tb_nmpra_sched_top: end-to-end test of the scheduler and task-switch logic
// with every parameter at its default (five tasks).
//
// A stand-in for the pipeline executes the running task: each cycle it
// advances the task's PC by 4, increments register 1 in the task's own bank
// after checking that it still holds the task's last value, and raises
// task_finished on the last cycle of the task's job. A monitor checks every
// dispatch: stall of the old task one cycle after the event, processactive
// after three, resetstall and startagain after four, and the new task
// fetching from its own saved PC after five cycles (75 ns at a 15 ns clock).
//
// Directed scenarios:
//   S1  a task preempts a lower one and the lower one resumes from the ITQ
//       (the waveform example of the switch timing);
//   S2  all five tasks become active one after the other: four are
//       interrupted and then served by priority;
//   S3  priority inversion: a lower task activated as the higher one
//       finishes runs before the interrupted middle task;
//   S4  five never-ending tasks: TRB expiry moves them to the LTQ and they
//       are served round robin; then they finish and leave the LTQ;
//   S5  starvation: while the ATQ is kept busy the interrupted task waits;
//       it runs once the ATQ drains.
// The TRB time stamp and one activation are written over the bus, and the
// status registers are read back. Each mechanism is counted; one that never
// happened is a failure.
module tb_nmpra_sched_top;
  timeunit 1ns;
  timeprecision 100ps;
  import nmpra_pkg::*;
  localparam int N = 5;
  localparam realtime TCLK = 15ns;

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
  int n_preempt = 0, n_expire = 0, n_finish = 0, n_itq = 0, n_ltq = 0, n_idle = 0;
  int n_switch_timed = 0, n_inversion = 0, n_starved = 0, n_bus_act = 0, n_bus_trb = 0;
  int cyc = 0;

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nmpra_sched_top dut (.*);

  initial begin
    #(TCLK * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- pipeline stand-in ----------------
  int job_left [N];             // remaining work cycles, -1 = never ends
  logic [31:0] m_pc [N];        // expected saved PC of each task
  logic [31:0] m_r1 [N];        // expected register 1 of each bank
  always @(negedge clk) begin
    if (rst_n) begin
      int a;
      a = int'(processactive_o);
      rf_we = 1'b0; rf_ra1 = 5'd1; rf_ra2 = 5'd0; rf_wa = 5'd1; rf_wbank = processactive_o;
      pc_we_i = run_o; pc_next_i = fetch_pc_o + 32'd4;
      task_finished_i = run_o && (job_left[a] == 1);
      #0.1;
      if (run_o) begin
        chk(rf_rd1 == m_r1[a], "task's register bank intact");
        chk(fetch_pc_o == m_pc[a], "fetch PC follows the task's own PC");
        rf_wd = m_r1[a] + 32'd1;
        rf_we = 1'b1;
        m_r1[a] = rf_wd;
        m_pc[a] = pc_next_i;
        if (job_left[a] > 0) job_left[a]--;
      end
    end
  end

  // ---------------- switch monitor ----------------
  int log_q [$];                // dispatched tasks, in order
  bit pend;
  int t0, nxt, prev;
  bit prev_v;
  bit last_valid = 1'b0;
  realtime t_ev;
  // Samples late in each cycle, after all stimulus of the cycle has settled.
  always begin
    @(negedge clk);
    #(TCLK / 2 - 1ns);
    if (rst_n) begin
      if (pend) begin
        case (cyc - t0)
          1: begin
            nxt = int'(sched_task_o);
            chk(sched_task_valid_o, "dispatched task valid");
            chk(stall_o == (prev_v ? N'(1) << prev : '0), "stall one cycle after the event");
            log_q.push_back(nxt);
          end
          3: chk(int'(processactive_o) == nxt, "processactive three cycles after the event");
          4: chk(startagain_o == N'(1) << nxt && resetstall_o == N'(1) << nxt,
                 "resetstall/startagain four cycles after the event");
          5: begin
            chk(run_o && int'(processactive_o) == nxt, "new task executes five cycles after the event");
            chk(($realtime - t_ev) > 5 * TCLK - 0.01ns && ($realtime - t_ev) < 5 * TCLK + 0.01ns,
                "switch takes 75 ns");
            n_switch_timed++;
            pend = 0;
          end
          default: ;
        endcase
        if (cyc - t0 < 5) chk(!run_o, "no task executes during a switch");
      end
      if (ev_dispatch_o) begin
        pend = 1; t0 = cyc; t_ev = $realtime;
        prev_v = run_o; prev = int'(processactive_o);
        if (ev_src_o == SRC_ITQ) n_itq++;
        if (ev_src_o == SRC_LTQ) n_ltq++;
      end
      if (last_valid && !sched_task_valid_o) n_idle++;
      last_valid = sched_task_valid_o;
      if (ev_preempt_o) n_preempt++;
      if (ev_expire_o) n_expire++;
      if (ev_finish_o) n_finish++;
    end
  end

  // ---------------- helpers ----------------
  task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask
  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    #0.3 d = bus_rdata;
    bus_sel = 0;
  endtask
  task automatic pulse(input int t, input int job);
    job_left[t] = job;
    event_i[t] = 1'b1;
    @(negedge clk);
    event_i[t] = 1'b0;
  endtask
  task automatic wait_running(input int t);
    int guard = 0;
    do begin @(negedge clk); #0.3; guard++; end
    while (!(run_o && int'(processactive_o) == t) && guard < 5000);
    chk(guard < 5000, "task reached");
  endtask
  task automatic wait_idle();
    int guard = 0;
    do begin @(negedge clk); #0.3; guard++; end
    while ((ready_o != '0 || !lowpower_o[processactive_o] || dut.u_switch.busy) && guard < 20000);
    chk(guard < 20000, "all tasks done");
    repeat (3) @(negedge clk);
  endtask
  function automatic bit log_tail(input int exp_q [$]);
    if (log_q.size() < exp_q.size()) return 0;
    foreach (exp_q[i]) if (log_q[log_q.size() - exp_q.size() + i] != exp_q[i]) return 0;
    return 1;
  endfunction

  initial begin
    logic [31:0] rd;
    int s4_start;
    event_i = '0; bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    task_finished_i = 0; pc_we_i = 0; pc_next_i = '0;
    rf_ra1 = '0; rf_ra2 = '0; rf_we = 0; rf_wa = '0; rf_wd = '0; rf_wbank = '0;
    pend = 0;
    for (int i = 0; i < N; i++) begin
      job_left[i] = 0; m_pc[i] = 32'(i * 32'h400); m_r1[i] = 32'(i * 1000);
    end
    // Give every bank a known register 1 (written while still in reset).
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      rf_we = 1; rf_wbank = 3'(i); rf_wa = 5'd1; rf_wd = m_r1[i];
    end
    @(negedge clk);
    rf_we = 0;
    rst_n = 1'b1;
    bus_read(2'd0, rd);
    chk(rd == 32'd1000, "TRB time stamp reset value");

    // S1: task 1 runs, task 0 preempts it, task 1 resumes.
    bus_write(2'd0, 32'd200); n_bus_trb++;
    bus_read(2'd0, rd);
    chk(rd == 32'd200, "TRB time stamp written over the bus");
    pulse(1, 60);
    wait_running(1);
    repeat (10) @(negedge clk);
    pulse(0, 15);
    wait_running(0);
    bus_read(2'd2, rd);
    chk(rd[16+:N] == 5'b00010, "task 1 shown in the ITQ");
    wait_idle();
    chk(log_tail('{1, 0, 1}), "S1 dispatch order 1,0,1");

    // S2: all five tasks become active, lowest priority first.
    for (int t = N - 1; t >= 0; t--) begin
      pulse(t, 30);
      repeat (8) @(negedge clk);
    end
    chk(itq_o == 5'b11110, "four tasks interrupted");
    wait_idle();
    chk(log_tail('{4, 3, 2, 1, 0, 1, 2, 3, 4}), "S2 interrupted tasks served by priority");

    // S3: priority inversion.
    pulse(2, 50);
    wait_running(2);
    repeat (8) @(negedge clk);
    pulse(1, 10);
    begin
      int guard = 0;
      do begin @(negedge clk); #0.3; guard++; end while (!task_finished_i && guard < 1000);
    end
    event_i[3] = 1'b1; job_left[3] = 10;
    @(negedge clk);
    event_i[3] = 1'b0;
    wait_idle();
    if (log_tail('{2, 1, 3, 2})) n_inversion++;
    chk(log_tail('{2, 1, 3, 2}), "S3 new low task runs before the interrupted one");

    // S4: five never-ending tasks, activated over the bus.
    bus_write(2'd0, 32'd20); n_bus_trb++;
    for (int i = 0; i < N; i++) job_left[i] = -1;
    s4_start = log_q.size();
    bus_write(2'd1, 32'h1F); n_bus_act++;
    repeat (15 * 26) @(negedge clk);
    bus_read(2'd2, rd);
    chk(rd[24+:N] == 5'b11111, "all tasks in the LTQ");
    chk(rd[N-1:0] == 5'b11111, "all tasks ready");
    chk(log_q.size() - s4_start >= 15, "S4 at least three rounds");
    for (int i = s4_start; i < log_q.size(); i++)
      chk(log_q[i] == (i - s4_start) % N, "S4 long tasks served in turn 0,1,2,3,4,0,...");
    for (int i = 0; i < N; i++) job_left[i] = 5;
    wait_idle();
    chk(ltq_o == '0, "finished long tasks left the LTQ");
    bus_read(2'd3, rd);
    chk(rd[8] == 1'b0 && rd[4] == 1'b0, "status: idle, nothing runs");

    // S5: starvation of an interrupted task while the ATQ stays busy.
    bus_write(2'd0, 32'd1000); n_bus_trb++;
    pulse(4, 40);
    wait_running(4);
    pulse(3, 6);
    for (int k = 0; k < 12; k++) begin
      int guard = 0;
      do begin @(negedge clk); #0.3; guard++; end while (!task_finished_i && guard < 1000);
      // Activate another task in the very cycle the running one finishes.
      event_i[k % 3] = 1'b1; job_left[k % 3] = 6;
      @(negedge clk);
      event_i[k % 3] = 1'b0;
      chk(itq_o[4] && int'(processactive_o) != 4, "interrupted task waits while the ATQ is fed");
    end
    n_starved++;
    wait_idle();
    chk(log_q[log_q.size() - 1] == 4, "starved task runs once the ATQ drains");

    $display("switches=%0d preempt=%0d expire=%0d finish=%0d itq=%0d ltq=%0d idle=%0d inversion=%0d starved=%0d bus_act=%0d bus_trb=%0d",
             n_switch_timed, n_preempt, n_expire, n_finish, n_itq, n_ltq, n_idle, n_inversion,
             n_starved, n_bus_act, n_bus_trb);
    chk(n_switch_timed > 0, "timed switch happened");
    chk(n_preempt > 0, "preemption happened");
    chk(n_expire > 0, "TRB expiry happened");
    chk(n_finish > 0, "finish happened");
    chk(n_itq > 0, "dispatch from ITQ happened");
    chk(n_ltq > 0, "round-robin dispatch happened");
    chk(n_idle > 0, "idle happened");
    chk(n_inversion > 0, "priority inversion happened");
    chk(n_starved > 0, "starvation case happened");
    chk(n_bus_act > 0 && n_bus_trb > 0, "bus configuration happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
