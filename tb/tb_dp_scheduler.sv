// tb_dp_scheduler: random and directed check of the dual priority scheduler
// against a reference model.
//
// The model keeps the three queues as lists of task numbers and applies the
// scheduling rules: an activated task joins the ATQ; in the Running State a
// higher-priority activation preempts the running task into the ITQ; a
// finished task leaves; a task whose TRB expires joins the LTQ; the next task
// comes from the ATQ by priority, else the ITQ by priority, else the LTQ in
// round-robin order; a long task is preempted by any activation and stays in
// the LTQ. The switch controller is replaced by a stand-in that stays busy for
// four cycles after each request. Every cycle the testbench compares the
// request, the old and new task, the queues, the ready flags and the state.
// It counts the mechanisms exercised and fails if any never happened.
module tb_dp_scheduler;
  import nmpra_pkg::*;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] activate, ready, atq, itq, ltq;
  logic finished, sw_busy, run, sw_req, prev_valid, next_valid, cur_valid;
  logic [15:0] trb_reload, trb_count;
  logic [2:0] prev_id, next_id, cur_id;
  sched_state_e state;
  logic ev_preempt, ev_expire, ev_finish, ev_dispatch;
  task_src_e ev_src;
  int checks = 0, failures = 0;
  int n_preempt = 0, n_expire = 0, n_finish = 0, n_from_atq = 0, n_from_itq = 0;
  int n_from_ltq = 0, n_idle = 0, n_inversion = 0;

  always #5 clk = ~clk;

  dp_scheduler dut (.*);

  // Stand-in for the switch controller.
  int sw_cnt;
  logic run_q, nv_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_cnt <= 0; run_q <= 1'b0; nv_q <= 1'b0;
    end else if (sw_cnt == 0 && sw_req) begin
      sw_cnt <= 4; run_q <= 1'b0; nv_q <= next_valid;
    end else if (sw_cnt > 0) begin
      sw_cnt <= sw_cnt - 1;
      if (sw_cnt == 1) run_q <= nv_q;
    end
  end
  assign sw_busy = (sw_cnt != 0);
  assign run     = run_q && !sw_busy;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  bit m_ready [N];
  int m_atq [$], m_itq [$], m_ltq [$];
  bit m_cur_v, m_cur_long;
  int m_cur, m_rr_last, m_trb;
  bit m_running_state;

  function automatic bit has(ref int q [$], input int t);
    foreach (q[i]) if (q[i] == t) return 1;
    return 0;
  endfunction
  function automatic void del(ref int q [$], input int t);
    for (int i = q.size() - 1; i >= 0; i--) if (q[i] == t) q.delete(i);
  endfunction
  function automatic logic [N-1:0] to_mask(ref int q [$]);
    logic [N-1:0] m = '0;
    foreach (q[i]) m[q[i]] = 1'b1;
    return m;
  endfunction
  function automatic int qmin(ref int q [$]);
    int b = N;
    foreach (q[i]) if (q[i] < b) b = q[i];
    return b;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Evaluate the model for the current cycle (inputs are stable), compare
  // with the DUT outputs, and advance the model to the next cycle.
  task automatic model_step();
    bit running, fin, exp, leave, preempt, decide, req, nv;
    int nid, src;  // 0 ATQ, 1 ITQ, 2 LTQ
    logic [N-1:0] m_rdy;
    // Compare the registered state first.
    for (int i = 0; i < N; i++) m_rdy[i] = m_ready[i];
    chk(ready == m_rdy, "ready flags");
    chk(atq == to_mask(m_atq), "ATQ");
    chk(itq == to_mask(m_itq), "ITQ");
    chk(ltq == to_mask(m_ltq), "LTQ");
    chk((state == ST_RUNNING) == m_running_state, "Running/Idle state");
    // Activations.
    for (int i = 0; i < N; i++)
      if (activate[i] && !m_ready[i]) begin m_ready[i] = 1; m_atq.push_back(i); end
    running = m_cur_v && run && !sw_busy;
    fin = running && finished;
    exp = running && !finished && (m_trb == 0);
    if (fin) begin
      m_ready[m_cur] = 0;
      if (m_cur_long) del(m_ltq, m_cur);
    end
    if (exp && !has(m_ltq, m_cur)) m_ltq.push_back(m_cur);
    leave = fin || exp;
    preempt = running && !leave && m_atq.size() > 0 && (m_cur_long || qmin(m_atq) < m_cur);
    if (preempt && !m_cur_long) m_itq.push_back(m_cur);
    decide = !sw_busy && (running ? (leave || preempt) : !m_cur_v);
    nv = 1; nid = 0; src = 0;
    if (m_atq.size() > 0) begin nid = qmin(m_atq); src = 0; end
    else if (m_itq.size() > 0) begin nid = qmin(m_itq); src = 1; end
    else if (m_ltq.size() > 0) begin
      src = 2; nid = -1;
      for (int s = 1; s <= N && nid < 0; s++)
        if (has(m_ltq, (m_rr_last + s) % N)) nid = (m_rr_last + s) % N;
    end else nv = 0;
    req = decide && (running || nv);
    chk(sw_req == req, "switch request");
    if (req) begin
      chk(prev_valid == running, "prev valid");
      if (running) chk(int'(prev_id) == m_cur, "prev task");
      chk(next_valid == nv, "next valid");
      if (nv) chk(int'(next_id) == nid, "next task");
      if (fin && m_atq.size() > 0 && m_itq.size() > 0 && qmin(m_itq) < qmin(m_atq))
        n_inversion++;
      if (preempt) n_preempt++;
      if (!nv) n_idle++;
      if (nv) begin
        if (src == 0) begin n_from_atq++; del(m_atq, nid); end
        if (src == 1) begin n_from_itq++; del(m_itq, nid); end
        if (src == 2) begin n_from_ltq++; m_rr_last = nid; end
        m_trb = (trb_reload == 0) ? 0 : int'(trb_reload) - 1;
      end
      m_cur_v = nv;
      if (nv) m_cur = nid;
      m_cur_long = nv && src == 2;
      m_running_state = nv && src != 2;
    end else if (running && m_trb > 0) begin
      m_trb--;
    end
    if (fin) n_finish++;
    if (exp) n_expire++;
  endtask

  initial begin
    int phase;
    activate = '0; finished = 0; trb_reload = 16'd12;
    m_cur_v = 0; m_cur_long = 0; m_cur = 0; m_rr_last = N - 1; m_trb = 0;
    m_running_state = 0;
    for (int i = 0; i < N; i++) m_ready[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60000; t++) begin
      @(negedge clk);
      phase = (t / 5000) % 3;
      // Phase 0: light load. Phase 1: heavy load, tasks finish rarely (long
      // tasks, round robin). Phase 2: bursts of activations (preemption,
      // interrupted tasks).
      for (int i = 0; i < N; i++)
        activate[i] = ($urandom_range(0, (phase == 2) ? 15 : 60) == 0);
      finished = run && ($urandom_range(0, (phase == 1) ? 40 : 6) == 0);
      if (t % 997 == 0) trb_reload = 16'($urandom_range(0, 30));
      #1;
      model_step();
    end
    $display("preempt=%0d expire=%0d finish=%0d from_atq=%0d from_itq=%0d from_ltq=%0d idle=%0d inversion=%0d",
             n_preempt, n_expire, n_finish, n_from_atq, n_from_itq, n_from_ltq, n_idle, n_inversion);
    chk(n_preempt > 0, "preemption happened");
    chk(n_expire > 0, "TRB expiry happened");
    chk(n_finish > 0, "finish happened");
    chk(n_from_atq > 0, "dispatch from ATQ happened");
    chk(n_from_itq > 0, "dispatch from ITQ happened");
    chk(n_from_ltq > 0, "round-robin dispatch from LTQ happened");
    chk(n_idle > 0, "going idle happened");
    chk(n_inversion > 0, "priority inversion case happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
