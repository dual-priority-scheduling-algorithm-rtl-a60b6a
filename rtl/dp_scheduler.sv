// dp_scheduler: dual priority scheduler of the nMPRA microcontroller.
//
// Tasks belong to one of three classes, each with its own queue:
//   ATQ  active tasks: newly activated, scheduled by priority;
//   ITQ  interrupted tasks: preempted by a higher-priority task, scheduled by
//        priority, but only when the ATQ is empty;
//   LTQ  long tasks: ran out of TRB time, scheduled round robin with one TRB
//        period each, only when both other queues are empty.
// In the Running State a task of the active class runs and only the ATQ is
// looked at: a newly activated task of higher priority preempts the running
// one (which goes to the ITQ); one of lower priority waits in the ATQ. When the
// running task finishes or its TRB expires (it then joins the LTQ), the next
// ATQ task is dispatched at once; with an empty ATQ the scheduler goes to the
// Idle State, where the ITQ is served by priority and then the LTQ by round
// robin. A task taken from the ITQ runs again in the Running State; a long
// task runs in the Idle State, is preempted by any active task, stays in the
// LTQ until it finishes, and leaves the LTQ when it finishes. Because the TRB
// bounds every run and the LTQ is served in turn, no task can block the
// processor.
//
// A queue is a membership mask: with distinct fixed priorities (task 0 the
// highest) ordering by priority is a search for the lowest set bit.
//
// Interface and timing: activate[i] is the scheduling event of task i (a
// pulse or a level; it is ignored while task i is already ready). finished is
// the running task's end-of-job signal. A decision uses the events of the
// same cycle and is handed to task_switch_ctrl as a one-cycle sw_req with the
// old and the new task; no decision is taken while sw_busy is high, events
// arriving then are queued. The TRB is reloaded at every dispatch and counts
// only while `run` is high.
//
// As in the published nMPRA scheduler: the three queues and classes, the two states, the
// priority and round-robin dispatchers, the TRB use and the behaviour of its
// examples (preemption, priority inversion, starvation of the ITQ while the
// ATQ keeps the scheduler running). Own choices: tie-breaking and the exact
// cycle of each decision, the round-robin order, that a preempted long task
// stays in the LTQ, and that a task taken from the LTQ runs in the Idle State.
module dp_scheduler
  import nmpra_pkg::*;
#(
  parameter int unsigned N  = N_TASKS,
  parameter int unsigned IW = TASK_W,
  parameter int unsigned TW = TRB_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  activate,
  input  logic          finished,
  input  logic [TW-1:0] trb_reload,
  // Handshake with the task switch controller
  input  logic          sw_busy,
  input  logic          run,
  output logic          sw_req,
  output logic          prev_valid,
  output logic [IW-1:0] prev_id,
  output logic          next_valid,
  output logic [IW-1:0] next_id,
  // Status
  output sched_state_e  state,
  output logic [N-1:0]  ready,
  output logic [N-1:0]  atq,
  output logic [N-1:0]  itq,
  output logic [N-1:0]  ltq,
  output logic          cur_valid,
  output logic [IW-1:0] cur_id,
  output logic [TW-1:0] trb_count,
  // One-cycle event strobes
  output logic          ev_preempt,
  output logic          ev_expire,
  output logic          ev_finish,
  output logic          ev_dispatch,
  output task_src_e     ev_src
);

  sched_state_e  state_q;
  logic [N-1:0]  ready_q, atq_q, itq_q, ltq_q;
  logic          cur_valid_q, cur_long_q;
  logic [IW-1:0] cur_q, rr_last_q;

  logic [N-1:0]  new_act, atq_eff, ltq_after, cur_bit;
  logic          running, fin, exp, preempt, leave, decide;
  logic          a_v, i_v, l_v;
  logic [IW-1:0] a_id, i_id, l_id;
  logic          trb_expired;
  logic          nxt_v;
  logic [IW-1:0] nxt_id;
  task_src_e     nxt_src;

  assign new_act = activate & ~ready_q;
  assign atq_eff = atq_q | new_act;
  assign cur_bit = N'(1) << cur_q;

  // A task executes: it was dispatched and its switch has completed.
  assign running = cur_valid_q && run && !sw_busy;
  assign fin     = running && finished;
  assign exp     = running && trb_expired && !finished;

  // The LTQ as the round robin must see it after this cycle's events.
  always_comb begin
    ltq_after = ltq_q;
    if (exp) ltq_after = ltq_after | cur_bit;
    if (fin && cur_long_q) ltq_after = ltq_after & ~cur_bit;
  end

  prio_select #(.N(N), .IW(IW)) u_atq_sel (.mask(atq_eff), .valid(a_v), .id(a_id));
  prio_select #(.N(N), .IW(IW)) u_itq_sel (.mask(itq_q),   .valid(i_v), .id(i_id));
  rr_select   #(.N(N), .IW(IW)) u_ltq_sel (.mask(ltq_after), .last(rr_last_q),
                                           .valid(l_v), .id(l_id));

  trb_timer #(.W(TW)) u_trb (
    .clk          (clk),
    .rst_n        (rst_n),
    .load         (sw_req && nxt_v),
    .reload_value (trb_reload),
    .enable       (running),
    .expired      (trb_expired),
    .count        (trb_count)
  );

  // Decision: which task runs next.
  always_comb begin
    leave   = fin || exp;
    preempt = running && !leave && a_v && (cur_long_q || a_id < cur_q);
    decide  = !sw_busy && (running ? (leave || preempt) : !cur_valid_q);
    nxt_v   = 1'b0;
    nxt_id  = '0;
    nxt_src = SRC_ATQ;
    if (a_v) begin
      nxt_v = 1'b1; nxt_id = a_id; nxt_src = SRC_ATQ;
    end else if (i_v) begin
      nxt_v = 1'b1; nxt_id = i_id; nxt_src = SRC_ITQ;
    end else if (l_v) begin
      nxt_v = 1'b1; nxt_id = l_id; nxt_src = SRC_LTQ;
    end
    // With nothing running and nothing queued there is nothing to switch.
    sw_req = decide && (running || nxt_v);
  end

  assign prev_valid = running;
  assign prev_id    = cur_q;
  assign next_valid = nxt_v;
  assign next_id    = nxt_id;

  // Queue contents after this cycle's events and dispatch.
  logic [N-1:0] rdy_n, atq_n, itq_n;
  always_comb begin
    rdy_n = ready_q | new_act;
    atq_n = atq_eff;
    itq_n = itq_q;
    if (fin) rdy_n = rdy_n & ~cur_bit;
    if (preempt && !cur_long_q) itq_n = itq_n | cur_bit;
    if (sw_req && nxt_v) begin
      if (nxt_src == SRC_ATQ) atq_n[nxt_id] = 1'b0;
      if (nxt_src == SRC_ITQ) itq_n[nxt_id] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_IDLE;
      ready_q     <= '0;
      atq_q       <= '0;
      itq_q       <= '0;
      ltq_q       <= '0;
      cur_valid_q <= 1'b0;
      cur_long_q  <= 1'b0;
      cur_q       <= '0;
      rr_last_q   <= IW'(N - 1);
    end else begin
      ready_q <= rdy_n;
      atq_q   <= atq_n;
      itq_q   <= itq_n;
      ltq_q   <= ltq_after;
      if (sw_req) begin
        cur_valid_q <= nxt_v;
        if (nxt_v) cur_q <= nxt_id;
        cur_long_q  <= nxt_v && (nxt_src == SRC_LTQ);
        state_q     <= (nxt_v && nxt_src != SRC_LTQ) ? ST_RUNNING : ST_IDLE;
        if (nxt_v && nxt_src == SRC_LTQ) rr_last_q <= nxt_id;
      end
    end
  end

  assign state     = state_q;
  assign ready     = ready_q;
  assign atq       = atq_q;
  assign itq       = itq_q;
  assign ltq       = ltq_q;
  assign cur_valid = cur_valid_q;
  assign cur_id    = cur_q;

  assign ev_preempt  = sw_req && preempt;
  assign ev_expire   = exp;
  assign ev_finish   = fin;
  assign ev_dispatch = sw_req && nxt_v;
  assign ev_src      = nxt_src;

  // ATQ and ITQ are disjoint and only hold ready tasks.
  a_queues_disjoint: assert property (@(posedge clk) disable iff (!rst_n)
    (atq_q & itq_q) == '0);
  a_queues_ready: assert property (@(posedge clk) disable iff (!rst_n)
    ((atq_q | itq_q | ltq_q) & ~ready_q) == '0);

endmodule
