// nmpra_sched_top: task scheduling and task switching of the nMPRA
// microcontroller.
//
// nMPRA runs N_TASKS hardware tasks on one pipelined core. Each task owns a
// program counter and a register bank; only the instruction memory, data
// memory and ALU are shared. A task switch is therefore not a context switch:
// the old task's PC is stopped, the shared units are handed to the new task
// through the task multiplexer, and the new task continues where its own PC
// stands. Which task runs is decided by the dual priority scheduler, a
// peripheral on the slow bus.
//
// This top joins:
//   sched_regs        the scheduler's bus registers (TRB time stamp,
//                     software activation, status);
//   dp_scheduler      ATQ/ITQ/LTQ, Running/Idle State, TRB, dispatchers;
//   task_switch_ctrl  the five-cycle stall / select / release sequence;
//   pc_bank           the per-task PCs and the fetch PC (with task_mux);
//   banked_regfile    the per-task register banks.
// The pipeline that executes instructions is outside: it takes fetch_pc_o,
// runs while run_o is high, reports the next PC on pc_we_i/pc_next_i, uses the
// register file ports, and raises task_finished_i when the running task ends
// its job. event_i[i] is the hardware scheduling event of task i; bus writes
// to ACTIVATE are a second source of the same events.
//
// Timing: an event in cycle t0 that makes a task the next to run stalls the
// old task in t0+1, selects the new one on processactive in t0+3, releases it
// in t0+4, and the new task fetches from its own PC in t0+5.
//
// As in the published nMPRA scheduler: the partitioning into scheduler peripheral, task
// multiplexer, per-task PCs and banked register file, the signal set
// (processXstall, processXresetstall, processXstartagain, processactive,
// var_processXready, var_processfinished) and the five-cycle switch. Own
// choices: the port-level interface to the pipeline, the bus protocol and
// register map, and a single clock in place of three phase-shifted clocks.
module nmpra_sched_top
  import nmpra_pkg::*;
#(
  parameter int unsigned   N           = N_TASKS,
  parameter int unsigned   IW          = TASK_W,
  parameter int unsigned   W           = XLEN,
  parameter int unsigned   TW          = TRB_W,
  parameter int unsigned   NREGS       = 32,
  parameter logic [TW-1:0] TRB_DEFAULT = TW'(1000),
  localparam int unsigned  AW          = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // Scheduling events
  input  logic [N-1:0]  event_i,
  // Slow bus slave port of the scheduler
  input  logic          bus_sel,
  input  logic          bus_we,
  input  logic [1:0]    bus_addr,
  input  logic [31:0]   bus_wdata,
  output logic [31:0]   bus_rdata,
  // Pipeline: fetch and control
  input  logic          task_finished_i,
  input  logic          pc_we_i,
  input  logic [W-1:0]  pc_next_i,
  output logic [W-1:0]  fetch_pc_o,
  output logic          run_o,
  output logic [IW-1:0] processactive_o,
  output logic [N-1:0]  stall_o,
  output logic [N-1:0]  resetstall_o,
  output logic [N-1:0]  startagain_o,
  output logic [N-1:0]  ready_o,
  // Scheduler status and one-cycle event strobes
  output sched_state_e  state_o,
  output logic [N-1:0]  atq_o,
  output logic [N-1:0]  itq_o,
  output logic [N-1:0]  ltq_o,
  output logic [N-1:0]  lowpower_o,
  output logic          sched_task_valid_o,
  output logic [IW-1:0] sched_task_o,
  output logic [TW-1:0] trb_count_o,
  output logic          ev_preempt_o,
  output logic          ev_expire_o,
  output logic          ev_finish_o,
  output logic          ev_dispatch_o,
  output task_src_e     ev_src_o,
  output logic [N-1:0][W-1:0] task_pc_o,
  // Pipeline: register file
  input  logic [AW-1:0] rf_ra1,
  input  logic [AW-1:0] rf_ra2,
  output logic [W-1:0]  rf_rd1,
  output logic [W-1:0]  rf_rd2,
  input  logic          rf_we,
  input  logic [IW-1:0] rf_wbank,
  input  logic [AW-1:0] rf_wa,
  input  logic [W-1:0]  rf_wd
);

  logic [TW-1:0]       trb_reload;
  logic [N-1:0]        sw_activate;
  logic [N-1:0]        ready, atq, itq, ltq, lowpower;
  sched_state_e        state;
  logic                sw_req, sw_busy, prev_valid, next_valid, run;
  logic [IW-1:0]       prev_id, next_id, processactive;
  logic [TW-1:0]       trb_count;
  logic                ev_preempt, ev_expire, ev_finish, ev_dispatch;
  task_src_e           ev_src;
  logic [N-1:0][W-1:0] pc_all;

  sched_regs #(.N(N), .IW(IW), .TW(TW), .TRB_DEFAULT(TRB_DEFAULT)) u_regs (
    .clk, .rst_n,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .trb_reload, .sw_activate,
    .ready, .atq, .itq, .ltq, .processactive, .state, .run, .lowpower
  );

  dp_scheduler #(.N(N), .IW(IW), .TW(TW)) u_sched (
    .clk, .rst_n,
    .activate   (event_i | sw_activate),
    .finished   (task_finished_i),
    .trb_reload,
    .sw_busy, .run, .sw_req, .prev_valid, .prev_id, .next_valid, .next_id,
    .state, .ready, .atq, .itq, .ltq, .cur_valid (sched_task_valid_o), .cur_id (sched_task_o), .trb_count,
    .ev_preempt, .ev_expire, .ev_finish, .ev_dispatch, .ev_src
  );

  task_switch_ctrl #(.N(N), .IW(IW)) u_switch (
    .clk, .rst_n,
    .req        (sw_req),
    .prev_valid, .prev_id, .next_valid, .next_id,
    .busy       (sw_busy),
    .stall      (stall_o),
    .resetstall (resetstall_o),
    .startagain (startagain_o),
    .processactive,
    .run,
    .lowpower
  );

  pc_bank #(.N(N), .IW(IW), .W(W)) u_pc (
    .clk, .rst_n,
    .active     (processactive),
    .run,
    .startagain (startagain_o),
    .pc_we      (pc_we_i),
    .pc_next    (pc_next_i),
    .fetch_pc   (fetch_pc_o),
    .pc_o       (pc_all)
  );

  banked_regfile #(.N(N), .IW(IW), .W(W), .NREGS(NREGS)) u_rf (
    .clk,
    .rbank (processactive),
    .ra1   (rf_ra1), .ra2 (rf_ra2), .rd1 (rf_rd1), .rd2 (rf_rd2),
    .we    (rf_we), .wbank (rf_wbank), .wa (rf_wa), .wd (rf_wd)
  );

  assign run_o           = run;
  assign processactive_o = processactive;
  assign ready_o         = ready;
  assign state_o         = state;
  assign atq_o           = atq;
  assign itq_o           = itq;
  assign ltq_o           = ltq;
  assign lowpower_o      = lowpower;
  assign trb_count_o     = trb_count;
  assign ev_preempt_o    = ev_preempt;
  assign ev_expire_o     = ev_expire;
  assign ev_finish_o     = ev_finish;
  assign ev_dispatch_o   = ev_dispatch;
  assign ev_src_o        = ev_src;
  assign task_pc_o       = pc_all;

endmodule
