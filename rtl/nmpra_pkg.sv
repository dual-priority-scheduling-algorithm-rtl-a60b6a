// nmpra_pkg: constants and types shared by the dual priority scheduler and
// the task-switch logic of the nMPRA microcontroller.
//
// The microcontroller runs N_TASKS hardware tasks on one 5-stage pipeline.
// Each task has its own program counter and register bank; a task switch
// only changes which copy the pipeline uses, so no context is saved.
// Task numbers double as fixed priorities: task 0 is the highest priority.
//
// As in the published nMPRA scheduler: five tasks, a 3-bit active-task number, the Running
// and Idle states of the scheduler and a task switch of five machine cycles.
// Own choices: the 32-bit program counter and data word (a MIPS-style core)
// and the 16-bit TRB counter.
package nmpra_pkg;

  // Number of hardware tasks (five in the presented microcontroller).
  localparam int unsigned N_TASKS = 5;
  // Width of a task number, processactive[2:0] / SelectTask[2..0].
  localparam int unsigned TASK_W = 3;
  // Program counter and data width of the core.
  localparam int unsigned XLEN = 32;
  // Width of the Round Robin timer (TRB).
  localparam int unsigned TRB_W = 16;
  // Machine cycles from the scheduling event to the first cycle in which the
  // new task executes code.
  localparam int unsigned SWITCH_CYCLES = 5;

  typedef logic [TASK_W-1:0] task_id_t;

  // Scheduler state: Running State (a task of the active class runs) or
  // Idle State (no task runs, or a long task runs under round robin).
  typedef enum logic {
    ST_IDLE    = 1'b0,
    ST_RUNNING = 1'b1
  } sched_state_e;

  // Queue the dispatched task was taken from.
  typedef enum logic [1:0] {
    SRC_ATQ = 2'd0,
    SRC_ITQ = 2'd1,
    SRC_LTQ = 2'd2
  } task_src_e;

endpackage
