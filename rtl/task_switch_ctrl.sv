// task_switch_ctrl: sequences the switch from one hardware task to another.
//
// Stopping a task means stopping its PC; the shared instruction memory, data
// memory and ALU are then handed to the next task through the task
// multiplexer. Because instructions of the old task are still in the shared
// pipeline, the hand-over is spread over a fixed sequence. With the request
// from the scheduler in cycle t0 (the cycle in which the scheduling event is
// seen):
//
//   t0+1  STALL    processXstall of the old task (it enters low power)
//   t0+2  WAIT     the pipeline finishes with the old task
//   t0+3  SELECT   processactive (SelectTask) takes the new task number
//   t0+4  RELEASE  processXresetstall and processXstartagain of the new task
//   t0+5           the new task executes code (run = 1)
//
// so the scheduler responds in one cycle and the new task starts five cycles
// after the event, whatever the tasks involved. A request with no next task
// (the scheduler goes idle) only stalls the old task and ends after STALL.
// `lowpower[i]` is high while task i is stopped; a task starts in low power.
// Requests that arrive while `busy` is high are ignored.
//
// As in the published nMPRA scheduler: the order stall, wait one cycle, change processactive,
// resetstall with startagain; a response time of one cycle and a switch of
// five machine cycles; the signal names. Own choices: the exact cycle of each
// step, which the published description gives only through a waveform, one single clock
// instead of three phase-shifted ones, and that only the old task is stalled.
module task_switch_ctrl #(
  parameter int unsigned N  = nmpra_pkg::N_TASKS,
  parameter int unsigned IW = nmpra_pkg::TASK_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // Request from the scheduler
  input  logic          req,
  input  logic          prev_valid,
  input  logic [IW-1:0] prev_id,
  input  logic          next_valid,
  input  logic [IW-1:0] next_id,
  output logic          busy,
  // Task control
  output logic [N-1:0]  stall,
  output logic [N-1:0]  resetstall,
  output logic [N-1:0]  startagain,
  output logic [IW-1:0] processactive,
  output logic          run,
  output logic [N-1:0]  lowpower
);

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_STALL   = 3'd1,
    S_WAIT    = 3'd2,
    S_SELECT  = 3'd3,
    S_RELEASE = 3'd4
  } sw_state_e;

  sw_state_e     state_q;
  logic          prev_valid_q, next_valid_q;
  logic [IW-1:0] prev_q, next_q, active_q;
  logic          run_q;
  logic [N-1:0]  lowpower_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      prev_valid_q <= 1'b0;
      next_valid_q <= 1'b0;
      prev_q       <= '0;
      next_q       <= '0;
      active_q     <= '0;
      run_q        <= 1'b0;
      lowpower_q   <= '1;
    end else begin
      unique case (state_q)
        S_IDLE: if (req) begin
          state_q      <= S_STALL;
          prev_valid_q <= prev_valid;
          prev_q       <= prev_id;
          next_valid_q <= next_valid;
          next_q       <= next_id;
          run_q        <= 1'b0;
        end
        S_STALL: begin
          if (prev_valid_q) lowpower_q[prev_q] <= 1'b1;
          state_q <= next_valid_q ? S_WAIT : S_IDLE;
        end
        S_WAIT: begin
          state_q  <= S_SELECT;
          active_q <= next_q;
        end
        S_SELECT: state_q <= S_RELEASE;
        S_RELEASE: begin
          lowpower_q[next_q] <= 1'b0;
          run_q              <= 1'b1;
          state_q            <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    stall      = '0;
    resetstall = '0;
    startagain = '0;
    if (state_q == S_STALL && prev_valid_q) stall[prev_q] = 1'b1;
    if (state_q == S_RELEASE) begin
      resetstall[next_q] = 1'b1;
      startagain[next_q] = 1'b1;
    end
  end

  assign busy          = (state_q != S_IDLE);
  assign processactive = active_q;
  assign run           = run_q && (state_q == S_IDLE);
  assign lowpower      = lowpower_q;

  // A task is released only after it was selected on the multiplexer.
  a_release_selected: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_RELEASE) |-> (active_q == next_q));
  // Stall and release never hit the same task in the same cycle.
  a_no_stall_release: assert property (@(posedge clk) disable iff (!rst_n)
    (stall & resetstall) == '0);

endmodule
