// rr_select: round-robin dispatcher for the long task queue (LTQ).
//
// Given the LTQ membership mask and the number of the long task served last,
// it returns the first member found when searching upwards from the task
// after `last` and wrapping around; `last` itself is chosen only when it is
// the sole member. Long tasks are thus served in turn whatever their
// priority. Purely combinational.
//
// Interface: `mask` in, `last` in, `valid` high when the LTQ is not empty,
// `id` the chosen task.
//
// As in the published nMPRA scheduler: long tasks are scheduled by round robin and their
// priorities do not matter. Own choice: the ascending task-number order of
// the round.
module rr_select #(
  parameter int unsigned N  = nmpra_pkg::N_TASKS,
  parameter int unsigned IW = nmpra_pkg::TASK_W
) (
  input  logic [N-1:0]  mask,
  input  logic [IW-1:0] last,
  output logic          valid,
  output logic [IW-1:0] id
);

  always_comb begin
    logic [IW-1:0] k;
    valid = 1'b0;
    id    = '0;
    // Search from the farthest candidate (last itself) to the nearest
    // (last+1) so that the nearest member is kept.
    for (int unsigned d = N; d >= 1; d--) begin
      k = IW'((int'(last) + d) % N);
      if (mask[k]) begin
        valid = 1'b1;
        id    = IW'(k);
      end
    end
  end

endmodule
