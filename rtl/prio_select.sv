// prio_select: priority dispatcher for one task queue.
//
// A queue of tasks with distinct fixed priorities is held as a membership
// mask: bit i set means task i is in the queue. Since task i has priority i
// and 0 is the highest, taking the highest-priority entry of the queue is a
// search for the lowest set bit. Purely combinational.
//
// Interface: `mask` in, `valid` high when the queue is not empty, `id` the
// chosen task (0 when the queue is empty).
//
// As in the published nMPRA scheduler: the active and interrupted task queues are scheduled by
// priority and task 0 has the highest priority. Own choice: a queue is a mask
// rather than an ordered list, which is equivalent because priorities differ.
module prio_select #(
  parameter int unsigned N  = nmpra_pkg::N_TASKS,
  parameter int unsigned IW = nmpra_pkg::TASK_W
) (
  input  logic [N-1:0]  mask,
  output logic          valid,
  output logic [IW-1:0] id
);

  always_comb begin
    valid = 1'b0;
    id    = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (mask[i]) begin
        valid = 1'b1;
        id    = IW'(i);
      end
    end
  end

endmodule
