// task_mux: the multiplexer/demultiplexer between per-task resources and the
// shared pipeline.
//
// Every task owns a copy of a resource (its program counter, for instance).
// The multiplexer side hands the shared pipeline the copy of the task named
// by `sel` (SelectTask); the demultiplexer side turns one write strobe from
// the pipeline into a write enable for that task's copy only. Purely
// combinational, so a change of `sel` takes effect in the same cycle.
//
// Interface: in_vec[N] the N copies, out the selected copy; we in, we_vec the
// one-hot write enables. A `sel` of N or above selects nothing (out = 0, no
// write enable).
//
// As in the published nMPRA scheduler: one multiplexer/demultiplexer, steered by the 3-bit
// task number, connects the task resources to the shared ROM, RAM and ALU.
// Own choice: a single parameterised module reused for each resource.
module task_mux #(
  parameter int unsigned N  = nmpra_pkg::N_TASKS,
  parameter int unsigned IW = nmpra_pkg::TASK_W,
  parameter int unsigned W  = nmpra_pkg::XLEN
) (
  input  logic [IW-1:0]     sel,
  input  logic [N-1:0][W-1:0] in_vec,
  output logic [W-1:0]      out,
  input  logic              we,
  output logic [N-1:0]      we_vec
);

  always_comb begin
    out    = '0;
    we_vec = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel == IW'(i)) begin
        out       = in_vec[i];
        we_vec[i] = we;
      end
    end
  end

endmodule
