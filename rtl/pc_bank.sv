// pc_bank: one program counter per hardware task, plus the fetch PC.
//
// Each task keeps its own PC, so a stopped task resumes exactly where it was
// stopped and nothing is saved or restored on a switch. The fetch PC is the
// address sent to the instruction memory. When a task is released,
// startagain[i] copies task i's PC into the fetch PC (the address of the task
// being released is selected through the task multiplexer). While the active
// task executes (`run`), every pc_we from the core writes pc_next into both
// the fetch PC and the active task's own PC; nothing is written while the task
// is stalled, so the PCs of all other tasks are frozen.
//
// Interface: active = processactive; run = the active task executes this
// cycle; startagain one-hot; pc_we/pc_next from the core's next-PC logic;
// fetch_pc to the instruction memory; pc_o all task PCs for observation.
// Timing: startagain in cycle c gives fetch_pc = PC of that task in c+1.
// After reset, task i's PC is ENTRY_BASE + i*ENTRY_STRIDE.
//
// As in the published nMPRA scheduler: one PC per task (PC 0..n-1), a task is stopped by
// stopping its PC, and processXstartagain selects the address of the task
// being released. Own choices: the reset entry addresses and the fetch PC
// register as the place where the released task's address is synchronised.
module pc_bank #(
  parameter int unsigned         N            = nmpra_pkg::N_TASKS,
  parameter int unsigned         IW           = nmpra_pkg::TASK_W,
  parameter int unsigned         W            = nmpra_pkg::XLEN,
  parameter logic [W-1:0]        ENTRY_BASE   = '0,
  parameter logic [W-1:0]        ENTRY_STRIDE = W'(32'h400)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IW-1:0]        active,
  input  logic                 run,
  input  logic [N-1:0]         startagain,
  input  logic                 pc_we,
  input  logic [W-1:0]         pc_next,
  output logic [W-1:0]         fetch_pc,
  output logic [N-1:0][W-1:0]  pc_o
);

  logic [N-1:0][W-1:0] pc_q;
  logic [N-1:0]        pc_we_vec;
  logic [W-1:0]        pc_sel;
  logic [W-1:0]        fetch_q;

  // Multiplexer: selected task PC; demultiplexer: write enable of that PC.
  task_mux #(.N(N), .IW(IW), .W(W)) u_mux (
    .sel    (active),
    .in_vec (pc_q),
    .out    (pc_sel),
    .we     (pc_we && run),
    .we_vec (pc_we_vec)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        pc_q[i] <= ENTRY_BASE + W'(i) * ENTRY_STRIDE;
      end
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (pc_we_vec[i]) pc_q[i] <= pc_next;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_q <= ENTRY_BASE;
    end else if (|startagain) begin
      fetch_q <= pc_sel;
    end else if (pc_we && run) begin
      fetch_q <= pc_next;
    end
  end

  assign fetch_pc = fetch_q;
  assign pc_o     = pc_q;

endmodule
