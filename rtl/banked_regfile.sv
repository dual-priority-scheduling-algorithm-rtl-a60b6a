// banked_regfile: a register file with one bank per hardware task.
//
// Each task sees its own set of NREGS registers, so a task switch needs no
// saving or restoring of registers: the pipeline simply reads the bank of the
// task that now executes. Reads use `rbank` (the task in the decode stage);
// the write port carries its own bank number `wbank`, because an instruction
// of the previous task may still be writing back while the next task is
// already being decoded. Register 0 of every bank reads as zero and ignores
// writes (MIPS convention).
//
// Interface: two asynchronous read ports (ra1/rd1, ra2/rd2) and one
// synchronous write port (we, wbank, wa, wd). A read of the register written
// in the same cycle returns the new value (write-through), the usual rule for
// a 5-stage pipeline whose write-back and decode share a cycle.
//
// As in the published nMPRA scheduler: the banked register file with banks 0..n-1. Own
// choices: 32 registers of 32 bits, register 0 hard-wired to zero, the
// separate write bank and the write-through read.
module banked_regfile #(
  parameter int unsigned N     = nmpra_pkg::N_TASKS,
  parameter int unsigned IW    = nmpra_pkg::TASK_W,
  parameter int unsigned W     = nmpra_pkg::XLEN,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic [IW-1:0] rbank,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [IW-1:0] wbank,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);

  logic [W-1:0] mem [N*NREGS];

  function automatic int unsigned idx(input logic [IW-1:0] b, input logic [AW-1:0] a);
    return int'(b) * NREGS + int'(a);
  endfunction

  always_ff @(posedge clk) begin
    if (we && wa != '0 && int'(wbank) < N) begin
      mem[idx(wbank, wa)] <= wd;
    end
  end

  function automatic logic [W-1:0] rd(input logic [AW-1:0] a);
    if (a == '0 || int'(rbank) >= N) return '0;
    if (we && wbank == rbank && wa == a) return wd;
    return mem[idx(rbank, a)];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);

endmodule
