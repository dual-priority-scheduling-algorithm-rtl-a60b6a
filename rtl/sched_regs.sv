// sched_regs: register interface of the scheduler peripheral on the slow bus.
//
// The scheduler sits on the microcontroller's slow bus as a slave; software
// configures it and watches it through these registers. Word addresses:
//
//   0  TRB_RELOAD  read/write  time stamp loaded into the TRB at each dispatch
//   1  ACTIVATE    write only  a 1 in bit i activates task i (one-cycle pulse);
//                              reads as 0
//   2  QUEUES      read only   [N-1:0] ready, [8+N-1:8] ATQ, [16+N-1:16] ITQ,
//                              [24+N-1:24] LTQ
//   3  STATUS      read only   [2:0] processactive, [4] Running State,
//                              [8] a task executes, [16+N-1:16] tasks in low power
//
// Bus protocol: a single-cycle access. With sel and we high, wdata is written
// at the clock edge; with sel high and we low, rdata shows the addressed
// register in the same cycle (rdata is 0 when sel is low).
//
// As in the published nMPRA scheduler: the scheduler is a peripheral on a slow bus, clocked with
// the microcontroller clock, and tasks are configured through its internal
// registers. Own choices: the whole register map and the bus protocol, which
// the published description does not give, and the reset value TRB_DEFAULT.
module sched_regs
  import nmpra_pkg::*;
#(
  parameter int unsigned  N           = N_TASKS,
  parameter int unsigned  IW          = TASK_W,
  parameter int unsigned  TW          = TRB_W,
  parameter logic [TW-1:0] TRB_DEFAULT = TW'(1000)
) (
  input  logic          clk,
  input  logic          rst_n,
  // Slow bus slave port
  input  logic          bus_sel,
  input  logic          bus_we,
  input  logic [1:0]    bus_addr,
  input  logic [31:0]   bus_wdata,
  output logic [31:0]   bus_rdata,
  // To the scheduler
  output logic [TW-1:0] trb_reload,
  output logic [N-1:0]  sw_activate,
  // Status from the scheduler and the switch controller
  input  logic [N-1:0]  ready,
  input  logic [N-1:0]  atq,
  input  logic [N-1:0]  itq,
  input  logic [N-1:0]  ltq,
  input  logic [IW-1:0] processactive,
  input  sched_state_e  state,
  input  logic          run,
  input  logic [N-1:0]  lowpower
);

  localparam logic [1:0] A_TRB    = 2'd0;
  localparam logic [1:0] A_ACT    = 2'd1;
  localparam logic [1:0] A_QUEUES = 2'd2;
  localparam logic [1:0] A_STATUS = 2'd3;

  logic [TW-1:0] trb_q;
  logic [N-1:0]  act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trb_q <= TRB_DEFAULT;
      act_q <= '0;
    end else begin
      act_q <= '0;
      if (bus_sel && bus_we) begin
        unique case (bus_addr)
          A_TRB:   trb_q <= bus_wdata[TW-1:0];
          A_ACT:   act_q <= bus_wdata[N-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (bus_sel && !bus_we) begin
      unique case (bus_addr)
        A_TRB:    bus_rdata[TW-1:0] = trb_q;
        A_QUEUES: begin
          bus_rdata[N-1:0]      = ready;
          bus_rdata[8+:N]       = atq;
          bus_rdata[16+:N]      = itq;
          bus_rdata[24+:N]      = ltq;
        end
        A_STATUS: begin
          bus_rdata[IW-1:0]     = processactive;
          bus_rdata[4]          = (state == ST_RUNNING);
          bus_rdata[8]          = run;
          bus_rdata[16+:N]      = lowpower;
        end
        default: ;
      endcase
    end
  end

  assign trb_reload  = trb_q;
  assign sw_activate = act_q;

endmodule
