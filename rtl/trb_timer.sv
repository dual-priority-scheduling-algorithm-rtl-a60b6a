// trb_timer: the global Round Robin timer (TRB) of the dual priority scheduler.
//
// The scheduler reloads the timer with the time stamp every time it
// dispatches a task. The timer then counts down by one in every cycle in
// which the dispatched task actually executes (enable high) and raises
// `expired` for as long as it stands at zero with a task executing. The
// scheduler uses the expiry both to stop a task that runs too long and as the
// time slice of the round robin among long tasks.
//
// Interface: load (with reload_value) has priority over counting. A reload
// value of 0 is treated as 1 so that a task always gets at least one cycle.
// Timing: after a load in cycle c with value V and enable high from c+1 on,
// `expired` is high in cycle c+V.
//
// As in the published nMPRA scheduler: reload at dispatch and decrement only once the new task
// runs. Own choices: the width and the saturation of a zero reload value.
module trb_timer #(
  parameter int unsigned W = nmpra_pkg::TRB_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] reload_value,
  input  logic         enable,
  output logic         expired,
  output logic [W-1:0] count
);

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else if (load) begin
      cnt_q <= (reload_value == '0) ? '0 : reload_value - W'(1);
    end else if (enable && cnt_q != '0) begin
      cnt_q <= cnt_q - W'(1);
    end
  end

  assign expired = enable && (cnt_q == '0);
  assign count   = cnt_q;

endmodule
