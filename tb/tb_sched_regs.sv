// tb_sched_regs: checks the scheduler's bus registers.
// It checks the TRB_RELOAD reset value, write and read-back; that a write to
// ACTIVATE gives exactly a one-cycle pulse of the written mask; that QUEUES
// and STATUS show the status inputs at the documented bit positions; and that
// rdata is 0 when the slave is not selected.
module tb_sched_regs;
  import nmpra_pkg::*;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_sel, bus_we;
  logic [1:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [15:0] trb_reload;
  logic [N-1:0] sw_activate, ready, atq, itq, ltq, lowpower;
  logic [2:0] processactive;
  sched_state_e state;
  logic run;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sched_regs dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [31:0] e;
    logic [15:0] trb_m;
    logic [N-1:0] act;
    bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    ready = '0; atq = '0; itq = '0; ltq = '0; lowpower = '0; processactive = '0;
    state = ST_IDLE; run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    bus_sel = 1; bus_addr = 2'd0; #1;
    chk(bus_rdata == 32'd1000 && trb_reload == 16'd1000, "TRB reset value");
    trb_m = 16'd1000;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      // Random write of TRB_RELOAD or ACTIVATE.
      bus_sel = 1; bus_we = 1;
      bus_addr = ($urandom_range(0, 1) == 0) ? 2'd0 : 2'd1;
      bus_wdata = $urandom;
      act = (bus_addr == 2'd1) ? bus_wdata[N-1:0] : '0;
      if (bus_addr == 2'd0) trb_m = bus_wdata[15:0];
      #1 chk(sw_activate == '0, "no activation before the write edge");
      @(negedge clk);
      bus_we = 0; bus_addr = 2'd0;
      ready = N'($urandom); atq = N'($urandom); itq = N'($urandom); ltq = N'($urandom);
      lowpower = N'($urandom); processactive = 3'($urandom_range(0, 4));
      state = sched_state_e'($urandom_range(0, 1)); run = 1'($urandom);
      #1;
      chk(sw_activate == act, "activation pulse");
      chk(bus_rdata[15:0] == trb_m && trb_reload == trb_m, "TRB read-back");
      bus_addr = 2'd1; #1;
      chk(bus_rdata == 32'd0, "ACTIVATE reads 0");
      bus_addr = 2'd2; #1;
      e = {3'b0, ltq, 3'b0, itq, 3'b0, atq, 3'b0, ready};
      chk(bus_rdata == e, "QUEUES layout");
      bus_addr = 2'd3; #1;
      e = {11'b0, lowpower, 7'b0, run, 3'b0, (state == ST_RUNNING), 1'b0, processactive};
      chk(bus_rdata == e, "STATUS layout");
      @(negedge clk);
      chk(sw_activate == '0, "activation lasts one cycle");
      bus_sel = 0; #1;
      chk(bus_rdata == 32'd0, "rdata 0 when not selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
