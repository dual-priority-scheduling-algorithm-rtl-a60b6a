// tb_pc_bank: checks the per-task program counters against a model array.
// Random sequences of task selection, run/stop, next-PC writes and
// startagain pulses are applied. The model keeps one PC per task and the
// fetch PC; the testbench checks the reset entry addresses, that only the
// active, running task's PC moves, that a stopped task's PC is frozen, and
// that startagain loads the fetch PC from the released task's own PC.
module tb_pc_bank;
  localparam int N = 5, W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] active;
  logic run, pc_we;
  logic [N-1:0] startagain;
  logic [W-1:0] pc_next, fetch_pc;
  logic [N-1:0][W-1:0] pc_o;
  int checks = 0, failures = 0;
  logic [W-1:0] m_pc [N];
  logic [W-1:0] m_fetch;

  always #5 clk = ~clk;

  pc_bank dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (fetch_pc !== m_fetch) begin
      failures++; $display("FAIL fetch_pc=%h expected %h", fetch_pc, m_fetch);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pc_o[i] !== m_pc[i]) begin
        failures++; $display("FAIL pc[%0d]=%h expected %h", i, pc_o[i], m_pc[i]);
      end
    end
  endtask

  initial begin
    active = '0; run = 0; pc_we = 0; startagain = '0; pc_next = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) m_pc[i] = W'(i * 32'h400);
    m_fetch = '0;
    @(negedge clk);
    compare();
    for (int t = 0; t < 3000; t++) begin
      // A switch: stop, select a task, release it, then run it a while.
      run = 0; pc_we = 1'($urandom); pc_next = $urandom;  // ignored while stopped
      active = 3'($urandom_range(0, N - 1));
      @(negedge clk); compare();
      startagain = N'(1) << active; pc_we = 0;
      @(negedge clk);
      m_fetch = m_pc[active];
      startagain = '0;
      compare();
      run = 1;
      repeat ($urandom_range(1, 6)) begin
        pc_we = 1'($urandom); pc_next = $urandom;
        @(negedge clk);
        if (pc_we) begin m_pc[active] = pc_next; m_fetch = pc_next; end
        compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
