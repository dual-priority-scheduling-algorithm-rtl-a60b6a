// tb_task_mux: random check of the task multiplexer/demultiplexer.
// For random per-task values, selects and write strobes it checks that the
// output is the selected task's value and the write enable reaches only that
// task; out-of-range selects give 0 and no write enable.
module tb_task_mux;
  localparam int N = 5, W = 32;
  logic [2:0] sel;
  logic [N-1:0][W-1:0] in_vec;
  logic [W-1:0] out;
  logic we;
  logic [N-1:0] we_vec;
  int checks = 0, failures = 0;

  task_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e_out;
    logic [N-1:0] e_we;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) in_vec[i] = $urandom;
      sel = 3'($urandom_range(0, 7));
      we  = 1'($urandom);
      #1;
      e_out = (sel < N) ? in_vec[sel] : '0;
      e_we  = (sel < N && we) ? N'(1) << sel : '0;
      checks++;
      if (out !== e_out || we_vec !== e_we) begin
        failures++;
        $display("FAIL sel=%0d we=%0b out=%h we_vec=%b", sel, we, out, we_vec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
