// tb_rol_accumulator: random BOL vectors (0..4 per buffer) including the
// worked example (3, 2, 2, 3, 1) -> 11; checks the registered sum one cycle
// later.
module tb_rol_accumulator;
  import snn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [N_PORTS-1:0][BOL_W-1:0] bol = '0;
  logic [LVL_W-1:0] rol;
  int checks = 0, failures = 0;

  rol_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : main
    automatic int exp_sum;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    bol = {3'd1, 3'd3, 3'd2, 3'd2, 3'd3};   // core, E, S, W, N = (3,2,2,3,1)
    @(negedge clk);
    check(rol === 5'd11, "worked example 11");
    bol = {3'd3, 3'd2, 3'd3, 3'd2, 3'd4};   // (4,2,3,2,3)
    @(negedge clk);
    check(rol === 5'd14, "worked example 14");
    for (int c = 0; c < 1000; c++) begin
      exp_sum = 0;
      for (int p = 0; p < N_PORTS; p++) begin
        bol[p] = BOL_W'($urandom_range(0, SLOTS));
        exp_sum += int'(bol[p]);
      end
      @(negedge clk);
      check(rol === LVL_W'(exp_sum), "random sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
