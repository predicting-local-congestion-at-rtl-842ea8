// tb_lif_neuron: checks lif_neuron cycle by cycle against the reference
// neuron under random weighted input, random enable and occasional frame
// clears, and checks the firing time of one hand-worked case: a constant
// input of 40 per step with THETA = 64 (shifts 2) makes I = 40, 70, 93, 110, 123
// and u = 10, 25, 42, 59, 75: the crossing happens at the fifth step, the
// spike is seen in the following cycle, and the neuron then stays silent.
module tb_lif_neuron;
  import snn_ref_pkg::*;

  localparam int IN_W = 13;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [IN_W-1:0] syn_in = '0;
  logic spike, fired;
  int checks = 0, failures = 0;
  int n_spikes = 0;

  lif_neuron #(.IN_W(IN_W), .THETA(64), .TAU_S_SHIFT(2), .TAU_M_SHIFT(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  initial begin
    automatic lif_ref ref_n = new(64, 2, 2);
    automatic int step_no;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Hand-worked case.
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0; en = 1; syn_in = 40;
    step_no = 0;
    for (int c = 0; c < 12; c++) begin
      @(negedge clk);
      step_no++;
      check(spike === (step_no == 5), $sformatf("hand case spike at step %0d", step_no));
      check(fired === (step_no >= 5), "hand case fired");
    end
    // Random comparison.
    @(negedge clk);
    clr = 1; en = 0;
    @(negedge clk);
    ref_n.clear();
    for (int c = 0; c < 5000; c++) begin
      clr    = ($urandom_range(0, 99) == 0);
      en     = ($urandom_range(0, 9) != 0);
      syn_in = IN_W'($signed($urandom_range(0, 400)) - 150);
      @(posedge clk);
      if (clr) ref_n.clear();
      else if (en) ref_n.step(int'(syn_in));
      else ref_n.spike = 0;
      @(negedge clk);
      check(spike === ref_n.spike, "random spike");
      check(fired === ref_n.fired, "random fired");
      n_spikes += int'(spike);
    end
    check(n_spikes > 10, "random run produced spikes");
    $display("spikes in random run: %0d", n_spikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
