// tb_spike_encoder: loads random values (some above VMAX), sweeps the input
// window and checks that each input spikes exactly once, at cycle
// VMAX - min(value, VMAX), and never outside the window.
module tb_spike_encoder;
  import snn_pkg::*;

  localparam int N = 6;
  localparam int VMAX = 20;

  logic clk = 0, rst_n = 0, load = 0, active = 0;
  logic [N-1:0][LVL_W-1:0] value = '0;
  logic [T_W-1:0] t = '0;
  logic [N-1:0] spike;
  int checks = 0, failures = 0;

  spike_encoder #(.N(N), .VMAX(VMAX)) dut (.*);

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
    automatic int vals[N];
    automatic int cnt[N];
    automatic int clamped = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 200; frame++) begin
      @(negedge clk);
      foreach (vals[i]) begin
        vals[i] = $urandom_range(0, 25);
        value[i] = LVL_W'(vals[i]);
        if (vals[i] > VMAX) clamped++;
      end
      load = 1;
      @(negedge clk);
      load = 0;
      value = '1;   // must not disturb the latched values
      foreach (cnt[i]) cnt[i] = 0;
      active = 1;
      for (int c = 0; c <= VMAX; c++) begin
        t = T_W'(c);
        #1;
        for (int i = 0; i < N; i++) begin
          automatic int v = (vals[i] > VMAX) ? VMAX : vals[i];
          check(spike[i] === (c == VMAX - v), $sformatf("spike %0d at t=%0d v=%0d", i, c, vals[i]));
          cnt[i] += int'(spike[i]);
        end
        @(negedge clk);
      end
      active = 0;
      t = 0;
      #1;
      check(spike === '0, "no spike outside window");
      foreach (cnt[i]) check(cnt[i] == 1, "exactly one spike");
    end
    check(clamped > 0, "clamping exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
