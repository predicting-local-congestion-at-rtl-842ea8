// tb_spike_decoder: drives frames of phase/t sequences with one random spike
// time (or none) per output and checks the levels at the end of the output
// window: LMAX - t for a spike in T_o, LMAX for a spike in T_i/T_p, 0 for no
// spike, with valid one cycle after the last T_o cycle and levels held after.
module tb_spike_decoder;
  import snn_pkg::*;

  localparam int N = 5;
  localparam int LMAX = 20;
  localparam int TI = 5, TP = 4, TO = LMAX + 1;

  logic clk = 0, rst_n = 0, clr = 0, last = 0;
  logic [N-1:0] spike = '0;
  phase_t phase = PH_IDLE;
  logic [T_W-1:0] t = '0;
  logic [N-1:0][LVL_W-1:0] level;
  logic valid;
  int checks = 0, failures = 0;
  int n_early = 0, n_win = 0, n_none = 0;

  spike_decoder #(.N(N), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    automatic int when[N];   // frame cycle of the spike, -1 for none
    automatic int expv[N];
    automatic int f = TI + TP + TO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 300; frame++) begin
      @(negedge clk);
      clr = 1;
      foreach (when[k]) begin
        when[k] = ($urandom_range(0, 5) == 0) ? -1 : $urandom_range(0, f - 1);
        if (when[k] < 0) begin expv[k] = 0; n_none++; end
        else if (when[k] < TI + TP) begin expv[k] = LMAX; n_early++; end
        else begin expv[k] = LMAX - (when[k] - TI - TP); n_win++; end
      end
      @(negedge clk);
      clr = 0;
      for (int c = 0; c < f; c++) begin
        if (c < TI) begin phase = PH_TI; t = T_W'(c); end
        else if (c < TI + TP) begin phase = PH_TP; t = T_W'(c - TI); end
        else begin phase = PH_TO; t = T_W'(c - TI - TP); end
        last = (c == f - 1);
        foreach (when[k]) spike[k] = (when[k] == c);
        @(negedge clk);
        check(valid === (c == f - 1), "valid timing");
      end
      phase = PH_IDLE; t = 0; last = 0; spike = '0;
      foreach (expv[k]) check(level[k] === LVL_W'(expv[k]), $sformatf("level %0d exp %0d got %0d", k, expv[k], level[k]));
      @(negedge clk);
      check(!valid, "valid one cycle");
      foreach (expv[k]) check(level[k] === LVL_W'(expv[k]), "level held");
    end
    check(n_early > 0 && n_win > 0 && n_none > 0, "all three cases");
    $display("early=%0d in_window=%0d none=%0d", n_early, n_win, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
