// tb_snn_frame_ctrl: checks the phase sequence T_i, T_p, T_o of a frame, the
// cycle counter, start/last/busy, the frame length T_I+T_P+T_O, and that an
// ntf pulse during a frame is ignored.
module tb_snn_frame_ctrl;
  import snn_pkg::*;

  localparam int TI = 5, TP = 3, TO = 7;

  logic clk = 0, rst_n = 0, ntf = 0;
  logic start, last, busy;
  phase_t phase;
  logic [T_W-1:0] t;
  int checks = 0, failures = 0;
  int n_ignored = 0;

  snn_frame_ctrl #(.T_I(TI), .T_P(TP), .T_O(TO)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 50; frame++) begin
      @(negedge clk);
      check(phase == PH_IDLE && !busy, "idle before frame");
      ntf = 1;
      #1 check(start, "start with ntf when idle");
      @(negedge clk);
      ntf = 0;
      for (int c = 0; c < TI + TP + TO; c++) begin
        automatic phase_t ep = (c < TI) ? PH_TI : (c < TI + TP) ? PH_TP : PH_TO;
        automatic int et = (c < TI) ? c : (c < TI + TP) ? c - TI : c - TI - TP;
        // ntf in the middle of a frame must be ignored
        ntf = ($urandom_range(0, 3) == 0);
        #1;
        check(phase == ep && t == T_W'(et), $sformatf("phase/t at frame cycle %0d", c));
        check(busy, "busy");
        check(!start, "no start while busy");
        if (ntf) n_ignored++;
        check(last == (c == TI + TP + TO - 1), "last");
        @(negedge clk);
      end
      ntf = 0;
      #1 check(!busy, "frame ends after T_I+T_P+T_O cycles");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(n_ignored > 0, "ntf during frame exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
