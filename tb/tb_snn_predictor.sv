// tb_snn_predictor: runs many prediction frames of a 5 x 15 x 3 network with
// random weights (reloaded every few frames with a varying bias, so outputs
// fire early, inside the output window, or not at all) and random input
// values, and compares the predicted levels with the reference model. It also
// checks that valid comes exactly T_I+T_P+T_O clock edges after the edge that
// sampled ntf, that ntf pulses and input changes during a frame have no
// effect, and that each decoding case occurred.
module tb_snn_predictor;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  localparam int NI = 5, NH = 15, NO = 3, VMAX = SLOTS, LMAX = ROL_MAX, TP = 8;

  logic clk = 0, rst_n = 0, ntf = 0;
  logic [NI-1:0][LVL_W-1:0] value = '0;
  logic w_we = 0, w_layer = 0;
  logic [IDX_W-1:0] w_post = '0, w_pre = '0;
  weight_t w_data = '0;
  logic [NO-1:0][LVL_W-1:0] level;
  logic valid, busy;
  logic [NO-1:0] out_spike;
  int checks = 0, failures = 0;
  int n_win = 0, n_early = 0, n_silent = 0, n_ignored = 0;

  snn_predictor #(.N_IN(NI), .N_HID(NH), .N_OUT(NO), .VMAX(VMAX), .LMAX(LMAX), .T_P(TP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic write_w(bit layer, int post, int pre, int val);
    @(negedge clk);
    w_we = 1; w_layer = layer; w_post = IDX_W'(post); w_pre = IDX_W'(pre); w_data = W_W'(val);
    @(negedge clk);
    w_we = 0;
  endtask

  initial begin : main
    automatic snn_ref m = new(NI, NH, NO, VMAX, LMAX, TP);
    automatic int vals[] = new[NI];
    automatic int lvl[];
    automatic int f = m.frame_len();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 160; frame++) begin
      if (frame % 8 == 0) begin
        automatic int bias = $urandom_range(0, 80);
        foreach (m.wh[j, i]) begin
          m.wh[j][i] = $urandom_range(0, 100 + bias) - 60;
          write_w(0, j, i, m.wh[j][i]);
        end
        foreach (m.wo[k, j]) begin
          m.wo[k][j] = $urandom_range(0, 60 + bias) - 40;
          write_w(1, k, j, m.wo[k][j]);
        end
      end
      @(negedge clk);
      foreach (vals[i]) begin
        vals[i] = $urandom_range(0, VMAX);
        value[i] = LVL_W'(vals[i]);
      end
      ntf = 1;
      @(negedge clk);   // edge E0 sampled ntf
      ntf = 0;
      m.run(vals, lvl);
      n_win += m.n_in_window; n_early += m.n_early; n_silent += m.n_silent;
      for (int n = 1; n <= f; n++) begin
        if ($urandom_range(0, 9) == 0) begin ntf = 1; n_ignored++; end
        value[$urandom_range(0, NI - 1)] = LVL_W'($urandom_range(0, VMAX));
        check(busy == 1'b1, "busy during frame");
        @(negedge clk);
        ntf = 0;
        check(valid === (n == f), $sformatf("valid after %0d edges (frame %0d)", n, f));
      end
      foreach (lvl[k]) check(level[k] === LVL_W'(lvl[k]), $sformatf("frame %0d level %0d exp %0d got %0d", frame, k, lvl[k], level[k]));
      check(!busy, "idle after frame");
    end
    $display("outputs: in window %0d, early %0d, silent %0d; ignored ntf %0d", n_win, n_early, n_silent, n_ignored);
    check(n_win > 0, "output spike inside T_o occurred");
    check(n_early > 0, "early output spike occurred");
    check(n_silent > 0, "silent output occurred");
    check(n_ignored > 0, "ntf during frame occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
