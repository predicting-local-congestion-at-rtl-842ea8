// tb_network_model_predictor: loads random weights into the single
// 16 x 30 x 16 network, drives random buffer occupancies with a varying
// load per frame, and checks all 16 predicted levels against a reference
// network fed with each router's summed occupancy. Also checks that valid
// comes T_I+T_P+T_O+1 clock edges after the edge that sampled ntf (one edge
// for the occupancy sum) and that weights addressed to another SNN are ignored.
module tb_network_model_predictor;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  localparam int MX = 4, MY = 4, R = MX * MY, NH = 30, TP = 3;

  logic clk = 0, rst_n = 0, ntf = 0;
  logic [R-1:0][N_PORTS-1:0][BOL_W-1:0] bol = '0;
  wcfg_t wcfg = '0;
  logic [R-1:0][LVL_W-1:0] level;
  logic valid, busy;
  logic [R-1:0] out_spike;
  int checks = 0, failures = 0;
  int n_win = 0, n_early = 0, n_silent = 0;

  network_model_predictor #(.MESH_X(MX), .MESH_Y(MY), .N_HID(NH), .T_P(TP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic write_w(int sel, bit layer, int post, int pre, int val);
    @(negedge clk);
    wcfg.we = 1; wcfg.sel = SEL_W'(sel); wcfg.layer = layer;
    wcfg.post = IDX_W'(post); wcfg.pre = IDX_W'(pre); wcfg.data = W_W'(val);
    @(negedge clk);
    wcfg = '0;
  endtask

  initial begin : main
    automatic snn_ref m = new(R, NH, R, ROL_MAX, ROL_MAX, TP);
    automatic int vals[] = new[R];
    automatic int lvl[];
    automatic int f = m.frame_len() + 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 48; frame++) begin
      if (frame % 6 == 0) begin
        automatic int bias = 10 * (frame / 6);
        foreach (m.wh[j, i]) begin
          m.wh[j][i] = $urandom_range(0, 90 + bias) - 50;
          write_w(R, 0, j, i, m.wh[j][i]);
        end
        foreach (m.wo[k, j]) begin
          m.wo[k][j] = $urandom_range(0, 50 + bias) - 30;
          write_w(R, 1, k, j, m.wo[k][j]);
        end
        // Writes for another SNN select must not land here.
        write_w(0, 0, 0, 0, 127);
        write_w(R + 1, 1, 0, 0, -128);
      end
      @(negedge clk);
      begin
        automatic int load = $urandom_range(0, SLOTS);
        for (int r = 0; r < R; r++) begin
          vals[r] = 0;
          for (int p = 0; p < N_PORTS; p++) begin
            bol[r][p] = BOL_W'($urandom_range(0, load));
            vals[r] += int'(bol[r][p]);
          end
        end
      end
      ntf = 1;
      @(negedge clk);
      ntf = 0;
      m.run(vals, lvl);
      n_win += m.n_in_window; n_early += m.n_early; n_silent += m.n_silent;
      for (int n = 1; n <= f; n++) begin
        bol[$urandom_range(0, R - 1)] = '1;   // later changes are ignored
        @(negedge clk);
        check(valid === (n == f), "valid latency");
      end
      foreach (lvl[r]) check(level[r] === LVL_W'(lvl[r]), $sformatf("frame %0d router %0d exp %0d got %0d", frame, r, lvl[r], level[r]));
    end
    $display("network outputs: in window %0d, early %0d, silent %0d", n_win, n_early, n_silent);
    check(n_win > 0 && n_early > 0 && n_silent > 0, "all output cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
