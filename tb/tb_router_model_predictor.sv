// tb_router_model_predictor: loads random weights into all 16 per-router
// networks of a 4x4 mesh, drives random buffer occupancies (0 on ports a
// border router does not have) and checks every router's predicted level
// against a reference network built from that router's own channels: 3 at
// corners, 4 on edges, 5 inside. Also checks the frame latency and that a
// weight written to one router's network does not reach another.
module tb_router_model_predictor;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  localparam int MX = 4, MY = 4, R = MX * MY, NH = 15, TP = 3;

  typedef int int_array_t[];

  logic clk = 0, rst_n = 0, ntf = 0;
  logic [R-1:0][N_PORTS-1:0][BOL_W-1:0] bol = '0;
  wcfg_t wcfg = '0;
  logic [R-1:0][LVL_W-1:0] level;
  logic valid, busy;
  logic [R-1:0] out_spike;
  int checks = 0, failures = 0;
  int n_win = 0, n_early = 0, n_silent = 0;
  int n_ports_seen[6];

  router_model_predictor #(.MESH_X(MX), .MESH_Y(MY), .N_HID(NH), .T_P(TP)) dut (.*);

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

  // Channels (N, W, S, E, core) router r has.
  function automatic bit has_port(int r, int p);
    int row = r / MX, col = r % MX;
    case (p)
      0: return row != MY - 1;
      1: return col != 0;
      2: return row != 0;
      3: return col != MX - 1;
      default: return 1;
    endcase
  endfunction

  initial begin : main
    automatic snn_ref m[R];
    automatic int plist[R][$];
    automatic int f;
    for (int r = 0; r < R; r++) begin
      for (int p = 0; p < N_PORTS; p++) if (has_port(r, p)) plist[r].push_back(p);
      m[r] = new(plist[r].size(), NH, 1, SLOTS, ROL_MAX, TP);
      n_ports_seen[plist[r].size()]++;
    end
    f = m[0].frame_len();
    check(n_ports_seen[3] == 4 && n_ports_seen[4] == 8 && n_ports_seen[5] == 4, "3/4/5-input routers in a 4x4 mesh");
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 24; frame++) begin
      if (frame % 6 == 0) begin
        automatic int bias = 20 * (frame / 6);
        for (int r = 0; r < R; r++) begin
          foreach (m[r].wh[j, i]) begin
            m[r].wh[j][i] = $urandom_range(0, 100 + bias) - 50;
            write_w(r, 0, j, i, m[r].wh[j][i]);
          end
          foreach (m[r].wo[k, j]) begin
            m[r].wo[k][j] = $urandom_range(0, 60 + bias) - 35;
            write_w(r, 1, k, j, m[r].wo[k][j]);
          end
        end
      end
      @(negedge clk);
      for (int r = 0; r < R; r++)
        for (int p = 0; p < N_PORTS; p++)
          bol[r][p] = has_port(r, p) ? BOL_W'($urandom_range(0, SLOTS)) : '0;
      ntf = 1;
      @(negedge clk);
      ntf = 0;
      for (int n = 1; n <= f; n++) begin
        bol[$urandom_range(0, R - 1)] = '1;   // changes after sampling are ignored
        @(negedge clk);
        check(valid === (n == f), "valid latency");
      end
      for (int r = 0; r < R; r++) begin
        automatic int vals[] = saved_vals(r, plist[r]);
        automatic int lvl[];
        m[r].run(vals, lvl);
        n_win += m[r].n_in_window; n_early += m[r].n_early; n_silent += m[r].n_silent;
        check(level[r] === LVL_W'(lvl[0]), $sformatf("frame %0d router %0d exp %0d got %0d", frame, r, lvl[0], level[r]));
      end
    end
    $display("router outputs: in window %0d, early %0d, silent %0d", n_win, n_early, n_silent);
    check(n_win > 0 && n_early > 0 && n_silent > 0, "all output cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Copy of bol at the edge that sampled ntf.
  logic [R-1:0][N_PORTS-1:0][BOL_W-1:0] bol_at_ntf;
  always @(posedge clk) if (ntf && !busy) bol_at_ntf <= bol;

  function automatic int_array_t saved_vals(int r, int pl[$]);
    int_array_t v = new[pl.size()];
    foreach (pl[k]) v[k] = int'(bol_at_ntf[r][pl[k]]);
    return v;
  endfunction
endmodule
