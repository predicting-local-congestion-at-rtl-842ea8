// tb_congestion_predictor_top: end-to-end test of the full-size design (4x4
// mesh, 16 router-model networks of (3..5) x 15 x 1 and one 16 x 30 x 16
// network-model network, all parameters at their defaults).
//
// It loads random weights into all 17 networks through the shared weight
// port, then runs prediction frames on random buffer occupancies with a load
// that varies per frame, from an idle mesh to a saturated one. For every
// frame both models' 16 predicted levels are compared with reference models,
// the router model's valid must come 29 and the network model's 46 clock
// edges after the edge that sampled ntf, and ntf pulses during a frame must
// be ignored. It counts how often each mechanism happened and fails if one
// never did: hidden spikes, output spikes inside the output
// window, early (saturated) outputs, silent outputs, ignored ntf pulses.
module tb_congestion_predictor_top;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  localparam int MX = 4, MY = 4, R = MX * MY;
  localparam int RM_LAT = (SLOTS + 1) + 3 + (ROL_MAX + 1);
  localparam int NM_LAT = (ROL_MAX + 1) + 3 + (ROL_MAX + 1) + 1;

  typedef int int_array_t[];

  logic clk = 0, rst_n = 0, ntf = 0;
  logic [R-1:0][N_PORTS-1:0][BOL_W-1:0] bol = '0;
  wcfg_t wcfg = '0;
  logic [R-1:0][LVL_W-1:0] rm_level, nm_level;
  logic rm_valid, rm_busy, nm_valid, nm_busy;
  logic [R-1:0] rm_out_spike, nm_out_spike;
  int checks = 0, failures = 0;
  int rm_win = 0, rm_early = 0, rm_silent = 0, nm_win = 0, nm_early = 0, nm_silent = 0;
  int n_hid = 0, n_ignored = 0, n_frames = 0, n_rm_spikes = 0, n_nm_spikes = 0;

  congestion_predictor_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  always @(posedge clk) begin
    n_rm_spikes += $countones(rm_out_spike);
    n_nm_spikes += $countones(nm_out_spike);
  end

  initial begin : main
    automatic snn_ref rm[R];
    automatic snn_ref nm = new(R, 30, R, ROL_MAX, ROL_MAX, 3);
    automatic int plist[R][$];
    automatic int rol[] = new[R];
    automatic int nlvl[];
    automatic int rlvl[R];
    automatic int seen_rm, seen_nm;
    for (int r = 0; r < R; r++) begin
      for (int p = 0; p < N_PORTS; p++) if (has_port(r, p)) plist[r].push_back(p);
      rm[r] = new(plist[r].size(), 15, 1, SLOTS, ROL_MAX, 3);
    end
    check(rm[0].frame_len() == RM_LAT && nm.frame_len() + 1 == NM_LAT, "frame lengths");
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 20; frame++) begin
      if (frame % 5 == 0) begin
        automatic int bias = 15 * (frame / 5);
        for (int r = 0; r < R; r++) begin
          foreach (rm[r].wh[j, i]) begin
            rm[r].wh[j][i] = $urandom_range(0, 100 + bias + bias / 2) - 50;
            write_w(r, 0, j, i, rm[r].wh[j][i]);
          end
          foreach (rm[r].wo[k, j]) begin
            rm[r].wo[k][j] = $urandom_range(0, 60 + 2 * bias) - 35;
            write_w(r, 1, k, j, rm[r].wo[k][j]);
          end
        end
        foreach (nm.wh[j, i]) begin
          nm.wh[j][i] = $urandom_range(0, 90 + bias) - 50;
          write_w(R, 0, j, i, nm.wh[j][i]);
        end
        foreach (nm.wo[k, j]) begin
          nm.wo[k][j] = $urandom_range(0, 50 + bias) - 30;
          write_w(R, 1, k, j, nm.wo[k][j]);
        end
      end
      // Occupancy snapshot: per-frame load from idle to saturated, with one
      // hotspot router whose buffers are full.
      @(negedge clk);
      begin
        automatic int load = frame % (SLOTS + 1);
        automatic int hot = $urandom_range(0, R - 1);
        for (int r = 0; r < R; r++) begin
          rol[r] = 0;
          for (int p = 0; p < N_PORTS; p++) begin
            bol[r][p] = !has_port(r, p) ? '0 :
                        (r == hot) ? BOL_W'(SLOTS) : BOL_W'($urandom_range(0, load));
            rol[r] += int'(bol[r][p]);
          end
        end
      end
      // Reference results from the snapshot.
      for (int r = 0; r < R; r++) begin
        automatic int vals[] = new[plist[r].size()];
        automatic int l[];
        foreach (vals[k]) vals[k] = int'(bol[r][plist[r][k]]);
        rm[r].run(vals, l);
        rlvl[r] = l[0];
        rm_win += rm[r].n_in_window; rm_early += rm[r].n_early; rm_silent += rm[r].n_silent;
        n_hid += rm[r].n_hid_spikes;
      end
      nm.run(rol, nlvl);
      nm_win += nm.n_in_window; nm_early += nm.n_early; nm_silent += nm.n_silent;
      n_hid += nm.n_hid_spikes;
      ntf = 1;
      @(negedge clk);
      ntf = 0;
      seen_rm = 0; seen_nm = 0;
      for (int n = 1; n <= NM_LAT; n++) begin
        if (n < RM_LAT && $urandom_range(0, 7) == 0) begin ntf = 1; n_ignored++; end
        bol[$urandom_range(0, R - 1)] = '1;
        @(negedge clk);
        ntf = 0;
        check(rm_valid === (n == RM_LAT), "router-model latency");
        check(nm_valid === (n == NM_LAT), "network-model latency");
        if (n == RM_LAT)
          for (int r = 0; r < R; r++)
            check(rm_level[r] === LVL_W'(rlvl[r]), $sformatf("frame %0d rm router %0d exp %0d got %0d", frame, r, rlvl[r], rm_level[r]));
      end
      for (int r = 0; r < R; r++)
        check(nm_level[r] === LVL_W'(nlvl[r]), $sformatf("frame %0d nm router %0d exp %0d got %0d", frame, r, nlvl[r], nm_level[r]));
      check(!rm_busy && !nm_busy, "both idle after frame");
      n_frames++;
    end
    $display("frames %0d, hidden spikes %0d, ignored ntf %0d", n_frames, n_hid, n_ignored);
    $display("router model:  in window %0d, early %0d, silent %0d, output spikes seen %0d", rm_win, rm_early, rm_silent, n_rm_spikes);
    $display("network model: in window %0d, early %0d, silent %0d, output spikes seen %0d", nm_win, nm_early, nm_silent, n_nm_spikes);
    check(n_hid > 0, "hidden spikes happened");
    check(rm_win > 0 && nm_win > 0, "output spikes inside the output window happened in both models");
    check(rm_early > 0 && nm_early > 0, "early outputs happened in both models");
    check(rm_silent > 0 && nm_silent > 0, "silent outputs happened in both models");
    check(n_ignored > 0, "ntf during a frame happened");
    check(n_rm_spikes == rm_win + rm_early && n_nm_spikes == nm_win + nm_early, "output spike counts agree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
