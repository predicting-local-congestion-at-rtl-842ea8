// tb_workload_traffic: runs the full-size predictor on buffer occupancies
// produced by a simple behavioural 4x4 mesh NoC under the synthetic traffic
// patterns transpose1, transpose2, butterfly and shuffle, 2000 cycles each at a
// packet injection rate of 0.5.
//
// The mesh model: single-flit packets, five 4-slot input buffers per router
// (north, west, south, east, core), dimension-order XY routing, one flit per
// output port per cycle chosen round-robin, a flit moves only if the
// downstream buffer has room, ejection always accepts. Node id = y*4 + x.
// Destinations: transpose1 (3-y, 3-x), transpose2 (y, x), butterfly swaps the
// top and bottom bit of the 4-bit id, shuffle rotates it left by one; a node
// whose destination is itself does not inject.
//
// Every 60 cycles the occupancies are sampled with ntf (both models are idle
// by then); each prediction of both models is compared with the reference
// networks. Random weights stand in for trained ones, so the levels are not
// expected to match the future occupancy: the bench shows that the design
// holds and runs these workloads and reports how congested the mesh became.
module tb_workload_traffic;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  localparam int MX = 4, MY = 4, R = MX * MY;
  localparam int CYCLES = 2000, PERIOD = 60;

  logic clk = 0, rst_n = 0, ntf = 0;
  logic [R-1:0][N_PORTS-1:0][BOL_W-1:0] bol = '0;
  wcfg_t wcfg = '0;
  logic [R-1:0][LVL_W-1:0] rm_level, nm_level;
  logic rm_valid, rm_busy, nm_valid, nm_busy;
  logic [R-1:0] rm_out_spike, nm_out_spike;
  int checks = 0, failures = 0;

  congestion_predictor_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // ---------------- behavioural mesh ----------------
  int q[R][N_PORTS][$];     // destination ids of the flits in each buffer
  int rr[R][N_PORTS];       // round-robin pointer per output port

  function automatic int dest_of(int pattern, int src);
    int x = src % MX, y = src / MX;
    case (pattern)
      0: return (MX - 1 - x) * MX + (MY - 1 - y);             // transpose1: (3-y, 3-x)
      1: return x * MX + y;                                    // transpose2: (y, x)
      2: return (src & 6) | ((src >> 3) & 1) | ((src & 1) << 3); // butterfly
      default: return ((src << 1) & 15) | ((src >> 3) & 1);  // shuffle
    endcase
  endfunction

  // Output port for a flit at router r heading to d (P_C = eject).
  function automatic int route(int r, int d);
    int x = r % MX, y = r / MX, dx = d % MX, dy = d / MX;
    if (dx > x) return P_E;
    if (dx < x) return P_W;
    if (dy > y) return P_N;
    if (dy < y) return P_S;
    return P_C;
  endfunction

  function automatic int neighbour(int r, int o);
    case (o)
      P_N: return r + MX;
      P_S: return r - MX;
      P_E: return r + 1;
      default: return r - 1;
    endcase
  endfunction

  function automatic int opposite(int o);
    case (o)
      P_N: return P_S;
      P_S: return P_N;
      P_E: return P_W;
      default: return P_E;
    endcase
  endfunction

  int n_full_buffers, n_moves, n_blocked_inject, n_delivered;

  task automatic noc_step(int pattern);
    int mv_r[$], mv_p[$], mv_o[$];
    bit taken[R][N_PORTS];
    foreach (taken[r, p]) taken[r][p] = 0;
    for (int r = 0; r < R; r++)
      for (int o = 0; o < N_PORTS; o++)
        for (int k = 0; k < N_PORTS; k++) begin
          int p = (rr[r][o] + k) % N_PORTS;
          if (!taken[r][p] && q[r][p].size() > 0 && route(r, q[r][p][0]) == o) begin
            if (o == P_C || q[neighbour(r, o)][opposite(o)].size() < SLOTS) begin
              taken[r][p] = 1;
              mv_r.push_back(r); mv_p.push_back(p); mv_o.push_back(o);
              rr[r][o] = (p + 1) % N_PORTS;
              break;
            end
          end
        end
    foreach (mv_r[i]) begin
      int d = q[mv_r[i]][mv_p[i]].pop_front();
      n_moves++;
      if (mv_o[i] == P_C) n_delivered++;
      else q[neighbour(mv_r[i], mv_o[i])][opposite(mv_o[i])].push_back(d);
    end
    for (int r = 0; r < R; r++) begin
      int d = dest_of(pattern, r);
      if (d != r && $urandom_range(0, 1) == 1) begin
        if (q[r][P_C].size() < SLOTS) q[r][P_C].push_back(d);
        else n_blocked_inject++;
      end
    end
    foreach (q[r, p]) begin
      bol[r][p] = BOL_W'(q[r][p].size());
      if (q[r][p].size() == SLOTS) n_full_buffers++;
    end
  endtask

  initial begin : main
    automatic snn_ref rm[R];
    automatic snn_ref nm = new(R, 30, R, ROL_MAX, ROL_MAX, 3);
    automatic int plist[R][$];
    automatic string names[4] = '{"transpose1", "transpose2", "butterfly", "shuffle"};
    automatic int rm_exp[R];
    automatic int nm_exp[];
    automatic int n_pred;
    automatic int rm_seen, nm_seen;
    for (int r = 0; r < R; r++) begin
      for (int p = 0; p < N_PORTS; p++) if (has_port(r, p)) plist[r].push_back(p);
      rm[r] = new(plist[r].size(), 15, 1, SLOTS, ROL_MAX, 3);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) begin
      foreach (rm[r].wh[j, i]) begin
        rm[r].wh[j][i] = $urandom_range(0, 130) - 50;
        write_w(r, 0, j, i, rm[r].wh[j][i]);
      end
      foreach (rm[r].wo[k, j]) begin
        rm[r].wo[k][j] = $urandom_range(0, 80) - 35;
        write_w(r, 1, k, j, rm[r].wo[k][j]);
      end
    end
    foreach (nm.wh[j, i]) begin
      nm.wh[j][i] = $urandom_range(0, 100) - 50;
      write_w(R, 0, j, i, nm.wh[j][i]);
    end
    foreach (nm.wo[k, j]) begin
      nm.wo[k][j] = $urandom_range(0, 60) - 30;
      write_w(R, 1, k, j, nm.wo[k][j]);
    end
    for (int pat = 0; pat < 4; pat++) begin
      automatic int max_rol = 0;
      foreach (q[r, p]) q[r][p].delete();
      foreach (rr[r, o]) rr[r][o] = 0;
      n_full_buffers = 0; n_moves = 0; n_blocked_inject = 0; n_delivered = 0;
      n_pred = 0; rm_seen = 0; nm_seen = 0;
      for (int c = 0; c < CYCLES; c++) begin
        @(negedge clk);
        ntf = 0;
        noc_step(pat);
        for (int r = 0; r < R; r++) begin
          automatic int s = 0;
          for (int p = 0; p < N_PORTS; p++) s += int'(bol[r][p]);
          if (s > max_rol) max_rol = s;
        end
        if (c % PERIOD == 10 && c + PERIOD < CYCLES) begin
          automatic int rol[] = new[R];
          check(!rm_busy && !nm_busy, "models idle at sample time");
          for (int r = 0; r < R; r++) begin
            automatic int vals[] = new[plist[r].size()];
            automatic int l[];
            foreach (vals[k]) vals[k] = int'(bol[r][plist[r][k]]);
            rm[r].run(vals, l);
            rm_exp[r] = l[0];
            rol[r] = 0;
            for (int p = 0; p < N_PORTS; p++) rol[r] += int'(bol[r][p]);
          end
          nm.run(rol, nm_exp);
          ntf = 1;
          n_pred++;
        end
        if (rm_valid) begin
          rm_seen++;
          for (int r = 0; r < R; r++) check(rm_level[r] === LVL_W'(rm_exp[r]), $sformatf("%s rm router %0d", names[pat], r));
        end
        if (nm_valid) begin
          nm_seen++;
          for (int r = 0; r < R; r++) check(nm_level[r] === LVL_W'(nm_exp[r]), $sformatf("%s nm router %0d", names[pat], r));
        end
      end
      @(negedge clk);
      ntf = 0;
      check(rm_seen == n_pred && nm_seen == n_pred, $sformatf("%s: every sample predicted", names[pat]));
      check(n_full_buffers > 0, $sformatf("%s: congestion (full buffers) occurred", names[pat]));
      check(n_delivered > 0, $sformatf("%s: packets delivered", names[pat]));
      $display("%-10s: %0d predictions per model, %0d flits delivered, max ROL %0d, full-buffer cycles %0d, blocked injections %0d",
               names[pat], n_pred, n_delivered, max_rol, n_full_buffers, n_blocked_inject);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
