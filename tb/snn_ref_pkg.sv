// snn_ref_pkg: cycle-level reference model of the spiking predictors, used by
// the testbenches to work out expected levels without the RTL.
//
// lif_ref mirrors one neuron time step (leaky current, membrane leaking toward
// the current, fire once per frame with reset to zero, 16-bit saturation).
// snn_ref runs a whole frame of an N_IN x N_HID x N_OUT network: latency-coded
// inputs at cycle VMAX - value, one cycle of register delay per layer, and the
// output spike time read as a level (LMAX - cycle in the output window, LMAX
// for an early spike, 0 for none). It also counts which of these cases each
// output fell into, so a testbench can show that all of them occurred.
package snn_ref_pkg;

  function automatic int sat16(int x);
    if (x > 32767)  return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction

  class lif_ref;
    int i_syn, u, theta, ss, ms;
    bit fired, spike;

    function new(int theta_ = 64, int ss_ = 4, int ms_ = 3);
      theta = theta_; ss = ss_; ms = ms_;
      clear();
    endfunction

    function void clear();
      i_syn = 0; u = 0; fired = 0; spike = 0;
    endfunction

    // One enabled time step with summed synaptic input syn.
    function void step(int syn);
      int i_new, u_new;
      bit c;
      i_new = sat16(i_syn - (i_syn >>> ss) + syn);
      u_new = sat16(u + ((i_new - u) >>> ms));
      c     = !fired && (u_new >= theta);
      i_syn = i_new;
      u     = c ? 0 : u_new;
      fired = fired | c;
      spike = c;
    endfunction
  endclass

  class snn_ref;
    int n_in, n_hid, n_out, vmax, lmax, tp;
    int wh[][];
    int wo[][];
    lif_ref hid[];
    lif_ref out[];
    // Per-frame statistics of the last run.
    int n_in_window, n_early, n_silent, n_hid_spikes;

    function new(int n_in_, int n_hid_, int n_out_, int vmax_, int lmax_, int tp_,
                 int theta_h = 64, int theta_o = 64);
      n_in = n_in_; n_hid = n_hid_; n_out = n_out_;
      vmax = vmax_; lmax = lmax_; tp = tp_;
      wh  = new[n_hid];
      foreach (wh[j]) wh[j] = new[n_in];
      wo  = new[n_out];
      foreach (wo[k]) wo[k] = new[n_hid];
      hid = new[n_hid];
      foreach (hid[j]) hid[j] = new(theta_h);
      out = new[n_out];
      foreach (out[k]) out[k] = new(theta_o);
    endfunction

    function int frame_len();
      return (vmax + 1) + tp + (lmax + 1);
    endfunction

    function void run(input int vals[], output int lvl[]);
      int t_i, t_o, f, t, ph; // ph: 1 = TI, 2 = TP, 3 = TO
      bit s0[];
      bit sh[];
      bit so[];
      int acc[];
      t_i = vmax + 1;
      t_o = lmax + 1;
      f   = frame_len();
      s0  = new[n_in];
      sh  = new[n_hid];
      so  = new[n_out];
      acc = new[n_out];
      lvl = new[n_out];
      foreach (hid[j]) hid[j].clear();
      foreach (out[k]) out[k].clear();
      foreach (acc[k]) acc[k] = 0;
      n_in_window = 0; n_early = 0; n_silent = 0; n_hid_spikes = 0;
      for (int c = 0; c < f; c++) begin
        if (c < t_i) begin ph = 1; t = c; end
        else if (c < t_i + tp) begin ph = 2; t = c - t_i; end
        else begin ph = 3; t = c - t_i - tp; end
        foreach (s0[i]) begin
          int v = (vals[i] > vmax) ? vmax : vals[i];
          s0[i] = (ph == 1) && (t == vmax - v);
        end
        foreach (sh[j]) sh[j] = hid[j].spike;
        foreach (so[k]) so[k] = out[k].spike;
        foreach (so[k])
          if (so[k]) begin
            acc[k] = (ph == 3) ? lmax - t : lmax;
            if (ph == 3) n_in_window++; else n_early++;
          end
        foreach (sh[j]) n_hid_spikes += int'(sh[j]);
        foreach (hid[j]) begin
          int syn = 0;
          foreach (s0[i]) if (s0[i]) syn += wh[j][i];
          hid[j].step(syn);
        end
        foreach (out[k]) begin
          int syn = 0;
          foreach (sh[j]) if (sh[j]) syn += wo[k][j];
          out[k].step(syn);
        end
      end
      foreach (acc[k]) lvl[k] = acc[k];
      n_silent = n_out - n_in_window - n_early;
    endfunction
  endclass

endpackage
