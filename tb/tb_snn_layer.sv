// tb_snn_layer: loads random weights through the write port (plus writes to
// out-of-range indices, which must be ignored), then drives random input
// spikes, enables and frame clears and compares every output spike with a
// reference layer built from the same weights.
module tb_snn_layer;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  localparam int NI = 8, NO = 6;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [NI-1:0] s_in = '0;
  logic w_we = 0;
  logic [IDX_W-1:0] w_post = '0, w_pre = '0;
  weight_t w_data = '0;
  logic [NO-1:0] s_out;
  int checks = 0, failures = 0;
  int n_out_spikes = 0;

  snn_layer #(.N_IN(NI), .N_OUT(NO), .THETA(64)) dut (.*);

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

  task automatic write_w(int post, int pre, int val);
    @(negedge clk);
    w_we = 1; w_post = IDX_W'(post); w_pre = IDX_W'(pre); w_data = W_W'(val);
    @(negedge clk);
    w_we = 0;
  endtask

  initial begin : main
    automatic int w[NO][NI];
    automatic lif_ref nrn[NO];
    foreach (nrn[j]) nrn[j] = new(64);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (w[j, i]) begin
      w[j][i] = $urandom_range(0, 140) - 40;
      write_w(j, i, w[j][i]);
    end
    // Out-of-range writes change nothing.
    write_w(NO, 0, 127);
    write_w(0, NI, 127);
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    foreach (nrn[j]) nrn[j].clear();
    for (int c = 0; c < 8000; c++) begin
      clr = ($urandom_range(0, 49) == 0);
      en  = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < NI; i++) s_in[i] = ($urandom_range(0, 4) == 0);
      @(posedge clk);
      foreach (nrn[j]) begin
        if (clr) nrn[j].clear();
        else if (en) begin
          automatic int syn = 0;
          for (int i = 0; i < NI; i++) if (s_in[i]) syn += w[j][i];
          nrn[j].step(syn);
        end else nrn[j].spike = 0;
      end
      @(negedge clk);
      foreach (nrn[j]) check(s_out[j] === nrn[j].spike, $sformatf("neuron %0d spike", j));
      n_out_spikes += $countones(s_out);
    end
    check(n_out_spikes > 20, "layer produced spikes");
    $display("output spikes: %0d", n_out_spikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
