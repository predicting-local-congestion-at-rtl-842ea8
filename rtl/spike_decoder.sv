// spike_decoder: reads the output neurons' first spike times as levels.
//
// A spike of output neuron k in cycle t of the output window (phase PH_TO)
// means level LMAX - t: the earlier, the higher. A spike already in the input
// or processing window saturates to LMAX; no spike in the frame means level 0.
// Each output neuron spikes at most once per frame, so the level seen is the
// one of its first spike. At the last cycle of the output window (last high)
// the levels are copied to the level outputs, which hold until the next frame
// ends, and valid pulses for one cycle after that edge. clr (frame start)
// clears the working levels.
// Decoding the output spike times inside T_o follows the predictor's
// description; the linear mapping and the saturation rules are choices of this
// design.
module spike_decoder
  import snn_pkg::*;
#(
  parameter int N    = 16,
  parameter int LMAX = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic [N-1:0]            spike,
  input  phase_t                  phase,
  input  logic [T_W-1:0]          t,
  input  logic                    last,
  output logic [N-1:0][LVL_W-1:0] level,
  output logic                    valid
);

  logic [N-1:0][LVL_W-1:0] acc, acc_next;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      acc_next[k] = acc[k];
      if (spike[k]) begin
        if (phase == PH_TO)
          acc_next[k] = LVL_W'(LMAX) - LVL_W'(t);
        else if (phase == PH_TI || phase == PH_TP)
          acc_next[k] = LVL_W'(LMAX);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      level <= '0;
      valid <= 1'b0;
    end else begin
      acc   <= clr ? '0 : acc_next;
      valid <= last;
      if (last) level <= acc_next;
    end
  end

endmodule
