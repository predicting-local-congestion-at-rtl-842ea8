// spike_encoder: latency (time-to-first-spike) encoding of occupancy values.
//
// On load the N input values are latched, clamped to VMAX. During the input
// window (active high, cycle counter t = 0..VMAX) input i emits exactly one
// spike, in the cycle where t == VMAX - value[i]: a fuller buffer spikes
// earlier, an empty one in the last cycle of the window. The window therefore
// needs VMAX+1 cycles.
// Carrying each value as one spike time in the input window follows the
// predictor's description; the mapping t = VMAX - value is a choice of this
// design.
module spike_encoder
  import snn_pkg::*;
#(
  parameter int N    = 16,
  parameter int VMAX = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0][LVL_W-1:0] value,
  input  logic                 active,
  input  logic [T_W-1:0]       t,
  output logic [N-1:0]         spike
);

  logic [N-1:0][LVL_W-1:0] v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (load) begin
      for (int i = 0; i < N; i++)
        v_q[i] <= (value[i] > LVL_W'(VMAX)) ? LVL_W'(VMAX) : value[i];
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      spike[i] = active && (t == T_W'(VMAX - int'(v_q[i])));
  end

endmodule
