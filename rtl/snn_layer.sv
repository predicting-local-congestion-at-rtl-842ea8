// snn_layer: one fully connected layer of a spiking neural network.
//
// Every presynaptic neuron i connects to every postsynaptic neuron j through a
// signed weight w[j][i]. Each cycle the layer adds, for each postsynaptic
// neuron, the weights of the presynaptic neurons whose spike is high in that
// cycle, and hands the sum to that neuron's lif_neuron as its synaptic input.
// The weights are registers written one at a time through the w_* port
// (w_post selects j, w_pre selects i; out-of-range indices are ignored) and
// are cleared by reset, so a layer without loaded weights stays silent.
//
// Timing: s_out is the registered spike of each neuron, one cycle after the
// input spikes that caused the crossing. clr and en are passed to every neuron.
// Full connectivity follows the predictor's description; the weight register
// file and its write port are choices of this design (the weights come from
// offline training).
module snn_layer
  import snn_pkg::*;
#(
  parameter int N_IN        = 16,
  parameter int N_OUT       = 30,
  parameter int THETA       = 64,
  parameter int TAU_S_SHIFT = 4,
  parameter int TAU_M_SHIFT = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [N_IN-1:0]  s_in,
  input  logic             w_we,
  input  logic [IDX_W-1:0] w_post,
  input  logic [IDX_W-1:0] w_pre,
  input  weight_t          w_data,
  output logic [N_OUT-1:0] s_out
);

  localparam int IN_W = W_W + $clog2(N_IN + 1);

  weight_t w [N_OUT][N_IN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_OUT; j++)
        for (int i = 0; i < N_IN; i++)
          w[j][i] <= '0;
    end else if (w_we) begin
      for (int j = 0; j < N_OUT; j++)
        for (int i = 0; i < N_IN; i++)
          if (w_post == IDX_W'(j) && w_pre == IDX_W'(i))
            w[j][i] <= w_data;
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_neuron
    logic signed [IN_W-1:0] syn;
    logic                   fired_unused;

    always_comb begin
      syn = '0;
      for (int i = 0; i < N_IN; i++)
        if (s_in[i]) syn = syn + IN_W'(w[j][i]);
    end

    lif_neuron #(
      .IN_W       (IN_W),
      .THETA      (THETA),
      .TAU_S_SHIFT(TAU_S_SHIFT),
      .TAU_M_SHIFT(TAU_M_SHIFT)
    ) u_neuron (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .en    (en),
      .syn_in(syn),
      .spike (s_out[j]),
      .fired (fired_unused)
    );
  end

endmodule
