// snn_predictor: one fully connected three-layer LIF spiking network that maps
// occupancy values to predicted occupancy levels, one frame at a time.
//
// Structure: spike_encoder (N_IN values -> one spike each in the input
// window) -> snn_layer N_IN x N_HID -> snn_layer N_HID x N_OUT ->
// spike_decoder (first output spike time -> level), sequenced by
// snn_frame_ctrl.
//
// Timing: an ntf pulse while idle samples value at that clock edge and starts a
// frame of T_I = VMAX+1 input cycles, T_P processing cycles and T_O = LMAX+1
// output cycles. valid pulses, with level updated, exactly T_I+T_P+T_O clock
// edges after the edge that sampled ntf; busy is high during the frame and
// ntf is ignored while it is. Every neuron advances one time step per cycle of
// the frame and is cleared when the next frame starts. out_spike shows the
// output neurons' spikes as they happen.
// Weights: w_we writes w_data to layer w_layer (0 = input->hidden,
// 1 = hidden->output) at [w_post][w_pre]; they may be written at any time and
// are cleared by reset.
// The layer sizes come from the instantiating model; thresholds, leaks and the
// encoding are choices of this design, as the trained values are not given.
module snn_predictor
  import snn_pkg::*;
#(
  parameter int N_IN        = 16,
  parameter int N_HID       = 30,
  parameter int N_OUT       = 16,
  parameter int VMAX        = ROL_MAX,
  parameter int LMAX        = ROL_MAX,
  parameter int T_P         = 3,
  parameter int THETA_H     = 64,
  parameter int THETA_O     = 64,
  parameter int TAU_S_SHIFT = 4,
  parameter int TAU_M_SHIFT = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ntf,
  input  logic [N_IN-1:0][LVL_W-1:0]  value,
  input  logic                        w_we,
  input  logic                        w_layer,
  input  logic [IDX_W-1:0]            w_post,
  input  logic [IDX_W-1:0]            w_pre,
  input  weight_t                     w_data,
  output logic [N_OUT-1:0][LVL_W-1:0] level,
  output logic                        valid,
  output logic                        busy,
  output logic [N_OUT-1:0]            out_spike
);

  localparam int T_I = VMAX + 1;
  localparam int T_O = LMAX + 1;

  logic           start, last;
  phase_t         phase;
  logic [T_W-1:0] t;
  logic [N_IN-1:0]  s_in;
  logic [N_HID-1:0] s_hid;

  snn_frame_ctrl #(.T_I(T_I), .T_P(T_P), .T_O(T_O)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .ntf  (ntf),
    .start(start),
    .phase(phase),
    .t    (t),
    .last (last),
    .busy (busy)
  );

  spike_encoder #(.N(N_IN), .VMAX(VMAX)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start),
    .value (value),
    .active(phase == PH_TI),
    .t     (t),
    .spike (s_in)
  );

  snn_layer #(
    .N_IN(N_IN), .N_OUT(N_HID), .THETA(THETA_H),
    .TAU_S_SHIFT(TAU_S_SHIFT), .TAU_M_SHIFT(TAU_M_SHIFT)
  ) u_hidden (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (start),
    .en    (busy),
    .s_in  (s_in),
    .w_we  (w_we && !w_layer),
    .w_post(w_post),
    .w_pre (w_pre),
    .w_data(w_data),
    .s_out (s_hid)
  );

  snn_layer #(
    .N_IN(N_HID), .N_OUT(N_OUT), .THETA(THETA_O),
    .TAU_S_SHIFT(TAU_S_SHIFT), .TAU_M_SHIFT(TAU_M_SHIFT)
  ) u_output (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (start),
    .en    (busy),
    .s_in  (s_hid),
    .w_we  (w_we && w_layer),
    .w_post(w_post),
    .w_pre (w_pre),
    .w_data(w_data),
    .s_out (out_spike)
  );

  spike_decoder #(.N(N_OUT), .LMAX(LMAX)) u_dec (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start),
    .spike(out_spike),
    .phase(phase),
    .t    (t),
    .last (last),
    .level(level),
    .valid(valid)
  );

endmodule
