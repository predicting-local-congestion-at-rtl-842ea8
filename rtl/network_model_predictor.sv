// network_model_predictor: the network model of congestion prediction, one
// spiking predictor for the whole MESH_X x MESH_Y mesh.
//
// Each router's five buffer occupancy levels are summed by a rol_accumulator
// into its router occupancy level (ROL, 0..ROL_MAX). The R = MESH_X*MESH_Y
// ROLs drive the R input neurons of a single fully connected R x N_HID x R
// LIF network (16 x 30 x 16 for a 4x4 mesh); output neuron r's first spike
// time gives router r's predicted occupancy level.
//
// Interface and timing: bol[r][p] as in router_model_predictor. Because the
// ROL is registered, ntf is delayed by one cycle here, so the SNN samples the
// ROLs of the BOLs present at the edge that sampled ntf, the same instant the
// router model samples. valid therefore pulses T_I+T_P+T_O+1 =
// (ROL_MAX+1)+T_P+(ROL_MAX+1)+1 clock edges after that edge. wcfg writes a
// weight when wcfg.sel == R.
// The accumulator and the single 16 x 30 x 16 network follow the predictor's
// description; the one-cycle alignment and all timing are choices of this
// design.
module network_model_predictor
  import snn_pkg::*;
#(
  parameter int MESH_X  = 4,
  parameter int MESH_Y  = 4,
  parameter int N_HID   = 30,
  parameter int T_P     = 3,
  parameter int THETA_H = 64,
  parameter int THETA_O = 64
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         ntf,
  input  logic [MESH_X*MESH_Y-1:0][N_PORTS-1:0][BOL_W-1:0] bol,
  input  wcfg_t                                        wcfg,
  output logic [MESH_X*MESH_Y-1:0][LVL_W-1:0]          level,
  output logic                                         valid,
  output logic                                         busy,
  output logic [MESH_X*MESH_Y-1:0]                     out_spike
);

  localparam int R = MESH_X * MESH_Y;

  logic [R-1:0][LVL_W-1:0] rol;
  logic                    ntf_d;

  for (genvar r = 0; r < R; r++) begin : g_acc
    rol_accumulator u_acc (
      .clk  (clk),
      .rst_n(rst_n),
      .bol  (bol[r]),
      .rol  (rol[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ntf_d <= 1'b0;
    else        ntf_d <= ntf;
  end

  snn_predictor #(
    .N_IN   (R),
    .N_HID  (N_HID),
    .N_OUT  (R),
    .VMAX   (ROL_MAX),
    .LMAX   (ROL_MAX),
    .T_P    (T_P),
    .THETA_H(THETA_H),
    .THETA_O(THETA_O)
  ) u_snn (
    .clk      (clk),
    .rst_n    (rst_n),
    .ntf      (ntf_d),
    .value    (rol),
    .w_we     (wcfg.we && wcfg.sel == SEL_W'(R)),
    .w_layer  (wcfg.layer),
    .w_post   (wcfg.post),
    .w_pre    (wcfg.pre),
    .w_data   (wcfg.data),
    .level    (level),
    .valid    (valid),
    .busy     (busy),
    .out_spike(out_spike)
  );

endmodule
