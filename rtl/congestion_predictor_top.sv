// congestion_predictor_top: fine-grain congestion prediction for a 4x4 mesh
// network-on-chip, with both spiking-network predictors side by side.
//
// The NoC supplies, for every router, the occupancy (0..4 flits) of its five
// input buffers. The router model gives each router its own small spiking
// network on those buffer levels; the network model sums them into one
// occupancy level per router and feeds all sixteen to one larger network.
// Both predict, for every router, an occupancy level 0..20 that a congestion-
// aware routing function can compare between candidate next hops.
//
// Interface: ntf starts a prediction frame in both models (ignored by a model
// that is still busy); bol is sampled at the clock edge where ntf is high.
// wcfg loads trained weights: sel 0..15 addresses router r's SNN, sel 16 the
// network SNN. rm_* and nm_* are the results of the router and network model.
// Timing at the defaults: rm_valid pulses 29 clock edges and nm_valid 46 clock
// edges after the edge that sampled ntf.
// The two models, their sizes and inputs follow the predictor's description;
// the weight port, the frame timing and the shared strobe are choices of this
// design.
module congestion_predictor_top
  import snn_pkg::*;
#(
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4
) (
  input  logic                                             clk,
  input  logic                                             rst_n,
  input  logic                                             ntf,
  input  logic [MESH_X*MESH_Y-1:0][N_PORTS-1:0][BOL_W-1:0] bol,
  input  wcfg_t                                            wcfg,
  output logic [MESH_X*MESH_Y-1:0][LVL_W-1:0]              rm_level,
  output logic                                             rm_valid,
  output logic                                             rm_busy,
  output logic [MESH_X*MESH_Y-1:0]                         rm_out_spike,
  output logic [MESH_X*MESH_Y-1:0][LVL_W-1:0]              nm_level,
  output logic                                             nm_valid,
  output logic                                             nm_busy,
  output logic [MESH_X*MESH_Y-1:0]                         nm_out_spike
);

  router_model_predictor #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_router_model (
    .clk      (clk),
    .rst_n    (rst_n),
    .ntf      (ntf),
    .bol      (bol),
    .wcfg     (wcfg),
    .level    (rm_level),
    .valid    (rm_valid),
    .busy     (rm_busy),
    .out_spike(rm_out_spike)
  );

  network_model_predictor #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_network_model (
    .clk      (clk),
    .rst_n    (rst_n),
    .ntf      (ntf),
    .bol      (bol),
    .wcfg     (wcfg),
    .level    (nm_level),
    .valid    (nm_valid),
    .busy     (nm_busy),
    .out_spike(nm_out_spike)
  );

endmodule
