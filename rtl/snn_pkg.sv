// snn_pkg: types and constants shared by the spiking-neural-network congestion
// predictors of a 2-D mesh network-on-chip.
//
// Each router input channel has a 4-slot buffer, so a buffer occupancy level
// (BOL) is 0..4 and the router occupancy level (ROL), the sum over the five
// channels (north, west, south, east, core), is 0..20. Predicted levels use the
// same 0..20 scale. Weights are signed 8-bit values loaded at run time through
// a single write port (wcfg_t); the widths and the weight format are choices of
// this design, the slot count and port set follow the predictor's description.
package snn_pkg;

  // Input buffer slots per channel and channels per router.
  localparam int SLOTS   = 4;
  localparam int N_PORTS = 5;
  // Channel order inside a router's BOL vector.
  localparam int P_N = 0;
  localparam int P_W = 1;
  localparam int P_S = 2;
  localparam int P_E = 3;
  localparam int P_C = 4;

  localparam int BOL_W = 3;                    // 0..SLOTS
  localparam int LVL_W = 5;                    // 0..N_PORTS*SLOTS
  localparam int ROL_MAX = N_PORTS * SLOTS;    // 20
  localparam int W_W   = 8;                    // synaptic weight width
  localparam int V_W   = 16;                   // current / membrane width
  localparam int T_W   = 6;                    // cycle-in-phase counter width
  localparam int IDX_W = 6;                    // neuron index width on the weight port
  localparam int SEL_W = 8;                    // SNN select width on the weight port

  typedef logic [BOL_W-1:0] bol_t;
  typedef logic [LVL_W-1:0] lvl_t;
  typedef logic signed [W_W-1:0] weight_t;

  // Phases of one prediction frame: input spikes (T_i), processing (T_p),
  // output spikes (T_o).
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_TI   = 2'd1,
    PH_TP   = 2'd2,
    PH_TO   = 2'd3
  } phase_t;

  // Weight write command. sel picks the SNN (0..R-1 router-model SNNs,
  // R = the network-model SNN), layer 0 = input->hidden, 1 = hidden->output,
  // post/pre index the postsynaptic and presynaptic neuron.
  typedef struct packed {
    logic             we;
    logic [SEL_W-1:0] sel;
    logic             layer;
    logic [IDX_W-1:0] post;
    logic [IDX_W-1:0] pre;
    weight_t          data;
  } wcfg_t;

endpackage
