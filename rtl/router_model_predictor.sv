// router_model_predictor: the router model of congestion prediction, one
// spiking predictor per router of a MESH_X x MESH_Y mesh.
//
// Router r sits at column r % MESH_X and row r / MESH_X (row 0 at the bottom).
// Its SNN has one input neuron per input channel the router really has: the
// core port always, north unless in the top row, west unless in column 0,
// south unless in row 0, east unless in the last column. That gives 3 inputs
// at corners, 4 on edges and 5 inside, then N_HID hidden neurons and one output
// neuron, whose first spike time is the router's predicted occupancy level
// (0..ROL_MAX). Inputs are the raw buffer occupancy levels (0..SLOTS) taken in
// the order north, west, south, east, core.
//
// Interface: bol[r][p] is the occupancy of router r's input buffer p.
// wcfg writes a weight of SNN wcfg.sel = r. All SNNs start together on ntf and
// finish together; valid pulses T_I+T_P+T_O = (SLOTS+1)+T_P+(ROL_MAX+1) clock
// edges after the edge that sampled ntf.
// The per-router network and its (3-5) x 15 x 1 size follow the predictor's
// description; router numbering, port order and all timing are choices of
// this design.
module router_model_predictor
  import snn_pkg::*;
#(
  parameter int MESH_X  = 4,
  parameter int MESH_Y  = 4,
  parameter int N_HID   = 15,
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

  // Which of the N_PORTS channels router r has.
  function automatic logic [N_PORTS-1:0] ports_of(input int r);
    int row, col;
    logic [N_PORTS-1:0] h;
    row    = r / MESH_X;
    col    = r % MESH_X;
    h      = '0;
    h[P_N] = (row < MESH_Y - 1);
    h[P_W] = (col > 0);
    h[P_S] = (row > 0);
    h[P_E] = (col < MESH_X - 1);
    h[P_C] = 1'b1;
    return h;
  endfunction

  function automatic int count_ports(input int r);
    int n = 0;
    logic [N_PORTS-1:0] h = ports_of(r);
    for (int p = 0; p < N_PORTS; p++) n += int'(h[p]);
    return n;
  endfunction

  // Port number of the k-th channel router r has.
  function automatic int port_index(input int r, input int k);
    int n = 0;
    logic [N_PORTS-1:0] h = ports_of(r);
    for (int p = 0; p < N_PORTS; p++)
      if (h[p]) begin
        if (n == k) return p;
        n++;
      end
    return 0;
  endfunction

  logic [R-1:0] valid_v, busy_v;

  for (genvar r = 0; r < R; r++) begin : g_router
    localparam int NI = count_ports(r);
    logic [NI-1:0][LVL_W-1:0] value;
    logic [0:0][LVL_W-1:0]    lvl;

    for (genvar k = 0; k < NI; k++) begin : g_in
      assign value[k] = LVL_W'(bol[r][port_index(r, k)]);
    end

    snn_predictor #(
      .N_IN   (NI),
      .N_HID  (N_HID),
      .N_OUT  (1),
      .VMAX   (SLOTS),
      .LMAX   (ROL_MAX),
      .T_P    (T_P),
      .THETA_H(THETA_H),
      .THETA_O(THETA_O)
    ) u_snn (
      .clk      (clk),
      .rst_n    (rst_n),
      .ntf      (ntf),
      .value    (value),
      .w_we     (wcfg.we && wcfg.sel == SEL_W'(r)),
      .w_layer  (wcfg.layer),
      .w_post   (wcfg.post),
      .w_pre    (wcfg.pre),
      .w_data   (wcfg.data),
      .level    (lvl),
      .valid    (valid_v[r]),
      .busy     (busy_v[r]),
      .out_spike(out_spike[r +: 1])
    );

    assign level[r] = lvl[0];
  end

  // All SNNs run in lock step; report the frame as one.
  assign valid = &valid_v;
  assign busy  = |busy_v;

endmodule
