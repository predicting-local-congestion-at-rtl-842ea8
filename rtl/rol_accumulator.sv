// rol_accumulator: router occupancy level from the input buffer levels.
//
// Adds the occupancy levels of a router's N_PORTS input buffers (north, west,
// south, east, core) into one router occupancy level, e.g. 3+2+2+3+1 = 11.
// The sum is registered: rol shows the sum of the bol values present at the
// previous clock edge. Absent ports (mesh border) are expected to read 0.
// The sum follows the predictor's description; the output register is a
// choice of this design.
module rol_accumulator
  import snn_pkg::*;
#(
  parameter int N_PORTS_P = N_PORTS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_PORTS_P-1:0][BOL_W-1:0] bol,
  output logic [LVL_W-1:0]              rol
);

  logic [LVL_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int p = 0; p < N_PORTS_P; p++)
      sum = sum + LVL_W'(bol[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rol <= '0;
    else        rol <= sum;
  end

endmodule
