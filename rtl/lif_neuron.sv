// lif_neuron: digital leaky integrate-and-fire neuron, one time step per clock.
//
// The neuron follows tau_m du/dt = -u + R*I_syn with R = 1, discretised with
// power-of-two time constants:
//   I <- I - I/2^TAU_S_SHIFT + syn_in          (leaky synaptic current)
//   u <- u + (I_new - u)/2^TAU_M_SHIFT         (membrane leaks toward I)
// syn_in is the sum of the weights of the inputs that spiked this step. A
// spike on one input therefore gives the rise-and-decay response that
// SpikeProp-trained networks assume. When u reaches THETA the neuron emits one
// spike and resets u to 0; it then stays silent until the next frame, because
// the predictor reads only each neuron's first firing time. Both state values
// saturate at V_W bits.
//
// Interface: clr (frame start) clears all state and has priority; en advances
// one time step. spike is registered: a crossing computed at one clock edge is
// visible during the following cycle, for exactly one cycle. fired stays high
// from that cycle to the end of the frame.
// The LIF equation follows the predictor's description; the fixed-point
// format, the shift-based leaks, the reset to zero and the fire-once rule are
// choices of this design.
module lif_neuron
  import snn_pkg::*;
#(
  parameter int IN_W        = 13,
  parameter int THETA       = 64,
  parameter int TAU_S_SHIFT = 4,
  parameter int TAU_M_SHIFT = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   en,
  input  logic signed [IN_W-1:0] syn_in,
  output logic                   spike,
  output logic                   fired
);

  localparam logic signed [V_W+1:0] VMAXP = (V_W+2)'((1 << (V_W-1)) - 1);
  localparam logic signed [V_W+1:0] VMINN = -(V_W+2)'(1 << (V_W-1));

  logic signed [V_W-1:0] i_syn, u;
  logic signed [V_W+1:0] i_sum, u_sum;
  logic signed [V_W-1:0] i_next, u_next;
  logic                  thr_cross;

  function automatic logic signed [V_W-1:0] sat(input logic signed [V_W+1:0] x);
    if (x > VMAXP)      return VMAXP[V_W-1:0];
    else if (x < VMINN) return VMINN[V_W-1:0];
    else                return x[V_W-1:0];
  endfunction

  always_comb begin
    i_sum  = (V_W+2)'(i_syn) - (V_W+2)'(i_syn >>> TAU_S_SHIFT) + (V_W+2)'(syn_in);
    i_next = sat(i_sum);
    u_sum  = (V_W+2)'(u) + (((V_W+2)'(i_next) - (V_W+2)'(u)) >>> TAU_M_SHIFT);
    u_next = sat(u_sum);
    thr_cross  = !fired && (u_next >= V_W'(THETA));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_syn <= '0;
      u     <= '0;
      fired <= 1'b0;
      spike <= 1'b0;
    end else if (clr) begin
      i_syn <= '0;
      u     <= '0;
      fired <= 1'b0;
      spike <= 1'b0;
    end else if (en) begin
      i_syn <= i_next;
      u     <= thr_cross ? '0 : u_next;
      fired <= fired | thr_cross;
      spike <= thr_cross;
    end else begin
      spike <= 1'b0;
    end
  end

endmodule
