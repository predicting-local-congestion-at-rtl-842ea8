// snn_frame_ctrl: sequences one prediction frame of a spiking predictor.
//
// A frame is T_I cycles of input spikes, T_P cycles of processing and T_O
// cycles in which output spike times are read, after which the controller is
// idle again. An ntf pulse while idle starts a frame: start is high in that
// same cycle (the occupancy values are sampled at its clock edge) and the
// first T_I cycle follows. ntf during a frame is ignored. phase and t (cycle
// within the phase, from 0) drive the encoder, the neurons and the decoder;
// last marks the final T_O cycle; busy is high from the first T_I cycle to the
// last T_O cycle, so a frame occupies T_I+T_P+T_O cycles.
// The three phases and the NTF strobe follow the predictor's timing diagram;
// the phase lengths and the ignore-while-busy rule are choices of this design.
// The range assertion is disabled during reset, so rst_n feeds both the
// asynchronous reset of the registers and the assertion's disable condition;
// lint tools report that double use, which is intended.
module snn_frame_ctrl
  import snn_pkg::*;
#(
  parameter int T_I = 21,
  parameter int T_P = 3,
  parameter int T_O = 21
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ntf,
  output logic           start,
  output phase_t         phase,
  output logic [T_W-1:0] t,
  output logic           last,
  output logic           busy
);

  assign start = ntf && (phase == PH_IDLE);
  assign last  = (phase == PH_TO) && (t == T_W'(T_O - 1));
  assign busy  = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      t     <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: if (ntf) begin
          phase <= PH_TI;
          t     <= '0;
        end
        PH_TI: if (t == T_W'(T_I - 1)) begin
          phase <= PH_TP;
          t     <= '0;
        end else t <= t + 1'b1;
        PH_TP: if (t == T_W'(T_P - 1)) begin
          phase <= PH_TO;
          t     <= '0;
        end else t <= t + 1'b1;
        PH_TO: if (t == T_W'(T_O - 1)) begin
          phase <= PH_IDLE;
          t     <= '0;
        end else t <= t + 1'b1;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  initial begin
    assert (T_I >= 1 && T_P >= 1 && T_O >= 1 && T_I <= 2**T_W && T_P <= 2**T_W && T_O <= 2**T_W)
      else $error("snn_frame_ctrl: phase lengths must be 1..%0d", 2**T_W);
  end

  // The cycle counter never leaves its phase's range.
  a_t_range: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_TI) |-> (t < T_W'(T_I)));

endmodule
