// cal_controller: sequences one I/Q-LOFT calibration.
//
// States: IDLE -> CLEAR (one cycle: chi reset, compensator bypassed)
//   -> TRAIN (a training step is requested whenever the LMS block is ready,
//      i.e. every 8 cycles, until N_TRAIN steps have completed)
//   -> EST (the parameter estimator is started once and awaited)
//   -> COMP (compensator enabled with the new coefficients; `cal_done` high).
// A new `cal_start` from IDLE or COMP runs the sequence again; the
// compensator is bypassed from CLEAR to the end of EST so that the envelope
// detector sees the uncorrected transmitter.  The 12000 training steps of
// 8 cycles (1.2 ms at 80 MHz) follow the published design; the state
// encoding, the bypass during training and the restart rule are this
// implementation's choices.
//
// Interface: `lms_step` requests a step; `steps` counts completed steps.
module cal_controller
  import iqloft_pkg::*;
#(
  parameter int N_TRAIN = 12000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_start,
  input  logic       lms_ready,
  input  logic       lms_done,
  input  logic       est_done,
  output cal_state_e state,
  output logic       lms_clear,
  output logic       lms_step,
  output logic       est_start,
  output logic       comp_en,
  output logic       cal_busy,
  output logic       cal_done,
  output logic [$clog2(N_TRAIN+1)-1:0] steps
);

  localparam int SW = $clog2(N_TRAIN + 1);

  logic [SW-1:0] issued;
  logic          est_started;

  assign lms_clear = (state == CAL_CLEAR);
  assign lms_step  = (state == CAL_TRAIN) && lms_ready && (int'(issued) < N_TRAIN);
  assign est_start = (state == CAL_EST) && !est_started;
  assign comp_en   = (state == CAL_COMP);
  assign cal_done  = (state == CAL_COMP);
  assign cal_busy  = (state == CAL_CLEAR) || (state == CAL_TRAIN) || (state == CAL_EST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CAL_IDLE;
      issued      <= '0;
      steps       <= '0;
      est_started <= 1'b0;
    end else begin
      unique case (state)
        CAL_IDLE, CAL_COMP: if (cal_start) state <= CAL_CLEAR;
        CAL_CLEAR: begin
          issued      <= '0;
          steps       <= '0;
          est_started <= 1'b0;
          state       <= CAL_TRAIN;
        end
        CAL_TRAIN: begin
          if (lms_step) issued <= issued + 1'b1;
          if (lms_done) begin
            steps <= steps + 1'b1;
            if (int'(steps) == N_TRAIN - 1) state <= CAL_EST;
          end
        end
        CAL_EST: begin
          est_started <= 1'b1;
          if (est_done) state <= CAL_COMP;
        end
        default: state <= CAL_IDLE;
      endcase
    end
  end

endmodule
