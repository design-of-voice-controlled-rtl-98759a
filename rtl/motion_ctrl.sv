// Movement control for the two-wheel differential drive.
// Seven movements (forward, reverse, left, right, soft left, soft right,
// stop) are turned into the four L293D inputs motor = {L_a, L_b, R_a, R_b};
// a wheel turns forward with {a,b} = 10, backward with 01 and is braked with
// 00. A spot turn runs the wheels in opposite directions, a soft turn stops
// the inner wheel. A command is taken when cmd_valid is high; it clears the
// encoder distance counters (clr_dist) and, if target is non-zero, the move
// ends by itself once either wheel has made target encoder pulses (see
// encoder_counter for the pulse-to-distance and pulse-to-angle factors).
// Independently of the processor, an obstacle reported by the IR sensors
// stops any movement except reverse; this sets stopped_obstacle, which drives
// the buzzer, until the next command. Outputs are registered: the motor
// levels change one cycle after the command or the stopping event.
// The movement set and the obstacle stop follow the description; the wheel
// level encoding, the pulse target and the reverse exception are this
// design's choices.
module motion_ctrl
  import mfcc_pkg::*;
#(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  move_e            cmd,
  input  logic             cmd_valid,
  input  logic [CNT_W-1:0] target,
  input  logic [CNT_W-1:0] pulses_l,
  input  logic [CNT_W-1:0] pulses_r,
  input  logic             obstacle,
  output logic [3:0]       motor,
  output logic             clr_dist,
  output move_e            state,
  output logic             stopped_obstacle,
  output logic             target_reached
);
  localparam logic [1:0] W_FWD = 2'b10, W_BCK = 2'b01, W_OFF = 2'b00;

  logic [CNT_W-1:0] tgt;
  logic             reached, blocked;

  assign reached = (tgt != '0) && ((pulses_l >= tgt) || (pulses_r >= tgt));
  assign blocked = obstacle && (state != MV_STOP) && (state != MV_REVERSE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= MV_STOP; tgt <= '0; clr_dist <= 1'b0;
      stopped_obstacle <= 1'b0; target_reached <= 1'b0;
    end else begin
      clr_dist <= 1'b0;
      if (cmd_valid) begin
        state            <= cmd;
        tgt              <= target;
        clr_dist         <= 1'b1;
        stopped_obstacle <= 1'b0;
        target_reached   <= 1'b0;
      end else if (blocked) begin
        state            <= MV_STOP;
        stopped_obstacle <= 1'b1;
      end else if (reached && !clr_dist && state != MV_STOP) begin
        state          <= MV_STOP;
        target_reached <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (state)
      MV_FORWARD:    motor = {W_FWD, W_FWD};
      MV_REVERSE:    motor = {W_BCK, W_BCK};
      MV_LEFT:       motor = {W_BCK, W_FWD};
      MV_RIGHT:      motor = {W_FWD, W_BCK};
      MV_SOFT_LEFT:  motor = {W_OFF, W_FWD};
      MV_SOFT_RIGHT: motor = {W_FWD, W_OFF};
      default:       motor = {W_OFF, W_OFF};
    endcase
  end
endmodule
