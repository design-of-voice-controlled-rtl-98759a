// Voice-controlled robot, FPGA fabric part.
// Holds the hardware that sits on the processor bus of the robot platform,
// side by side, each with its processor-side registers brought out as ports
// (the soft-core processor, its bus and the software that recognises the
// words are not part of this RTL):
//   feature_extractor  MFCC co-processor fed from the FFT output FIFO
//   ac97_controller    link to the audio codec (microphone in, headphone out),
//                      running on the codec's BIT_CLK
//   ir_obstacle        obstacle flag from the IR range and proximity sensors
//   encoder_counter x2 distance and speed of each wheel
//   motion_ctrl        seven movements to the L293D inputs, stops at an
//                      obstacle or after a pulse count, drives the buzzer
//   pwm_gen x2         20 ms speed PWM for each motor
// The obstacle flag and the encoder counts go straight to the movement
// control, so the robot stops for an obstacle without the processor, as the
// described platform intends. rst is synchronous to clk; a copy synchronised
// to BIT_CLK resets the codec link. Parameters only shorten the time
// constants for simulation; the defaults are the platform's 66.67 MHz clock,
// 20 ms PWM period and a one-second frequency gate.
module robot_top
  import mfcc_pkg::*;
#(
  parameter int CLK_HZ      = 66_670_000,
  parameter int PWM_US      = 20_000,
  parameter int GATE_CYCLES = 66_670_000
) (
  input  logic                    clk,
  input  logic                    rst,
  // FFT output FIFO -> MFCC co-processor
  input  logic [31:0]             fft_data,
  input  logic                    fft_valid,
  output logic                    fft_rd_en,
  output logic signed [CEP_W-1:0] cep [NCEP],
  output logic                    cep_valid,
  output logic                    mel_hold,
  output logic                    emag_valid,
  output logic [5:0]              emag_index,
  output logic [EMAG_W-1:0]       emag,
  // AC'97 codec pins
  input  logic                    ac97_bit_clk,
  input  logic                    ac97_sdata_in,
  output logic                    ac97_sdata_out,
  output logic                    ac97_sync,
  // AC'97 user registers (BIT_CLK domain)
  input  logic [6:0]              codec_cmd_addr,
  input  logic [15:0]             codec_cmd_data,
  input  logic                    codec_cmd_rw,
  input  logic                    codec_cmd_valid,
  output logic                    codec_cmd_done,
  input  logic [15:0]             play_l,
  input  logic [15:0]             play_r,
  output logic [15:0]             rec_l,
  output logic [15:0]             rec_r,
  output logic                    rec_valid,
  output logic                    codec_ready,
  output logic [15:0]             codec_status,
  output logic                    codec_status_valid,
  // locomotion registers
  input  move_e                   move_cmd,
  input  logic                    move_valid,
  input  logic [15:0]             move_target,
  input  logic [7:0]              speed_l,
  input  logic [7:0]              speed_r,
  output move_e                   move_state,
  output logic                    target_reached,
  output logic [15:0]             pulses_l,
  output logic [15:0]             pulses_r,
  output logic [15:0]             freq_l,
  output logic [15:0]             freq_r,
  // sensors
  input  logic                    enc_l,
  input  logic                    enc_r,
  input  logic [7:0]              range_val [3],
  input  logic [7:0]              prox_val  [3],
  input  logic [7:0]              range_thr,
  input  logic [7:0]              prox_thr,
  input  logic                    sensors_on,
  output logic                    sens_en,
  output logic                    obstacle,
  // actuators
  output logic [3:0]              motor,
  output logic                    pwm_l,
  output logic                    pwm_r,
  output logic                    buzzer
);
  // ---- MFCC co-processor ----
  feature_extractor u_fe (
    .clk(clk), .rst(rst), .datain(fft_data), .valid_in(fft_valid), .rd_en_out(fft_rd_en),
    .cep(cep), .valid_out(cep_valid), .mel_hold(mel_hold),
    .mel_valid(emag_valid), .mel_index(emag_index), .mel_emag(emag)
  );

  // ---- codec link ----
  logic [1:0] ac_rst_sync;
  always_ff @(posedge ac97_bit_clk) ac_rst_sync <= {ac_rst_sync[0], rst};

  ac97_controller u_ac97 (
    .bit_clk(ac97_bit_clk), .rst(ac_rst_sync[1]), .sdata_in(ac97_sdata_in),
    .sdata_out(ac97_sdata_out), .sync(ac97_sync),
    .cmd_addr(codec_cmd_addr), .cmd_data(codec_cmd_data), .cmd_rw(codec_cmd_rw),
    .cmd_valid(codec_cmd_valid), .cmd_done(codec_cmd_done),
    .play_l(play_l), .play_r(play_r), .rec_l(rec_l), .rec_r(rec_r), .rec_valid(rec_valid),
    .codec_ready(codec_ready), .status_data(codec_status), .status_valid(codec_status_valid)
  );

  // ---- sensors and locomotion ----
  logic clr_dist, freq_valid_l, freq_valid_r;

  ir_obstacle #(.NRANGE(3), .NPROX(3), .AW(8)) u_ir (
    .clk(clk), .rst(rst), .en(sensors_on), .range_val(range_val), .prox_val(prox_val),
    .range_thr(range_thr), .prox_thr(prox_thr), .sens_en(sens_en), .obstacle(obstacle)
  );

  encoder_counter #(.GATE_CYCLES(GATE_CYCLES)) u_enc_l (
    .clk(clk), .rst(rst), .enc_in(enc_l), .clr_dist(clr_dist),
    .pulses(pulses_l), .freq(freq_l), .freq_valid(freq_valid_l)
  );
  encoder_counter #(.GATE_CYCLES(GATE_CYCLES)) u_enc_r (
    .clk(clk), .rst(rst), .enc_in(enc_r), .clr_dist(clr_dist),
    .pulses(pulses_r), .freq(freq_r), .freq_valid(freq_valid_r)
  );

  motion_ctrl u_move (
    .clk(clk), .rst(rst), .cmd(move_cmd), .cmd_valid(move_valid), .target(move_target),
    .pulses_l(pulses_l), .pulses_r(pulses_r), .obstacle(obstacle), .motor(motor),
    .clr_dist(clr_dist), .state(move_state), .stopped_obstacle(buzzer),
    .target_reached(target_reached)
  );

  logic ps_l, ps_r;
  pwm_gen #(.CLK_HZ(CLK_HZ), .PERIOD_US(PWM_US)) u_pwm_l (
    .clk(clk), .rst(rst), .duty(speed_l), .pwm(pwm_l), .period_start(ps_l)
  );
  pwm_gen #(.CLK_HZ(CLK_HZ), .PERIOD_US(PWM_US)) u_pwm_r (
    .clk(clk), .rst(rst), .duty(speed_r), .pwm(pwm_r), .period_start(ps_r)
  );
endmodule
